// tb_afpos_ref_pkg: reference arithmetic for the testbenches.
//
// Evaluates AFPOS words through the value formula
//   (-1)^s * 2^(exp - 7) * (1 + man/8)   (exp = 0, man = 0 is zero)
// in double precision and scales products to the fixed-point grid of the
// design (LSB = 2^-20). All values involved are exact in a double, so the
// results must match the hardware bit for bit. Also holds random operand
// generators.
package tb_afpos_ref_pkg;

  function automatic real afpos_value(input logic [7:0] w);
    int e, m;
    real v;
    e = int'(w[6:3]);
    m = int'(w[2:0]);
    if (e == 0 && m == 0) return 0.0;
    v = (1.0 + m / 8.0) * (2.0 ** (e - 7));
    return w[7] ? -v : v;
  endfunction

  // product on the 2^-20 grid
  function automatic longint ref_mul(input logic [7:0] a, input logic [7:0] b);
    real p;
    p = afpos_value(a) * afpos_value(b) * (2.0 ** 20);
    return longint'(p);
  endfunction

  // random operand; small exponents keep large sums realistic but all codes occur
  function automatic logic [7:0] rand_afpos();
    return 8'($urandom);
  endfunction

endpackage
