// afpos_mult: one approximate fixed-POSIT (AFPOS) multiplier.
//
// Multiplies two 8-bit AFPOS words {sign, exp[3:0], man[2:0]} and returns the
// exact product as a signed fixed-point integer (LSB = 2^-20, see axlam_pkg).
// Because the regime term of both operands is the same constant 2^BETA, the
// multiplier needs no regime decoding: the sign is an XOR, the two exponents
// are added, the two 4-bit significands (hidden one included) are multiplied
// into 8 bits, and the 8-bit product is shifted left by the exponent sum.
// The shift turns the floating result straight into the fixed-point form the
// adder tree of the vector MAC sums, so no normalisation or rounding is
// needed anywhere. An operand with exp = 0 and man = 0 is zero (this RTL's
// choice; the source gives only the value formula).
//
// Purely combinational. In the source design the whole 16-wide vector MAC
// built from these fits in one 500 MHz cycle.
module afpos_mult
  import axlam_pkg::*;
(
  input  afpos_t                    a,
  input  afpos_t                    b,
  output logic signed [PROD_W-1:0]  p
);

  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb;
  logic [MAN_W:0]    ma, mb;        // significands with hidden one
  logic              za, zb;
  logic [EXP_W:0]    esum;
  logic [2*MAN_W+1:0] msig;
  logic [PROD_W-2:0] mag;

  always_comb begin
    sa   = a[AF_W-1];
    sb   = b[AF_W-1];
    ea   = a[AF_W-2 -: EXP_W];
    eb   = b[AF_W-2 -: EXP_W];
    ma   = {1'b1, a[MAN_W-1:0]};
    mb   = {1'b1, b[MAN_W-1:0]};
    za   = (a[AF_W-2:0] == '0);
    zb   = (b[AF_W-2:0] == '0);
    esum = {1'b0, ea} + {1'b0, eb};
    msig = ma * mb;
    mag  = (PROD_W-1)'(msig) << esum;
    if (za || zb)
      p = '0;
    else if (sa ^ sb)
      p = -$signed({1'b0, mag});
    else
      p = $signed({1'b0, mag});
  end

endmodule
