// axlam_pkg: shared types and constants of the AxLaM accelerator.
//
// Number format. Operands are 8-bit approximate fixed-POSIT (AFPOS) words
// {sign, exp[3:0], man[2:0]}. The POSIT regime term is fixed to the constant
// 2^BETA with BETA = -7, so it is not stored (POSIT N = 10, es = 4, 8 bits
// kept). The value of a word is
//     (-1)^sign * 2^BETA * 2^exp * (1 + man/8)
// The field widths and BETA follow the source design; the bit order and the
// use of exp = 0, man = 0 as the code for zero are choices of this RTL.
//
// Products and sums are exact signed fixed-point integers whose least
// significant bit weighs 2^(2*BETA - 2*MAN_W) = 2^-20.
package axlam_pkg;

  localparam int unsigned EXP_W   = 4;
  localparam int unsigned MAN_W   = 3;
  localparam int unsigned AF_W    = 1 + EXP_W + MAN_W;         // 8 stored bits
  localparam int          BETA    = -7;
  // Largest magnitude of one product: (2^(MAN_W+1)-1)^2 << 2*(2^EXP_W-1)
  localparam int unsigned PROD_W  = 2*(MAN_W+1) + 2*((1<<EXP_W)-1) + 1;  // 39, signed

  typedef logic [AF_W-1:0] afpos_t;

  // Matrix-multiply command accepted by the controller.
  //   For j in 0..n_r-1 (R column groups), i in 0..n_l-1 (L row groups):
  //     tile(i,j) = sum over k < k_words of  L[l_base + i*k_words + k] . R[r_base + j*k_words + k]
  //     written to A.SRAM entry acc_base + j*n_l + i, added to the entry's
  //     old value when accumulate is set.
  typedef struct packed {
    logic [8:0]  l_base;     // word address in every L buffer
    logic [8:0]  r_base;     // word address in every R buffer
    logic [9:0]  k_words;    // inner dimension / 16, 1..512
    logic [6:0]  n_l;        // L row groups (of 8 rows), 1..64
    logic [6:0]  n_r;        // R column groups (of 8 columns), 1..64
    logic [5:0]  acc_base;   // first A.SRAM entry
    logic        accumulate; // continue partial sums already in A.SRAM
  } mm_cmd_t;

endpackage
