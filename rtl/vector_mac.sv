// vector_mac: 16-wide AFPOS vector multiply-accumulate unit.
//
// Computes the dot product of two VEC-element AFPOS vectors each cycle: VEC
// afpos_mult multipliers feed a balanced binary adder tree of log2(VEC)
// levels (a "parallel adder tree", as in the source design, which reports
// the 16-wide unit fitting one 500 MHz cycle). All arithmetic is exact
// fixed-point: products are PROD_W bits, the sum grows by log2(VEC) bits.
//
// Timing: the tree is combinational; its result is registered once, so dot
// and out_valid appear one cycle after a and b with in_valid. One vector per
// cycle, no stalls. The single output register is this RTL's choice.
// VEC must be a power of two.
module vector_mac
  import axlam_pkg::*;
#(
  parameter int unsigned VEC   = 16,
  parameter int unsigned SUM_W = PROD_W + $clog2(VEC)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  afpos_t [VEC-1:0]         a,
  input  afpos_t [VEC-1:0]         b,
  output logic                     out_valid,
  output logic signed [SUM_W-1:0]  dot
);

  localparam int unsigned LEVELS = $clog2(VEC);

  logic signed [PROD_W-1:0] prod [VEC];
  // tree[l][n]: node n of level l; level 0 holds the products
  logic signed [SUM_W-1:0]  tree [LEVELS+1][VEC];

  for (genvar g = 0; g < VEC; g++) begin : g_mul
    afpos_mult u_mul (.a(a[g]), .b(b[g]), .p(prod[g]));
  end

  always_comb begin
    for (int n = 0; n < VEC; n++) tree[0][n] = SUM_W'(prod[n]);
    for (int l = 1; l <= LEVELS; l++) begin
      for (int n = 0; n < VEC; n++) begin
        if (n < (VEC >> l)) tree[l][n] = tree[l-1][2*n] + tree[l-1][2*n+1];
        else                tree[l][n] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dot       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) dot <= tree[LEVELS][0];
    end
  end

endmodule
