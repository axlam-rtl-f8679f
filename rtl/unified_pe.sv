// unified_pe: the single unified processing element of AxLaM.
//
// A ROWS x COLS grid of VEC-wide vector MACs computes one ROWS x COLS tile of
// the product L x R. Every cycle one VEC-element word is read from each of the
// ROWS L buffers (one row of L each) and from each of the COLS R buffers (one
// column of R each). The L word of row r is broadcast to the COLS vector MACs
// of that row and the R word of column c to the ROWS vector MACs of that
// column, so each operand read feeds eight dot products: this is the
// three-dimensional reuse of the source design (eight rows, eight columns,
// sixteen-wide reduction; 1024 multiplications per cycle, 1.024 TOPS at
// 500 MHz).
//
// The dot products of consecutive words of a tile are summed in one ACC_W-bit
// accumulator register per output element. On the first word of a tile the
// accumulator starts from zero, or from init_sum (a partial sum read back
// from the A.SRAM) when init_use was set with that word. After the last word
// the finished tile is presented on out_sum with out_valid and out_addr for
// one cycle, to be written to the A.SRAM. Holding the running sum in
// registers and writing the A.SRAM once per tile is this RTL's choice.
//
// Timing: in_* are sampled with l_data/r_data. init_sum must be valid one
// cycle after the in_valid & in_first cycle. out_valid rises two cycles after
// the in_valid & in_last cycle. Tiles may follow each other back to back.
module unified_pe
  import axlam_pkg::*;
#(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned COLS  = 8,
  parameter int unsigned VEC   = 16,
  parameter int unsigned ACC_W = 56,
  parameter int unsigned AW    = 6
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic                                      in_valid,
  input  logic                                      in_first,
  input  logic                                      in_last,
  input  logic                                      init_use,
  input  logic [AW-1:0]                             in_addr,
  input  afpos_t [ROWS-1:0][VEC-1:0]                l_data,
  input  afpos_t [COLS-1:0][VEC-1:0]                r_data,
  input  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0]      init_sum,
  output logic                                      out_valid,
  output logic [AW-1:0]                             out_addr,
  output logic [ROWS-1:0][COLS-1:0][ACC_W-1:0]      out_sum
);

  localparam int unsigned SUM_W = PROD_W + $clog2(VEC);

  logic                    mac_valid [ROWS][COLS];
  logic signed [SUM_W-1:0] dot       [ROWS][COLS];

  // control delayed to line up with the vector MAC outputs
  logic          d_valid, d_first, d_last, d_init;
  logic [AW-1:0] d_addr;
  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] acc_base;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      vector_mac #(.VEC(VEC)) u_vmac (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (in_valid),
        .a        (l_data[r]),
        .b        (r_data[c]),
        .out_valid(mac_valid[r][c]),
        .dot      (dot[r][c])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_first <= 1'b0;
      d_last  <= 1'b0;
      d_init  <= 1'b0;
      d_addr  <= '0;
    end else begin
      // the vector MACs all see the same valid; a mismatch is a wiring fault
      assert (mac_valid[ROWS-1][COLS-1] == d_valid)
        else $error("unified_pe: vector MAC valid out of step");
      d_valid <= in_valid;
      if (in_valid) begin
        d_first <= in_first;
        d_last  <= in_last;
        d_init  <= init_use;
        d_addr  <= in_addr;
      end
    end
  end

  // what the dot product is added to: the running sum, a partial sum
  // continued from the A.SRAM, or zero at the start of a fresh tile
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (!d_first)    acc_base[r][c] = out_sum[r][c];
        else if (d_init) acc_base[r][c] = init_sum[r][c];
        else             acc_base[r][c] = '0;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_sum   <= '0;
    end else begin
      out_valid <= d_valid && d_last;
      if (d_valid) begin
        out_addr <= d_addr;
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            out_sum[r][c] <= acc_base[r][c] + ACC_W'(dot[r][c]);
      end
    end
  end

  // The vector MACs all see the same valid; any disagreement is a wiring fault.

endmodule
