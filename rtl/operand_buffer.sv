// operand_buffer: one local L-row or R-column buffer of the unified PE.
//
// A simple dual-port synchronous SRAM of BYTES bytes organised as words of
// WORD_BYTES AFPOS elements, the width one vector MAC consumes per cycle.
// The write port is filled by one HBM channel; the read port is driven by the
// controller and delivers rd_data one cycle after rd_en (the data is held
// until the next read). Writing and reading the same address in one cycle
// returns the old word. The source design gives 8 KB per row and per
// column buffer; the two-port organisation and the word width are this RTL's
// choices.
module operand_buffer
  import axlam_pkg::*;
#(
  parameter int unsigned BYTES      = 8192,
  parameter int unsigned WORD_BYTES = 16,
  parameter int unsigned DEPTH      = BYTES / WORD_BYTES,
  parameter int unsigned AW         = $clog2(DEPTH)
) (
  input  logic                        clk,
  input  logic                        wr_en,
  input  logic [AW-1:0]               wr_addr,
  input  afpos_t [WORD_BYTES-1:0]     wr_data,
  input  logic                        rd_en,
  input  logic [AW-1:0]               rd_addr,
  output afpos_t [WORD_BYTES-1:0]     rd_data
);

  afpos_t [WORD_BYTES-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
