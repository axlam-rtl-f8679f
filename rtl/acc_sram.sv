// acc_sram: the accumulation buffer (A.SRAM) of the unified PE.
//
// Each of the ENTRIES entries holds one ROWS x COLS tile of signed ACC_W-bit
// partial sums. The PE writes a finished tile through the write port; the
// read port (read latency one cycle, data held until the next read) serves
// either the controller, when a command continues partial sums of an earlier
// command, or the result read-out toward memory. A write and a read of the
// same entry in one cycle return the old tile. Capacity, width and port
// organisation are this RTL's choices; the source design only says the
// A.SRAM caches partial sums.
module acc_sram #(
  parameter int unsigned ROWS    = 8,
  parameter int unsigned COLS    = 8,
  parameter int unsigned ACC_W   = 56,
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned AW      = $clog2(ENTRIES)
) (
  input  logic                                      clk,
  input  logic                                      wr_en,
  input  logic [AW-1:0]                             wr_addr,
  input  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0]      wr_data,
  input  logic                                      rd_en,
  input  logic [AW-1:0]                             rd_addr,
  output logic [ROWS-1:0][COLS-1:0][ACC_W-1:0]      rd_data
);

  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
