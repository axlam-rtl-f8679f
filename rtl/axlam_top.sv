// axlam_top: the AxLaM matrix-multiply accelerator for the HBM3 logic die.
//
// One unified PE (ROWS x COLS = 8 x 8 vector MACs, 16 wide, 1024 AFPOS
// multiplications per cycle) is fed by ROWS L buffers and COLS R buffers of
// BUF_BYTES = 8 KB each. The sixteen buffers are filled through sixteen
// channel ports, one per HBM3 channel: channels 0..ROWS-1 write L buffers
// 0..ROWS-1 (one row of L each), channels ROWS..ROWS+COLS-1 write the R
// buffers (one column of R each). Word w of a buffer holds elements
// 16w..16w+15 of that row or column. The HBM memory controllers sit outside
// and drive these ports; the ports accept a write every cycle, also while a
// command runs.
//
// A command (mm_cmd_t) makes the controller stream the buffers through the
// PE; finished 8 x 8 tiles of signed fixed-point sums (LSB = 2^-20) land in
// the accumulation buffer (A.SRAM), where a later command can keep adding to
// them. While no command runs, the tiles are read out through the res_rd_*
// port (one tile per cycle, data one cycle after the request).
//
// Timing: cmd is accepted when cmd_valid and cmd_ready are high. A command of
// T = n_l * n_r tiles of k_words words keeps busy high for T*k_words + 3
// cycles (one vector word per cycle, then the pipeline drains) and ends with
// a one-cycle done pulse. res_rd_ready is low while busy.
//
// Organisation (one PE of 8 x 8 x 16 multipliers, 8 KB per row and column
// buffer, one HBM channel per buffer) follows the source design; port
// protocols, the command format and the A.SRAM size are this RTL's choices.
module axlam_top
  import axlam_pkg::*;
#(
  parameter int unsigned ROWS        = 8,
  parameter int unsigned COLS        = 8,
  parameter int unsigned VEC         = 16,
  parameter int unsigned BUF_BYTES   = 8192,
  parameter int unsigned ACC_ENTRIES = 64,
  parameter int unsigned ACC_W       = 56,
  parameter int unsigned NCH         = ROWS + COLS,
  parameter int unsigned BUF_DEPTH   = BUF_BYTES / VEC,
  parameter int unsigned BUF_AW      = $clog2(BUF_DEPTH),
  parameter int unsigned ACC_AW      = $clog2(ACC_ENTRIES)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // HBM channel fill ports
  input  logic [NCH-1:0]                         ch_wr_en,
  input  logic [NCH-1:0][BUF_AW-1:0]             ch_wr_addr,
  input  afpos_t [NCH-1:0][VEC-1:0]              ch_wr_data,
  // commands
  input  logic                                   cmd_valid,
  output logic                                   cmd_ready,
  input  mm_cmd_t                                cmd,
  output logic                                   busy,
  output logic                                   done,
  // result read-out from the A.SRAM
  input  logic                                   res_rd_en,
  output logic                                   res_rd_ready,
  input  logic [ACC_AW-1:0]                      res_rd_addr,
  output logic                                   res_rd_valid,
  output logic [ROWS-1:0][COLS-1:0][ACC_W-1:0]   res_rd_data
);

  logic                 buf_rd_en;
  logic [BUF_AW-1:0]    l_addr, r_addr;
  logic                 pe_valid, pe_first, pe_last, pe_init_use;
  logic [ACC_AW-1:0]    pe_addr;
  logic                 acc_rd_en;
  logic [ACC_AW-1:0]    acc_rd_addr;

  afpos_t [ROWS-1:0][VEC-1:0] l_data;
  afpos_t [COLS-1:0][VEC-1:0] r_data;

  logic                                  wb_valid;
  logic [ACC_AW-1:0]                     wb_addr;
  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0]  wb_sum;
  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0]  asram_rdata;

  logic                 asram_rd_en;
  logic [ACC_AW-1:0]    asram_rd_addr;
  logic                 res_grant;

  pe_controller #(
    .BUF_DEPTH  (BUF_DEPTH),
    .ACC_ENTRIES(ACC_ENTRIES)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd_valid  (cmd_valid),
    .cmd_ready  (cmd_ready),
    .cmd        (cmd),
    .busy       (busy),
    .done       (done),
    .buf_rd_en  (buf_rd_en),
    .l_addr     (l_addr),
    .r_addr     (r_addr),
    .pe_valid   (pe_valid),
    .pe_first   (pe_first),
    .pe_last    (pe_last),
    .pe_init_use(pe_init_use),
    .pe_addr    (pe_addr),
    .acc_rd_en  (acc_rd_en),
    .acc_rd_addr(acc_rd_addr)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_lbuf
    operand_buffer #(.BYTES(BUF_BYTES), .WORD_BYTES(VEC)) u_lbuf (
      .clk    (clk),
      .wr_en  (ch_wr_en[r]),
      .wr_addr(ch_wr_addr[r]),
      .wr_data(ch_wr_data[r]),
      .rd_en  (buf_rd_en),
      .rd_addr(l_addr),
      .rd_data(l_data[r])
    );
  end

  for (genvar c = 0; c < COLS; c++) begin : g_rbuf
    operand_buffer #(.BYTES(BUF_BYTES), .WORD_BYTES(VEC)) u_rbuf (
      .clk    (clk),
      .wr_en  (ch_wr_en[ROWS+c]),
      .wr_addr(ch_wr_addr[ROWS+c]),
      .wr_data(ch_wr_data[ROWS+c]),
      .rd_en  (buf_rd_en),
      .rd_addr(r_addr),
      .rd_data(r_data[c])
    );
  end

  unified_pe #(
    .ROWS (ROWS),
    .COLS (COLS),
    .VEC  (VEC),
    .ACC_W(ACC_W),
    .AW   (ACC_AW)
  ) u_pe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pe_valid),
    .in_first (pe_first),
    .in_last  (pe_last),
    .init_use (pe_init_use),
    .in_addr  (pe_addr),
    .l_data   (l_data),
    .r_data   (r_data),
    .init_sum (asram_rdata),
    .out_valid(wb_valid),
    .out_addr (wb_addr),
    .out_sum  (wb_sum)
  );

  // A.SRAM read port: the controller has it while busy, the read-out otherwise
  assign res_rd_ready  = !busy;
  assign res_grant     = res_rd_en && !busy;
  assign asram_rd_en   = acc_rd_en || res_grant;
  assign asram_rd_addr = acc_rd_en ? acc_rd_addr : res_rd_addr;

  acc_sram #(
    .ROWS   (ROWS),
    .COLS   (COLS),
    .ACC_W  (ACC_W),
    .ENTRIES(ACC_ENTRIES)
  ) u_asram (
    .clk    (clk),
    .wr_en  (wb_valid),
    .wr_addr(wb_addr),
    .wr_data(wb_sum),
    .rd_en  (asram_rd_en),
    .rd_addr(asram_rd_addr),
    .rd_data(asram_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_rd_valid <= 1'b0;
    else        res_rd_valid <= res_grant;
  end
  assign res_rd_data = asram_rdata;

endmodule
