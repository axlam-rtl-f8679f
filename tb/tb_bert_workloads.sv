// tb_bert_workloads: BERT-large encoder matrix shapes on the full-size
// accelerator.
//
// For each distinct inner dimension of the encoder's matrix products, one
// buffer-load of work is run: the operand buffers are filled through the
// sixteen channels with random AFPOS data, one command computes every tile
// the buffers and the A.SRAM can hold, and all tiles are read out and
// compared with sums of exact products.
//   Q/K/V, multi-head, bottleneck expand: K = 1024 (64 words); 64 rows of L
//     against 64 columns of R (8 x 8 tiles), which for Q/K/V is all of R.
//   attention scores: K = 64 (4 words), 8 x 8 tiles.
//   bottleneck contract: K = 4096 (256 words), 2 x 2 tiles, the buffers full.
// Busy time must be tiles * k_words + 3 cycles, i.e. all 1024 multipliers
// used in every compute cycle; the utilisation is printed.
module tb_bert_workloads;
  import axlam_pkg::*;
  import tb_afpos_ref_pkg::*;

  localparam int ROWS = 8, COLS = 8, VEC = 16, NCH = 16, DEPTH = 512, BUF_AW = 9;
  localparam int ACC_W = 56, ACC_AW = 6;

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] ch_wr_en;
  logic [NCH-1:0][BUF_AW-1:0] ch_wr_addr;
  afpos_t [NCH-1:0][VEC-1:0] ch_wr_data;
  logic cmd_valid, cmd_ready, busy, done;
  mm_cmd_t cmd;
  logic res_rd_en, res_rd_ready, res_rd_valid;
  logic [ACC_AW-1:0] res_rd_addr;
  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] res_rd_data;

  axlam_top dut (.*);

  afpos_t [VEC-1:0] bufm [NCH][DEPTH];
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run_shape(string name, int kw, int nl, int nr);
    int t0, dt, tiles, nwords;
    tiles = nl * nr;
    nwords = ((nl > nr) ? nl : nr) * kw;
    // fill: L buffers get nl*kw words, R buffers nr*kw words
    for (int w = 0; w < nwords; w++) begin
      for (int ch = 0; ch < NCH; ch++) begin
        afpos_t [VEC-1:0] d;
        for (int e = 0; e < VEC; e++) d[e] = rand_afpos();
        ch_wr_en[ch]   = (ch < ROWS) ? (w < nl * kw) : (w < nr * kw);
        ch_wr_addr[ch] = BUF_AW'(w);
        ch_wr_data[ch] = d;
        if (ch_wr_en[ch]) bufm[ch][w] = d;
      end
      @(negedge clk);
    end
    ch_wr_en = '0;
    cmd = '{l_base: 9'd0, r_base: 9'd0, k_words: 10'(kw), n_l: 7'(nl), n_r: 7'(nr),
            acc_base: 6'd0, accumulate: 1'b0};
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    t0 = cycle;
    while (!done) @(negedge clk);
    dt = cycle - t0;
    expect_eq({name, " busy cycles"}, longint'(dt), longint'(tiles * kw + 3));
    $display("%s: K=%0d, %0d tiles, %0d cycles, %0d multiplications, utilisation %0d%%",
             name, kw * VEC, tiles, dt, tiles * kw * 1024, (100 * tiles * kw) / dt);
    for (int j = 0; j < nr; j++)
      for (int i = 0; i < nl; i++) begin
        res_rd_en = 1;
        res_rd_addr = ACC_AW'(j * nl + i);
        @(negedge clk);
        res_rd_en = 0;
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            longint s = 0;
            for (int k = 0; k < kw; k++)
              for (int e = 0; e < VEC; e++)
                s += ref_mul(bufm[r][i * kw + k][e], bufm[ROWS + c][j * kw + k][e]);
            expect_eq($sformatf("%s tile (%0d,%0d) elem (%0d,%0d)", name, i, j, r, c),
                      longint'($signed(res_rd_data[r][c])), s);
          end
      end
  endtask

  initial begin
    ch_wr_en = '0; ch_wr_addr = '0; ch_wr_data = '0;
    cmd_valid = 0; cmd = '0; res_rd_en = 0; res_rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_shape("Q/K/V, multi-head, bottleneck expand (K=1024)", 64, 8, 8);
    run_shape("attention scores (K=64)", 4, 8, 8);
    run_shape("bottleneck contract (K=4096)", 256, 2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
