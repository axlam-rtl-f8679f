// tb_axlam_top: end-to-end test of the accelerator at its full size.
//
// The sixteen operand buffers are filled through the sixteen channel ports
// with random AFPOS words; a model of the buffers is kept alongside. Commands
// then run: a multi-tile product with R refreshes, an inner dimension split
// over two commands (the second continues the partial sums in the A.SRAM), a
// BERT-sized K = 1024 tile group, and a one-word command. While commands run,
// other buffer regions are refilled, read-out requests are refused and a
// waiting command is held off. Every tile read out is compared with sums of
// exact products computed from the buffer model; busy must last exactly
// T*k_words + 3 cycles per command (one 1024-multiplication step per cycle).
// Each of those mechanisms is counted and must occur at least once.
module tb_axlam_top;
  import axlam_pkg::*;
  import tb_afpos_ref_pkg::*;

  localparam int ROWS = 8, COLS = 8, VEC = 16, NCH = 16, DEPTH = 512, BUF_AW = 9;
  localparam int ACC_W = 56, ENTRIES = 64, ACC_AW = 6;

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

  typedef logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] tile_t;
  afpos_t [VEC-1:0] bufm [NCH][DEPTH];   // buffer model
  tile_t  asram_m [ENTRIES];             // A.SRAM model
  bit     written [ENTRIES];

  int checks = 0, failures = 0, cycle = 0;
  int n_cmd = 0, n_fresh = 0, n_cont = 0, n_refresh = 0;
  int n_fill_busy = 0, n_res_refused = 0, n_cmd_wait = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
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

  // write nwords words from base into every buffer, one word per channel per cycle
  task automatic fill(int base, int nwords);
    for (int w = 0; w < nwords; w++) begin
      for (int ch = 0; ch < NCH; ch++) begin
        afpos_t [VEC-1:0] d;
        for (int e = 0; e < VEC; e++) d[e] = rand_afpos();
        bufm[ch][(base + w) % DEPTH] = d;
        ch_wr_en[ch]   = 1'b1;
        ch_wr_addr[ch] = BUF_AW'(base + w);
        ch_wr_data[ch] = d;
      end
      if (busy) n_fill_busy++;
      @(negedge clk);
    end
    ch_wr_en = '0;
  endtask

  // reference result of a command, folded into the A.SRAM model
  task automatic model_cmd(mm_cmd_t c);
    for (int j = 0; j < int'(c.n_r); j++)
      for (int i = 0; i < int'(c.n_l); i++) begin
        int a;
        tile_t t;
        a = int'(c.acc_base) + j * int'(c.n_l) + i;
        for (int r = 0; r < ROWS; r++)
          for (int col = 0; col < COLS; col++) begin
            longint s;
            s = c.accumulate ? longint'($signed(asram_m[a][r][col])) : 0;
            for (int k = 0; k < int'(c.k_words); k++) begin
              int la, ra;
              la = (int'(c.l_base) + i * int'(c.k_words) + k) % DEPTH;
              ra = (int'(c.r_base) + j * int'(c.k_words) + k) % DEPTH;
              for (int e = 0; e < VEC; e++)
                s += ref_mul(bufm[r][la][e], bufm[ROWS + col][ra][e]);
            end
            t[r][col] = ACC_W'(s);
          end
        asram_m[a] = t;
        written[a] = 1;
        if (c.accumulate) n_cont++; else n_fresh++;
        if (j > 0 && i == 0) n_refresh++;
      end
  endtask

  // issue a command, wait for done, check busy time; optionally fill while running
  task automatic run_cmd(mm_cmd_t c, int fill_base, int fill_words);
    int t0, tiles, dt;
    tiles = int'(c.n_l) * int'(c.n_r);
    // waits while a previous command is still busy
    cmd = c;
    cmd_valid = 1;
    while (!cmd_ready) begin
      n_cmd_wait++;
      @(negedge clk);
    end
    model_cmd(c);
    @(negedge clk);
    cmd_valid = 0;
    t0 = cycle;
    n_cmd++;
    fork
      if (fill_words > 0) fill(fill_base, fill_words);
      begin
        // the read-out must be refused while the command runs
        res_rd_en = 1;
        res_rd_addr = '0;
        @(negedge clk);
        expect_eq("res ready while busy", longint'(res_rd_ready), 0);
        if (!res_rd_ready) n_res_refused++;
        res_rd_en = 0;
        @(negedge clk);
        expect_eq("res valid while busy", longint'(res_rd_valid), 0);
        while (!done) @(negedge clk);
        dt = cycle - t0;
        expect_eq("busy cycles", longint'(dt), longint'(tiles * int'(c.k_words) + 3));
      end
    join
  endtask

  task automatic read_check(int a);
    while (!res_rd_ready) @(negedge clk);
    res_rd_en = 1;
    res_rd_addr = ACC_AW'(a);
    @(negedge clk);
    res_rd_en = 0;
    expect_eq("res_rd_valid", longint'(res_rd_valid), 1);
    for (int r = 0; r < ROWS; r++)
      for (int col = 0; col < COLS; col++)
        expect_eq($sformatf("entry %0d (%0d,%0d)", a, r, col),
                  longint'($signed(res_rd_data[r][col])), longint'($signed(asram_m[a][r][col])));
  endtask

  initial begin
    mm_cmd_t c;
    ch_wr_en = '0; ch_wr_addr = '0; ch_wr_data = '0;
    cmd_valid = 0; cmd = '0; res_rd_en = 0; res_rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fill(0, 128);
    // A: K = 128 (8 words), 4 L groups x 2 R groups, entries 0..7
    c = '{l_base: 9'd0, r_base: 9'd64, k_words: 10'd8, n_l: 7'd4, n_r: 7'd2,
          acc_base: 6'd0, accumulate: 1'b0};
    run_cmd(c, 256, 64);                 // refill 256..319 while it runs
    // B: K = 256 split in two commands of 8 words; B2 continues B1's sums
    c = '{l_base: 9'd256, r_base: 9'd256, k_words: 10'd8, n_l: 7'd2, n_r: 7'd1,
          acc_base: 6'd16, accumulate: 1'b0};
    run_cmd(c, 0, 0);
    c = '{l_base: 9'd272, r_base: 9'd264, k_words: 10'd8, n_l: 7'd2, n_r: 7'd1,
          acc_base: 6'd16, accumulate: 1'b1};
    run_cmd(c, 0, 0);
    for (int a = 0; a < 8; a++) read_check(a);
    read_check(16);
    read_check(17);
    // C: BERT-sized inner dimension K = 1024: one L group x 2 R groups
    fill(320, 192);
    c = '{l_base: 9'd320, r_base: 9'd384, k_words: 10'd64, n_l: 7'd1, n_r: 7'd2,
          acc_base: 6'd32, accumulate: 1'b0};
    run_cmd(c, 0, 0);
    // D: single-word tile, then continued by a command that has to wait
    c = '{l_base: 9'd5, r_base: 9'd6, k_words: 10'd1, n_l: 7'd1, n_r: 7'd1,
          acc_base: 6'd63, accumulate: 1'b0};
    // and continued by a second command offered while the first still runs
    fork
      run_cmd(c, 0, 0);
      begin
        mm_cmd_t c2;
        c2 = c;
        c2.accumulate = 1'b1;
        c2.l_base = 9'd7;
        repeat (2) @(negedge clk);
        run_cmd(c2, 0, 0);
      end
    join
    read_check(32);
    read_check(33);
    read_check(63);
    // mechanisms
    checks++;
    if (n_fresh == 0 || n_cont == 0 || n_refresh == 0 || n_fill_busy == 0 ||
        n_res_refused == 0 || n_cmd_wait == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("commands=%0d fresh tiles=%0d continued tiles=%0d R refreshes=%0d",
             n_cmd, n_fresh, n_cont, n_refresh);
    $display("fills while busy=%0d read-outs refused=%0d command waits=%0d",
             n_fill_busy, n_res_refused, n_cmd_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
