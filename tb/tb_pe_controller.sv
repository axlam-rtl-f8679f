// tb_pe_controller: command sequencing of the PE controller.
// For several commands (single tile, one R group with many L groups, many R
// groups, continuation of partial sums) every cycle is checked against the
// loop nest the command defines: buffer read addresses, first/last marks,
// tile address and A.SRAM read for continued sums one cycle later, no bubble
// between tiles, busy for T*k_words + 3 cycles, then a one-cycle done.
// A command offered while busy must wait (cmd_ready low).
module tb_pe_controller;
  import axlam_pkg::*;

  localparam int BUF_DEPTH = 512, ACC_ENTRIES = 64, BUF_AW = 9, ACC_AW = 6;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, busy, done;
  mm_cmd_t cmd;
  logic buf_rd_en;
  logic [BUF_AW-1:0] l_addr, r_addr;
  logic pe_valid, pe_first, pe_last, pe_init_use;
  logic [ACC_AW-1:0] pe_addr;
  logic acc_rd_en;
  logic [ACC_AW-1:0] acc_rd_addr;

  int checks = 0, failures = 0;
  int n_wait = 0, n_refresh = 0, n_accum = 0;

  pe_controller #(.BUF_DEPTH(BUF_DEPTH), .ACC_ENTRIES(ACC_ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run_cmd(int lb, int rb, int kw, int nl, int nr, int ab, bit acc);
    bit pv, pf, pl;
    int pa;
    cmd = '{l_base: 9'(lb), r_base: 9'(rb), k_words: 10'(kw), n_l: 7'(nl),
            n_r: 7'(nr), acc_base: 6'(ab), accumulate: acc};
    cmd_valid = 1;
    expect_eq("ready before accept", int'(cmd_ready), 1);
    @(negedge clk);
    cmd_valid = 0;
    cmd = '1;                       // the command is latched, not followed
    pv = 0; pf = 0; pl = 0; pa = 0;
    for (int j = 0; j < nr; j++) begin
      if (j > 0) n_refresh++;
      for (int i = 0; i < nl; i++)
        for (int k = 0; k < kw; k++) begin
          expect_eq("rd_en", int'(buf_rd_en), 1);
          expect_eq("l_addr", int'(l_addr), (lb + i * kw + k) % BUF_DEPTH);
          expect_eq("r_addr", int'(r_addr), (rb + j * kw + k) % BUF_DEPTH);
          expect_eq("busy", int'(busy), 1);
          expect_eq("pe_valid", int'(pe_valid), int'(pv));
          if (pv) begin
            expect_eq("pe_first", int'(pe_first), int'(pf));
            expect_eq("pe_last", int'(pe_last), int'(pl));
            expect_eq("pe_addr", int'(pe_addr), pa);
            expect_eq("acc_rd_en", int'(acc_rd_en), int'(pf && acc));
            if (pf && acc) begin
              expect_eq("acc_rd_addr", int'(acc_rd_addr), pa);
              n_accum++;
            end
          end
          pv = 1; pf = (k == 0); pl = (k == kw - 1); pa = ab + j * nl + i;
          // a second command offered now must wait
          cmd_valid = (i == 0 && k == 0);
          if (cmd_valid) begin
            expect_eq("ready while busy", int'(cmd_ready), 0);
            n_wait++;
          end
          @(negedge clk);
          cmd_valid = 0;
        end
    end
    expect_eq("rd_en after", int'(buf_rd_en), 0);
    expect_eq("pe_valid tail", int'(pe_valid), 1);
    expect_eq("pe_last tail", int'(pe_last), 1);
    expect_eq("pe_addr tail", int'(pe_addr), pa);
    for (int d = 0; d < 3; d++) begin
      expect_eq("busy drain", int'(busy), 1);
      expect_eq("done early", int'(done), 0);
      @(negedge clk);
    end
    expect_eq("done", int'(done), 1);
    expect_eq("idle", int'(busy), 0);
    @(negedge clk);
    expect_eq("done pulse", int'(done), 0);
  endtask

  initial begin
    cmd_valid = 0;
    cmd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_cmd(0, 0, 1, 1, 1, 0, 0);          // one word, one tile
    run_cmd(10, 300, 64, 1, 1, 5, 0);      // one tile, K = 1024
    run_cmd(0, 0, 4, 8, 1, 0, 0);          // one R set, eight L groups
    run_cmd(100, 20, 3, 3, 4, 40, 1);      // R refreshes, continued sums
    run_cmd(0, 0, 2, 1, 5, 60 - 5, 1);     // L stationary, R groups cycle
    run_cmd(448, 448, 64, 1, 1, 63, 0);    // top of the buffers
    checks++;
    if (n_wait == 0 || n_refresh == 0 || n_accum == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("waits=%0d R refreshes=%0d continued tiles=%0d", n_wait, n_refresh, n_accum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
