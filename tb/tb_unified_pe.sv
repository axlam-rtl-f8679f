// tb_unified_pe: tiles of random AFPOS operands through the 8 x 8 x 16 PE.
// Each tile has 1..6 words per lane, with and without a partial sum to
// continue (init_use), mostly back to back and sometimes with idle cycles in
// between. Every output element is compared with a reference sum of exact
// products, the tile address is checked, and out_valid must come exactly two
// cycles after the last word of the tile.
module tb_unified_pe;
  import axlam_pkg::*;
  import tb_afpos_ref_pkg::*;

  localparam int ROWS = 8, COLS = 8, VEC = 16, ACC_W = 56, AW = 6;
  localparam int NTILES = 60;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, in_last, init_use;
  logic [AW-1:0] in_addr;
  afpos_t [ROWS-1:0][VEC-1:0] l_data;
  afpos_t [COLS-1:0][VEC-1:0] r_data;
  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] init_sum;
  logic out_valid;
  logic [AW-1:0] out_addr;
  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] out_sum;

  int checks = 0, failures = 0, cycle = 0;
  int n_init = 0, n_single = 0, n_b2b = 0;

  unified_pe #(.ROWS(ROWS), .COLS(COLS), .VEC(VEC), .ACC_W(ACC_W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] tile_t;
  tile_t exp_q[$];
  int    exp_addr[$];
  int    exp_cyc[$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected tile");
      end else begin
        tile_t e;
        int a, c;
        e = exp_q.pop_front();
        a = exp_addr.pop_front();
        c = exp_cyc.pop_front();
        for (int r = 0; r < ROWS; r++)
          for (int k = 0; k < COLS; k++) begin
            checks++;
            if (out_sum[r][k] !== e[r][k]) begin
              failures++;
              if (failures < 10)
                $display("tile %0d (%0d,%0d): got %0d exp %0d", a, r, k,
                         $signed(out_sum[r][k]), $signed(e[r][k]));
            end
          end
        checks++;
        if (int'(out_addr) != a) begin failures++; $display("addr %0d exp %0d", out_addr, a); end
        checks++;
        if (cycle != c + 2) begin failures++; $display("tile latency: last at %0d out at %0d", c, cycle); end
      end
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; init_use = 0; in_addr = '0;
    l_data = '0; r_data = '0; init_sum = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NTILES; t++) begin
      int kw;
      logic use_init;
      tile_t acc, init;
      kw = (t % 5 == 0) ? 1 : int'($urandom_range(2, 6));
      if (kw == 1) n_single++;
      use_init = (t % 3 == 1);
      if (use_init) n_init++;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          init[r][c] = ACC_W'({$urandom, $urandom} >> 12);
          acc[r][c]  = use_init ? init[r][c] : '0;
        end
      for (int k = 0; k < kw; k++) begin
        for (int r = 0; r < ROWS; r++)
          for (int i = 0; i < VEC; i++) l_data[r][i] = rand_afpos();
        for (int c = 0; c < COLS; c++)
          for (int i = 0; i < VEC; i++) r_data[c][i] = rand_afpos();
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            for (int i = 0; i < VEC; i++)
              acc[r][c] = acc[r][c] + ACC_W'(ref_mul(l_data[r][i], r_data[c][i]));
        in_valid = 1;
        in_first = (k == 0);
        in_last  = (k == kw - 1);
        init_use = use_init;
        in_addr  = AW'(t);
        if (k == kw - 1) begin
          exp_q.push_back(acc);
          exp_addr.push_back(t % 64);
          exp_cyc.push_back(cycle);
        end
        @(negedge clk);
        // the partial sum arrives one cycle after the first word
        init_sum = (k == 0 && use_init) ? init : tile_t'({$urandom, $urandom});
      end
      if (t % 4 == 3) begin
        in_valid = 0;
        l_data = '1;
        r_data = '1;
        repeat (2) @(negedge clk);
      end else n_b2b++;
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d tiles missing", exp_q.size()); end
    checks++;
    if (n_init == 0 || n_single == 0 || n_b2b == 0) begin failures++; $display("case not covered"); end
    $display("init=%0d single-word=%0d back-to-back=%0d", n_init, n_single, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
