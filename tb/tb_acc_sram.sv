// tb_acc_sram: write and read-back test of the accumulation buffer.
// Writes random 8 x 8 tiles of 56-bit sums to every entry, reads them back in
// random order and checks the data, the one-cycle read latency, that the data
// holds without rd_en, and old-data behaviour of a read and write of the same
// entry in one cycle.
module tb_acc_sram;

  localparam int ROWS = 8, COLS = 8, ACC_W = 56, ENTRIES = 64, AW = $clog2(ENTRIES);
  localparam int W = ROWS * COLS * ACC_W;

  logic clk = 0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] wr_data, rd_data;
  logic [W-1:0] model [ENTRIES];
  int checks = 0, failures = 0;

  acc_sram #(.ROWS(ROWS), .COLS(COLS), .ACC_W(ACC_W), .ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch", what);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    @(negedge clk);
    for (int a = 0; a < ENTRIES; a++) begin
      model[a] = rnd();
      wr_en = 1; wr_addr = AW'(a); wr_data = model[a];
      @(negedge clk);
    end
    wr_en = 0;
    for (int n = 0; n < 4 * ENTRIES; n++) begin
      int a;
      a = (n < ENTRIES) ? n : int'($urandom_range(ENTRIES - 1));
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      check("read", rd_data, model[a]);
    end
    rd_en = 1; rd_addr = 6'd9;
    @(negedge clk);
    rd_en = 0; rd_addr = 6'd2;
    @(negedge clk);
    check("hold", rd_data, model[9]);
    rd_en = 1; rd_addr = 6'd4; wr_en = 1; wr_addr = 6'd4; wr_data = rnd();
    @(negedge clk);
    check("rdw old", rd_data, model[4]);
    model[4] = wr_data;
    wr_en = 0;
    @(negedge clk);
    check("rdw new", rd_data, model[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
