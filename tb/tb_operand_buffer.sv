// tb_operand_buffer: fill and read-back test of one 8 KB operand buffer.
// Fills every word with a pattern, reads all words back in random order and
// checks data and the one-cycle read latency, that the read data holds
// without rd_en, and that a read and write of the same word in one cycle
// returns the old word.
module tb_operand_buffer;
  import axlam_pkg::*;

  localparam int BYTES = 8192, WB = 16, DEPTH = BYTES / WB, AW = $clog2(DEPTH);

  logic clk = 0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  afpos_t [WB-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;

  operand_buffer #(.BYTES(BYTES), .WORD_BYTES(WB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WB*8-1:0] pat(int a, int salt);
    logic [WB*8-1:0] v;
    for (int i = 0; i < WB; i++) v[i*8 +: 8] = 8'(a * 7 + i * 13 + salt);
    return v;
  endfunction

  task automatic check(string what, logic [WB*8-1:0] got, logic [WB*8-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = pat(a, 0);
      @(negedge clk);
    end
    wr_en = 0;
    for (int n = 0; n < 2 * DEPTH; n++) begin
      int a;
      a = (n < DEPTH) ? n : int'($urandom_range(DEPTH - 1));
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      check("read", rd_data, pat(a, 0));
    end
    // the last word read stays on rd_data while rd_en is low
    rd_en = 1; rd_addr = 9'd7;
    @(negedge clk);
    rd_en = 0; rd_addr = 9'd3;
    @(negedge clk);
    @(negedge clk);
    check("hold", rd_data, pat(7, 0));
    // read-during-write: old word
    rd_en = 1; rd_addr = 9'd5; wr_en = 1; wr_addr = 9'd5; wr_data = pat(5, 99);
    @(negedge clk);
    check("rdw old", rd_data, pat(5, 0));
    wr_en = 0;
    @(negedge clk);
    check("rdw new", rd_data, pat(5, 99));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
