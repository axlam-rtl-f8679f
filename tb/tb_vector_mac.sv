// tb_vector_mac: random and corner vectors through the 16-wide vector MAC.
// Checks each dot product against the reference sum of exact products and
// that it appears exactly one cycle after its operands, at one vector per
// cycle (throughput 16 multiplications per cycle).
module tb_vector_mac;
  import axlam_pkg::*;
  import tb_afpos_ref_pkg::*;

  localparam int VEC = 16;
  localparam int SUM_W = PROD_W + $clog2(VEC);

  logic clk = 0, rst_n = 0;
  logic in_valid;
  afpos_t [VEC-1:0] a, b;
  logic out_valid;
  logic signed [SUM_W-1:0] dot;
  int checks = 0, failures = 0;
  int cycle = 0;

  vector_mac #(.VEC(VEC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q[$];
  int     exp_cyc[$];

  function automatic longint ref_dot(afpos_t [VEC-1:0] x, afpos_t [VEC-1:0] y);
    longint s = 0;
    for (int i = 0; i < VEC; i++) s += ref_mul(x[i], y[i]);
    return s;
  endfunction

  // monitor, sampling between clock edges
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        longint e;
        int c;
        e = exp_q.pop_front();
        c = exp_cyc.pop_front();
        if (longint'(dot) != e) begin
          failures++;
          $display("dot mismatch got %0d exp %0d", dot, e);
        end
        checks++;
        if (cycle != c + 1) begin
          failures++;
          $display("latency wrong: in at %0d out at %0d", c, cycle);
        end
      end
    end
  end

  initial begin
    in_valid = 0;
    a = '0;
    b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      // bubbles every few vectors, otherwise back to back
      in_valid = (n % 7 != 3);
      for (int i = 0; i < VEC; i++) begin
        case (n)
          0: begin a[i] = 8'h7f; b[i] = 8'h7f; end  // largest products
          1: begin a[i] = 8'hff; b[i] = 8'h7f; end  // most negative
          2: begin a[i] = 8'h00; b[i] = rand_afpos(); end // zeros
          default: begin a[i] = rand_afpos(); b[i] = rand_afpos(); end
        endcase
      end
      if (in_valid) begin
        exp_q.push_back(ref_dot(a, b));
        exp_cyc.push_back(cycle);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
