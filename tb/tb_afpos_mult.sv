// tb_afpos_mult: exhaustive check of the AFPOS multiplier.
// All 65536 operand pairs are applied and the product compared with the
// value formula evaluated in double precision (tb_afpos_ref_pkg).
module tb_afpos_mult;
  import axlam_pkg::*;
  import tb_afpos_ref_pkg::*;

  afpos_t a, b;
  logic signed [PROD_W-1:0] p;
  int checks = 0, failures = 0;

  afpos_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (longint'(p) != ref_mul(a, b)) begin
          failures++;
          if (failures < 10)
            $display("mismatch a=%02h b=%02h got %0d exp %0d", a, b, p, ref_mul(a, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
