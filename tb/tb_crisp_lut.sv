// tb_crisp_lut: reads all 49 rules for Kp, Kd and alpha and compares with the
// reference tables; also checks that the unused rule numbers read zero.
module tb_crisp_lut;
  import fpid_pkg::*;
  import fpid_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [RULE_W-1:0] rule;
  out_sel_e          sel;
  logic [OUT_W-1:0]  crisp;

  crisp_lut dut (.rule, .sel, .crisp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      for (int r = 0; r < 64; r++) begin
        int want;
        rule = 6'(r);
        sel  = out_sel_e'(s);
        #1;
        want = (r < 49) ? ref_crisp(r / 7, r % 7, s) : 0;
        checks++;
        if (int'(crisp) != want) begin
          failures++;
          $display("FAIL sel %0d rule %0d: got %0d want %0d", s, r, crisp, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
