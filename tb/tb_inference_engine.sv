// tb_inference_engine: drives random label pairs and degrees and checks the four
// firing strengths (min of each antecedent pair) and rule numbers (7*e + de),
// one clock after 'en'.
module tb_inference_engine;
  import fpid_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  in_label_e         mf [4];
  logic [MU_W-1:0]   mu [4];
  logic [MU_W-1:0]   mu_o [4];
  logic [RULE_W-1:0] rule [4];
  logic              valid;

  inference_engine dut (.clk, .rst_n, .en, .mf, .mu, .mu_o, .rule, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m [4], l [4], exp_mu, exp_rule;
    for (int i = 0; i < 4; i++) begin mf[i] = NB; mu[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        l[i] = $urandom_range(0, 6);
        m[i] = $urandom_range(0, 15);
        mf[i] = in_label_e'(l[i]);
        mu[i] = 4'(m[i]);
      end
      en = 1;
      @(negedge clk);
      en = 0;
      checks++;
      if (!valid) begin failures++; $display("FAIL valid missing"); end
      for (int j = 0; j < 4; j++) begin
        int a, b;
        a = j / 2;          // error label 0 or 1
        b = 2 + j % 2;      // change label 2 or 3
        exp_mu   = (m[a] < m[b]) ? m[a] : m[b];
        exp_rule = 7 * l[a] + l[b];
        checks++;
        if (int'(mu_o[j]) != exp_mu || int'(rule[j]) != exp_rule) begin
          failures++;
          if (failures < 10)
            $display("FAIL rule %0d: got mu %0d rule %0d, want %0d %0d",
                     j, mu_o[j], rule[j], exp_mu, exp_rule);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
