// tb_defuzzifier: random firing strengths and rule numbers; checks Kp, Kd and
// alpha against the centre-of-gravity reference (rounded), Ki against
// Kp^2/(alpha*Kd) (truncated), and the 77-clock run time.
module tb_defuzzifier;
  import fpid_pkg::*;
  import fpid_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [MU_W-1:0]   mu_o [4];
  logic [RULE_W-1:0] rule [4];
  logic [OUT_W-1:0]  kp, kd, alpha, ki;
  logic busy, done;

  defuzzifier dut (.clk, .rst_n, .start, .mu_o, .rule, .kp, .kd, .alpha, .ki, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w [4], r [4], sw, num, q [3], wki, lat;
    for (int j = 0; j < 4; j++) begin mu_o[j] = '0; rule[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      sw = 0;
      for (int j = 0; j < 4; j++) begin
        w[j] = $urandom_range(0, 15);
        r[j] = $urandom_range(0, 48);
        sw  += w[j];
      end
      if (sw == 0) begin w[0] = 1; sw = 1; end
      for (int j = 0; j < 4; j++) begin mu_o[j] = 4'(w[j]); rule[j] = 6'(r[j]); end
      start = 1;
      @(posedge clk);
      lat = 0;
      @(negedge clk);
      start = 0;
      while (!done && lat < 200) begin
        @(posedge clk);
        lat++;
        #1;
      end
      for (int s = 0; s < 3; s++) begin
        num = 0;
        for (int j = 0; j < 4; j++) num += w[j] * ref_crisp(r[j] / 7, r[j] % 7, s);
        q[s] = imin(255, (num + sw / 2) / sw);
      end
      wki = imin(255, imin(q[0] * q[0], 16383) / imin(q[2] * q[1], 16383));
      checks += 2;
      if (lat != 76) begin failures++; $display("FAIL latency %0d", lat + 1); end
      if (int'(kp) != q[0] || int'(kd) != q[1] || int'(alpha) != q[2] || int'(ki) != wki) begin
        failures++;
        if (failures < 10)
          $display("FAIL got kp %0d kd %0d al %0d ki %0d, want %0d %0d %0d %0d",
                   kp, kd, alpha, ki, q[0], q[1], q[2], wki);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
