// tb_error_unit: random and extreme SP/PV sequences; checks e = SP - PV and
// de = e[n] - e[n-1], both saturated to -512..511, one clock after 'en'.
module tb_error_unit;
  import fpid_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [ADC_W-1:0] sp = '0, pv = '0;
  logic signed [CRISP_W-1:0] e, de;
  logic valid;
  int sat_seen = 0;

  error_unit dut (.clk, .rst_n, .en, .sp, .pv, .e, .de, .valid);

  always #5 clk = ~clk;

  function automatic int sat(input int v);
    return (v > 511) ? 511 : (v < -512) ? -512 : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e_prev, en_, s, p;
    e_prev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 50 < 4) begin s = (t % 2 != 0) ? 1023 : 0; p = 1023 - s; end
      else begin s = $urandom_range(0, 1023); p = $urandom_range(0, 1023); end
      sp = 10'(s);
      pv = 10'(p);
      en = 1;
      @(negedge clk);
      en = 0;
      en_ = s - p;
      checks++;
      if (!valid || int'(e) != sat(en_) || int'(de) != sat(en_ - e_prev)) begin
        failures++;
        if (failures < 10)
          $display("FAIL sp %0d pv %0d: e %0d de %0d, want %0d %0d", s, p, e, de,
                   sat(en_), sat(en_ - e_prev));
      end
      if (sat(en_ - e_prev) != en_ - e_prev) sat_seen++;
      e_prev = en_;
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
