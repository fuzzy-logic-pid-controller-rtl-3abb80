// tb_pid_processor: runs sequences of PID actions with random set points,
// process values and gains and compares Vo with the velocity-form reference,
// including clamping at both ends of the 12-bit range. Checks the five-clock
// action time and that 'start' during an action is ignored. It also applies a
// step of the error from zero with P, PI, PD and PID gain sets and compares the
// response with the closed form of the PID step response,
//     Vo[0] = (Kp+Ki+Kd)*E,   Vo[n] = (Kp + (n+1)*Ki)*E  for n >= 1,
// scaled by 2^-GAIN_SHIFT.
module tb_pid_processor;
  import fpid_pkg::*;
  import fpid_ref_pkg::*;

  localparam int SHIFT = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [ADC_W-1:0]  sp = '0, pv = '0;
  logic [GAIN_W-1:0] kp = '0, ki = '0, kd = '0;
  logic [VO_W-1:0]   vo;
  logic busy, done;
  int clamp_hi = 0, clamp_lo = 0;

  pid_processor dut (.clk, .rst_n, .start, .sp, .pv, .kp, .ki, .kd, .vo, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int e1 = 0, e2 = 0, want;
  longint v = 0;

  task automatic action(input int s, input int p, input int gp, input int gi, input int gd);
    int lat;
    @(negedge clk);
    sp = 10'(s); pv = 10'(p); kp = 8'(gp); ki = 8'(gi); kd = 8'(gd);
    start = 1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    // a second start inside the action must be ignored; operands must be latched
    sp = 10'($urandom); pv = 10'($urandom);
    while (!done && lat < 20) begin
      @(posedge clk);
      lat++;
      #1;
    end
    start = 0;
    ref_pid(s, p, gp, gi, gd, SHIFT, e1, e2, v, want);
    if (want == 4095) clamp_hi++;
    if (want == 0 && s != p) clamp_lo++;
    checks += 2;
    if (lat != 3) begin failures++; $display("FAIL latency %0d edges", lat); end
    if (int'(vo) != want) begin
      failures++;
      if (failures < 10) $display("FAIL sp %0d pv %0d: vo %0d want %0d", s, p, vo, want);
    end
    @(negedge clk);
  endtask

  // Step of the error from 0 to E at n = 0, from reset, checked against the
  // closed-form step response.
  int n_step = 0;
  task automatic step_response(input int gp, input int gi, input int gd, input int big_e);
    longint want_f;
    int g;
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    e1 = 0; e2 = 0; v = 0;
    for (int n = 0; n < 12; n++) begin
      action(600, 600 - big_e, gp, gi, gd);
      g = (n == 0) ? gp + gi + gd : gp + (n + 1) * gi;
      want_f = longint'(g * big_e);
      if (want_f > (longint'(4096) << SHIFT) - 1) want_f = (longint'(4096) << SHIFT) - 1;
      checks++;
      if (int'(vo) != int'(want_f >> SHIFT)) begin
        failures++;
        $display("FAIL step Kp %0d Ki %0d Kd %0d n %0d: vo %0d want %0d", gp, gi, gd, n, vo,
                 want_f >> SHIFT);
      end
    end
    n_step++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    step_response(40, 0, 0, 10);      // P
    step_response(40, 8, 0, 10);      // PI
    step_response(40, 0, 30, 10);     // PD: derivative kick at n = 0 only
    step_response(35, 12, 30, 10);    // PID
    step_response(24, 3, 38, 1);      // unit step
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    e1 = 0; e2 = 0; v = 0;
    for (int t = 0; t < 3000; t++) begin
      int s, p;
      s = $urandom_range(0, 1023);
      p = (t % 200 < 100) ? $urandom_range(0, 1023) : s + $urandom_range(0, 20) - 10;
      if (p < 0) p = 0;
      if (p > 1023) p = 1023;
      action(s, p, $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    end
    checks++;
    if (clamp_hi == 0 || clamp_lo == 0) begin
      failures++;
      $display("FAIL clamp not exercised: hi %0d lo %0d", clamp_hi, clamp_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
