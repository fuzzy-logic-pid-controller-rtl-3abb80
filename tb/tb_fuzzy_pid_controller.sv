// tb_fuzzy_pid_controller: end-to-end closed-loop test of the controller at its
// default parameters.
//
// A behavioural tank stands in for the level process: each 100 ms sample the
// level L (in 10-bit ADC counts) changes by
//     dL = KIN * Vo - KOUT * L,
// i.e. inflow proportional to the 12-bit valve command and outflow proportional
// to the level, a first-order process with a time constant of 1/KOUT samples.
// The testbench runs the level from empty to 50 %, steps the set point up to
// 75 %, back down to 50 %, holds 75 % while the outflow valve is shut for 5 s (a
// disturbance), and finally drops the set point to 5 %. Every action is checked
// against the reference model (error, fuzzy schedule, PID update) and must take
// 85 clocks; each phase must end with the level near the set point. It counts
// how often each mechanism occurs (fuzzifier saturation on both inputs and both
// sides, output clamping at both ends, a sample ignored while busy, changes of
// the scheduled gains) and fails if one never does.
module tb_fuzzy_pid_controller;
  import fpid_pkg::*;
  import fpid_ref_pkg::*;

  localparam int    SHIFT    = 4;        // default GAIN_SHIFT of the top
  localparam int    PERIOD   = 100;      // clocks between samples
  localparam real   KIN      = 0.004;
  localparam real   KOUT     = 0.01;
  localparam int    TOL      = 16;       // settled band, ADC counts

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample = 0;
  logic [ADC_W-1:0]  sp = '0, pv = '0;
  logic [VO_W-1:0]   vo;
  logic [GAIN_W-1:0] kp, ki, kd;
  logic [OUT_W-1:0]  alpha;
  logic busy, done;

  fuzzy_pid_controller dut (.clk, .rst_n, .sample, .sp, .pv, .vo,
                            .kp, .ki, .kd, .alpha, .busy, .done);

  always #5 clk = ~clk;

  // mechanism counters
  int n_e_sat_pos = 0, n_e_sat_neg = 0, n_de_sat_pos = 0, n_de_sat_neg = 0;
  int n_clamp_hi = 0, n_clamp_lo = 0, n_ignored = 0, n_kp_change = 0, n_ki_change = 0;
  int n_actions = 0, max_overshoot = 0;

  initial begin
    repeat (3000 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real level = 0.0;
  real kout = KOUT;
  int  r_e1 = 0, r_e2 = 0, r_eprev = 0, r_vo = 0, last_kp = -1, last_ki = -1;
  longint r_v = 0;

  function automatic int sat10(input int v);
    return (v > 511) ? 511 : (v < -512) ? -512 : v;
  endfunction

  // One sample: apply SP/PV, run the action, check it, advance the plant.
  task automatic one_sample(input int setp, input bit poke);
    int p, e, wkp, wkd, wal, wki, wvo, lat;
    p = int'(level + 0.5);
    if (p < 0) p = 0;
    if (p > 1023) p = 1023;
    @(negedge clk);
    sp = 10'(setp);
    pv = 10'(p);
    sample = 1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    sample = 0;
    if (poke)
      fork
        begin                                    // a sample in mid-action is ignored
          repeat (40) @(posedge clk);
          #2;
          sample = 1;
          pv = 10'($urandom);
          n_ignored += busy;
          @(posedge clk);
          #2;
          sample = 0;
        end
      join_none
    while (!done && lat < 2 * PERIOD) begin
      @(posedge clk);
      lat++;
      #1;
    end
    // reference
    e  = setp - p;
    ref_schedule(sat10(e), sat10(e - r_eprev), wkp, wkd, wal, wki);
    ref_pid(setp, p, wkp, wki, wkd, SHIFT, r_e1, r_e2, r_v, wvo);
    if (sat10(e) >= 384)  n_e_sat_pos++;
    if (sat10(e) <= -384) n_e_sat_neg++;
    if (sat10(e - r_eprev) >= 384)  n_de_sat_pos++;
    if (sat10(e - r_eprev) <= -384) n_de_sat_neg++;
    r_eprev = e;
    if (wvo == 4095) n_clamp_hi++;
    if (wvo == 0)    n_clamp_lo++;
    if (last_kp >= 0 && wkp != last_kp) n_kp_change++;
    if (last_ki >= 0 && wki != last_ki) n_ki_change++;
    last_kp = wkp;
    last_ki = wki;
    n_actions++;
    checks += 2;
    // 'done' set by the 84th edge counting the one that took the sample: the
    // action spans 85 clock cycles
    if (lat != 83) begin
      failures++;
      $display("FAIL action %0d spanned %0d clock cycles", n_actions, lat + 2);
    end
    if (int'(vo) != wvo || int'(kp) != wkp || int'(kd) != wkd || int'(ki) != wki ||
        int'(alpha) != wal) begin
      failures++;
      if (failures < 10)
        $display("FAIL action %0d sp %0d pv %0d: vo %0d kp %0d kd %0d ki %0d al %0d, want %0d %0d %0d %0d %0d",
                 n_actions, setp, p, vo, kp, kd, ki, alpha, wvo, wkp, wkd, wki, wal);
    end
    // plant, one 100 ms sample
    level = level + KIN * real'(vo) - kout * level;
    if (level < 0.0) level = 0.0;
    if (level > 1023.0) level = 1023.0;
    repeat (PERIOD - lat - 4) @(posedge clk);
  endtask

  task automatic phase(input string name, input int setp, input int n,
                       input int shut_from, input int shut_len, input int approach);
    int peak;
    peak = 0;
    for (int i = 0; i < n; i++) begin
      kout = (i >= shut_from && i < shut_from + shut_len) ? 0.0 : KOUT;
      one_sample(setp, (i % 97) == 5);
      if (approach > 0 && int'(level) - setp > peak) peak = int'(level) - setp;
      if (approach < 0 && setp - int'(level) > peak) peak = setp - int'(level);
    end
    checks++;
    if (int'(level + 0.5) > setp + TOL || int'(level + 0.5) < setp - TOL) begin
      failures++;
      $display("FAIL %s: level %0d, set point %0d", name, int'(level), setp);
    end
    $display("%s: set point %0d, final level %0d, peak overshoot %0d counts, kp %0d kd %0d ki %0d alpha %0d",
             name, setp, int'(level + 0.5), peak, kp, kd, ki, alpha);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    phase("start-up 0 -> 50 %",    512, 500, -1, 0, 1);
    phase("step up 50 -> 75 %",    768, 500, -1, 0, 1);
    phase("step down 75 -> 50 %",  512, 500, -1, 0, -1);
    phase("setup 75 %",            768, 400, -1, 0, 1);
    phase("disturbance at 75 %",   768, 500, 20, 50, 0);
    phase("step down 75 -> 5 %",    51, 500, -1, 0, -1);
    $display("mechanisms over %0d actions:", n_actions);
    need("error saturated high",     n_e_sat_pos);
    need("error saturated low",      n_e_sat_neg);
    need("error change saturated high", n_de_sat_pos);
    need("error change saturated low",  n_de_sat_neg);
    need("output clamped high",      n_clamp_hi);
    need("output clamped low",       n_clamp_lo);
    need("sample ignored while busy", n_ignored);
    need("Kp rescheduled",           n_kp_change);
    need("Ki rescheduled",           n_ki_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
