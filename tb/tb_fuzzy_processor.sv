// tb_fuzzy_processor: sweeps the error and error-change plane (including both
// saturated ends) and random points; checks the scheduled Kp, Kd, alpha and Ki
// against the reference fuzzy model and the 79-clock run time.
module tb_fuzzy_processor;
  import fpid_pkg::*;
  import fpid_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [CRISP_W-1:0] e = '0, de = '0;
  logic [OUT_W-1:0] kp, kd, ki, alpha;
  logic busy, done;

  fuzzy_processor dut (.clk, .rst_n, .start, .e, .de, .kp, .kd, .ki, .alpha, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int x, input int dx);
    int lat, wkp, wkd, wal, wki;
    @(negedge clk);
    e = 10'(x); de = 10'(dx);
    start = 1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    e = 10'($urandom); de = 10'($urandom);   // inputs are captured at start
    while (!done && lat < 200) begin
      @(posedge clk);
      lat++;
      #1;
    end
    start = 0;
    ref_schedule(x, dx, wkp, wkd, wal, wki);
    checks += 2;
    if (lat != 78) begin failures++; $display("FAIL latency %0d", lat + 1); end
    if (int'(kp) != wkp || int'(kd) != wkd || int'(alpha) != wal || int'(ki) != wki) begin
      failures++;
      if (failures < 10)
        $display("FAIL e %0d de %0d: got %0d %0d %0d %0d want %0d %0d %0d %0d",
                 x, dx, kp, kd, alpha, ki, wkp, wkd, wal, wki);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int x = -512; x < 512; x += 48)
      for (int dx = -512; dx < 512; dx += 48)
        run(x, dx);
    run(511, 511);
    run(-512, -512);
    for (int t = 0; t < 500; t++)
      run($urandom_range(0, 1023) - 512, $urandom_range(0, 1023) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
