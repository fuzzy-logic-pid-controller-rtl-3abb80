// tb_seq_divider: random and corner-case 14-bit divisions; checks quotient,
// remainder and that 'done' is set by the 14th clock edge, counting the edge
// that sampled 'start'.
module tb_seq_divider;
  localparam int W = 14;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] dividend = '0, divisor = '0, quotient, remainder;
  logic busy, done;

  seq_divider dut (.clk, .rst_n, .start, .dividend, .divisor,
                            .quotient, .remainder, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input int a, input int b);
    int lat, wq, wr;
    @(negedge clk);
    dividend = W'(a);
    divisor  = W'(b);
    start    = 1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 0;
    dividend = W'($urandom);                 // operands are captured at start
    divisor  = W'($urandom);
    while (!done && lat < 40) begin
      @(posedge clk);
      lat++;
      #1;
    end
    if (b == 0) begin wq = (1 << W) - 1; wr = a; end
    else        begin wq = a / b;        wr = a % b; end
    checks += 2;
    if (lat != W - 1) begin
      failures++;
      $display("FAIL latency %0d", lat + 1);
    end
    if (int'(quotient) != wq || (b != 0 && int'(remainder) != wr)) begin
      failures++;
      $display("FAIL %0d/%0d: got %0d r%0d", a, b, quotient, remainder);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    divide(0, 1);
    divide(16383, 1);
    divide(16383, 16383);
    divide(15300, 60);
    divide(2025, 40);
    divide(5, 7);
    divide(100, 0);
    for (int t = 0; t < 500; t++)
      divide($urandom_range(0, 16383), $urandom_range(1, 16383));
    for (int t = 0; t < 500; t++)
      divide($urandom_range(0, 16383), $urandom_range(1, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
