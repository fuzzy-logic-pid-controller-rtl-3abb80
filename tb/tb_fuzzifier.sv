// tb_fuzzifier: sweeps every 10-bit signed crisp value through the fuzzifier,
// serving the membership LUT from the testbench's own table, and compares the
// two labels and degrees with the reference model. Also checks that the outputs
// arrive one clock after 'en' and hold while 'en' is low.
module tb_fuzzifier;
  import fpid_pkg::*;
  import fpid_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [CRISP_W-1:0] crisp = '0;
  logic [2:0]      lut_addr;
  logic [MU_W-1:0] lut_data;
  in_label_e       mf0, mf1;
  logic [MU_W-1:0] mu0, mu1;
  logic            valid;

  assign lut_data = 4'(MU_EDGE[lut_addr]);

  fuzzifier dut (.clk, .rst_n, .en, .crisp, .lut_addr, .lut_data,
                 .mf0, .mf1, .mu0, .mu1, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l0, l1, m0, m1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int x = -512; x < 512; x++) begin
      @(negedge clk);
      crisp = CRISP_W'(x);
      en    = 1;
      @(negedge clk);
      en    = 0;
      crisp = CRISP_W'(-x);                  // must not disturb the held result
      ref_fuzz(x, l0, l1, m0, m1);
      checks++;
      if (!valid || int'(mf0) != l0 || int'(mf1) != l1 || int'(mu0) != m0 || int'(mu1) != m1) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d: got %0d/%0d %0d/%0d v%0d, want %0d/%0d %0d/%0d",
                   x, mf0, mf1, mu0, mu1, valid, l0, l1, m0, m1);
      end
      @(negedge clk);
      checks++;
      if (valid || int'(mu1) != m1 || int'(mf0) != l0) begin
        failures++;
        $display("FAIL x=%0d: output not held", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
