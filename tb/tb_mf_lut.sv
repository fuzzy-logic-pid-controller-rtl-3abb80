// tb_mf_lut: checks every entry of the membership LUT on both read ports
// against the triangle-edge degrees round(15*a/8).
module tb_mf_lut;
  import fpid_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0]      addr_a, addr_b;
  logic [MU_W-1:0] data_a, data_b;
  int expected [8] = '{0, 2, 4, 6, 8, 9, 11, 13};

  mf_lut dut (.addr_a, .data_a, .addr_b, .data_b);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      addr_a = 3'(a);
      addr_b = 3'(7 - a);
      #1;
      checks += 2;
      if (data_a != 4'(expected[a]) || data_b != 4'(expected[7 - a])) begin
        failures++;
        $display("FAIL addr %0d: got %0d/%0d", a, data_a, data_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
