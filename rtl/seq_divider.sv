// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Divides a W-bit dividend by a W-bit divisor in W clocks (14 with the default
// width, as for the division module of the defuzzifier). 'start' loads the
// operands and performs the first step on the same edge; the remaining W-1
// steps follow on the next edges, so the division uses W clock edges counting
// the one that sampled 'start'. 'done' is high for one cycle after the last
// step, with the quotient and remainder valid. Quotient and remainder hold until the next start. Division by zero
// gives an all-ones quotient, the natural result of the restoring algorithm.
module seq_divider #(
  parameter int unsigned W = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder,
  output logic         busy,
  output logic         done
);

  logic [W-1:0]         dvs;
  logic [$clog2(W+1)-1:0] cnt;

  // One restoring step: shift the next dividend bit into the remainder, subtract
  // the divisor if it fits, and shift the result bit into the quotient.
  function automatic logic [2*W-1:0] div_step(input logic [W-1:0] rem,
                                              input logic [W-1:0] quo,
                                              input logic [W-1:0] d);
    logic [W:0]   trial;
    logic [W-1:0] r;
    trial = {rem, quo[W-1]} - {1'b0, d};
    if (!trial[W] || d == '0) r = trial[W-1:0];
    else                      r = {rem[W-2:0], quo[W-1]};
    return {r, quo[W-2:0], (!trial[W] || d == '0)};
  endfunction

  assign busy = (cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quotient  <= '0;
      remainder <= '0;
      dvs       <= '0;
      cnt       <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dvs                     <= divisor;
        {remainder, quotient}   <= div_step('0, dividend, divisor);
        cnt                     <= ($clog2(W+1))'(W - 1);
        done                    <= (W == 1);
      end else if (busy) begin
        {remainder, quotient}   <= div_step(remainder, quotient, dvs);
        cnt                     <= cnt - 1'b1;
        done                    <= (cnt == 1);
      end
    end
  end

endmodule
