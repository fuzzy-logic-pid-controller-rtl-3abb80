// error_unit: control error and its change, the crisp inputs of the fuzzy processor.
//
// On each sample ('en' high) it forms e[n] = SP - PV (11 bits, signed) and
// de[n] = e[n] - e[n-1], and registers both saturated to the 10-bit signed range
// of the fuzzifier inputs (-512..511). e[n-1] is kept at full precision; it is
// zero after reset, so the first sample sees de = e. 'valid' pulses in the cycle
// after 'en', together with the new e and de. The subtraction and the change of
// error follow the controller block diagram; the saturation and reset value are
// this design's choices.
module error_unit
  import fpid_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [ADC_W-1:0]          sp,
  input  logic [ADC_W-1:0]          pv,
  output logic signed [CRISP_W-1:0] e,
  output logic signed [CRISP_W-1:0] de,
  output logic                      valid
);

  localparam int signed LIM_HI = (1 << (CRISP_W - 1)) - 1;
  localparam int signed LIM_LO = -(1 << (CRISP_W - 1));

  logic signed [ADC_W:0]   e_now, e_prev;
  logic signed [ADC_W+1:0] de_now;

  function automatic logic signed [CRISP_W-1:0] sat(input int signed v);
    if (v > LIM_HI) return CRISP_W'(LIM_HI);
    if (v < LIM_LO) return CRISP_W'(LIM_LO);
    return CRISP_W'(v);
  endfunction

  always_comb begin
    e_now  = $signed({1'b0, sp}) - $signed({1'b0, pv});
    de_now = (ADC_W+2)'(e_now) - (ADC_W+2)'(e_prev);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev <= '0;
      e      <= '0;
      de     <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        e_prev <= e_now;
        e      <= sat(int'(e_now));
        de     <= sat(int'(de_now));
      end
    end
  end

endmodule
