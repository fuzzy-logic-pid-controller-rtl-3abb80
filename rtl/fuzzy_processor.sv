// fuzzy_processor: fuzzy gain scheduler producing Kp, Kd, alpha and Ki.
//
// Two fuzzifiers share one membership LUT and turn the error e and its change
// de into their two active labels and degrees; the inference engine forms the
// four firing strengths and rule numbers by max-min; the defuzzifier computes
// Kp, Kd and alpha by centre of gravity over the level-process rule tables and
// then Ki = Kp^2/(alpha*Kd). The stages are clocked one after the other:
// fuzzification one clock, inference one clock, defuzzification 77 clocks, so
// 'done' is high 79 clocks after the clock in which 'start' was high. 'start' is
// ignored while the processor is busy. Outputs hold until the next run.
//
// The structure (shared LUT, two fuzzifiers, max-min inference, COG
// defuzzification, Kp^2/(alpha*Kd)) follows the fuzzy processor block diagram;
// the label spacing (SEG_SHIFT_*) is this design's choice, and the scheduling
// limits default to the values worked out for the level process.
module fuzzy_processor
  import fpid_pkg::*;
#(
  parameter int unsigned SEG_SHIFT_E  = 7,
  parameter int unsigned SEG_SHIFT_DE = 7,
  parameter int unsigned KP_MIN = 24,
  parameter int unsigned KP_MAX = 45,
  parameter int unsigned KD_MIN = 20,
  parameter int unsigned KD_MAX = 38
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic signed [CRISP_W-1:0] e,
  input  logic signed [CRISP_W-1:0] de,
  output logic [OUT_W-1:0]          kp,
  output logic [OUT_W-1:0]          kd,
  output logic [OUT_W-1:0]          ki,
  output logic [OUT_W-1:0]          alpha,
  output logic                      busy,
  output logic                      done
);

  logic [2:0]        addr_e, addr_de;
  logic [MU_W-1:0]   data_e, data_de;
  in_label_e         mf [4];
  logic [MU_W-1:0]   mu [4];
  logic              fz_valid_e, fz_valid_de;
  logic [MU_W-1:0]   mu_o [4];
  logic [RULE_W-1:0] rule [4];
  logic              inf_valid;
  logic              df_busy;
  logic              run;             // between start and the defuzzifier starting
  logic              go;

  assign go = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         run <= 1'b0;
    else if (go)        run <= 1'b1;
    else if (inf_valid) run <= 1'b0;
  end

  assign busy = run || df_busy;

  mf_lut u_mf_lut (
    .addr_a(addr_e),  .data_a(data_e),
    .addr_b(addr_de), .data_b(data_de));

  fuzzifier #(.SEG_SHIFT(SEG_SHIFT_E)) u_fuzz_e (
    .clk, .rst_n, .en(go), .crisp(e),
    .lut_addr(addr_e), .lut_data(data_e),
    .mf0(mf[0]), .mf1(mf[1]), .mu0(mu[0]), .mu1(mu[1]), .valid(fz_valid_e));

  fuzzifier #(.SEG_SHIFT(SEG_SHIFT_DE)) u_fuzz_de (
    .clk, .rst_n, .en(go), .crisp(de),
    .lut_addr(addr_de), .lut_data(data_de),
    .mf0(mf[2]), .mf1(mf[3]), .mu0(mu[2]), .mu1(mu[3]), .valid(fz_valid_de));

  inference_engine u_infer (
    .clk, .rst_n, .en(fz_valid_e && fz_valid_de),
    .mf, .mu, .mu_o, .rule, .valid(inf_valid));

  defuzzifier #(.KP_MIN(KP_MIN), .KP_MAX(KP_MAX), .KD_MIN(KD_MIN), .KD_MAX(KD_MAX))
    u_defuzz (
    .clk, .rst_n, .start(inf_valid), .mu_o, .rule,
    .kp, .kd, .alpha, .ki, .busy(df_busy), .done);

endmodule
