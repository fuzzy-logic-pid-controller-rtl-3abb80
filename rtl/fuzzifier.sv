// fuzzifier: turns one 10-bit signed crisp value into its two active fuzzy labels.
//
// Seven triangular labels NB..PB have their centres 2^SEG_SHIFT apart, at
// -3,-2,..,+3 times 2^SEG_SHIFT (±384 with the default SEG_SHIFT = 7). Because at
// most two labels overlap, a crisp value x is described by the lower label MF0 of
// the segment it falls in, the upper label MF1 = MF0+1, and their degrees mu0 and
// mu1. The three bits below the segment index address the shared membership LUT;
// the LUT gives mu1 and mu0 is its complement, so mu0 + mu1 = 15. Values at or
// beyond the outer centres saturate to full membership of NB or PB.
//
// Interface: when 'en' is high the outputs are registered at the next clock edge
// (one clock of latency) and 'valid' rises for one cycle. The LUT is read
// combinationally through lut_addr/lut_data. The widths (10-bit crisp, 3-bit
// label, 4-bit degree, 3-bit LUT address, 4-bit LUT data) follow the
// fuzzification diagram; the even spacing of the labels and the saturation are
// this design's choices.
module fuzzifier
  import fpid_pkg::*;
#(
  parameter int unsigned SEG_SHIFT = 7   // log2 of the distance between label centres
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic signed [CRISP_W-1:0] crisp,
  output logic [2:0]                lut_addr,
  input  logic [MU_W-1:0]           lut_data,
  output in_label_e                 mf0,
  output in_label_e                 mf1,
  output logic [MU_W-1:0]           mu0,
  output logic [MU_W-1:0]           mu1,
  output logic                      valid
);

  localparam int signed HALF = 3 * (1 << SEG_SHIFT);  // outermost centre

  initial assert (SEG_SHIFT >= 3 && HALF < (1 << (CRISP_W - 1)))
    else $error("fuzzifier: SEG_SHIFT out of range");

  logic [CRISP_W:0]  offset;      // crisp + HALF, valid inside the universe
  logic [2:0]        seg;
  in_label_e         mf0_d, mf1_d;
  logic [MU_W-1:0]   mu0_d, mu1_d;

  always_comb begin
    offset   = (CRISP_W+1)'(int'(crisp) + HALF);
    seg      = 3'(offset >> SEG_SHIFT);
    lut_addr = offset[SEG_SHIFT-1 -: 3];
    if (int'(crisp) <= -HALF) begin
      mf0_d = NB;  mf1_d = NM;
      mu0_d = MU_W'(MU_MAX);  mu1_d = '0;
    end else if (int'(crisp) >= HALF) begin
      mf0_d = PM;  mf1_d = PB;
      mu0_d = '0;  mu1_d = MU_W'(MU_MAX);
    end else begin
      mf0_d = in_label_e'(seg);
      mf1_d = in_label_e'(seg + 3'd1);
      mu1_d = lut_data;
      mu0_d = MU_W'(MU_MAX) - lut_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mf0   <= NB;
      mf1   <= NM;
      mu0   <= '0;
      mu1   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        mf0 <= mf0_d;
        mf1 <= mf1_d;
        mu0 <= mu0_d;
        mu1 <= mu1_d;
      end
    end
  end

endmodule
