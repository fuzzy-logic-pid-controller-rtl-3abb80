// inference_engine: max-min rule evaluation for the two-input fuzzy scheduler.
//
// With at most two labels active per input, exactly four rules fire: the pairs
// (MF0,MF2), (MF0,MF3), (MF1,MF2) and (MF1,MF3), where MF0/MF1 are the error
// labels and MF2/MF3 the error-change labels. Each max-min unit gives a rule's
// firing strength as the minimum of its two antecedent degrees; the maximum of
// the max-min composition is taken over a single term here, because the four
// active rules are always distinct. The fuzzy-rule LUT turns each label pair
// into a 6-bit rule number 7*e_label + de_label, which addresses the crisp
// output table of the defuzzifier.
//
// Interface: when 'en' is high, muO0..3 and rule0..3 are registered at the next
// clock edge and 'valid' pulses for one cycle. The pairing of degrees, the 4-bit
// strengths and 6-bit rule numbers follow the inference diagram; the rule
// numbering is this design's choice.
module inference_engine
  import fpid_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  in_label_e           mf [4],     // MF0, MF1 (error), MF2, MF3 (error change)
  input  logic [MU_W-1:0]     mu [4],     // mu0, mu1 (error), mu2, mu3 (error change)
  output logic [MU_W-1:0]     mu_o [4],   // firing strengths muO0..muO3
  output logic [RULE_W-1:0]   rule [4],   // rule numbers Rule0..Rule3
  output logic                valid
);

  function automatic logic [MU_W-1:0] max_min(input logic [MU_W-1:0] a,
                                              input logic [MU_W-1:0] b);
    return (a < b) ? a : b;
  endfunction

  // Antecedent pairing: rule j uses error label E_IDX[j] and change label D_IDX[j].
  localparam int E_IDX [4] = '{0, 0, 1, 1};
  localparam int D_IDX [4] = '{2, 3, 2, 3};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 4; j++) begin
        mu_o[j] <= '0;
        rule[j] <= '0;
      end
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        for (int j = 0; j < 4; j++) begin
          mu_o[j] <= max_min(mu[E_IDX[j]], mu[D_IDX[j]]);
          rule[j] <= rule_number(mf[E_IDX[j]], mf[D_IDX[j]]);
        end
      end
    end
  end

endmodule
