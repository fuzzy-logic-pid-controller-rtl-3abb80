// crisp_lut: crisp output value of a rule's consequent.
//
// Given a 6-bit rule number (7*e_label + de_label) and the quantity being
// defuzzified, returns the 8-bit centre of that rule's consequent: for Kp and Kd
// the centre of the output label (Z, VS, S, M, B, VB) on the scheduling range,
// for alpha the singleton value itself. Mapping the normalised gains K'p, K'd
// onto Kmin + (Kmax-Kmin)*K' is folded into the table; since the centre-of-
// gravity average is linear, this gives the same Kp and Kd as scaling after
// defuzzification. The table is combinational; rule numbers above 48 read 0.
module crisp_lut
  import fpid_pkg::*;
#(
  parameter int unsigned KP_MIN = 24,
  parameter int unsigned KP_MAX = 45,
  parameter int unsigned KD_MIN = 20,
  parameter int unsigned KD_MAX = 38
) (
  input  logic [RULE_W-1:0] rule,
  input  out_sel_e          sel,
  output logic [OUT_W-1:0]  crisp
);

  always_comb begin
    crisp = '0;
    if (rule < RULE_W'(N_RULE)) begin
      unique case (sel)
        SEL_KP:    crisp = label_centre(KP_MIN, KP_MAX, KP_RULE[rule]);
        SEL_KD:    crisp = label_centre(KD_MIN, KD_MAX, KD_RULE[rule]);
        SEL_ALPHA: crisp = ALPHA_RULE[rule];
        default:   crisp = '0;
      endcase
    end
  end

endmodule
