// fpid_pkg: types, widths and rule tables shared by the fuzzy-tuned PID controller.
//
// The widths are those of the block diagrams: 10-bit set point, process value and
// crisp fuzzy inputs, 8-bit PID gains and crisp fuzzy outputs, 12-bit controller
// output, 4-bit membership degrees, 3-bit membership-function indices and 6-bit rule
// numbers. The three rule tables give, for each pair (error label, error-change
// label), the consequent for Kp, Kd and alpha of the level-process tuning. Rows are
// indexed by the error label, columns by the error-change label; the rule number of
// a pair is 7*e_label + de_label. The centres of the output labels are spread evenly
// between the scheduling limits (Kp 24..45, Kd 20..38) and rounded to integers; this
// even spacing and rounding is this design's choice.
package fpid_pkg;

  localparam int unsigned ADC_W   = 10;  // SP, PV
  localparam int unsigned GAIN_W  = 8;   // Kp, Ki, Kd
  localparam int unsigned VO_W    = 12;  // controller output
  localparam int unsigned CRISP_W = 10;  // fuzzifier input
  localparam int unsigned MU_W    = 4;   // membership degree
  localparam int unsigned MF_W    = 3;   // membership-function index
  localparam int unsigned RULE_W  = 6;   // rule number 0..48
  localparam int unsigned OUT_W   = 8;   // crisp fuzzy output
  localparam int unsigned DIV_W   = 14;  // divider operand width
  localparam int unsigned N_LABEL = 7;   // input labels per fuzzy input
  localparam int unsigned N_RULE  = N_LABEL * N_LABEL;
  localparam int unsigned MU_MAX  = (1 << MU_W) - 1;

  // Input linguistic labels of e and de.
  typedef enum logic [MF_W-1:0] {NB = 3'd0, NM = 3'd1, NS = 3'd2, ZO = 3'd3,
                                 PS = 3'd4, PM = 3'd5, PB = 3'd6} in_label_e;

  // Output linguistic labels of Kp and Kd.
  typedef enum logic [2:0] {Z = 3'd0, VS = 3'd1, S = 3'd2, M = 3'd3,
                            B = 3'd4, VB = 3'd5} out_label_e;

  // Which scheduled quantity the defuzzifier is producing.
  typedef enum logic [1:0] {SEL_KP = 2'd0, SEL_KD = 2'd1, SEL_ALPHA = 2'd2} out_sel_e;

  // Rule tables, entry [7*e + de].
  localparam out_label_e KP_RULE [N_RULE] = '{
    VB, VB, VB, VB, VB, VB, VB,   // e = NB
    Z,  B,  S,  VB, S,  B,  Z,    // e = NM
    Z,  VS, VS, VB, VS, VS, Z,    // e = NS
    Z,  Z,  VS, VB, VS, Z,  Z,    // e = ZO
    Z,  VS, VS, VB, VS, VS, Z,    // e = PS
    Z,  B,  S,  VB, S,  B,  Z,    // e = PM
    VB, VB, VB, VB, VB, VB, VB    // e = PB
  };

  localparam out_label_e KD_RULE [N_RULE] = '{
    Z,  Z,  Z,  Z,  Z,  Z,  Z,    // e = NB
    VB, VB, VS, Z,  VS, VB, VB,   // e = NM
    VB, B,  B,  Z,  B,  B,  VB,   // e = NS
    VB, VB, VB, VB, VB, VB, VB,   // e = ZO
    VB, B,  B,  Z,  B,  B,  VB,   // e = PS
    VB, VB, VS, Z,  VS, VB, VB,   // e = PM
    Z,  Z,  Z,  Z,  Z,  Z,  Z     // e = PB
  };

  // alpha singletons, as integers.
  localparam logic [OUT_W-1:0] ALPHA_RULE [N_RULE] = '{
    2, 2, 2, 2, 2, 2, 2,          // e = NB
    3, 3, 2, 2, 2, 3, 3,          // e = NM
    4, 3, 3, 2, 3, 3, 4,          // e = NS
    5, 4, 3, 3, 3, 4, 5,          // e = ZO
    4, 3, 3, 2, 3, 3, 4,          // e = PS
    3, 3, 2, 2, 2, 3, 3,          // e = PM
    2, 2, 2, 2, 2, 2, 2           // e = PB
  };

  // Centre of output label 'lbl' on the range lo..hi: lo + (hi-lo)*lbl/5, rounded.
  function automatic logic [OUT_W-1:0] label_centre(input int unsigned lo,
                                                    input int unsigned hi,
                                                    input out_label_e lbl);
    int unsigned span;
    span = (hi - lo) * 2 * int'(lbl);
    return OUT_W'(lo + (span + 5) / 10);
  endfunction

  // Rule number of the pair (e label, de label).
  function automatic logic [RULE_W-1:0] rule_number(input in_label_e e_lbl,
                                                    input in_label_e de_lbl);
    return RULE_W'(N_LABEL * int'(e_lbl) + int'(de_lbl));
  endfunction

endpackage
