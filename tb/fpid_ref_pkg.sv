// fpid_ref_pkg: reference model of the fuzzy-scheduled PID controller, used by
// the testbenches to work out expected results independently of the RTL.
//
// It is written for the default parameters only: label centres 128 apart
// (outer centres at +-384), membership edge table round(15*a/8), Kp range
// 24..45 and Kd range 20..38 with six evenly spaced output labels. The rule
// tables are held here as strings, one character per cell:
// z = Z, v = VS, s = S, m = M, b = B, V = VB; alpha cells are digits.
package fpid_ref_pkg;

  localparam string KP_TAB [7] = '{"VVVVVVV", "zbsVsbz", "zvvVvvz", "zzvVvzz",
                                   "zvvVvvz", "zbsVsbz", "VVVVVVV"};
  localparam string KD_TAB [7] = '{"zzzzzzz", "VVvzvVV", "VbbzbbV", "VVVVVVV",
                                   "VbbzbbV", "VVvzvVV", "zzzzzzz"};
  localparam string AL_TAB [7] = '{"2222222", "3322233", "4332334", "5433345",
                                   "4332334", "3322233", "2222222"};

  localparam int MU_EDGE [8] = '{0, 2, 4, 6, 8, 9, 11, 13};

  function automatic int label_value(input byte c, input int is_kd);
    int kp_c [6] = '{24, 28, 32, 37, 41, 45};
    int kd_c [6] = '{20, 24, 27, 31, 34, 38};
    int idx;
    case (c)
      "z": idx = 0;
      "v": idx = 1;
      "s": idx = 2;
      "m": idx = 3;
      "b": idx = 4;
      default: idx = 5;
    endcase
    return (is_kd != 0) ? kd_c[idx] : kp_c[idx];
  endfunction

  // Crisp consequent of rule (e label, de label) for output sel (0 Kp, 1 Kd, 2 alpha).
  function automatic int ref_crisp(input int el, input int dl, input int sel);
    if (sel == 0) return label_value(KP_TAB[el][dl], 0);
    if (sel == 1) return label_value(KD_TAB[el][dl], 1);
    return int'(AL_TAB[el][dl]) - int'("0");
  endfunction

  // Two active labels and degrees of a crisp value.
  function automatic void ref_fuzz(input int x, output int l0, output int l1,
                                   output int m0, output int m1);
    int off;
    if (x <= -384) begin
      l0 = 0; l1 = 1; m0 = 15; m1 = 0;
    end else if (x >= 384) begin
      l0 = 5; l1 = 6; m0 = 0; m1 = 15;
    end else begin
      off = x + 384;
      l0  = off / 128;
      l1  = l0 + 1;
      m1  = MU_EDGE[(off % 128) / 16];
      m0  = 15 - m1;
    end
  endfunction

  function automatic int imin(input int a, input int b);
    return (a < b) ? a : b;
  endfunction

  // Scheduled gains for error e and error change de.
  function automatic void ref_schedule(input int e, input int de,
                                       output int kp, output int kd,
                                       output int al, output int ki);
    int el [2], dl [2], em [2], dm [2];
    int w [4], re [4], rd [4];
    int sw, num, q [3];
    ref_fuzz(e, el[0], el[1], em[0], em[1]);
    ref_fuzz(de, dl[0], dl[1], dm[0], dm[1]);
    for (int j = 0; j < 4; j++) begin
      re[j] = el[j / 2];
      rd[j] = dl[j % 2];
      w[j]  = imin(em[j / 2], dm[j % 2]);
    end
    sw = w[0] + w[1] + w[2] + w[3];
    for (int s = 0; s < 3; s++) begin
      num = 0;
      for (int j = 0; j < 4; j++) num += w[j] * ref_crisp(re[j], rd[j], s);
      q[s] = imin(255, (num + sw / 2) / sw);
    end
    kp = q[0];
    kd = q[1];
    al = q[2];
    ki = imin(255, imin(kp * kp, 16383) / imin(al * kd, 16383));
  endfunction

  // Velocity-form PID reference: state is e1, e2 and the fractional output v.
  function automatic void ref_pid(input int sp, input int pv, input int kp,
                                  input int ki, input int kd, input int shift,
                                  inout int e1, inout int e2, inout longint v,
                                  output int vo);
    int e0, g0, g1;
    longint vmax;
    e0   = sp - pv;
    g0   = kp + ki + kd;
    g1   = kp + 2 * kd;
    vmax = (longint'(4096) << shift) - 1;
    v    = v + longint'(g0 * e0) - longint'(g1 * e1) + longint'(kd * e2);
    if (v < 0)    v = 0;
    if (v > vmax) v = vmax;
    vo = int'(v >> shift);
    e2 = e1;
    e1 = e0;
  endfunction

endpackage
