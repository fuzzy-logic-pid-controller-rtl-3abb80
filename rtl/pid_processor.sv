// pid_processor: velocity-form digital PID with shared operators.
//
// Each action computes
//     Vo[n] = Vo[n-1] + (Kp+Ki+Kd)*e[n] - (Kp+2Kd)*e[n-1] + Kd*e[n-2],
// with e[n] = SP - PV, in three processes that reuse one three-input adder, one
// two-input adder and two multipliers under a small state machine:
//   process 1: Kp+Ki+Kd (3-input adder), Kp+2Kd (2-input adder), Kd*e[n-2]
//   process 2: (Kp+Ki+Kd)*e[n], (Kp+2Kd)*e[n-1], Kd*e[n-2] + Vo[n-1]
//   process 3: the final three-input sum, clamped, and the shift of e history.
// Gains are unsigned integers; the output is their product with the error
// scaled down by 2^GAIN_SHIFT, i.e. the gains carry GAIN_SHIFT fractional bits.
// Vo[n-1] is kept internally with those fractional bits and clamped to the
// 12-bit output range, which also stops the integral from winding up. The
// error history and Vo start at zero after reset.
//
// Timing: 'start' samples SP, PV and the gains; 'vo' updates and 'done' pulses
// three clock edges later, so one action spans five clock cycles from the one
// holding 'start' to the one holding 'done'. The three
// processes and the operator sharing follow the process diagram; the error
// width (11-bit signed), the fractional scaling and the clamp are this
// design's choices.
module pid_processor
  import fpid_pkg::*;
#(
  parameter int unsigned GAIN_SHIFT = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [ADC_W-1:0]    sp,
  input  logic [ADC_W-1:0]    pv,
  input  logic [GAIN_W-1:0]   kp,
  input  logic [GAIN_W-1:0]   ki,
  input  logic [GAIN_W-1:0]   kd,
  output logic [VO_W-1:0]     vo,
  output logic                busy,
  output logic                done
);

  typedef enum logic [1:0] {S_IDLE, S_P1, S_P2, S_P3} state_e;

  localparam int unsigned E_W   = ADC_W + 1;           // signed error
  localparam int unsigned SUM_W = GAIN_W + 2;          // Kp+Ki+Kd, Kp+2Kd
  localparam int unsigned ACC_W = 32;                  // internal sums
  localparam logic signed [ACC_W-1:0] V_MAX = ACC_W'(((1 << VO_W) << GAIN_SHIFT) - 1);

  state_e                    state;
  logic signed [E_W-1:0]     e0, e1, e2;               // e[n], e[n-1], e[n-2]
  logic [GAIN_W-1:0]         kp_r, ki_r, kd_r;
  logic [SUM_W-1:0]          s1, s2;
  logic signed [ACC_W-1:0]   m1, m2, m3v;              // process results
  logic signed [ACC_W-1:0]   vacc;                     // Vo[n-1], fractional

  // Shared operators and their operand multiplexers.
  logic signed [ACC_W-1:0]   add3_a, add3_b, add3_c, add3_y;
  logic [SUM_W-1:0]          add2_y;
  logic signed [SUM_W:0]     mula_a, mulb_a;
  logic signed [E_W-1:0]     mula_b, mulb_b;
  logic signed [ACC_W-1:0]   mula_y, mulb_y;

  always_comb begin
    add3_a = '0; add3_b = '0; add3_c = '0;
    mula_a = '0; mula_b = '0;
    mulb_a = '0; mulb_b = '0;
    unique case (state)
      S_P1: begin
        add3_a = ACC_W'(kp_r); add3_b = ACC_W'(ki_r); add3_c = ACC_W'(kd_r);
        mula_a = $signed({3'b0, kd_r}); mula_b = e2;
      end
      S_P2: begin
        mula_a = $signed({1'b0, s1}); mula_b = e0;
        mulb_a = $signed({1'b0, s2}); mulb_b = e1;
        add3_a = m3v; add3_b = vacc;                    // m3v holds Kd*e[n-2] here
      end
      S_P3: begin
        add3_a = m1; add3_b = -m2; add3_c = m3v;
      end
      default: ;
    endcase
    add3_y = add3_a + add3_b + add3_c;
    add2_y = SUM_W'(kp_r) + SUM_W'({kd_r, 1'b0});
    mula_y = ACC_W'(mula_a * mula_b);
    mulb_y = ACC_W'(mulb_a * mulb_b);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      e0 <= '0; e1 <= '0; e2 <= '0;
      kp_r <= '0; ki_r <= '0; kd_r <= '0;
      s1 <= '0; s2 <= '0;
      m1 <= '0; m2 <= '0; m3v <= '0;
      vacc <= '0;
      vo   <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          e0    <= $signed({1'b0, sp}) - $signed({1'b0, pv});
          kp_r  <= kp;
          ki_r  <= ki;
          kd_r  <= kd;
          state <= S_P1;
        end
        S_P1: begin
          s1    <= SUM_W'(add3_y);
          s2    <= add2_y;
          m3v   <= mula_y;
          state <= S_P2;
        end
        S_P2: begin
          m1    <= mula_y;
          m2    <= mulb_y;
          m3v   <= add3_y;
          state <= S_P3;
        end
        default: begin                                  // S_P3
          if (add3_y < 0) begin
            vacc <= '0;
            vo   <= '0;
          end else if (add3_y > V_MAX) begin
            vacc <= V_MAX;
            vo   <= VO_W'(V_MAX >>> GAIN_SHIFT);
          end else begin
            vacc <= add3_y;
            vo   <= VO_W'(add3_y >>> GAIN_SHIFT);
          end
          e2    <= e1;
          e1    <= e0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
