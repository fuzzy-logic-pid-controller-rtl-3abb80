// fuzzy_pid_controller: fuzzy-scheduled PID controller core (top level).
//
// On each 'sample' strobe the controller takes the digitised set point SP and
// process value PV and runs one control action:
//   1. error_unit forms e = SP - PV and de = e[n] - e[n-1]        (1 clock)
//   2. fuzzy_processor schedules Kp, Kd, alpha and Ki from e, de  (79 clocks)
//   3. pid_processor updates the 12-bit output Vo with those gains (5 clocks)
// 'done' is high, with the new 'vo', 84 clocks after the clock in which
// 'sample' was taken, so one action spans 85 clock cycles. At 30 MHz this is about 2.8 us,
// far inside the 100 ms sampling period of the level process. 'sample' is
// ignored while an action is in progress. SP and PV are held from the sample
// for the whole action. The A/D and D/A converters are outside: PV comes in as
// a 10-bit word and Vo goes out as a 12-bit word. The scheduled gains and alpha
// are brought out for observation.
module fuzzy_pid_controller
  import fpid_pkg::*;
#(
  parameter int unsigned SEG_SHIFT_E  = 7,
  parameter int unsigned SEG_SHIFT_DE = 7,
  parameter int unsigned KP_MIN = 24,
  parameter int unsigned KP_MAX = 45,
  parameter int unsigned KD_MIN = 20,
  parameter int unsigned KD_MAX = 38,
  parameter int unsigned GAIN_SHIFT = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample,
  input  logic [ADC_W-1:0]   sp,
  input  logic [ADC_W-1:0]   pv,
  output logic [VO_W-1:0]    vo,
  output logic [GAIN_W-1:0]  kp,
  output logic [GAIN_W-1:0]  ki,
  output logic [GAIN_W-1:0]  kd,
  output logic [OUT_W-1:0]   alpha,
  output logic               busy,
  output logic               done
);

  logic                      active;
  logic                      take;
  logic [ADC_W-1:0]          sp_r, pv_r;
  logic signed [CRISP_W-1:0] e, de;
  logic                      e_valid;
  logic                      fz_busy, fz_done;
  logic                      pid_busy, pid_done;

  assign take = sample && !active;
  assign busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      sp_r   <= '0;
      pv_r   <= '0;
    end else begin
      if (take) begin
        active <= 1'b1;
        sp_r   <= sp;
        pv_r   <= pv;
      end else if (pid_done) begin
        active <= 1'b0;
      end
    end
  end

  assign done = pid_done;

  // Each stage is handed work only when it is free.
  assert property (@(posedge clk) disable iff (!rst_n) e_valid |-> !fz_busy)
    else $error("fuzzy_pid_controller: fuzzy processor started while busy");
  assert property (@(posedge clk) disable iff (!rst_n) fz_done |-> !pid_busy)
    else $error("fuzzy_pid_controller: PID processor started while busy");

  error_unit u_err (
    .clk, .rst_n, .en(take), .sp, .pv, .e, .de, .valid(e_valid));

  fuzzy_processor #(
    .SEG_SHIFT_E(SEG_SHIFT_E), .SEG_SHIFT_DE(SEG_SHIFT_DE),
    .KP_MIN(KP_MIN), .KP_MAX(KP_MAX), .KD_MIN(KD_MIN), .KD_MAX(KD_MAX))
    u_fuzzy (
    .clk, .rst_n, .start(e_valid), .e, .de,
    .kp, .kd, .ki, .alpha, .busy(fz_busy), .done(fz_done));

  pid_processor #(.GAIN_SHIFT(GAIN_SHIFT)) u_pid (
    .clk, .rst_n, .start(fz_done), .sp(sp_r), .pv(pv_r),
    .kp, .ki, .kd, .vo, .busy(pid_busy), .done(pid_done));

endmodule
