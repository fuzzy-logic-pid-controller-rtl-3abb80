// defuzzifier: centre-of-gravity defuzzification and the Ki computation, on one
// set of shared arithmetic units.
//
// For each of Kp, Kd and alpha, in that order, the four active rules are
// combined by the centre-of-gravity formula
//     out = sum(muO_j * z_j) / sum(muO_j),   j = 0..3,
// where z_j is the crisp centre of rule j's consequent, read from crisp_lut. A
// multiplexer feeds one muO_j per clock to a single 4x8-bit multiplier, a
// demultiplexer stores the four 12-bit products, a four-input adder forms both
// sums in one clock, and the 14-bit sequential divider takes 14 clocks. Half the
// divisor is added to the dividend so that the quotient is rounded to nearest.
// The same units then compute Ki = Kp^2 / (alpha*Kd): each 8x8 product is made
// from two 4x8 products, the upper one shifted left by four, and the quotient
// (truncated) is the 8-bit Ki. An output demultiplexer routes each quotient to
// its register; quotients above 255 saturate.
//
// Timing: 'start' is sampled once; each of the three centre-of-gravity passes
// takes 4 multiply, 1 add and 14 divide clocks, the Ki pass 4 multiply and 14
// divide clocks, and 'done' is high for one cycle 77 clocks after the clock in
// which 'start' was high. Outputs hold until the next run. The operator
// set (4x8 multiplier, four-input adder, 14-bit divider, crisp LUT, shift,
// multiplexer and demultiplexers) follows the defuzzification diagram; the
// schedule, the rounding and the saturation are this design's choices.
module defuzzifier
  import fpid_pkg::*;
#(
  parameter int unsigned KP_MIN = 24,
  parameter int unsigned KP_MAX = 45,
  parameter int unsigned KD_MIN = 20,
  parameter int unsigned KD_MAX = 38
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [MU_W-1:0]     mu_o [4],
  input  logic [RULE_W-1:0]   rule [4],
  output logic [OUT_W-1:0]    kp,
  output logic [OUT_W-1:0]    kd,
  output logic [OUT_W-1:0]    alpha,
  output logic [OUT_W-1:0]    ki,
  output logic                busy,
  output logic                done
);

  typedef enum logic [2:0] {S_IDLE, S_MUL, S_ADD, S_DIV, S_KI_MUL, S_KI_DIV, S_FIN} state_e;

  localparam int unsigned PROD_W = MU_W + OUT_W;   // 12-bit product

  state_e              state;
  out_sel_e            pass;
  logic [1:0]          step;                      // multiplier step 0..3
  logic [PROD_W-1:0]   prod [4];                  // demultiplexed products
  logic [2*OUT_W-1:0]  acc_n, acc_d;              // Kp^2 and alpha*Kd

  // Shared operators.
  logic [MU_W-1:0]     mul_a;
  logic [OUT_W-1:0]    mul_b;
  logic [PROD_W-1:0]   mul_p;
  logic [OUT_W-1:0]    crisp;
  logic [DIV_W-1:0]    sum_p;
  logic [DIV_W-1:0]    sum_mu;
  logic [2*OUT_W-1:0]  acc_d_next;

  logic                div_start;
  logic [DIV_W-1:0]    div_n, div_d, div_q, div_r;
  logic                div_busy, div_done;

  crisp_lut #(.KP_MIN(KP_MIN), .KP_MAX(KP_MAX), .KD_MIN(KD_MIN), .KD_MAX(KD_MAX))
    u_crisp (.rule(rule[step]), .sel(pass), .crisp(crisp));

  seq_divider #(.W(DIV_W)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_n), .divisor(div_d),
    .quotient(div_q), .remainder(div_r), .busy(div_busy), .done(div_done));

  function automatic logic [DIV_W-1:0] sat_div(input logic [2*OUT_W-1:0] v);
    return (v > (2*OUT_W)'({DIV_W{1'b1}})) ? {DIV_W{1'b1}} : DIV_W'(v);
  endfunction

  function automatic logic [OUT_W-1:0] sat_out(input logic [DIV_W-1:0] v);
    return (v > DIV_W'({OUT_W{1'b1}})) ? {OUT_W{1'b1}} : OUT_W'(v);
  endfunction

  always_comb begin
    // Multiplexer into the 4x8 multiplier.
    if (state == S_KI_MUL) begin
      unique case (step)
        2'd0:    begin mul_a = kp[3:0];    mul_b = kp; end
        2'd1:    begin mul_a = kp[7:4];    mul_b = kp; end
        2'd2:    begin mul_a = alpha[3:0]; mul_b = kd; end
        default: begin mul_a = alpha[7:4]; mul_b = kd; end
      endcase
    end else begin
      mul_a = mu_o[step];
      mul_b = crisp;
    end
    mul_p = mul_a * mul_b;

    // Four-input adder: products and firing strengths.
    sum_p  = DIV_W'(prod[0]) + DIV_W'(prod[1]) + DIV_W'(prod[2]) + DIV_W'(prod[3]);
    sum_mu = DIV_W'(mu_o[0]) + DIV_W'(mu_o[1]) + DIV_W'(mu_o[2]) + DIV_W'(mu_o[3]);

    // Shift: the upper-nibble partial product of an 8x8 product.
    acc_d_next = acc_d + ((2*OUT_W)'(mul_p) << 4);

    div_start = 1'b0;
    div_n     = '0;
    div_d     = '0;
    if (state == S_ADD) begin
      div_start = 1'b1;
      div_n     = sum_p + (sum_mu >> 1);
      div_d     = sum_mu;
    end else if (state == S_KI_MUL && step == 2'd3) begin
      div_start = 1'b1;
      div_n     = sat_div(acc_n);
      div_d     = sat_div(acc_d_next);
    end
  end

  assign busy = (state != S_IDLE);

  // The shared divider is only restarted once it has finished.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy)
    else $error("defuzzifier: divider restarted while busy");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pass  <= SEL_KP;
      step  <= '0;
      for (int j = 0; j < 4; j++) prod[j] <= '0;
      acc_n <= '0;
      acc_d <= '0;
      kp    <= '0;
      kd    <= '0;
      alpha <= '0;
      ki    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_MUL;
          pass  <= SEL_KP;
          step  <= '0;
        end
        S_MUL: begin
          prod[step] <= mul_p;                   // demultiplexer
          step       <= step + 2'd1;
          if (step == 2'd3) state <= S_ADD;
        end
        S_ADD: state <= S_DIV;
        S_DIV: if (div_done) begin
          unique case (pass)                     // output demultiplexer
            SEL_KP:  kp    <= sat_out(div_q);
            SEL_KD:  kd    <= sat_out(div_q);
            default: alpha <= sat_out(div_q);
          endcase
          step <= '0;
          if (pass == SEL_ALPHA) begin
            state <= S_KI_MUL;
          end else begin
            pass  <= out_sel_e'(pass + 2'd1);
            state <= S_MUL;
          end
        end
        S_KI_MUL: begin
          unique case (step)
            2'd0:    acc_n <= (2*OUT_W)'(mul_p);
            2'd1:    acc_n <= acc_n + ((2*OUT_W)'(mul_p) << 4);
            2'd2:    acc_d <= (2*OUT_W)'(mul_p);
            default: acc_d <= acc_d_next;
          endcase
          step <= step + 2'd1;
          if (step == 2'd3) state <= S_KI_DIV;
        end
        S_KI_DIV: if (div_done) begin
          ki    <= sat_out(div_q);
          state <= S_FIN;
        end
        default: begin                           // S_FIN
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
