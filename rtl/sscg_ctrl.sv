// sscg_ctrl: digital control of the phase-rotation spread-spectrum clock
// generator.
//
// The SSCG is a 100 MHz -> 1.2 GHz PLL (divide by 12) whose feedback is taken
// through a phase rotator (mux pair + 16-step interpolator over the ten VCO
// phases, 160 positions). Moving the rotator alpha positions earlier at
// every reference edge makes the loop settle at
//   f_vco = f_nom * (1 - alpha / (12 * 160)),
// so alpha = 9.6 gives 5000 ppm down spread. This block chains the
// triangular profile (ssc_profile), the first-order sigma-delta (sd_mod1),
// a rotation counter counting down by alpha (phase_counter) and the
// zigzag/thermometer decoder (phase_decoder, one lane). The direction of
// rotation (count down) follows from the down-spread equation.
// Timing: all in the reference-clock domain; pi_ctrl follows phase by one
// cycle.
module sscg_ctrl
  import cdr_pkg::*;
#(
  parameter int K_MIN        = 1,
  parameter int K_MAX        = 153,
  parameter int STAIR_CYCLES = 10
) (
  input  logic                      clk_ref,
  input  logic                      rst_n,
  input  logic                      en,
  output pi_ctrl_t                  pi_ctrl,
  output logic [$clog2(N_STEPS)-1:0] phase,
  output logic [7:0]                k,
  output logic [4:0]                alpha,
  output logic                      turn_top,
  output logic                      turn_bot
);
  logic     carry, wrap_up, wrap_dn;
  pi_ctrl_t pi_arr [1];

  ssc_profile #(.K_W(8), .K_MIN(K_MIN), .K_MAX(K_MAX), .STAIR_CYCLES(STAIR_CYCLES)) u_prof (
    .clk_ref, .rst_n, .en, .k, .turn_top, .turn_bot);

  sd_mod1 #(.K_W(8), .ACC_W(4)) u_sd (
    .clk_ref, .rst_n, .k, .alpha, .carry);

  phase_counter #(.MODULUS(N_STEPS), .STEP_W(9)) u_cnt (
    .clk(clk_ref), .rst_n, .en(1'b1), .step(-$signed(9'(alpha))),
    .phase, .wrap_up, .wrap_dn);

  phase_decoder #(.LANES(1), .LANE_STEP(STEPS_UI)) u_dec (
    .clk(clk_ref), .rst_n, .phase, .pi_ctrl(pi_arr));

  assign pi_ctrl = pi_arr[0];
endmodule
