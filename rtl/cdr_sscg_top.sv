// cdr_sscg_top: digital core of a 6 Gb/s receiver with spread-spectrum
// clocking: the CDR loop with its BIST, and the controller of the local
// spread-spectrum clock generator.
//
// Clock domains: clk is the 1.2 GHz word clock (the free-running PLL clock,
// five bits per cycle); clk_ref is the 100 MHz PLL reference clock of the
// SSCG. The analog parts (ten-phase PLL, phase muxes and interpolators,
// M-AES edge delay, samplers) sit outside and connect through the ports:
//   pi_ctrl / edge_offs -> CDR phase selection and edge delay
//   data_s / edge_s     <- samplers, retimed to clk
//   ssc_pi_ctrl         -> phase rotator in the SSCG feedback path
//   clk_rot / clk_fb    <- rotator output, -> PLL phase-frequency detector
//                          (divide-by-12 feedback divider, third domain)
// The BIST checks the recovered words against a repeating K28.5 pattern.
// Each domain has its own synchronous active-low reset (this design's
// choice).
module cdr_sscg_top
  import cdr_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clk_ref,
  input  logic                      rst_ref_n,
  input  logic                      clk_rot,
  input  logic                      rst_rot_n,
  input  cdr_cfg_t                  cfg,
  input  logic                      ssc_en,
  input  logic [N_LANES-1:0]          data_s,
  input  logic [N_LANES-1:0]          edge_s,
  output logic [N_LANES-1:0]          rx_data,
  output pi_ctrl_t                  pi_ctrl [N_LANES],
  output logic signed [5:0]         edge_offs [N_LANES],
  output logic [$clog2(N_STEPS)-1:0] cdr_phase,
  output logic signed [7:0]         cdr_freq,
  output pi_ctrl_t                  ssc_pi_ctrl,
  output logic [$clog2(N_STEPS)-1:0] ssc_phase,
  output logic [7:0]                ssc_k,
  output logic [19:0]               rev_data,
  output logic                      data_en,
  output logic [15:0]               err_cnt,
  output logic                      err_pwm,
  output logic                      clk_fb,
  // loop observation
  output logic signed [1:0]         p_step,
  output logic signed [7:0]         i_step,
  output logic signed [GN_FRAC+1:0] gn,
  output logic                      wrap_up,
  output logic                      wrap_dn,
  output logic [4:0]                ssc_alpha,
  output logic                      ssc_turn_top,
  output logic                      ssc_turn_bot
);

  cdr_loop #(.LANES(N_LANES)) u_cdr (
    .clk, .rst_n, .cfg, .data_s, .edge_s, .rx_data, .pi_ctrl, .edge_offs,
    .phase(cdr_phase), .freq(cdr_freq), .p_step, .i_step, .gn,
    .wrap_up, .wrap_dn);

  bist_k285 #(.LANES(N_LANES), .ERR_W(16)) u_bist (
    .clk, .rst_n, .data(rx_data), .rev_data, .data_en, .err_cnt, .err_pwm);

  sscg_ctrl u_sscg (
    .clk_ref, .rst_n(rst_ref_n), .en(ssc_en), .pi_ctrl(ssc_pi_ctrl),
    .phase(ssc_phase), .k(ssc_k), .alpha(ssc_alpha), .turn_top(ssc_turn_top),
    .turn_bot(ssc_turn_bot));

  fb_divider #(.N(12)) u_fbdiv (.clk_rot, .rst_n(rst_rot_n), .clk_fb);

endmodule
