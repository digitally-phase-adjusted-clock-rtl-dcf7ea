// cdr_loop: digital second-order phase/frequency tracking loop of the
// feed-forward phase-adjusted CDR.
//
// The PLL runs free; the loop only chooses where, inside the 5-UI PLL
// period, the five data and five edge sampling clocks sit (160 positions of
// 1/32 UI). Data flow, one register per stage:
//   bbpd          lead/lag per transition of the five bits
//   gain_comp     (lead - lag)/transitions, or majority vote     (1.2 GHz)
//   window_sum    sum of two words, valid every second clock      (600 MHz)
//   prop_path     sigma-delta gain 2^-N  -> P = -1/0/+1 steps
//   integral_path F += P, sigma-delta gain 2^-M -> I steps
//   phase_counter position += P + I, modulo 160
//   phase_decoder mux selects + thermometer codes of the 5 interpolators
// maes_ctrl alternates the edge clocks (M-AES). The loop structure, gains
// and rates follow the design; widths, the fixed-point format and register
// placement (loop latency) are this design's choices.
// Interface: data_s/edge_s are the sampler outputs retimed to clk (bit 0
// earliest); rx_data is the recovered word one clock later.
// Timing: a PD decision reaches the rotation counter 5-6 clocks later and
// the interpolator control one clock after that.
module cdr_loop
  import cdr_pkg::*;
#(
  parameter int LANES = cdr_pkg::N_LANES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  cdr_cfg_t                  cfg,
  input  logic [LANES-1:0]          data_s,
  input  logic [LANES-1:0]          edge_s,
  output logic [LANES-1:0]          rx_data,
  output pi_ctrl_t                  pi_ctrl [LANES],
  output logic signed [5:0]         edge_offs [LANES],
  output logic [$clog2(N_STEPS)-1:0] phase,
  output logic signed [7:0]         freq,
  output logic signed [1:0]         p_step,
  output logic signed [7:0]         i_step,
  output logic signed [GN_FRAC+1:0] gn,
  output logic                      wrap_up,
  output logic                      wrap_dn
);
  logic [LANES-1:0]          lead, lag, trans;
  logic signed [GN_FRAC+2:0] wsum;
  logic                      wvalid, pvalid, ivalid;

  bbpd #(.LANES(LANES)) u_pd (
    .clk, .rst_n, .data_s, .edge_s, .lead, .lag, .trans, .rx_data);

  maes_ctrl #(.LANES(LANES)) u_maes (
    .clk, .rst_n, .en(cfg.maes_en), .edge_offs);

  gain_comp #(.LANES(LANES), .FRAC(GN_FRAC)) u_gc (
    .clk, .rst_n, .mode(cfg.mode), .lead, .lag, .gn);

  window_sum #(.IN_W(GN_FRAC + 2)) u_win (
    .clk, .rst_n, .gn, .sum(wsum), .valid(wvalid));

  prop_path #(.X_W(GN_FRAC + 3), .W(GN_FRAC + 1)) u_prop (
    .clk, .rst_n, .in_valid(wvalid), .x(wsum), .n_shift(cfg.n_shift),
    .step(p_step), .out_valid(pvalid));

  integral_path #(.FREQ_W(8), .STEP_W(8)) u_int (
    .clk, .rst_n, .en(cfg.int_en), .in_valid(pvalid), .p_step,
    .m_shift(cfg.m_shift), .i_step, .out_valid(ivalid), .freq);

  phase_counter #(.MODULUS(N_STEPS), .STEP_W(9)) u_cnt (
    .clk, .rst_n, .en(1'b1), .step(9'(p_step) + 9'(i_step)),
    .phase, .wrap_up, .wrap_dn);

  phase_decoder #(.LANES(LANES), .LANE_STEP(N_STEPS / LANES)) u_dec (
    .clk, .rst_n, .phase, .pi_ctrl);

endmodule
