// cdr_pkg: types and constants shared by the digital CDR loop and the SSCG
// phase-rotation controller.
//
// The receiver samples five bits per cycle of a 1.2 GHz, ten-phase PLL clock
// (6 Gb/s). Each sampling clock is made by a pair of 5:1 phase multiplexers
// (one on the even PLL phases, one on the odd ones) and a 16-step phase
// interpolator, which gives 160 positions per PLL period, i.e. 1/32 UI.
// pi_ctrl_t is the control word of one such mux pair plus interpolator.
package cdr_pkg;

  localparam int N_LANES    = 5;    // parallel bits per word clock
  localparam int N_PH       = 10;   // PLL phases
  localparam int N_INT      = 16;   // interpolation steps between two phases
  localparam int N_STEPS    = N_PH * N_INT;        // 160 rotation positions
  localparam int STEPS_UI   = N_STEPS / N_LANES;    // 32 positions = 1 UI
  localparam int GN_FRAC    = 6;    // pre-filter output: 1.0 == 64

  // Control of one mux pair and interpolator.
  //   sel_even : one-hot select of PLL phase 0,2,4,6,8
  //   sel_odd  : one-hot select of PLL phase 1,3,5,7,9
  //   therm    : thermometer code, number of ones = weight (0..16) of the
  //              odd mux output; the even output gets 16 - weight.
  typedef struct packed {
    logic [N_PH/2-1:0] sel_even;
    logic [N_PH/2-1:0] sel_odd;
    logic [N_INT-1:0]  therm;
  } pi_ctrl_t;

  typedef enum logic {
    PF_GAIN_COMP = 1'b0,   // (lead - lag) / transitions
    PF_MAJORITY  = 1'b1    // sign of (lead - lag)
  } prefilter_mode_e;

  // Loop programming.
  typedef struct packed {
    logic [2:0]      n_shift;   // proportional gain G_P = 2^-N, N = 2..5
    logic [2:0]      m_shift;   // integral gain G_I = 2^-M
    prefilter_mode_e mode;
    logic            maes_en;   // alternate the edge clocks
    logic            int_en;    // integral path on
  } cdr_cfg_t;

  // 20-bit K28.5 pair (RD+ then RD-), bit 0 is sent first.
  localparam logic [19:0] K28_5 = 20'b1010_0000_1101_0111_1100;

endpackage
