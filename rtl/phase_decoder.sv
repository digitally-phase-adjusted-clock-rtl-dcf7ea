// phase_decoder: rotation count -> control of the phase mux pairs and
// interpolators.
//
// Position p (0..N_PH*N_INT-1) means PLL phase c = p / N_INT plus f = p % N_INT
// sixteenths of the way to phase c+1. Each interpolator is fed by one mux
// over the even PLL phases and one over the odd phases ("zigzag" order):
// phases c and c+1 are always one even and one odd, so a mux only changes
// its selection while its interpolation weight is zero, which avoids
// glitches, and 5:1 muxes suffice instead of 10:1. The weight of the odd
// input, as a thermometer code (monotonic steps), is
//   f        for even c  (moving from even phase c to odd phase c+1)
//   N_INT - f for odd c   (moving from odd phase c to even phase c+1)
// Lane k is placed LANE_STEP positions (one UI) after lane k-1. The edge
// clocks are the complementary outputs of the same interpolators (half a PLL
// period later); that pairing is this design's reading of how five mux pairs
// serve ten sampling clocks.
// Timing: outputs registered, one cycle after phase.
module phase_decoder
  import cdr_pkg::*;
#(
  parameter int LANES     = 5,
  parameter int LANE_STEP = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(N_STEPS)-1:0] phase,
  output pi_ctrl_t                  pi_ctrl [LANES]
);
  function automatic pi_ctrl_t decode(input int unsigned p);
    pi_ctrl_t    r;
    int unsigned c, f, w, ce, co;
    c = p / N_INT;
    f = p % N_INT;
    if (c % 2 == 0) begin
      ce = c;
      co = (c + 1) % N_PH;
      w  = f;
    end else begin
      co = c;
      ce = (c + 1) % N_PH;
      w  = N_INT - f;
    end
    r.sel_even = '0;
    r.sel_odd  = '0;
    r.sel_even[ce / 2] = 1'b1;
    r.sel_odd[co / 2]  = 1'b1;
    r.therm = '0;
    for (int i = 0; i < N_INT; i++) r.therm[i] = (i < w);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < LANES; k++) pi_ctrl[k] <= decode(k * LANE_STEP % N_STEPS);
    end else begin
      for (int k = 0; k < LANES; k++)
        pi_ctrl[k] <= decode((int'(phase) + k * LANE_STEP) % N_STEPS);
    end
  end
endmodule
