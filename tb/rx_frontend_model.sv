// rx_frontend_model: behavioural phase-domain model of the analog receiver
// front end, for testbenches only (not synthesizable).
//
// It stands in for the serial transmitter, the channel jitter, the ten-phase
// PLL, the phase muxes and interpolators, the M-AES edge delays and the ten
// samplers. Time is counted in transmit unit intervals (UI):
//  * transmit bit n occupies [n + j(n), n + 1 + j(n+1)), where j(n) is
//    Gaussian random jitter (rj_sigma, UI rms, from a hash of n so it is
//    reproducible) plus sinusoidal jitter (sj_pp UI peak-to-peak at sj_hz,
//    6 Gb/s nominal), limited to +-0.45 UI;
//  * the data pattern is K28.5 (pattern 0), PRBS7 (1, about 50 % transition
//    density), 1010... (2, 100 % transition density) or five ones and five
//    zeros (3, 20 % transition density);
//  * a word clock edge advances the receiver time base by 5 receive UI, and
//    one receive UI is (1 + tx_ppm)/(1 + rx_ppm) transmit UI;
//  * each lane's clock position is rebuilt from its mux selects and
//    thermometer code (weighted average of the two selected PLL phases, in
//    1/32 UI); lane 0's position is unwrapped across the 160-step circle so
//    the sampling instants stay continuous (an ideal retimer);
//  * data lane i samples at base + pos_i/32 UI, edge i half a UI earlier,
//    moved by its M-AES offset (1/100 UI).
// Outputs change on the falling clock edge for the next rising edge.
// Counters: slips (a data sample not following the previous one by exactly
// one bit), and the mean absolute distance of the data samples from the bit
// centres, for the testbench to judge lock.
module rx_frontend_model
  import cdr_pkg::*;
(
  input  logic              clk,
  input  pi_ctrl_t          pi_ctrl [N_LANES],
  input  logic signed [5:0] edge_offs [N_LANES],
  input  real               tx_ppm,
  input  real               rx_ppm,
  input  real               rj_sigma,
  input  real               sj_pp,
  input  real               sj_hz,
  input  int                pattern,
  output logic [N_LANES-1:0] data_s,
  output logic [N_LANES-1:0] edge_s
);
  localparam real PI = 3.14159265358979;
  localparam logic [19:0] K285 = 20'b1010_0000_1101_0111_1100;

  real     t_word = 1000.0;   // receive time base, transmit UI
  real     u0;                // unwrapped lane-0 position, 1/32 UI
  int      last_pos0 = -1;
  longint  last_idx = -1;
  int      slips = 0;
  real     err_acc = 0.0;
  int      err_n = 0;
  bit      prbs [127];

  initial begin
    logic [6:0] s;
    s = 7'h7f;
    for (int i = 0; i < 127; i++) begin
      prbs[i] = s[6] ^ s[5];
      s = {s[5:0], s[6] ^ s[5]};
    end
  end

  function automatic logic [31:0] hash(input logic [31:0] x);
    logic [31:0] h;
    h = x * 32'h9E3779B1;
    h ^= h >> 15; h *= 32'h85EBCA77;
    h ^= h >> 13; h *= 32'hC2B2AE3D;
    h ^= h >> 16;
    return h;
  endfunction

  function automatic real jit(input longint n);
    real u1, u2, g, j;
    u1 = (real'(hash(32'(n))) + 1.0) / 4294967297.0;
    u2 = real'(hash(32'(n) ^ 32'h5bd1e995)) / 4294967296.0;
    g  = $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
    j  = rj_sigma * g + 0.5 * sj_pp * $sin(2.0 * PI * sj_hz * real'(n) / 6.0e9);
    if (j > 0.45) j = 0.45;
    if (j < -0.45) j = -0.45;
    return j;
  endfunction

  function automatic logic tx_bit(input longint n);
    case (pattern)
      0:       return K285[n % 20];
      1:       return prbs[n % 127];
      3:       return ((n / 5) % 2) == 1;
      default: return n[0];
    endcase
  endfunction

  // index of the transmit bit seen at time t
  function automatic longint bit_at(input real t);
    longint n0;
    n0 = longint'($floor(t));
    if (t < real'(n0) + jit(n0)) return n0 - 1;
    if (t >= real'(n0 + 1) + jit(n0 + 1)) return n0 + 1;
    return n0;
  endfunction

  function automatic int position(input pi_ctrl_t c);
    int pe, po, w;
    pe = 0; po = 1;
    for (int i = 0; i < 5; i++) begin
      if (c.sel_even[i]) pe = 2 * i;
      if (c.sel_odd[i])  po = 2 * i + 1;
    end
    w = $countones(c.therm);
    if ((pe + 1) % 10 == po) return (pe * 16 + w) % 160;
    return (po * 16 + 16 - w) % 160;
  endfunction

  always @(negedge clk) begin
    real    r, t, te, c;
    int     p0, d;
    longint idx;
    r  = (1.0 + tx_ppm * 1.0e-6) / (1.0 + rx_ppm * 1.0e-6);
    p0 = position(pi_ctrl[0]);
    if (last_pos0 < 0) u0 = real'(p0);
    else begin
      d = p0 - last_pos0;
      if (d > 80) d -= 160;
      if (d < -80) d += 160;
      u0 += real'(d);
    end
    last_pos0 = p0;
    for (int i = 0; i < N_LANES; i++) begin
      int rel;
      rel = (position(pi_ctrl[i]) - p0 + 160) % 160;
      t   = t_word + (u0 + real'(rel)) / 32.0 * r;
      te  = t - 0.5 * r + real'(edge_offs[i]) / 100.0 * r;
      idx = bit_at(t);
      data_s[i] = tx_bit(idx);
      edge_s[i] = tx_bit(bit_at(te));
      if (last_idx >= 0 && idx != last_idx + 1) slips++;
      last_idx = idx;
      c = t - (real'(idx) + 0.5);
      err_acc += (c < 0.0) ? -c : c;
      err_n++;
    end
    t_word += 5.0 * r;
  end

  // mean |sample - bit centre| since the last call, UI
  function automatic real take_err();
    real m;
    m = (err_n > 0) ? err_acc / real'(err_n) : 0.0;
    err_acc = 0.0;
    err_n = 0;
    return m;
  endfunction
endmodule
