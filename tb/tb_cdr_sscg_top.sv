// tb_cdr_sscg_top: end-to-end test of the receiver core at its default
// sizes, in the configuration of the design's circuit-level check:
// G_P = 1/8, G_I = 1/64, gain compensation, M-AES on, K28.5 data at the
// nominal rate, and the receiver's own clock spread by the on-chip SSCG
// (0/-5000 ppm, ~33 kHz triangle), so the CDR has to undo the spread.
//
// The SSCG's rotation amount alpha (steps of T_VCO/160 per 100 MHz reference
// cycle, divide-by-12 PLL) is turned into the receive clock's frequency
// offset -alpha/1920, smoothed by a first-order low pass standing in for the
// PLL (about 2 MHz bandwidth), and fed to the front-end model together with
// 0.02 UI rms random jitter.
// Checks: the BIST locks on K28.5 and sees no bit error and no slip during
// more than one full modulation period; the SSCG reaches its 4980 ppm peak;
// the CDR frequency register follows (about -102 codes at 5000 ppm, Eq. 3.1;
// negative because the sampling phase has to advance against a slow clock);
// a forced 0.5 UI phase jump of the incoming data is seen by the BIST as bit
// errors, after which it relocks. Every mechanism must occur at least once:
// the feedback divider gives one clk_fb edge per 12 rotated-clock cycles;
// proportional up/down steps, integral steps, rotation wraps both ways,
// fractional gain-compensation outputs, M-AES offsets, SSCG profile turns at
// both ends, sigma-delta alternation between two rotation amounts, BIST
// lock, BIST error count.
module tb_cdr_sscg_top;
  import cdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clk_ref = 1'b0, rst_ref_n = 1'b0;
  logic clk_rot, rst_rot_n, clk_fb;
  int n_fb = 0, n_refc = 0;
  cdr_cfg_t cfg;
  logic ssc_en;
  logic [N_LANES-1:0] data_s, edge_s, rx_data;
  pi_ctrl_t pi_ctrl [N_LANES];
  logic signed [5:0] edge_offs [N_LANES];
  logic [7:0] cdr_phase, ssc_phase, ssc_k;
  logic signed [7:0] cdr_freq, i_step;
  pi_ctrl_t ssc_pi_ctrl;
  logic [19:0] rev_data;
  logic data_en, err_pwm, wrap_up, wrap_dn, ssc_turn_top, ssc_turn_bot;
  logic [15:0] err_cnt;
  logic signed [1:0] p_step;
  logic signed [GN_FRAC+1:0] gn;
  logic [4:0] ssc_alpha;
  real tx_ppm = 0.0, rx_ppm = 0.0, rj_sigma = 0.02, sj_pp = 0.0, sj_hz = 1.0e6;
  int pattern = 0;
  int checks = 0, failures = 0;
  int n_pup = 0, n_pdn = 0, n_int = 0, n_wup = 0, n_wdn = 0, n_frac = 0, n_maes = 0;
  int n_top = 0, n_bot = 0, n_a9 = 0, n_a10 = 0, n_lock = 0;
  logic data_en_d = 1'b0;
  real rx_min = 0.0;

  cdr_sscg_top dut (.*);
  rx_frontend_model fe (.clk, .pi_ctrl, .edge_offs, .tx_ppm, .rx_ppm, .rj_sigma,
                        .sj_pp, .sj_hz, .pattern, .data_s, .edge_s);

  always #5 clk = ~clk;
  always #60 clk_ref = ~clk_ref;      // 1.2 GHz / 12
  // the rotated VCO clock is taken as the word clock itself here
  assign clk_rot = clk;
  assign rst_rot_n = rst_n;
  always @(posedge clk_fb) n_fb++;
  always @(posedge clk_ref) if (rst_n) n_refc++;

  // PLL stand-in: receive clock offset follows the SSCG rotation
  always @(posedge clk_ref) if (rst_ref_n) begin
    rx_ppm = rx_ppm + 0.12 * (-1.0e6 * real'(ssc_alpha) / 1920.0 - rx_ppm);
    if (rx_ppm < rx_min) rx_min = rx_ppm;
    n_top += ssc_turn_top;
    n_bot += ssc_turn_bot;
    n_a9  += (ssc_alpha == 5'd9);
    n_a10 += (ssc_alpha == 5'd10);
  end

  always @(posedge clk) if (rst_n) begin
    n_pup  += (p_step > 0);
    n_pdn  += (p_step < 0);
    n_int  += (i_step != 0);
    n_wup  += wrap_up;
    n_wdn  += wrap_dn;
    n_frac += (gn != 0 && gn != 64 && gn != -64);
    n_maes += (edge_offs[0] != 0);
    n_lock += (data_en && !data_en_d);
    data_en_d <= data_en;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
    else $display("ok   %s", what);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lost, fpeak;
    logic [15:0] e0;
    cfg = '{n_shift: 3'd3, m_shift: 3'd6, mode: PF_GAIN_COMP, maes_en: 1'b1, int_en: 1'b1};
    ssc_en = 1'b0;
    fe.t_word = 1000.3;
    repeat (4) @(posedge clk_ref);
    rst_n = 1'b1;
    rst_ref_n = 1'b1;
    repeat (3000) @(posedge clk);
    check(data_en && rev_data == 20'b1010_0000_1101_0111_1100, "BIST locked on K28.5 without spread");
    ssc_en = 1'b1;
    repeat (6000) @(posedge clk);
    // one full modulation period plus margin, with the BIST watching
    e0 = err_cnt;
    fe.slips = 0;
    lost = 0; fpeak = 0;
    repeat (3040 * 12 + 4000) begin
      @(posedge clk);
      lost += !data_en;
      if (-int'(cdr_freq) > fpeak) fpeak = -int'(cdr_freq);  // slower clock: negative
    end
    $display("SSC: receive clock down to %0.0f ppm, CDR freq peak -%0d, BIST errors %0d, slips %0d",
             rx_min, fpeak, err_cnt - e0, fe.slips);
    check(err_cnt == e0 && lost == 0, "no bit errors during spread spectrum");
    check(fe.slips == 0, "no slips during spread spectrum");
    check(rx_min < -4800.0 && rx_min > -5050.0, "SSCG peak near -5000 ppm");
    check(fpeak > 90 && fpeak < 115, $sformatf("CDR integral path follows the spread (%0d)", fpeak));
    // disturbance: half a UI jump of the incoming data
    fe.t_word += 0.5;
    repeat (40) @(posedge clk);
    check(err_cnt != e0, $sformatf("BIST counted errors after phase jump (%0d)", err_cnt - e0));
    repeat (3000) @(posedge clk);
    check(data_en, "BIST relocked");
    $display("mechanisms: P %0d/%0d, I %0d, wraps %0d/%0d, GC fractions %0d, M-AES %0d, SSC turns %0d/%0d, alpha 9/10 %0d/%0d, BIST locks %0d",
             n_pup, n_pdn, n_int, n_wup, n_wdn, n_frac, n_maes, n_top, n_bot, n_a9, n_a10, n_lock);
    check(n_pup > 0 && n_pdn > 0, "proportional steps both ways");
    check(n_int > 0, "integral steps");
    check(n_wup > 0 && n_wdn > 0, "rotation wraps both ways");
    check(n_frac > 0, "fractional gain compensation");
    check(n_maes > 0, "M-AES active");
    check(n_top > 0 && n_bot > 0, "SSC profile turns at both ends");
    check(n_a9 > 0 && n_a10 > 0, "sigma-delta alternates 9/10");
    check(n_lock >= 2, "BIST lock events");
    check(n_fb > 1000 && (n_fb - n_refc) <= 1 && (n_refc - n_fb) <= 1,
          $sformatf("feedback divider %0d edges vs %0d reference", n_fb, n_refc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
