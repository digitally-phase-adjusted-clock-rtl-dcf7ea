// tb_cdr_loop: closed-loop test of the digital CDR loop with a behavioural
// front end (rx_frontend_model).
// Scenarios, each judged after a settling time:
//   A  PRBS7, 0.02 UI rms random jitter, started 0.4 UI off: locks, samples
//      within 0.15 UI of the bit centres on average, no bit slips
//   B  +1000 ppm and C -1000 ppm frequency offset (the design's tolerance):
//      no slips, frequency register at 1000 ppm / (1/64 step per 600 MHz
//      update) = -+20.5 codes (+-6; data faster than the clock needs the
//      sampling phase to move earlier, i.e. a negative register)
//   D  0/-5000 ppm triangular spread spectrum at 33 kHz on the incoming data
//      for one full period: no slips, frequency register reaches about
//      5000 ppm = +102 codes
//   E  majority vote, PRBS7 (50 % transitions), +300 ppm: no slips
//   G  1010 pattern (100 % transitions), gain compensation: no slips
//   F  M-AES off, 0.18 UI pp sinusoidal jitter at 1 MHz: no slips
// Mechanisms counted (each must occur): proportional up and down steps,
// integral steps, counter wrap both ways, fractional gain-compensation
// outputs, majority-vote outputs, M-AES offsets.
module tb_cdr_loop;
  import cdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  cdr_cfg_t cfg;
  logic [N_LANES-1:0] data_s, edge_s, rx_data;
  pi_ctrl_t pi_ctrl [N_LANES];
  logic signed [5:0] edge_offs [N_LANES];
  logic [7:0] phase;
  logic signed [7:0] freq, i_step;
  logic signed [1:0] p_step;
  logic signed [GN_FRAC+1:0] gn;
  logic wrap_up, wrap_dn;
  real tx_ppm = 0.0, rx_ppm = 0.0, rj_sigma = 0.02, sj_pp = 0.0, sj_hz = 1.0e6;
  int pattern = 1;
  int checks = 0, failures = 0;
  int n_pup = 0, n_pdn = 0, n_int = 0, n_wup = 0, n_wdn = 0, n_frac = 0, n_maj = 0, n_maes = 0;

  cdr_loop dut (.*);
  rx_frontend_model fe (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_pup += (p_step > 0);
    n_pdn += (p_step < 0);
    n_int += (i_step != 0);
    n_wup += wrap_up;
    n_wdn += wrap_dn;
    if (cfg.mode == PF_GAIN_COMP && gn != 0 && gn != 64 && gn != -64) n_frac++;
    if (cfg.mode == PF_MAJORITY && gn != 0) n_maj++;
    n_maes += (edge_offs[0] != 0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
    else $display("ok   %s", what);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic settle_then_measure(input int settle, input int measure, input string what);
    real e;
    int fmin, fmax;
    repeat (settle) @(posedge clk);
    fe.slips = 0;
    void'(fe.take_err());
    fmin = 127; fmax = -128;
    repeat (measure) begin
      @(posedge clk);
      if (freq < fmin) fmin = freq;
      if (freq > fmax) fmax = freq;
    end
    e = fe.take_err();
    $display("%s: slips %0d, mean |error| %0.3f UI, freq %0d..%0d", what, fe.slips, e, fmin, fmax);
    check(fe.slips == 0, {what, ": no slips"});
    check(e < 0.15, {what, ": sampling near bit centre"});
  endtask

  initial begin
    int fmin;
    cfg = '{n_shift: 3'd3, m_shift: 3'd6, mode: PF_GAIN_COMP, maes_en: 1'b1, int_en: 1'b1};
    fe.t_word = 1000.4;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    settle_then_measure(3000, 3000, "A lock");

    tx_ppm = 1000.0;
    settle_then_measure(12000, 4000, "B +1000ppm");
    check(freq < -14 && freq > -27, $sformatf("B freq register %0d", freq));

    tx_ppm = -1000.0;
    settle_then_measure(16000, 4000, "C -1000ppm");
    check(freq > 14 && freq < 27, $sformatf("C freq register %0d", freq));

    // D: triangular 0 .. -5000 ppm, 33 kHz (36364 words per period)
    fe.slips = 0;
    fmin = 0;   // tracks the peak (positive: data slower than the clock)
    for (int w = 0; w < 36364 + 8000; w++) begin
      int ph;
      ph = w % 36364;
      tx_ppm = (ph < 18182) ? -5000.0 * real'(ph) / 18182.0 : -5000.0 * real'(36364 - ph) / 18182.0;
      @(posedge clk);
      if (w == 8000) fe.slips = 0;
      if (freq > fmin) fmin = freq;
    end
    $display("D SSC: slips %0d, freq peak %0d", fe.slips, fmin);
    check(fe.slips == 0, "D SSC tracking: no slips");
    check(fmin > 90 && fmin < 115, $sformatf("D freq register peak %0d", fmin));
    tx_ppm = 0.0;

    cfg.mode = PF_MAJORITY;
    tx_ppm = 300.0;
    settle_then_measure(8000, 4000, "E majority vote");

    cfg.mode = PF_GAIN_COMP;
    pattern = 2;
    settle_then_measure(4000, 4000, "G 100% transition density");

    cfg.mode = PF_GAIN_COMP;
    cfg.maes_en = 1'b0;
    pattern = 1;
    tx_ppm = 0.0;
    sj_pp = 0.18;
    settle_then_measure(6000, 12000, "F sinusoidal jitter");

    $display("mechanisms: P up %0d down %0d, I steps %0d, wraps %0d/%0d, GC fractions %0d, MV %0d, M-AES %0d",
             n_pup, n_pdn, n_int, n_wup, n_wdn, n_frac, n_maj, n_maes);
    check(n_pup > 0 && n_pdn > 0, "proportional steps both ways");
    check(n_int > 0, "integral steps");
    check(n_wup > 0 && n_wdn > 0, "rotation wraps both ways");
    check(n_frac > 0, "fractional gain compensation");
    check(n_maj > 0, "majority vote");
    check(n_maes > 0, "M-AES active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
