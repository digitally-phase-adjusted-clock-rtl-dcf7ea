// tb_cdr_density: the CDR loop's evaluation conditions, run on cdr_loop with
// the behavioural front end (rx_frontend_model).
//
// For both pre-filter schemes (gain compensation and majority vote) and
// three transition densities (1010 = 100 %, PRBS7 = about 50 %, five ones /
// five zeros = 20 %), with M-AES on and 0.02 UI rms random jitter:
//   * 0.2 UI pp sinusoidal jitter at 3 MHz: no slips, mean sampling error
//     below 0.15 UI;
//   * +100 ppm frequency offset: no slips, mean error below 0.15 UI.
// Then the proportional gain settings: N = 2..5 each lock at +100 ppm, and
// with the integral path off the proportional path alone holds at most
// 2^-N x (1/32 UI) / 10 bits: N = 3 -> 390.6 ppm, so +300 ppm is tracked
// without slips and +600 ppm is not (bits slip).
// Finally the 100 % density case is repeated at lock for both schemes, and
// the mean error of gain compensation must not exceed that of majority vote
// (majority vote stays bang-bang near lock).
module tb_cdr_density;
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
  real tx_ppm = 0.0, rx_ppm = 0.0, rj_sigma = 0.02, sj_pp = 0.0, sj_hz = 3.0e6;
  int pattern = 1;
  int checks = 0, failures = 0;

  cdr_loop dut (.*);
  rx_frontend_model fe (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
    else $display("ok   %s", what);
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int settle, input int measure, output int slips, output real err);
    repeat (settle) @(posedge clk);
    fe.slips = 0;
    void'(fe.take_err());
    repeat (measure) @(posedge clk);
    slips = fe.slips;
    err = fe.take_err();
  endtask

  initial begin
    int slips;
    real err, e_gc, e_mv;
    string nm;
    prefilter_mode_e modes [2] = '{PF_GAIN_COMP, PF_MAJORITY};
    int pats [3] = '{2, 1, 3};
    cfg = '{n_shift: 3'd3, m_shift: 3'd6, mode: PF_GAIN_COMP, maes_en: 1'b1, int_en: 1'b1};
    fe.t_word = 1000.3;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4000) @(posedge clk);

    foreach (modes[m]) foreach (pats[p]) begin
      cfg.mode = modes[m];
      pattern = pats[p];
      nm = $sformatf("%s density %0d%%", m == 0 ? "GC" : "MV", p == 0 ? 100 : p == 1 ? 50 : 20);
      tx_ppm = 0.0; sj_pp = 0.2;
      run(6000, 12000, slips, err);
      $display("%s 3 MHz SJ: slips %0d, mean |error| %0.3f UI", nm, slips, err);
      check(slips == 0 && err < 0.15, {nm, ": 3 MHz sinusoidal jitter tracked"});
      sj_pp = 0.0; tx_ppm = 100.0;
      run(8000, 6000, slips, err);
      $display("%s +100 ppm: slips %0d, mean |error| %0.3f UI, freq %0d", nm, slips, err, freq);
      check(slips == 0 && err < 0.15, {nm, ": +100 ppm tracked"});
    end

    cfg.mode = PF_GAIN_COMP;
    pattern = 1;
    tx_ppm = 100.0;
    for (int n = 2; n <= 5; n++) begin
      cfg.n_shift = 3'(n);
      run(10000, 4000, slips, err);
      $display("N=%0d +100 ppm: slips %0d, mean |error| %0.3f UI", n, slips, err);
      check(slips == 0 && err < 0.15, $sformatf("N=%0d locks at +100 ppm", n));
    end

    cfg.n_shift = 3'd3;
    cfg.int_en = 1'b0;
    tx_ppm = 300.0;
    run(6000, 6000, slips, err);
    $display("P only, +300 ppm: slips %0d, mean |error| %0.3f UI", slips, err);
    check(slips == 0, "proportional path alone holds +300 ppm (< 390.6 ppm)");
    tx_ppm = 600.0;
    run(2000, 8000, slips, err);
    $display("P only, +600 ppm: slips %0d", slips);
    check(slips > 0, "proportional path alone loses +600 ppm (> 390.6 ppm)");

    cfg.int_en = 1'b1;
    tx_ppm = 0.0;
    pattern = 2;
    cfg.mode = PF_GAIN_COMP;
    run(12000, 12000, slips, e_gc);
    cfg.mode = PF_MAJORITY;
    run(6000, 12000, slips, e_mv);
    $display("lock at 100%% density: mean |error| GC %0.4f UI, MV %0.4f UI", e_gc, e_mv);
    check(e_gc <= e_mv, "gain compensation locks at least as tightly as majority vote");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
