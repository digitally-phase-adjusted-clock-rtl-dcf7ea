// tb_sscg_ctrl: self-checking test of the SSCG phase-rotation controller.
// Over one full modulation period it checks, cycle by cycle, that the
// rotation counter moves down by the alpha of the previous cycle (modulo
// 160), that the decoder output encodes the counter position, and it sums
// the rotation to get the frequency deviation:
//   deviation = rotation per reference cycle / (12 x 160)
// The peak over one stair must be 153/16/1920 = 4980 ppm (at most 5000 ppm,
// the SATA down-spread limit) and the mean about half of it. With en low
// there must be no rotation.
module tb_sscg_ctrl;
  import cdr_pkg::*;
  logic clk_ref = 1'b0, rst_n = 1'b0, en = 1'b0;
  pi_ctrl_t pi_ctrl;
  logic [7:0] phase, k;
  logic [4:0] alpha;
  logic turn_top, turn_bot;
  int checks = 0, failures = 0;

  sscg_ctrl dut (.*);

  always #5 clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int rebuild(input pi_ctrl_t c);
    int pe, po, w;
    pe = 2 * $clog2(int'(c.sel_even));
    po = 2 * $clog2(int'(c.sel_odd)) + 1;
    w  = $countones(c.therm);
    if ((pe + 1) % 10 == po) return (pe * 16 + w) % 160;
    return (po * 16 + 16 - w) % 160;
  endfunction

  initial begin
    repeat (20000) @(posedge clk_ref);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_phase, last_alpha, total, win_sum, win_max, ntop;
    int hist [$];
    real ppm_max, ppm_mean;
    repeat (3) @(posedge clk_ref);
    rst_n = 1'b1;
    repeat (5) @(posedge clk_ref);
    #1;
    check(phase == 0, "no rotation while disabled");
    @(negedge clk_ref);
    en = 1'b1;
    @(posedge clk_ref); #1;
    last_phase = phase; last_alpha = alpha; total = 0; win_max = 0; ntop = 0;
    for (int n = 0; n < 3040 + 100; n++) begin
      int d;
      @(posedge clk_ref); #1;
      d = (last_phase - int'(phase) + 160) % 160;
      check(d == last_alpha, $sformatf("rotation %0d alpha %0d", d, last_alpha));
      check(rebuild(pi_ctrl) == last_phase, "decoder follows counter");
      if (n >= 100) begin
        total += d;
        hist.push_back(d);
        if (hist.size() > 16) void'(hist.pop_front());
        win_sum = 0;
        foreach (hist[i]) win_sum += hist[i];
        if (hist.size() == 16 && win_sum > win_max) win_max = win_sum;
      end
      ntop += turn_top;
      last_phase = phase; last_alpha = alpha;
    end
    ppm_max  = 1.0e6 * real'(win_max) / 16.0 / 1920.0;
    ppm_mean = 1.0e6 * real'(total) / 3040.0 / 1920.0;
    $display("peak deviation %0.1f ppm, mean %0.1f ppm", ppm_max, ppm_mean);
    check(ppm_max > 4950.0 && ppm_max <= 5000.0, "peak deviation");
    check(ppm_mean > 2400.0 && ppm_mean < 2600.0, "mean deviation");
    check(ntop == 1, "one top turn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
