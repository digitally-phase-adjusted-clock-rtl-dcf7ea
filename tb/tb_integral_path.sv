// tb_integral_path: self-checking test of the integral (frequency) path.
// A tb model keeps the saturating frequency register F (F += P, limited to
// -128..127) and the running sums; after every update it checks that the
// register matches and that the emitted phase steps obey
// 0 <= sum(F) - 2^M * sum(I) < 2^M (the steps are F integrated and divided by
// 2^M, the G_I = 1/64 element for M = 6). Covers saturation in both
// directions, M = 3 and 6, and the clear while disabled.
module tb_integral_path;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, in_valid = 1'b0, out_valid;
  logic signed [1:0] p_step;
  logic [2:0] m_shift;
  logic signed [7:0] i_step, freq;
  int checks = 0, failures = 0;

  integral_path dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int m, input int count, input int bias);
    longint sf, si;
    int f;
    bit sat_hi, sat_lo;
    sf = 0; si = 0; f = 0; sat_hi = 0; sat_lo = 0;
    rst_n = 1'b0; m_shift = 3'(m);
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < count; i++) begin
      int r;
      r = int'($urandom_range(0, 99));
      p_step = (r < bias) ? 2'sd1 : (r < 2 * bias ? 2'sd0 : -2'sd1);
      if (i > count / 2) p_step = -p_step;
      in_valid = 1'b1;
      sf += longint'(f);               // the accumulator adds the old F
      f = f + int'(p_step);
      if (f > 127) begin f = 127; sat_hi = 1; end
      if (f < -128) begin f = -128; sat_lo = 1; end
      @(posedge clk); #1;
      si += longint'(i_step);
      check(int'(freq) == f, $sformatf("freq %0d expected %0d", freq, f));
      check(sf - (si << m) >= 0 && sf - (si << m) < (longint'(1) << m),
            $sformatf("M=%0d sum F %0d sum I %0d", m, sf, si));
      @(negedge clk);
      in_valid = 1'b0;
    end
    check(sat_hi && sat_lo, "saturation reached both ways");
  endtask

  initial begin
    p_step = '0; m_shift = 3'd6;
    repeat (3) @(posedge clk);
    run(6, 2000, 45);
    run(3, 2000, 45);
    @(negedge clk);
    en = 1'b0;
    @(posedge clk); #1;
    check(freq == 0 && i_step == 0, "cleared while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
