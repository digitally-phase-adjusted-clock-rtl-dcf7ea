// tb_ssc_profile: self-checking test of the triangular stair profile.
// Over two full periods with the default sizes (K 1..153, 10 reference
// cycles per stair) it checks that K only changes by one after exactly ten
// cycles, stays in 1..153, turns at both ends with a pulse, and that the
// period is 2 x 152 x 10 = 3040 reference cycles (32.9 kHz at 100 MHz).
// With en low K must be 0.
module tb_ssc_profile;
  logic clk_ref = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] k;
  logic turn_top, turn_bot;
  int checks = 0, failures = 0;

  ssc_profile dut (.*);

  always #5 clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk_ref);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_k, hold, last_top, ntop, nbot, kmax, kmin;
    repeat (3) @(posedge clk_ref);
    rst_n = 1'b1;
    @(posedge clk_ref); #1;
    check(k == 0, "zero while disabled");
    @(negedge clk_ref);
    en = 1'b1;
    @(posedge clk_ref); #1;
    last_k = k; hold = 1; last_top = -1; ntop = 0; nbot = 0; kmax = 0; kmin = 999;
    for (int n = 0; n < 7000; n++) begin
      @(posedge clk_ref); #1;
      if (k > kmax) kmax = k;
      if (k < kmin) kmin = k;
      if (int'(k) != last_k) begin
        check(hold == 10, $sformatf("stair length %0d", hold));
        check(int'(k) == last_k + 1 || int'(k) == last_k - 1, "unit stair");
        hold = 1;
      end else hold++;
      if (turn_top) begin
        check(last_k == 153, "top turn at 153");
        if (last_top >= 0) check(n - last_top == 3040, $sformatf("period %0d", n - last_top));
        last_top = n; ntop++;
      end
      if (turn_bot) begin check(last_k == 1, "bottom turn at 1"); nbot++; end
      last_k = k;
    end
    check(kmax == 153 && kmin == 1, $sformatf("range %0d..%0d", kmin, kmax));
    check(ntop == 2 && nbot == 2, "two periods");
    @(negedge clk_ref);
    en = 1'b0;
    @(posedge clk_ref); #1;
    check(k == 0, "zero after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
