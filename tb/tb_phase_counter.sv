// tb_phase_counter: self-checking test of the 0..159 rotation counter.
// Random signed steps (-40..40, and some full +-159 steps) are applied and the
// position is compared with a modulo-160 model; wrap flags are checked in
// both directions and en low must hold the position.
module tb_phase_counter;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [8:0] step;
  logic [7:0] phase;
  logic wrap_up, wrap_dn;
  int checks = 0, failures = 0;
  int nup = 0, ndn = 0;

  phase_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, s, e_up, e_dn;
    step = '0; p = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      en = ($urandom_range(0, 9) != 0);
      s  = ($urandom_range(0, 49) == 0) ? ($urandom_range(0, 1) ? 159 : -159)
                                         : int'($urandom_range(0, 80)) - 40;
      step = 9'(s);
      e_up = 0; e_dn = 0;
      if (en) begin
        p = p + s;
        if (p >= 160) begin p -= 160; e_up = 1; end
        if (p < 0) begin p += 160; e_dn = 1; end
      end
      @(posedge clk); #1;
      checks++;
      if (int'(phase) != p || wrap_up != e_up || wrap_dn != e_dn) begin
        failures++;
        if (failures < 10) $display("n=%0d phase %0d expected %0d", n, phase, p);
      end
      nup += e_up; ndn += e_dn;
      @(negedge clk);
    end
    checks++;
    if (nup == 0 || ndn == 0) failures++;
    $display("wraps up %0d down %0d", nup, ndn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
