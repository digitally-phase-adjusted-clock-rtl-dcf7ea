// tb_fb_divider: self-checking test of the divide-by-12 feedback divider.
// Over 50 output periods it checks that clk_fb rises exactly every 12
// input cycles and stays high for 6 of them, and that the first rise
// comes 12 cycles after reset.
module tb_fb_divider;
  logic clk_rot = 1'b0, rst_n = 1'b0, clk_fb;
  int checks = 0, failures = 0;

  fb_divider #(.N(12)) dut (.*);

  always #5 clk_rot = ~clk_rot;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk_rot);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_rise, hi, n, rises;
    logic prev;
    repeat (3) @(posedge clk_rot);
    @(negedge clk_rot);
    rst_n = 1'b1;
    last_rise = -1; hi = 0; n = 0; rises = 0; prev = 1'b0;
    while (rises < 52) begin
      @(posedge clk_rot); #1;
      n++;
      if (clk_fb && !prev) begin
        if (last_rise < 0) check(n == 12, $sformatf("first rise at %0d", n));
        else begin
          check(n - last_rise == 12, $sformatf("period %0d", n - last_rise));
          check(hi == 6, $sformatf("high time %0d", hi));
        end
        last_rise = n; hi = 0; rises++;
      end
      hi += clk_fb;
      prev = clk_fb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
