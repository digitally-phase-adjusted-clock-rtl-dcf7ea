// tb_sd_mod1: self-checking test of the first-order sigma-delta modulator.
// For K in {1, 8, 37, 100, 153, 160, 255} it runs 64 reference cycles and
// checks that alpha only takes the two integers around K/16, that the sum of
// alpha over every 16 consecutive cycles is exactly K (average K/16, e.g.
// 153 -> 9.5625), and that carry marks the cycles with the upper integer.
module tb_sd_mod1;
  logic clk_ref = 1'b0, rst_n = 1'b0;
  logic [7:0] k;
  logic [4:0] alpha;
  logic carry;
  int checks = 0, failures = 0;
  int ks [7] = '{1, 8, 37, 100, 153, 160, 255};

  sd_mod1 dut (.*);

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
    int a [$];
    k = '0;
    foreach (ks[j]) begin
      rst_n = 1'b0;
      @(negedge clk_ref);
      k = 8'(ks[j]);
      @(negedge clk_ref);
      rst_n = 1'b1;
      a.delete();
      for (int n = 0; n < 64; n++) begin
        @(posedge clk_ref); #1;
        a.push_back(int'(alpha));
        check(int'(alpha) == ks[j] / 16 || int'(alpha) == ks[j] / 16 + 1, "two levels");
        check(carry == (int'(alpha) == ks[j] / 16 + 1), "carry flag");
      end
      for (int s = 0; s + 16 <= 64; s++) begin
        int sum;
        sum = 0;
        for (int i = 0; i < 16; i++) sum += a[s + i];
        check(sum == ks[j], $sformatf("K=%0d window sum %0d", ks[j], sum));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
