// tb_window_sum: self-checking test of the two-word sliding window.
// Random signed values are fed every clock; valid must be high every second
// clock (half the word rate) and sum must equal the two values of the pair.
module tb_window_sum;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0] gn;
  logic signed [8:0] sum;
  logic valid;
  int checks = 0, failures = 0;
  int hist [$];
  int nvalid = 0, ncyc = 0;

  window_sum #(.IN_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gn = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      gn = 8'($signed(7'($urandom)));   // -64..63
      hist.push_back(int'(gn));
      @(posedge clk); #1;
      ncyc++;
      if (valid) begin
        nvalid++;
        checks++;
        // the pair is the last two values applied
        if (hist.size() < 2 || int'(sum) != hist[hist.size()-2] + hist[hist.size()-1]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: sum %0d", n, sum);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (nvalid != ncyc / 2) begin
      failures++;
      $display("valid rate %0d of %0d", nvalid, ncyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
