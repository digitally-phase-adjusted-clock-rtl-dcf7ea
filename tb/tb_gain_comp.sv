// tb_gain_comp: self-checking test of the pre-filter decision.
// All 3^5 lead/lag/none combinations of five bits are applied in both modes.
// Expected values: gain compensation = round(64 * (lead - lag) / transitions)
// computed with real arithmetic (the table of the design: 5 transitions ->
// +-1, +-0.6, +-0.2; 4 -> +-1, +-0.5, 0; 3 -> +-1, +-0.33), majority vote =
// 64 * sign(lead - lag). A few table entries are also checked as constants.
module tb_gain_comp;
  import cdr_pkg::*;
  localparam int L = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  prefilter_mode_e mode;
  logic [L-1:0] lead, lag;
  logic signed [7:0] gn;
  int checks = 0, failures = 0;

  gain_comp #(.LANES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_gn(input prefilter_mode_e m, input int nl, input int ng);
    real r;
    if (nl + ng == 0 || nl == ng) return 0;
    if (m == PF_MAJORITY) return nl > ng ? 64 : -64;
    r = 64.0 * real'(nl - ng) / real'(nl + ng);
    return r > 0 ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  initial begin
    mode = PF_GAIN_COMP; lead = '0; lag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int mm = 0; mm < 2; mm++) begin
      for (int code = 0; code < 243; code++) begin
        int c, nl, ng, e;
        @(negedge clk);
        mode = mm ? PF_MAJORITY : PF_GAIN_COMP;
        c = code; nl = 0; ng = 0;
        for (int i = 0; i < L; i++) begin
          lead[i] = (c % 3) == 1;
          lag[i]  = (c % 3) == 2;
          nl += lead[i]; ng += lag[i];
          c /= 3;
        end
        e = expect_gn(mode, nl, ng);
        @(posedge clk); #1;
        checks++;
        if (int'(gn) != e) begin
          failures++;
          if (failures < 10) $display("mode %0d lead %b lag %b: gn %0d expected %0d", mm, lead, lag, gn, e);
        end
        if (mm == 0 && nl == 3 && ng == 2) begin checks++; if (gn != 8'sd13) failures++; end  // 0.2
        if (mm == 0 && nl == 1 && ng == 2) begin checks++; if (gn != -8'sd21) failures++; end // -0.33
        if (mm == 1 && nl == 3 && ng == 2) begin checks++; if (gn != 8'sd64) failures++; end  // 1
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
