// tb_bbpd: self-checking test of the binary phase detector.
// Random data and edge samples are applied for 2000 words; for each word the
// expected lead/lag/transition flags are worked out bit by bit from the rule
// "edge equal to the earlier bit = early clock (lead), edge equal to the
// later bit = late clock (lag)", with the last bit of the previous word as
// the bit bprev bit 0. Outputs are checked one clock after the samples.
module tb_bbpd;
  localparam int L = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [L-1:0] data_s, edge_s, lead, lag, trans, rx_data;
  int checks = 0, failures = 0;

  bbpd #(.LANES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic          last;
    logic [L-1:0]  el, eg, et;
    data_s = '0; edge_s = '0; last = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      data_s = L'($urandom);
      edge_s = L'($urandom);
      for (int i = 0; i < L; i++) begin
        logic bprev;
        bprev = (i == 0) ? last : data_s[i-1];
        et[i] = bprev != data_s[i];
        el[i] = et[i] && (edge_s[i] == bprev);
        eg[i] = et[i] && (edge_s[i] == data_s[i]);
      end
      last = data_s[L-1];
      @(posedge clk); #1;
      checks++;
      if (lead !== el || lag !== eg || trans !== et || rx_data !== data_s) begin
        failures++;
        if (failures < 10) $display("word %0d: d=%b e=%b lead %b/%b lag %b/%b", n, data_s, edge_s, lead, el, lag, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
