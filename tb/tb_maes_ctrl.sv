// tb_maes_ctrl: self-checking test of the M-AES edge-offset control.
// Checks that with en high every edge gets its own magnitude
// (4,6,8,10,12 hundredths of a UI), that the side flips every word clock,
// that neighbouring edges sit on opposite sides, that every edge visits both
// sides, and that all offsets are 0 with en low.
module tb_maes_ctrl;
  localparam int L = 5;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [5:0] edge_offs [L];
  int checks = 0, failures = 0;
  int mags [L] = '{4, 6, 8, 10, 12};
  logic signed [5:0] prev [L];
  int pos_seen [L], neg_seen [L];

  maes_ctrl #(.LANES(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    for (int i = 0; i < L; i++) check(edge_offs[i] == 0, "off while disabled");
    en = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < L; i++) prev[i] = edge_offs[i];
    for (int n = 0; n < 40; n++) begin
      @(posedge clk); #1;
      for (int i = 0; i < L; i++) begin
        int a;
        a = edge_offs[i] < 0 ? -int'(edge_offs[i]) : int'(edge_offs[i]);
        check(a == mags[i], $sformatf("magnitude lane %0d = %0d", i, edge_offs[i]));
        check(edge_offs[i] == -prev[i], $sformatf("lane %0d did not alternate", i));
        if (i > 0) check((edge_offs[i] > 0) != (edge_offs[i-1] > 0), "neighbours on same side");
        if (edge_offs[i] > 0) pos_seen[i]++; else neg_seen[i]++;
        prev[i] = edge_offs[i];
      end
    end
    for (int i = 0; i < L; i++) check(pos_seen[i] == 20 && neg_seen[i] == 20, "both sides equally");
    en = 1'b0;
    @(posedge clk); #1;
    for (int i = 0; i < L; i++) check(edge_offs[i] == 0, "off after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
