// tb_prop_path: self-checking test of the proportional sigma-delta path.
// For N = 2..5 and for constant full-scale, fractional and random inputs,
// the tb keeps its own running sum of inputs S and of emitted steps T and
// checks the conservation rule |S - T * 2^(N+7)| < 2^(N+7) after every
// update (the emitted steps are the input integrated and divided by 2^N).
// It also checks the exact rate for full-scale input: one step every 2^N
// updates (Eq. 3.2: N = 3 -> 1/8 step per 600 MHz update), both signs, and
// that out_valid follows in_valid by one clock.
module tb_prop_path;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [8:0] x;
  logic [2:0] n_shift;
  logic signed [1:0] step;
  int checks = 0, failures = 0;

  prop_path dut (.*);

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

  task automatic run(input int n, input int kind, input int count);
    longint s, t, thr;
    int nsteps;
    s = 0; t = 0; nsteps = 0;
    thr = longint'(1) << (n + 7);
    rst_n = 1'b0; n_shift = 3'(n);
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < count; i++) begin
      case (kind)
        0: x = 9'sd128;
        1: x = -9'sd128;
        2: x = 9'sd37;
        default: x = 9'($signed(8'($urandom)));
      endcase
      in_valid = 1'b1;
      s += longint'(x);
      @(posedge clk); #1;
      check(out_valid, "out_valid");
      t += longint'(step);
      if (step != 0) nsteps++;
      check(s - t * thr < thr && s - t * thr > -thr, $sformatf("N=%0d kind=%0d S=%0d T=%0d", n, kind, s, t));
      @(negedge clk);
      in_valid = 1'b0;
      @(posedge clk); #1;
      check(!out_valid && step == 0, "idle when not valid");
      @(negedge clk);
    end
    if (kind < 2) check(nsteps == count >> n, $sformatf("rate N=%0d: %0d steps in %0d", n, nsteps, count));
  endtask

  initial begin
    x = '0; n_shift = 3'd3;
    repeat (3) @(posedge clk);
    for (int n = 2; n <= 5; n++) begin
      run(n, 0, 256);
      run(n, 1, 256);
      run(n, 2, 300);
      run(n, 3, 500);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
