// tb_phase_decoder: self-checking test of the zigzag mux / thermometer
// decoder. For every position 0..159 the tb rebuilds the clock position each
// lane's interpolator would produce from the two one-hot selects and the
// weight (number of ones in the thermometer code), and checks it equals
// (position + 32 k) mod 160. It also checks the codes are well formed
// (one-hot, thermometer) and the glitch-free rule of the zigzag order: a
// multiplexer only changes its selection in a step that starts or ends with
// zero weight on it, stepping up and down through the full circle.
module tb_phase_decoder;
  import cdr_pkg::*;
  localparam int L = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] phase;
  pi_ctrl_t pi_ctrl [L];
  pi_ctrl_t prev [L];
  int checks = 0, failures = 0, mux_switches = 0;

  phase_decoder #(.LANES(L), .LANE_STEP(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int onehot_idx(input logic [4:0] v);
    int idx = -1;
    for (int i = 0; i < 5; i++) if (v[i]) idx = (idx == -1) ? i : -2;
    return idx;
  endfunction

  function automatic int rebuild(input pi_ctrl_t c);
    int pe, po, w, lo, up, wu;
    pe = 2 * onehot_idx(c.sel_even);
    po = 2 * onehot_idx(c.sel_odd) + 1;
    w  = $countones(c.therm);          // weight of the odd phase
    if ((pe + 1) % 10 == po) begin lo = pe; up = po; wu = w; end
    else if ((po + 1) % 10 == pe) begin lo = po; up = pe; wu = 16 - w; end
    else return -1;
    return (lo * 16 + wu) % 160;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n <= 160; n++) begin
        int p;
        p = pass == 0 ? n % 160 : (160 - n) % 160;
        phase = 8'(p);
        @(posedge clk); #1;
        for (int k = 0; k < L; k++) begin
          int w;
          w = $countones(pi_ctrl[k].therm);
          check(onehot_idx(pi_ctrl[k].sel_even) >= 0 && onehot_idx(pi_ctrl[k].sel_odd) >= 0, "one-hot");
          check(pi_ctrl[k].therm == 16'((17'(1) << w) - 1), "thermometer");
          check(rebuild(pi_ctrl[k]) == (p + 32 * k) % 160,
                $sformatf("p=%0d lane %0d rebuilt %0d", p, k, rebuild(pi_ctrl[k])));
          if (n > 0) begin
            int wp;
            wp = $countones(prev[k].therm);
            if (pi_ctrl[k].sel_odd != prev[k].sel_odd) begin
              mux_switches++;
              check(w == 0 || wp == 0, "odd mux switched under load");
            end
            if (pi_ctrl[k].sel_even != prev[k].sel_even) begin
              mux_switches++;
              check(w == 16 || wp == 16, "even mux switched under load");
            end
          end
          prev[k] = pi_ctrl[k];
        end
        @(negedge clk);
      end
    end
    check(mux_switches == 2 * 5 * 10, $sformatf("mux switches %0d", mux_switches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
