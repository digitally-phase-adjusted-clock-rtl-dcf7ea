// prop_path: proportional path of the digital loop filter.
//
// A first-order sigma-delta gain element with a sign path: the signed input
// is added to a signed accumulator; when the accumulator reaches +2^(N+W)
// it emits a +1 phase step and drops by that amount, at -2^(N+W) a -1 step.
// With full-scale input 2^W this gives a time-averaged gain G_P = 2^-N phase
// steps per update, e.g. N = 3 -> at most 1/8 step (1/256 UI) per 600 MHz
// update = 390.625 ppm of frequency tracking. N is programmable; the design
// uses 2..5. The exact sign-path arrangement is this design's reading.
// Interface: x is the window sum (full scale 2^W, W = 7); step is -1/0/+1.
// Timing: step/out_valid registered, one cycle after in_valid.
module prop_path #(
  parameter int X_W = 9,     // input width
  parameter int W   = 7,     // input full scale = 2^W
  parameter int ACC_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x,
  input  logic [2:0]            n_shift,
  output logic signed [1:0]     step,
  output logic                  out_valid
);
  logic signed [ACC_W-1:0] acc, nxt, thr;

  always_comb begin
    thr = ACC_W'(1) <<< (W + int'(n_shift));
    nxt = acc + ACC_W'(x);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      step      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (nxt >= thr) begin
          acc  <= nxt - thr;
          step <= 2'sd1;
        end else if (nxt <= -thr) begin
          acc  <= nxt + thr;
          step <= -2'sd1;
        end else begin
          acc  <= nxt;
          step <= '0;
        end
      end else begin
        step <= '0;
      end
    end
  end
endmodule
