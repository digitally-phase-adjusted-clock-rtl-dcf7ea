// sd_mod1: first-order accumulator sigma-delta modulator of the SSCG.
//
// Every reference cycle the input K is added to a k-bit fractional
// accumulator (ACC_W = 4 bits); the integer part of the sum leaves as the
// rotation amount alpha and the fraction stays. The long-run average of
// alpha is K / 2^ACC_W, e.g. K = 153 -> 9.5625 steps (alpha toggles between
// 9 and 10). A first-order modulator is chosen because its output never
// leaves the two integers around K / 2^ACC_W, so rotation stays monotonic
// and the spread stays down-only; higher orders give negligible jitter gain
// at 1/160 phase resolution.
// Timing: alpha registered, one reference cycle after k.
module sd_mod1 #(
  parameter int K_W   = 8,
  parameter int ACC_W = 4
) (
  input  logic                 clk_ref,
  input  logic                 rst_n,
  input  logic [K_W-1:0]       k,
  output logic [K_W-ACC_W:0]   alpha,
  output logic                 carry     // fractional overflow this cycle
);
  logic [ACC_W-1:0] acc;
  logic [K_W:0]     sum;

  always_comb sum = (K_W+1)'(k) + (K_W+1)'(acc);

  always_ff @(posedge clk_ref) begin
    if (!rst_n) begin
      acc   <= '0;
      alpha <= '0;
      carry <= 1'b0;
    end else begin
      acc   <= sum[ACC_W-1:0];
      alpha <= sum[K_W:ACC_W];
      carry <= (sum[K_W:ACC_W] != (K_W-ACC_W+1)'(k >> ACC_W));
    end
  end
endmodule
