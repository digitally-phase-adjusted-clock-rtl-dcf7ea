// window_sum: sliding window of the CDR pre-filter.
//
// Adds two successive pre-filter values (two word clocks, ten bits) and
// emits the sum once every two word clocks, i.e. at 600 MHz for a 1.2 GHz
// word clock. This averages out part of the random jitter before the loop
// filter. The pairs do not overlap (this design's reading of "sums two
// successive" values at half the word rate).
// Interface: gn is the signed pre-filter value (1.0 = 2^FRAC); sum is the
// pair sum, which downstream treats as full scale 1.0 = 2^(FRAC+1).
// Timing: sum/valid are registered; valid is high for one cycle every two.
module window_sum #(
  parameter int IN_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] gn,
  output logic signed [IN_W:0]   sum,
  output logic                   valid
);
  logic                   half;   // 1: first value of the pair is held
  logic signed [IN_W-1:0] first;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      half  <= 1'b0;
      first <= '0;
      sum   <= '0;
      valid <= 1'b0;
    end else begin
      half  <= ~half;
      valid <= half;
      if (!half) first <= gn;
      else       sum   <= (IN_W+1)'(first) + (IN_W+1)'(gn);
    end
  end
endmodule
