// fb_divider: feedback divider of the spread-spectrum PLL.
//
// Divides the phase-rotated VCO clock (1.2 GHz nominal) by N = 12 to give
// the feedback clock that the phase-frequency detector compares with the
// 100 MHz reference. Because the rotator moves the edge of its input clock
// by alpha/160 of a VCO period once per reference cycle, N rotated cycles
// are shorter than N VCO cycles and the loop settles at
// f_vco = f_ref * (N - alpha/160), the down spread. The divide ratio follows
// the design; the 50 % duty cycle for even N (high for N/2 cycles) is this
// design's choice.
// Timing: clk_fb is a register output; it rises on the rotated clock edge
// that ends each N-cycle count (the first rise comes N cycles after reset).
module fb_divider #(
  parameter int N = 12
) (
  input  logic clk_rot,
  input  logic rst_n,
  output logic clk_fb
);
  localparam int CW = $clog2(N);
  logic [CW-1:0] cnt;
  logic          tick;

  always_comb tick = (cnt == CW'(N - 1));

  always_ff @(posedge clk_rot) begin
    if (!rst_n) begin
      cnt    <= '0;
      clk_fb <= 1'b0;
    end else begin
      cnt    <= tick ? '0 : cnt + 1'b1;
      clk_fb <= tick || (clk_fb && (cnt < CW'(N / 2 - 1)));
    end
  end
endmodule
