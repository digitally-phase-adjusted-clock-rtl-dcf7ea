// maes_ctrl: control of Multiple Alternating Edge Sampling (M-AES).
//
// Each of the LANES edge-sampling clocks is moved off its nominal position
// (half a UI between two data clocks) by its own amount, and the side of the
// move alternates, so that over time each edge sample looks both before and
// after the nominal edge. The offset magnitudes follow the design:
// 0.04, 0.06, 0.08, 0.10, 0.12 UI for E0..E4, which makes a dead zone of
// 2 x 0.04 UI and a staircase of PD gain levels. The order of alternation is
// this design's choice: the side flips every word clock, and neighbouring
// edges sit on opposite sides.
// Interface: edge_offs[i] is a signed offset in 1/100 UI (positive = later)
// for the analog edge-clock delay; it is 0 while en is low.
// Timing: registered, updated every word clock.
module maes_ctrl #(
  parameter int LANES = 5,
  parameter logic [LANES*6-1:0] OFFS = {6'd12, 6'd10, 6'd8, 6'd6, 6'd4} // E4..E0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  output logic signed [5:0]      edge_offs [LANES]
);
  logic side;   // flips every word

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      side <= 1'b0;
      for (int i = 0; i < LANES; i++) edge_offs[i] <= '0;
    end else begin
      side <= ~side;
      for (int i = 0; i < LANES; i++) begin
        logic signed [5:0] mag;
        mag = OFFS[i*6 +: 6];
        if (!en)                        edge_offs[i] <= '0;
        else if (side ^ i[0])           edge_offs[i] <= -mag;
        else                            edge_offs[i] <= mag;
      end
    end
  end
endmodule
