// phase_counter: phase rotation counter.
//
// Holds the rotator position 0..MODULUS-1 (160 = 10 PLL phases x 16
// interpolation steps) and adds a signed step whenever en is high, wrapping
// around in both directions, so the sampling clock can rotate without limit.
// |step| must be below MODULUS. Reset position 0 is this design's choice.
// Timing: phase is registered; wrap_up / wrap_dn pulse in the cycle the
// counter passes MODULUS-1 -> 0 or 0 -> MODULUS-1.
module phase_counter #(
  parameter int MODULUS = 160,
  parameter int STEP_W  = 9,
  parameter int PW      = $clog2(MODULUS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [STEP_W-1:0] step,
  output logic [PW-1:0]            phase,
  output logic                     wrap_up,
  output logic                     wrap_dn
);
  localparam int SW = (PW > STEP_W ? PW : STEP_W) + 2;
  logic signed [SW-1:0] s;

  always_comb s = SW'($signed({1'b0, phase})) + SW'(step);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= '0;
      wrap_up <= 1'b0;
      wrap_dn <= 1'b0;
    end else begin
      wrap_up <= 1'b0;
      wrap_dn <= 1'b0;
      if (en) begin
        if (s >= SW'(MODULUS)) begin
          phase   <= PW'(s - SW'(MODULUS));
          wrap_up <= 1'b1;
        end else if (s < 0) begin
          phase   <= PW'(s + SW'(MODULUS));
          wrap_dn <= 1'b1;
        end else begin
          phase   <= PW'(s);
        end
      end
    end
  end
endmodule
