// integral_path: integral (frequency) path of the digital loop filter.
//
// The proportional path's phase steps P (-1/0/+1) are integrated into a
// signed frequency register F, saturating at its range. F then drives a
// second sigma-delta gain element: an M-bit fractional accumulator adds F
// each update and hands the integer part on as phase steps, so the long-run
// phase rate is F / 2^M steps per update (G_I = 2^-M; M = 6 gives the
// design's 1/64). With 8-bit F and M = 6 the path reaches +-1.98 steps per
// 600 MHz update, about +-6200 ppm, which covers the 1.6 steps that
// 5000 ppm of spread spectrum needs. Taking P (not the PD output) as the
// integrator input follows the design's simplified loop; the register width
// and saturation are this design's choice.
// Interface: i_step is signed; freq is the register for observation.
// Timing: i_step/out_valid registered, one cycle after in_valid.
module integral_path #(
  parameter int FREQ_W = 8,
  parameter int STEP_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     in_valid,
  input  logic signed [1:0]        p_step,
  input  logic [2:0]               m_shift,
  output logic signed [STEP_W-1:0] i_step,
  output logic                     out_valid,
  output logic signed [FREQ_W-1:0] freq
);
  localparam int SW = FREQ_W + 9;
  localparam logic signed [SW-1:0] FMAX = SW'((1 <<< (FREQ_W - 1)) - 1);
  localparam logic signed [SW-1:0] FMIN = -SW'(1 <<< (FREQ_W - 1));

  logic signed [SW-1:0] f_nxt, sum, q;
  logic [7:0]           frac;   // fractional accumulator, low m_shift bits used

  always_comb begin
    f_nxt = SW'(freq) + SW'(p_step);
    if (f_nxt > FMAX) f_nxt = FMAX;
    if (f_nxt < FMIN) f_nxt = FMIN;
    sum = SW'($signed({1'b0, frac})) + SW'(freq);
    q   = sum >>> m_shift;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      freq      <= '0;
      frac      <= '0;
      i_step    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (!en) begin
        freq   <= '0;
        frac   <= '0;
        i_step <= '0;
      end else if (in_valid) begin
        freq   <= FREQ_W'(f_nxt);
        i_step <= STEP_W'(q);
        frac   <= 8'(sum - (q <<< m_shift));
      end else begin
        i_step <= '0;
      end
    end
  end
endmodule
