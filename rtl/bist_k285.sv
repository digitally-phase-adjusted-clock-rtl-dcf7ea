// bist_k285: built-in self test on the recovered data (K28.5 pattern).
//
// The recovered words (LANES bits per clock, bit 0 earliest) are shifted into
// a 20-bit history holding the last 20 received bits. While unlocked, the
// history is compared with all 20 rotations of the K28.5 pair; a match locks
// the alignment. Once locked, the expected rotation advances by LANES bits
// each clock and every new bit that differs from the pattern is counted as a
// bit error; a mismatch drops data_en and restarts the search. rev_data shows
// the received 20 bits rotated back into K28.5 order while data_en is high.
// err_pwm is a square wave of period 256 clocks whose high time is the
// accumulated error count (saturating at 255), so its duty cycle follows the
// error count as an oscilloscope sees it. The pattern and the rev_data /
// data_en behaviour follow the design; the search scheme and error-signal
// period are this design's choices.
// Timing: data_en rises on the clock after the first full 20-bit match.
module bist_k285
  import cdr_pkg::*;
#(
  parameter int LANES = 5,
  parameter int ERR_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LANES-1:0] data,
  output logic [19:0]      rev_data,
  output logic             data_en,
  output logic [ERR_W-1:0] err_cnt,
  output logic             err_pwm
);
  logic [19:0] hist, hist_n;
  logic [4:0]  rot;          // rotation of the pattern expected in hist
  logic [4:0]  hit_rot, rot_n;
  logic        hit;
  logic [7:0]  pwm_cnt;
  logic [LANES-1:0] bad;

  function automatic logic [19:0] rotr(input logic [19:0] v, input int unsigned r);
    logic [39:0] d;
    d = {v, v} >> r;
    return d[19:0];
  endfunction

  always_comb begin
    hist_n = {data, hist[19:LANES]};   // newest bits at the top
    hit     = 1'b0;
    hit_rot = '0;
    for (int r = 0; r < 20; r++) begin
      if (!hit && hist_n == rotr(K28_5, 32'(r))) begin
        hit     = 1'b1;
        hit_rot = 5'(r);
      end
    end
    rot_n = (rot + 5'(LANES) >= 5'd20) ? rot + 5'(LANES) - 5'd20 : rot + 5'(LANES);
    bad   = hist_n[19 -: LANES] ^ rotr(K28_5, 32'(rot_n))[19 -: LANES];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist     <= '0;
      rot      <= '0;
      data_en  <= 1'b0;
      rev_data <= '0;
      err_cnt  <= '0;
      pwm_cnt  <= '0;
      err_pwm  <= 1'b0;
    end else begin
      hist    <= hist_n;
      pwm_cnt <= pwm_cnt + 8'd1;
      err_pwm <= (err_cnt > ERR_W'(pwm_cnt));
      if (data_en) begin
        if (bad != '0) begin
          data_en <= 1'b0;
          if (err_cnt > ERR_W'(-LANES - 1)) err_cnt <= '1;
          else err_cnt <= err_cnt + ERR_W'($countones(bad));
        end else begin
          rot      <= rot_n;
          rev_data <= rotr(hist_n, (20 - int'(rot_n)) % 20);
        end
      end else if (hit) begin
        data_en  <= 1'b1;
        rot      <= hit_rot;
        rev_data <= K28_5;
      end
    end
  end
endmodule
