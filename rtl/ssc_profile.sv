// ssc_profile: triangular modulation profile of the spread-spectrum clock
// generator.
//
// The SSCG lowers the clock frequency by an amount proportional to K, the
// average number of 1/16 rotation steps per reference cycle (K/16 phase
// steps of T_VCO/160 per reference cycle, 16 x 9.6 = 153.6 -> 153 for
// 5000 ppm down spread with a divide-by-12 PLL). This block walks K up from
// K_MIN to K_MAX and back down in unit stairs, holding each stair for
// STAIR_CYCLES reference cycles, which draws the triangular SATA profile as
// a staircase. With 100 MHz reference and STAIR_CYCLES = 10 the period is
// 2 x 152 x 10 cycles = 30.4 us (32.9 kHz, inside 30-33 kHz); the stair
// length is this design's choice. While en is low, K is 0 (no spread).
// Timing: k registered; turn_top / turn_bot pulse when the direction flips.
module ssc_profile #(
  parameter int K_W          = 8,
  parameter int K_MIN        = 1,
  parameter int K_MAX        = 153,
  parameter int STAIR_CYCLES = 10
) (
  input  logic           clk_ref,
  input  logic           rst_n,
  input  logic           en,
  output logic [K_W-1:0] k,
  output logic           turn_top,
  output logic           turn_bot
);
  localparam int CW = $clog2(STAIR_CYCLES + 1);
  logic [CW-1:0] cyc;
  logic          down;

  always_ff @(posedge clk_ref) begin
    if (!rst_n || !en) begin
      k        <= '0;
      cyc      <= '0;
      down     <= 1'b0;
      turn_top <= 1'b0;
      turn_bot <= 1'b0;
    end else begin
      turn_top <= 1'b0;
      turn_bot <= 1'b0;
      if (k < K_W'(K_MIN)) begin
        k   <= K_W'(K_MIN);
        cyc <= '0;
      end else if (cyc == CW'(STAIR_CYCLES - 1)) begin
        cyc <= '0;
        if (!down) begin
          if (k == K_W'(K_MAX)) begin
            down     <= 1'b1;
            k        <= k - 1'b1;
            turn_top <= 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end else begin
          if (k == K_W'(K_MIN)) begin
            down     <= 1'b0;
            k        <= k + 1'b1;
            turn_bot <= 1'b1;
          end else begin
            k <= k - 1'b1;
          end
        end
      end else begin
        cyc <= cyc + 1'b1;
      end
    end
  end
endmodule
