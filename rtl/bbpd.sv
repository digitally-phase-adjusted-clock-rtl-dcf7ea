// bbpd: binary (bang-bang) phase detector for LANES parallel bits.
//
// Each word clock brings LANES data samples d[i] (bit centres) and LANES edge
// samples e[i], where e[i] is taken on the boundary between bit i-1 and bit i;
// bit -1 is the last data bit of the previous word, kept in a register.
// Where d[i-1] != d[i] there is a transition and the edge sample tells on
// which side of it the clock sits:
//   e[i] == d[i-1]  -> the sampling clock is early ("lead"): count phase up
//   e[i] == d[i]    -> the sampling clock is late  ("lag"):  count phase down
// This is the XOR detector of the Alexander type described for this CDR; the
// naming of lead as "up" is this design's reading.
// Timing: lead/lag/trans and the data word are registered, one cycle after
// the samples.
module bbpd #(
  parameter int LANES = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LANES-1:0] data_s,   // bit 0 is the earliest bit
  input  logic [LANES-1:0] edge_s,
  output logic [LANES-1:0] lead,
  output logic [LANES-1:0] lag,
  output logic [LANES-1:0] trans,
  output logic [LANES-1:0] rx_data
);
  logic             d_last;
  logic [LANES-1:0] prev;   // bit before each data bit
  logic [LANES-1:0] t_c, lead_c, lag_c;

  always_comb begin
    prev = {data_s[LANES-2:0], d_last};
    t_c    = prev ^ data_s;
    lead_c = t_c & ~(edge_s ^ prev);
    lag_c  = t_c & ~(edge_s ^ data_s);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_last  <= 1'b0;
      lead    <= '0;
      lag     <= '0;
      trans   <= '0;
      rx_data <= '0;
    end else begin
      d_last  <= data_s[LANES-1];
      lead    <= lead_c;
      lag     <= lag_c;
      trans   <= t_c;
      rx_data <= data_s;
    end
  end
endmodule
