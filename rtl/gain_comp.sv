// gain_comp: pre-filter decision of the CDR, one value per word clock.
//
// The phase detector gives, for the LANES bits of a word, a lead or a lag
// flag at each data transition. A plain sum of these grows with the
// transition density of the data, and so does the loop gain. This block
// removes that dependence in one of two selectable ways:
//   PF_GAIN_COMP : gn = (lead - lag) / transitions   ("gain compensation",
//                  e.g. 3 lead, 2 lag -> 0.2; 2 lead, 1 lag -> 0.33)
//   PF_MAJORITY  : gn = sign(lead - lag)              ("majority vote")
// Gain compensation is the scheme the design uses; majority vote is kept as a
// programmable alternative. A word without transitions, and a tie, give 0.
// Interface: gn is signed with GN_FRAC fraction bits (1.0 = 64); the
// division is rounded to the nearest code (this design's choice of format).
// Timing: registered, one cycle after lead/lag.
module gain_comp
  import cdr_pkg::*;
#(
  parameter int LANES = 5,
  parameter int FRAC  = GN_FRAC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  prefilter_mode_e        mode,
  input  logic [LANES-1:0]       lead,
  input  logic [LANES-1:0]       lag,
  output logic signed [FRAC+1:0] gn
);
  localparam int CW = $clog2(LANES + 1);

  logic [CW-1:0]          n_lead, n_lag, n_tr, n_abs;
  logic                   neg;
  logic [FRAC+CW:0]       num, q;
  logic signed [FRAC+1:0] gn_c;

  always_comb begin
    n_lead = '0;
    n_lag  = '0;
    for (int i = 0; i < LANES; i++) begin
      n_lead += CW'(lead[i]);
      n_lag  += CW'(lag[i]);
    end
    n_tr  = n_lead + n_lag;
    neg   = n_lag > n_lead;
    n_abs = neg ? n_lag - n_lead : n_lead - n_lag;
    num   = (FRAC+CW+1)'(n_abs) << FRAC;
    q     = '0;
    if (n_tr != '0) q = (num + (FRAC+CW+1)'(n_tr >> 1)) / (FRAC+CW+1)'(n_tr);
    if (mode == PF_MAJORITY) q = (n_abs != '0) ? (FRAC+CW+1)'(1) << FRAC : '0;
    gn_c = neg ? -$signed((FRAC+2)'(q)) : $signed((FRAC+2)'(q));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) gn <= '0;
    else        gn <= gn_c;
  end
endmodule
