// cc_comparator: majority-vote comparator of the confidence counter.
//
// Compares the encoded Lead count B with the Lag count A by forming B - A
// as B + ~A + 1 with look-ahead carries (carry-in fixed to 1), so no
// carry ripples through the three bits. The carry out says B >= A and a
// zero difference says B == A. Any difference, however small, becomes a
// single vote: (4:0), (3:1), (2:1), (1:0) and so on all count the same,
// which is the majority-vote rule that also cancels the two false APD
// events (both Lead and Lag set). Combinational.
`timescale 1ps/1fs
module cc_comparator
  import cdr_pkg::*;
(
  input  logic [2:0] lead_cnt,  // B
  input  logic [2:0] lag_cnt,   // A
  output vote_e      vote
);
  logic [2:0] p, g, diff;
  logic [3:0] cy;               // cy[i] = carry into bit i
  always_comb begin
    p = lead_cnt ^ ~lag_cnt;
    g = lead_cnt & ~lag_cnt;
    cy[0] = 1'b1;
    cy[1] = g[0] | p[0];
    cy[2] = g[1] | (p[1] & (g[0] | p[0]));
    cy[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & (g[0] | p[0]));
    diff  = p ^ cy[2:0];
    if (diff == 3'd0)  vote = VOTE_NONE;
    else if (cy[3])    vote = VOTE_LEAD;   // B > A
    else               vote = VOTE_LAG;    // B < A
  end
endmodule
