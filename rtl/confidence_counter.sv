// confidence_counter: digital loop filter of the CDR (encoder, comparator,
// accumulator).
//
// The four Lead flags and the four Lag flags of one quarter-rate cycle are
// each counted by a cc_encoder. The two 3-bit counts are registered on
// Ckb = P<4>, inside the window in which the phase-detector flags are
// valid, compared by the majority-vote cc_comparator, and the single vote
// steps cc_accumulator on the next Ck = P<0>. The accumulator emits a
// lead_cc or lag_cc pulse after six net votes (24 bit times).
// Latency from the APD flags to lead_cc/lag_cc: 1.5 Ck cycles to the
// accumulator edge plus the registered output, about 2.5 cycles (1 ns).
`timescale 1ps/1fs
module confidence_counter
  import cdr_pkg::*;
#(
  parameter int unsigned LIMIT = ACC_LIMIT
) (
  input  logic             ck,      // P<0>
  input  logic             ckb,     // P<4>
  input  logic             rst,
  input  logic [NLANE-1:0] lead,
  input  logic [NLANE-1:0] lag,
  output vote_e            vote,    // comparator result (for observation)
  output logic             lead_cc,
  output logic             lag_cc,
  output logic signed [3:0] acc_value // accumulator state, -5..+5
);
  logic [CNT_W-1:0] lead_cnt, lag_cnt, lead_cnt_r, lag_cnt_r;

  cc_encoder u_enc_lead (.flags(lead), .count(lead_cnt));
  cc_encoder u_enc_lag  (.flags(lag),  .count(lag_cnt));

  always_ff @(posedge ckb) begin
    lead_cnt_r <= lead_cnt;
    lag_cnt_r  <= lag_cnt;
  end

  cc_comparator u_comp (.lead_cnt(lead_cnt_r), .lag_cnt(lag_cnt_r), .vote(vote));

  cc_accumulator #(.LIMIT(LIMIT)) u_accu (
    .clk(ck), .rst(rst), .vote(vote),
    .lead_cc(lead_cc), .lag_cc(lag_cc), .value(acc_value)
  );
endmodule
