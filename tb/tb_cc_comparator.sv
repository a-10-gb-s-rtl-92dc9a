// tb_cc_comparator: all 64 input pairs of the majority-vote comparator,
// compared with an integer comparison in the testbench.
`timescale 1ps/1fs
module tb_cc_comparator;
  import cdr_pkg::*;
  logic [2:0] lead_cnt, lag_cnt;
  vote_e vote, exp_vote;
  int checks = 0, failures = 0;

  cc_comparator dut (.lead_cnt(lead_cnt), .lag_cnt(lag_cnt), .vote(vote));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 8; b++)
      for (int a = 0; a < 8; a++) begin
        lead_cnt = 3'(b);
        lag_cnt  = 3'(a);
        exp_vote = (b > a) ? VOTE_LEAD : (b < a) ? VOTE_LAG : VOTE_NONE;
        #10;
        checks++;
        if (vote != exp_vote) begin
          failures++;
          $display("FAIL lead=%0d lag=%0d vote=%s expected %s", b, a, vote.name(), exp_vote.name());
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
