// tb_cc_accumulator: random Lead/Lag/no votes into the accumulator; an
// integer model in the testbench predicts the state and the overflow
// pulses (+6 gives lead_cc, -6 gives lag_cc, then back to zero). Also
// checks that six Lead votes in a row from zero give exactly one pulse
// on the sixth vote.
`timescale 1ps/1fs
module tb_cc_accumulator;
  import cdr_pkg::*;
  logic clk = 0, rst = 1;
  vote_e vote = VOTE_NONE;
  logic lead_cc, lag_cc;
  logic signed [3:0] value;
  int checks = 0, failures = 0;
  int model = 0, exp_lead = 0, exp_lag = 0, n_lead = 0, n_lag = 0;

  cc_accumulator dut (.clk(clk), .rst(rst), .vote(vote),
                      .lead_cc(lead_cc), .lag_cc(lag_cc), .value(value));

  always #200 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input vote_e v);
    vote = v;
    @(posedge clk);
    exp_lead = 0; exp_lag = 0;
    if (v == VOTE_LEAD) begin
      if (model == 5) begin model = 0; exp_lead = 1; end else model++;
    end else if (v == VOTE_LAG) begin
      if (model == -5) begin model = 0; exp_lag = 1; end else model--;
    end
    #1;
    checks++;
    if (int'(value) != model || int'(lead_cc) != exp_lead || int'(lag_cc) != exp_lag) begin
      failures++;
      $display("FAIL vote=%s value=%0d/%0d lead_cc=%b/%0d lag_cc=%b/%0d",
               v.name(), value, model, lead_cc, exp_lead, lag_cc, exp_lag);
    end
    n_lead += int'(lead_cc);
    n_lag  += int'(lag_cc);
  endtask

  initial begin : main
    int r, bias, up_pct, exp_over;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // Six Lead votes: pulse on the sixth only.
    for (int i = 0; i < 6; i++) step(VOTE_LEAD);
    checks++;
    if (n_lead != 1) begin failures++; $display("FAIL six Lead votes gave %0d pulses", n_lead); end
    for (int i = 0; i < 6; i++) step(VOTE_LAG);
    checks++;
    if (n_lag != 1) begin failures++; $display("FAIL six Lag votes gave %0d pulses", n_lag); end
    // Random votes with a bias that changes sign.
    for (int i = 0; i < 2000; i++) begin
      r = int'($urandom_range(0, 99));
      bias = (i < 1000) ? 20 : -20;
      step(r < 40 + bias ? VOTE_LEAD : r < 80 ? VOTE_LAG : VOTE_NONE);
    end
    checks++;
    if (n_lead < 5 || n_lag < 5) begin failures++; $display("FAIL few pulses %0d %0d", n_lead, n_lag); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
