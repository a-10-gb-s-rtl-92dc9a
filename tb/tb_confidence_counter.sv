// tb_confidence_counter: random Lead<0:3>/Lag<0:3> flags, applied inside
// the valid window after each P<0> edge. The testbench counts the flags,
// takes the majority, and steps an integer accumulator model one P<0>
// edge later; lead_cc/lag_cc and the accumulator value must match it.
// Flags with equal counts (including the 010/101 false events, which set
// Lead and Lag together) must not move the accumulator.
`timescale 1ps/1fs
module tb_confidence_counter;
  import cdr_pkg::*;
  logic ck = 0, ckb = 1, rst = 1;
  logic [3:0] lead = 0, lag = 0;
  vote_e vote;
  logic lead_cc, lag_cc;
  logic signed [3:0] acc_value;
  int checks = 0, failures = 0, model = 0, pend = 0, n_lead = 0, n_lag = 0;

  confidence_counter dut (.ck(ck), .ckb(ckb), .rst(rst), .lead(lead), .lag(lag),
                          .vote(vote), .lead_cc(lead_cc), .lag_cc(lag_cc), .acc_value(acc_value));

  always #200 begin ck = ~ck; ckb = ~ckb; end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  initial begin : main
    int exp_lead, exp_lag, dir, bias;
    repeat (3) @(posedge ck);
    #50 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      // new flags 50 ps after P<0>, as the phase detectors deliver them
      bias = ((i / 400) % 2 == 0) ? 1 : 0;
      lead = 4'($urandom) | (bias ? 4'($urandom) : 4'b0);
      lag  = 4'($urandom) | (bias ? 4'b0 : 4'($urandom));
      if (i % 50 == 7) begin lead = 4'b0101; lag = 4'b0101; end
      dir  = (ones(lead) > ones(lag)) ? 1 : (ones(lead) < ones(lag)) ? -1 : 0;
      @(posedge ck);
      #1;
      // the vote of these flags takes effect at this edge
      exp_lead = 0; exp_lag = 0;
      pend = dir;
      begin
        if (pend == 1)  begin if (model == 5)  begin model = 0; exp_lead = 1; end else model++; end
        if (pend == -1) begin if (model == -5) begin model = 0; exp_lag = 1;  end else model--; end
        checks++;
        if (int'(acc_value) != model || int'(lead_cc) != exp_lead || int'(lag_cc) != exp_lag) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d acc=%0d/%0d lead_cc=%b/%0d lag_cc=%b/%0d", i,
                                      acc_value, model, lead_cc, exp_lead, lag_cc, exp_lag);
        end
      end
      n_lead += exp_lead;
      n_lag  += exp_lag;
      #49;
    end
    checks++;
    if (n_lead == 0 || n_lag == 0) begin failures++; $display("FAIL no pulses"); end
    $display("lead_cc=%0d lag_cc=%0d", n_lead, n_lag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
