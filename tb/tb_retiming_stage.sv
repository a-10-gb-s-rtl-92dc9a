// tb_retiming_stage: random even-phase samples in, checks that each word
// appears on d exactly two P<0> edges later.
`timescale 1ps/1fs
module tb_retiming_stage;
  logic ck = 0;
  logic [3:0] q_even = 0, d;
  logic [3:0] hist [0:2];
  int checks = 0, failures = 0;

  retiming_stage dut (.ck(ck), .q_even(q_even), .d(d));

  always #200 ck = ~ck;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge ck);
      q_even = 4'($urandom);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = q_even;
      @(posedge ck); #1;
      if (i >= 2) begin
        checks++;
        if (d != hist[1]) begin
          failures++;
          $display("FAIL d=%b expected %b", d, hist[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
