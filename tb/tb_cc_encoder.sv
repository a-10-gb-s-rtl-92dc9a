// tb_cc_encoder: exhaustive check of the 3-bit flag encoder against a
// population count computed in the testbench.
`timescale 1ps/1fs
module tb_cc_encoder;
  logic [3:0] flags;
  logic [2:0] count;
  int checks = 0, failures = 0;

  cc_encoder dut (.flags(flags), .count(count));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      flags = 4'(v);
      ones = 0;
      for (int b = 0; b < 4; b++) ones += (v >> b) & 1;
      #10;
      checks++;
      if (int'(count) != ones) begin
        failures++;
        $display("FAIL flags=%b count=%0d expected %0d", flags, count, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
