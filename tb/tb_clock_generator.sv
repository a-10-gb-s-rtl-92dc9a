// tb_clock_generator: 10-GHz input clock; checks that every P<n> has a
// 400-ps period, 200-ps high time, and rises 50*n ps after P<0>, starting
// from whatever state the counter powers up in.
`timescale 1ps/1fs
module tb_clock_generator;
  logic clk10 = 0, rst = 1;
  logic [7:0] p;
  realtime rise [8], prev_rise [8];
  int checks = 0, failures = 0;

  clock_generator dut (.clk10(clk10), .p(p));

  always #50 clk10 = ~clk10;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = 0; n < 8; n++) begin : g_mon
    always @(posedge p[n]) begin prev_rise[n] = rise[n]; rise[n] = $realtime; end
    always @(negedge p[n]) if (!rst && $realtime > 2000) begin
      checks++;
      if ($realtime - rise[n] != 200.0) begin
        failures++;
        $display("FAIL P%0d high for %0.1f ps", n, $realtime - rise[n]);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk10);
    rst = 0;
    #2000;
    for (int i = 0; i < 50; i++) begin
      @(posedge p[0]);
      #399;
      for (int n = 0; n < 8; n++) begin
        checks += 2;
        if (rise[n] - rise[0] != 50.0 * n) begin
          failures++;
          $display("FAIL P%0d rises %0.1f ps after P0", n, rise[n] - rise[0]);
        end
        if (n > 0 && rise[n] - prev_rise[n] != 400.0) begin
          failures++;
          $display("FAIL P%0d period %0.1f", n, rise[n] - prev_rise[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
