// tb_serializer: random 4-bit words on each P<0> edge; the serial output
// is sampled in the middle of each 100-ps slot and must read D<0>, D<1>,
// D<2>, D<3> of the word in the slots starting 100, 200, 300, 400 ps after
// the P<0> edge that takes the word.
`timescale 1ps/1fs
module tb_serializer;
  logic [7:0] p = 0;
  logic [3:0] d = 0;
  logic so;
  int checks = 0, failures = 0;

  serializer dut (.p(p), .d(d), .so(so));

  for (genvar n = 0; n < 8; n++) begin : g_clk
    initial begin
      #(1000 + n * 50);
      forever begin p[n] = 1; #200; p[n] = 0; #200; end
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // new word 100 ps after every P<0> edge
  initial begin
    forever begin
      @(posedge p[0]);
      #100 d = 4'($urandom);
    end
  end

  task automatic check_word(logic [3:0] word);
    for (int s = 0; s < 4; s++) begin
      #(s == 0 ? 150 : 100);          // middle of slot s
      checks++;
      if (so !== word[s]) begin
        failures++;
        if (failures < 10) $display("FAIL word %b slot %0d got %b", word, s, so);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge p[0]);
    for (int i = 0; i < 900; i++) begin
      @(posedge p[0]);
      fork
        check_word(d);                 // word taken at this edge
      join_none
    end
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
