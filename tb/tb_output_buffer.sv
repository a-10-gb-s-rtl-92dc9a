// tb_output_buffer: random 10-Gb/s data and random strength codes; the
// amplitude in the middle of each bit must be 64*s(bit) - strength*s(previous
// bit), and the logic output must follow the data.
`timescale 1ps/1fs
module tb_output_buffer;
  logic din = 0, dout;
  logic [4:0] strength = 0;
  int level;
  int checks = 0, failures = 0, n_over = 0;

  output_buffer dut (.din(din), .strength(strength), .dout(dout), .level(level));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev = 0, cur;
    int expl;
    #1000;
    for (int i = 0; i < 2000; i++) begin
      if (i % 100 == 0) strength = 5'($urandom);
      cur = bit'($urandom);
      din = cur;
      #50;
      expl = (cur ? 64 : -64) - (prev ? int'(strength) : -int'(strength));
      checks++;
      if (level != expl || dout != cur) begin
        failures++;
        if (failures < 10) $display("FAIL bit %b prev %b strength %0d level %0d expected %0d", cur, prev, strength, level, expl);
      end
      if (cur != prev && strength != 0) n_over++;
      prev = cur;
      #50;
    end
    checks++;
    if (n_over == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
