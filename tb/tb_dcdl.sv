// tb_dcdl: steps the delay-line model through all 28 control codes (made
// by the testbench from the coarse/fine rules, not by fsm_decoder) and
// measures the delay of a rising and a falling edge. Expected delay:
// PREAMP + CELL * (1 + code/4), i.e. a 6-ps step and a 162-ps range with
// the default 24-ps cell. Also checks that no edge is lost while the code
// moves one step per bit of a running 10-Gb/s stream.
`timescale 1ps/1fs
module tb_dcdl;
  import cdr_pkg::*;
  logic din = 0, dout;
  dcdl_ctrl_t ctrl;
  int delay_ps;
  real t_in, t_out;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  dcdl dut (.din(din), .ctrl(ctrl), .dout(dout), .delay_ps(delay_ps));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dcdl_ctrl_t mk(int c);
    int k = c / 4, f = c % 4;
    mk.c = 8'((1 << k) | (1 << (k + 1)));
    if (k % 2 == 0) mk.f = 4'((1 << f) - 1);
    else            mk.f = 4'(32'hF << f);
  endfunction

  always @(din)  n_in++;
  always @(dout) begin n_out++; t_out = $realtime; end

  initial begin
    real prev, expd;
    ctrl = mk(14);
    #1000;
    prev = 0.0;
    for (int c = 0; c < NCODES; c++) begin
      ctrl = mk(c);
      #500;
      for (int e = 0; e < 2; e++) begin
        t_in = $realtime;
        din = ~din;
        #400;
        expd = 30.0 + 24.0 * (1.0 + real'(c) / 4.0);
        checks++;
        if ((t_out - t_in) < expd - 0.01 || (t_out - t_in) > expd + 0.01) begin
          failures++;
          $display("FAIL code=%0d delay=%0.2f expected %0.2f", c, t_out - t_in, expd);
        end
      end
      if (c > 0) begin
        checks++;
        if ((t_out - t_in) - prev < 5.99 || (t_out - t_in) - prev > 6.01) begin
          failures++;
          $display("FAIL step at code %0d is %0.2f ps", c, (t_out - t_in) - prev);
        end
      end
      prev = t_out - t_in;
    end
    // running stream while sweeping the code up and down
    n_in = 0; n_out = 0;
    for (int i = 0; i < 400; i++) begin
      int c = (i < 200) ? i % 28 : 27 - (i % 28);
      ctrl = mk(c);
      din = ~din;
      #100;
    end
    #400;
    checks++;
    if (n_in != n_out) begin failures++; $display("FAIL edges in %0d out %0d", n_in, n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
