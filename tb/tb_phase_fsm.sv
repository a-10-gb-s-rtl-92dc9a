// tb_phase_fsm: random lead_cc/lag_cc pulses into the phase FSM. The
// testbench tracks the expected code (reset value 14, holds at 0 and 27)
// and builds the expected coarse/fine controls from the tap arithmetic:
// coarse position k = code/4 enables taps k and k+1; the fine code holds
// code%4 ones from F0 up when k is even and 4 - code%4 ones from F3 down
// when k is odd (Table-style thermometer that reverses direction).
`timescale 1ps/1fs
module tb_phase_fsm;
  import cdr_pkg::*;
  logic clk = 0, rst = 1, lead_cc = 0, lag_cc = 0;
  logic [4:0] code;
  dcdl_ctrl_t ctrl;
  logic over_flag;
  int checks = 0, failures = 0, model = 14, n_over = 0, n_top = 0, n_bot = 0;

  phase_fsm dut (.clk(clk), .rst(rst), .lead_cc(lead_cc), .lag_cc(lag_cc),
                 .code(code), .ctrl(ctrl), .over_flag(over_flag));

  always #200 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dcdl_ctrl_t expect_ctrl(int c);
    int k = c / 4, f = c % 4;
    expect_ctrl.c = 8'((1 << k) | (1 << (k + 1)));
    // even position: f ones filled from F0; odd position: 4-f ones filled from F3
    if (k % 2 == 0) expect_ctrl.f = 4'((1 << f) - 1);
    else            expect_ctrl.f = 4'(32'hF << f);
  endfunction

  task automatic check_state(int exp_over);
    checks++;
    if (int'(code) != model || ctrl != expect_ctrl(model) || int'(over_flag) != exp_over) begin
      failures++;
      $display("FAIL code=%0d/%0d ctrl c=%b f=%b exp c=%b f=%b over=%b/%0d", code, model,
               ctrl.c, ctrl.f, expect_ctrl(model).c, expect_ctrl(model).f, over_flag, exp_over);
    end
  endtask

  initial begin : main
    int r, bias, up_pct, exp_over;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check_state(0);
    for (int i = 0; i < 3000; i++) begin
      r = int'($urandom_range(0, 99));
      up_pct = ((i / 300) % 2 == 0) ? 70 : 30;
      exp_over = 0;
      lead_cc = (r < up_pct);
      lag_cc  = !lead_cc && ($urandom_range(0, 3) != 0);
      if (i % 97 == 5) begin lead_cc = 1; lag_cc = 1; end   // both: no move
      @(posedge clk);
      if (lead_cc && !lag_cc) begin
        if (model == 27) exp_over = 1; else model++;
      end else if (lag_cc && !lead_cc) begin
        if (model == 0) exp_over = 1; else model--;
      end
      #1;
      check_state(exp_over);
      n_over += exp_over;
      n_top  += (model == 27);
      n_bot  += (model == 0);
    end
    checks++;
    if (n_over == 0 || n_top == 0 || n_bot == 0) begin
      failures++;
      $display("FAIL ends not reached: over=%0d top=%0d bottom=%0d", n_over, n_top, n_bot);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
