// phase_fsm: phase-control state machine that drives the delay line.
//
// A 5-bit up/down counter S<0:4> moves one code up on every lead_cc pulse
// (add delay to the data) and one code down on every lag_cc pulse. The
// static reset loads code 14 (S<0:4> = [0,1,1,1,0]), which puts the delay
// line at half its tuning range at the start of every burst. Of the 32
// counter values only 0..27 are legal (S<4:2> = 111 is illegal); at the
// two ends the counter holds and over_flag pulses to report a request the
// delay line cannot follow. Holding at the ends is this design's choice.
// The registered code is decoded combinationally by fsm_decoder into the
// coarse code C<0:7> and fine code F<0:3>. The original builds the
// counter from toggle flip-flops; here it is written as +1/-1 arithmetic,
// which gives the same state sequence.
// Interface: clocked by Ck (P<0>), synchronous active-high reset.
`timescale 1ps/1fs
module phase_fsm
  import cdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        lead_cc,
  input  logic        lag_cc,
  output logic [4:0]  code,       // S<4:0>
  output dcdl_ctrl_t  ctrl,       // C<7:0>, F<3:0>
  output logic        over_flag   // request ignored at either end
);
  always_ff @(posedge clk) begin
    if (rst) begin
      code      <= CODE_INIT;
      over_flag <= 1'b0;
    end else begin
      over_flag <= 1'b0;
      if (lead_cc && !lag_cc) begin
        if (code == 5'(NCODES - 1)) over_flag <= 1'b1;
        else                        code <= code + 5'd1;
      end else if (lag_cc && !lead_cc) begin
        if (code == 5'd0) over_flag <= 1'b1;
        else              code <= code - 5'd1;
      end
    end
  end

  fsm_decoder u_dec (.code(code), .ctrl(ctrl));

  assert property (@(posedge clk) disable iff (rst) code < 5'(NCODES));
endmodule
