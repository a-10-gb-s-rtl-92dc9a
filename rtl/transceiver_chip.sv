// transceiver_chip: 10-Gb/s transceiver test chip built around deskew_cdr.
//
// Receive side: the 10-Gb/s input di goes to the data-deskew CDR, which
// recovers it as four 2.5-Gb/s bits D<0:3> on P<0>. Transmit side: the
// serializer turns D<0:3> back into a 10-Gb/s stream for the output buffer.
// The 8-phase clocks come from clock_generator, which divides the 10-GHz
// clock clk10 by four.
// Modes:
//  * nominal (bypass = 0): di -> CDR -> serializer -> output buffer.
//    Register B (loaded from ct while bypass = 0) sets the pre-emphasis.
//  * bypass (bypass = 1): di -> test delay line DCDL_T -> output buffer.
//    Register A (loaded from ct while bypass = 1) sets the DCDL_T code, so
//    each of its 28 delay steps can be measured from outside.
//  * debug (always on): lead_cc drives dbg[0]; dbg[1] carries lag_cc, or
//    the recovered bit D<0> when ct[0] = 1.
// rst is the global reset, synchronous to P<0>: CDR accumulator and FSM,
// pad-sampling divider and control registers. Hold it for at least two
// P<0> periods; the clock generator runs without reset. The output-buffer amplitude is given on to_level.
`timescale 1ps/1fs
module transceiver_chip
  import cdr_pkg::*;
(
  input  logic       clk10,     // 10-GHz clock from the tester
  input  logic       rst,
  input  logic       di,        // 10-Gb/s data from the tester
  input  logic       bypass,
  input  logic [4:0] ct,        // shared control pads Ct<4:0>
  output logic       to,        // 10-Gb/s output (logic level)
  output int         to_level,  // 10-Gb/s output amplitude, arbitrary units
  output logic [1:0] dbg        // 2.5-Gb/s debug outputs
);
  logic [NPHASE-1:0] p;
  logic [NLANE-1:0]  d;
  logic              lead_cc, lag_cc, over_flag, cdr_dout;
  logic [4:0]        code, reg_a, reg_b;
  logic              load, ser_out, dcdlt_out, full_rate;
  dcdl_ctrl_t        ctrl_t;
  int                dcdlt_delay;

  clock_generator u_clkgen (.clk10(clk10), .p(p));

  deskew_cdr u_cdr (
    .p(p), .rst(rst), .di(di), .d(d), .lead_cc(lead_cc), .lag_cc(lag_cc),
    .code(code), .over_flag(over_flag), .dout(cdr_dout)
  );

  serializer u_ser (.p(p), .d(d), .so(ser_out));

  control_registers u_regs (
    .ck(p[0]), .rst(rst), .bypass(bypass), .ct(ct),
    .reg_a(reg_a), .reg_b(reg_b), .load(load)
  );

  fsm_decoder u_dec_t (.code(reg_a), .ctrl(ctrl_t));
  dcdl u_dcdl_t (.din(di), .ctrl(ctrl_t), .dout(dcdlt_out), .delay_ps(dcdlt_delay));

  assign full_rate = bypass ? dcdlt_out : ser_out;

  output_buffer u_obuf (.din(full_rate), .strength(reg_b), .dout(to), .level(to_level));

  assign dbg[0] = lead_cc;
  assign dbg[1] = ct[0] ? d[0] : lag_cc;
endmodule
