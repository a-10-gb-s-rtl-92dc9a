// deskew_cdr: 10-Gb/s data-deskew clock and data recovery loop.
//
// Instead of moving a clock, this CDR delays the data until the middle of
// each bit lines up with the even phases of a fixed 8-phase 2.5-GHz clock.
// Loop: dcdl -> phase_detector (4 Alexander PDs) -> confidence_counter
// (encoders, majority-vote comparator, +/-6 accumulator) -> phase_fsm
// (28-code up/down counter and decoder) -> dcdl. The loop is first order:
// the only integrator is the FSM counter that sets the delay. The recovered
// bits leave the phase detectors already de-serialized by four and are
// retimed to P<0> by retiming_stage.
// Clocks: Ck = P<0> and Ckb = P<4> (the clock buffer of the described
// design only buffers these). rst is the global burst reset: it clears
// the accumulator and returns the delay line to mid-range (code 14).
// Loop latency, sample to new delay: about 3.5 Ck cycles (1.4 ns), inside
// the 24-bit-time (2.4 ns) limit that the counter size sets.
`timescale 1ps/1fs
module deskew_cdr
  import cdr_pkg::*;
#(
  parameter int unsigned LIMIT     = ACC_LIMIT,
  parameter int unsigned PREAMP_PS = 30,
  parameter int unsigned CELL_PS   = 24
) (
  input  logic [NPHASE-1:0] p,        // P<7:0> from the receive PLL
  input  logic              rst,      // global burst reset, sync to P<0>
  input  logic              di,       // 10-Gb/s input data
  output logic [NLANE-1:0]  d,        // D<3:0>, recovered quarter-rate data
  output logic              lead_cc,
  output logic              lag_cc,
  output logic [4:0]        code,     // present delay code S<4:0>
  output logic              over_flag,
  output logic              dout      // delayed data (DCDL output)
);
  logic             ck, ckb;
  logic [NLANE-1:0] lead, lag, q_even;
  vote_e            vote;
  dcdl_ctrl_t       ctrl;
  logic signed [3:0] acc_value;
  int               delay_ps;

  assign ck  = p[0];
  assign ckb = p[4];

  dcdl #(.PREAMP_PS(PREAMP_PS), .CELL_PS(CELL_PS)) u_dcdl (
    .din(di), .ctrl(ctrl), .dout(dout), .delay_ps(delay_ps)
  );

  phase_detector u_pd (.p(p), .din(dout), .lead(lead), .lag(lag), .q_even(q_even));

  confidence_counter #(.LIMIT(LIMIT)) u_cc (
    .ck(ck), .ckb(ckb), .rst(rst), .lead(lead), .lag(lag),
    .vote(vote), .lead_cc(lead_cc), .lag_cc(lag_cc), .acc_value(acc_value)
  );

  phase_fsm u_fsm (
    .clk(ck), .rst(rst), .lead_cc(lead_cc), .lag_cc(lag_cc),
    .code(code), .ctrl(ctrl), .over_flag(over_flag)
  );

  retiming_stage u_rt (.ck(ck), .q_even(q_even), .d(d));
endmodule
