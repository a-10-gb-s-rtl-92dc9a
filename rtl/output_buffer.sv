// output_buffer: behavioural model of the 10-Gb/s output driver.
//
// This is a behavioural model, not synthesizable logic: the real driver is
// a chain of tapered large-swing cells ending in a CMOS inverter, with a
// bank of binary-weighted tri-state buffers that feed back a one-bit-
// delayed, inverted copy of the data (a two-tap FIR pre-emphasis). The
// model gives the logic level on dout and a signed output amplitude in
// arbitrary units on level:
//   level = MAIN * s(now) - strength * s(one bit earlier),  s(x) = +1/-1,
// where strength (0..31) is the number of small tri-state cells turned on
// by the 5-bit binary code. A transition therefore overshoots by
// 2 * strength units; a repeated bit is reduced by the same amount.
// Interface: din is the 10-Gb/s data, strength from control register B.
`timescale 1ps/1fs
module output_buffer #(
  parameter int unsigned UI_PS = 100,   // one bit time in ps
  parameter int  MAIN  = 64       // main-driver amplitude
) (
  input  logic       din,
  input  logic [4:0] strength,
  output logic       dout,
  output int         level
);
  // One-bit delay for the pre-emphasis tap, as four quarter-bit stages so
  // that each stage is shorter than any data pulse.
  logic [4:0] dl;
  logic       dly;
  assign dl[0] = din;
  for (genvar k = 1; k < 5; k++) begin : g_dly
    assign #(UI_PS / 4) dl[k] = dl[k-1];
  end
  assign dly = dl[4];

  always_comb begin
    dout  = din;
    level = (din ? MAIN : -MAIN) - (dly ? int'(strength) : -int'(strength));
  end
endmodule
