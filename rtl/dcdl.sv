// dcdl: behavioural model of the digitally controlled delay line.
//
// This is a behavioural model, not synthesizable logic: the real part is a
// chain of full-custom large-swing CMOS cells. It keeps the structure of
// the described design: a three-cell pre-amplifier (a fixed delay here),
// eight delay cells giving taps d<0:7> one cell delay apart, an even-tap
// and an odd-tap 4:1 multiplexer selected by the one-hot-pair coarse code
// C<0:7>, and an interpolator that moves the output edge from the even tap
// towards the odd tap in quarter steps, one step per set bit of the
// thermometer code F<0:3>. With the fsm_decoder codes this gives 28
// monotonic settings spaced CELL_PS/4 apart, a tuning range of 27/4 cell
// delays. Amplitude, noise and inter-symbol interference are not modelled.
// The cells are modelled as a chain of continuous assignments with delay:
// PREAMP_PS for the pre-amplifier, CELL_PS per tap cell and CELL_PS/4 per
// step of a four-step fine chain. Every single delay is shorter than one
// bit, so no data pulse is swallowed. The interpolator is modelled as a
// selection along the fine chain behind the earlier of the two selected
// taps: the output edge lies nf quarter cells after the even tap, which is
// the same as 4 - nf quarter cells after the odd tap when the odd tap is
// the earlier one. In an illegal coarse state the output holds its value.
// Interface: din/dout are the 10-Gb/s data (single-ended here), ctrl from
// fsm_decoder. Timing: dout = din delayed by delay_ps.
`timescale 1ps/1fs
module dcdl
  import cdr_pkg::*;
#(
  parameter int unsigned PREAMP_PS = 30,  // fixed delay of the pre-amplifier
  parameter int unsigned CELL_PS   = 24   // delay of one cell, a multiple of 4;
                                          // one step is CELL_PS/4
) (
  input  logic       din,
  input  dcdl_ctrl_t ctrl,
  output logic       dout,
  output int         delay_ps       // present delay in ps, for observation
);
  int  ev, od, nf, base, fsel;
  bit  ok;

  // Delay chain: pre-amplifier, eight tap cells, then four fine steps
  // behind the selected tap.
  logic              pre;
  logic [NTAP-1:0]   tap;
  logic [4:0]        fine;

  assign #(PREAMP_PS) pre = din;
  assign #(CELL_PS)   tap[0] = pre;
  for (genvar k = 1; k < NTAP; k++) begin : g_cell
    assign #(CELL_PS) tap[k] = tap[k-1];
  end

  always_comb begin
    ev = -1; od = -1; nf = 0;
    for (int k = 0; k < NTAP; k += 2) if (ctrl.c[k])   ev = k;
    for (int k = 1; k < NTAP; k += 2) if (ctrl.c[k])   od = k;
    for (int k = 0; k < 4; k++)       if (ctrl.f[k])   nf++;
    ok = (ev >= 0) && (od >= 0) && ($countones(ctrl.c) == 2)
         && ((od - ev == 1) || (ev - od == 1));
    base = (od > ev) ? ev : od;
    fsel = (od > ev) ? nf : 4 - nf;
    if (!ok) begin
      base = 0;
      fsel = 0;
    end
    if (ok)
      delay_ps = int'(PREAMP_PS) + int'(CELL_PS) * (ev + 1) + int'(CELL_PS / 4) * nf * (od - ev);
    else
      delay_ps = int'(PREAMP_PS);
  end

  assign fine[0] = tap[base[2:0]];
  for (genvar k = 1; k < 5; k++) begin : g_fine
    assign #(CELL_PS / 4) fine[k] = fine[k-1];
  end

  always_latch begin
    if (ok) dout = fine[fsel[2:0]];
  end
endmodule
