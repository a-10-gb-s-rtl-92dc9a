// clock_generator: 8-phase 2.5-GHz clock generator for the test chip.
//
// A two-stage Johnson counter divides the 10-GHz input clock by four. It
// is built as two master-slave flip-flops A and B with A taking ~QB and B
// taking QA. The slave outputs give the even phases, one 100-ps input
// period apart; the master latches, which change half an input period
// earlier, give the odd phases:
//   P0 = QA, P1 = MB, P2 = QB, P3 = ~MA, P4 = ~QA, P5 = ~MB, P6 = ~QB, P7 = MA.
// The masters are written as falling-edge registers: their inputs only
// change on rising edges, so a latch transparent while the clock is low
// and a register on the falling edge give the same waveform.
// There is no reset: all four states of the two-stage Johnson counter lie
// on its one cycle, so it runs correctly from any power-up state, and the
// phases are valid from the second rising clk10 edge on. Which clk10 edge
// starts P<0> depends on that power-up state.
`timescale 1ps/1fs
module clock_generator
  import cdr_pkg::*;
(
  input  logic              clk10,
  output logic [NPHASE-1:0] p
);
  logic qa, qb, ma, mb;

  always_ff @(posedge clk10) begin
    qa <= ~qb;
    qb <= qa;
  end

  always_ff @(negedge clk10) begin
    ma <= ~qb;
    mb <= qa;
  end

  assign p = {ma, ~qb, ~mb, ~qa, ~ma, qb, mb, qa};
endmodule
