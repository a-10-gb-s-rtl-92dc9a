// retiming_stage: brings the four recovered bits into the Ck domain.
//
// The even-phase samples Q<0>, Q<2>, Q<4>, Q<6> of one quarter-rate cycle
// are all stable at the next P<0> edge (Q<0> of that cycle is taken just
// before it is overwritten). A first register captures them on P<0> and a
// second register on the following P<0> presents D<0:3>, the recovered
// bits in arrival order (D<0> first), two Ck periods after sampling, as
// the described design does. Word alignment between channels is left to
// higher-level logic.
`timescale 1ps/1fs
module retiming_stage
  import cdr_pkg::*;
(
  input  logic             ck,       // P<0>
  input  logic [NLANE-1:0] q_even,   // {Q6,Q4,Q2,Q0}
  output logic [NLANE-1:0] d         // D<3:0>, D<0> is the earliest bit
);
  logic [NLANE-1:0] r1;
  always_ff @(posedge ck) begin
    r1 <= q_even;
    d  <= r1;
  end
endmodule
