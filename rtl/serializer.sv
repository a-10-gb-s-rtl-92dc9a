// serializer: 4-to-1 serializer of the test-chip transmitter.
//
// Three 2:1 multiplexers in two stages. All inputs are first registered on
// P<0> (one-cycle delay); D<2> and D<3> pass one more register on the
// falling edge of P<0> (1.5-cycle delay), so that every multiplexer input
// changes while the multiplexer is looking at its other input. First
// stage: mux A selects h3 while P<0> is high and r1 while it is low; mux B
// selects r0 while P<2> is high and h2 while it is low. The output mux
// uses the 5-GHz clock P<0> ^ P<2>: mux A while it is high, mux B while
// it is low. All serializer clocks come from P<0:7>.
// Timing: a word on d at a P<0> rising edge (time 0) leaves as D<0>, D<1>,
// D<2>, D<3> in the 100-ps slots starting 100, 200, 300 and 400 ps later.
// The slot assignment and clock polarities are this design's choice.
`timescale 1ps/1fs
module serializer
  import cdr_pkg::*;
(
  input  logic [NPHASE-1:0] p,
  input  logic [NLANE-1:0]  d,     // D<3:0>, D<0> first on the line
  output logic              so     // 10-Gb/s serial output
);
  logic [NLANE-1:0] r;
  logic             h2, h3, mux_a, mux_b, c5;

  always_ff @(posedge p[0]) r <= d;
  always_ff @(negedge p[0]) begin
    h2 <= r[2];
    h3 <= r[3];
  end

  always_comb begin
    mux_a = p[0] ? h3 : r[1];
    mux_b = p[2] ? r[0] : h2;
    c5    = p[0] ^ p[2];
    so    = c5 ? mux_a : mux_b;
  end
endmodule
