// phase_detector: four quarter-rate Alexander (bang-bang) phase detectors.
//
// Eight flip-flops sample the delayed 10-Gb/s data on the rising edges of
// P<0:7>. Even phases land in the middle of bits, odd phases on the bit
// edges. APD j (j = 0..3) uses the samples a, b, c taken on P<2j>,
// P<2j+1>, P<2j+2>; the last one wraps to P<0> of the next cycle. The
// simplified detector reports Lead = a ^ b and Lag = b ^ c (no AND with
// the complement), so the two patterns 010 and 101 set both flags; the
// majority vote downstream cancels them.
// Partial retiming: Q<0:4> are re-sampled by Ck = P<0> into Qr<0:4>, while
// Q<5:7> and the new Q<0> are used directly. After each P<0> edge the set
// {Qr<0:4>, Q<5:7>, Q<0>} holds nine consecutive samples of one cycle until
// the next P<5> edge, so lead/lag are valid from P<0> to P<5>; the
// confidence counter registers them on Ckb = P<4>.
// q_even gives Q<0>, Q<2>, Q<4>, Q<6> to the retiming stage.
`timescale 1ps/1fs
module phase_detector
  import cdr_pkg::*;
(
  input  logic [NPHASE-1:0] p,       // P<7:0>, 2.5 GHz, 50 ps apart
  input  logic              din,     // full-rate data from the delay line
  output logic [NLANE-1:0]  lead,    // data leads the clock (add delay)
  output logic [NLANE-1:0]  lag,     // data lags the clock (remove delay)
  output logic [NLANE-1:0]  q_even   // Q<6>,Q<4>,Q<2>,Q<0>
);
  logic [NPHASE-1:0] q;
  logic [4:0]        qr;
  logic [8:0]        s;              // nine consecutive samples

  for (genvar n = 0; n < NPHASE; n++) begin : g_samp
    logic qn;                        // sampler clocked by P<n>
    always_ff @(posedge p[n]) qn <= din;
    assign q[n] = qn;
  end

  always_ff @(posedge p[0]) qr <= q[4:0];

  always_comb begin
    s = {q[0], q[7:5], qr};
    for (int j = 0; j < NLANE; j++) begin
      lead[j] = s[2*j]   ^ s[2*j+1];
      lag[j]  = s[2*j+1] ^ s[2*j+2];
    end
  end

  assign q_even = {q[6], q[4], q[2], q[0]};
endmodule
