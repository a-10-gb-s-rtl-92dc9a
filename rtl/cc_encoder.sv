// cc_encoder: 3-bit unsigned encoder of the confidence counter.
//
// Counts how many of the four Lead (or Lag) flags from the phase detectors
// are set and returns the count 0..4 as a 3-bit integer O<2:0>. The
// gate-level equations follow the described design, which counts the
// zeros of the inverted flags: O2 is the NOR of all inverted flags, O0 is
// their four-input parity and O1 is the "two or three set" term.
// Purely combinational; the register after it lives in confidence_counter.
`timescale 1ps/1fs
module cc_encoder (
  input  logic [3:0] flags,   // Lead<0:3> or Lag<0:3>, active high
  output logic [2:0] count    // number of flags set, 0..4
);
  logic a, b, c, d;           // inverted flags I3b..I0b
  always_comb begin
    {a, b, c, d} = ~flags;
    count[2] = ~(a | b | c | d);
    count[1] = ((~a & b) | (a & ~b)) & (~c | ~d)
             | (~a & ~b & (c | d))
             | (a & b & ~c & ~d);
    count[0] = (a ^ b) ^ (c ^ d);
  end
endmodule
