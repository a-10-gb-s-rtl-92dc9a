// fsm_decoder: turns the 5-bit phase code S<4:0> into delay-line controls.
//
// Coarse control uses the two-stage NOR scheme: e_k = (S<4:2> == k) for
// k = 0..7 and C_k = e_(k-1) | e_k, so C<0:7> always enables two adjacent
// taps (one even, one odd) and e_7, the illegal state, enables none. Fine
// control is the thermometer code F3 = S2, F2 = S2 ^ (S1 & S0),
// F1 = S2 ^ S1, F0 = ~S2 ^ (~S1 & ~S0): it counts up with S<1:0> when S2
// is 0 and down when S2 is 1, because the even and odd taps swap roles
// between neighbouring coarse positions. Combinational.
`timescale 1ps/1fs
module fsm_decoder
  import cdr_pkg::*;
(
  input  logic [4:0] code,
  output dcdl_ctrl_t ctrl
);
  logic [7:0] e;
  always_comb begin
    for (int k = 0; k < 8; k++) e[k] = (code[4:2] == 3'(k));
    ctrl.c[0] = e[0];
    for (int k = 1; k < 7; k++) ctrl.c[k] = e[k-1] | e[k];
    ctrl.c[7] = e[6];
    ctrl.f[3] = code[2];
    ctrl.f[2] = code[2] ^ (code[1] & code[0]);
    ctrl.f[1] = code[2] ^ code[1];
    ctrl.f[0] = ~code[2] ^ (~code[1] & ~code[0]);
  end
endmodule
