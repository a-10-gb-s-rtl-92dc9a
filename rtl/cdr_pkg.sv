// cdr_pkg: constants and types shared by the data-deskew CDR and its test chip.
//
// Timing model: the full-rate data run at 10 Gb/s (1 UI = 100 ps). Eight
// quarter-rate clocks P<0:7> at 2.5 GHz are spaced 50 ps apart; even phases
// sample the middle of a bit, odd phases sit on the bit edges. All digital
// logic except the delay line runs from these clocks, with Ck = P<0> and
// Ckb = P<4>. The numbers below follow the described design: four
// Alexander phase detectors, a confidence counter whose accumulator
// overflows at +/-6 majority votes (equivalent counter size N = 24 bit
// times), and a 28-code delay-line control whose reset code is 14.
`timescale 1ps/1fs
package cdr_pkg;
  localparam int unsigned NPHASE      = 8;   // P<0:7>
  localparam int unsigned NLANE       = 4;   // APD sets / parallel data bits
  localparam int unsigned CNT_W       = 3;   // encoder output width
  localparam int unsigned ACC_LIMIT   = 6;   // accumulator overflow at +/-6
  localparam int unsigned CODE_W      = 5;   // FSM counter S<0:4>
  localparam int unsigned NCODES      = 28;  // legal codes 0..27
  localparam logic [4:0]  CODE_INIT   = 5'd14; // S<0:4> = [0,1,1,1,0]
  localparam int unsigned NTAP        = 8;   // delay cells d<0:7>

  // Vote produced by the comparator from one quarter-rate cycle of PD flags.
  typedef enum logic [1:0] {
    VOTE_NONE = 2'b00,
    VOTE_LEAD = 2'b01,   // data leads the clock: add delay (count up)
    VOTE_LAG  = 2'b10    // data lags the clock: remove delay (count down)
  } vote_e;

  // DCDL control word: one-hot-pair coarse code and thermometer fine code.
  typedef struct packed {
    logic [7:0] c;       // C<7:0>, two adjacent bits set
    logic [3:0] f;       // F<3:0>, thermometer
  } dcdl_ctrl_t;
endpackage
