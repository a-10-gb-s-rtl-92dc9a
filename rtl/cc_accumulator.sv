// cc_accumulator: up/down accumulator with dynamic reset (last stage of the
// confidence counter).
//
// A 4-bit two's-complement counter built from toggle flip-flops. The toggle
// inputs follow the look-ahead form T0 = U + D, Ti = U&S0..S(i-1) +
// D&~S0..~S(i-1), where U is a Lead vote and D a Lag vote. The counter
// holds -5..+5 (states ST15..ST0..ST5). A Lead vote at +5 or a Lag vote at
// -5 reaches the +/-6 limit: instead of counting, the counter is loaded
// with zero on that clock edge and lead_cc or lag_cc is high for the
// following cycle. Six net votes in a row therefore make one output pulse;
// with four bits per vote this is the counter size N = 24 bit times.
// Interface: clocked by Ck (P<0>), synchronous active-high reset from the
// global burst reset. Outputs are registered one-cycle pulses.
`timescale 1ps/1fs
module cc_accumulator
  import cdr_pkg::*;
#(
  parameter int unsigned LIMIT = ACC_LIMIT   // overflow threshold, 2..8
) (
  input  logic  clk,
  input  logic  rst,
  input  vote_e vote,
  output logic  lead_cc,      // overflow upward: add one delay step
  output logic  lag_cc,       // overflow downward: remove one delay step
  output logic signed [3:0] value
);
  logic up, dn, ovf_up, ovf_dn;
  logic [3:0] s, t;

  assign s     = value;
  assign up    = (vote == VOTE_LEAD);
  assign dn    = (vote == VOTE_LAG);
  assign ovf_up = up && (value == 4'(signed'(LIMIT - 1)));
  assign ovf_dn = dn && (value == -4'(signed'(LIMIT - 1)));

  always_comb begin
    t[0] = up | dn;
    t[1] = (up & s[0])               | (dn & ~s[0]);
    t[2] = (up & s[0] & s[1])        | (dn & ~s[0] & ~s[1]);
    t[3] = (up & s[0] & s[1] & s[2]) | (dn & ~s[0] & ~s[1] & ~s[2]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      value   <= '0;
      lead_cc <= 1'b0;
      lag_cc  <= 1'b0;
    end else begin
      lead_cc <= ovf_up;
      lag_cc  <= ovf_dn;
      if (ovf_up || ovf_dn) value <= '0;   // dynamic reset to ST0
      else                  value <= value ^ t;
    end
  end

  // The counter never leaves -(LIMIT-1)..(LIMIT-1).
  assert property (@(posedge clk) disable iff (rst)
                   (value <= 4'(signed'(LIMIT - 1))) && (value >= -4'(signed'(LIMIT - 1))));
  assert property (@(posedge clk) disable iff (rst) !(lead_cc && lag_cc));
endmodule
