// control_registers: shared control pads of the test chip.
//
// The five pads Ct<0:4> feed two 5-bit registers: register A holds the
// delay code of the test delay line DCDL_T, register B the pre-emphasis
// strength of the 10-Gb/s output buffer. The bypass input chooses which
// register is loaded. Loading happens continuously but slowly: once every
// 512 Ck periods, so the pads never disturb the fast logic. The described
// design clocks the registers with Ck divided by 512; here a 9-bit counter
// makes a one-cycle load enable instead, which samples the pads at the
// same rate without a derived clock.
// Interface: ck = P<0>, rst synchronous active high (clears both
// registers and the divider; reset values are this design's choice).
// Timing: a pad value is taken at most 512 Ck cycles after it is applied.
`timescale 1ps/1fs
module control_registers #(
  parameter int unsigned DIV = 512       // Ck cycles between loads
) (
  input  logic       ck,
  input  logic       rst,
  input  logic       bypass,
  input  logic [4:0] ct,
  output logic [4:0] reg_a,              // DCDL_T code (bypass = 1)
  output logic [4:0] reg_b,              // output-buffer strength (bypass = 0)
  output logic       load                // the slow load strobe
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] div_cnt;

  assign load = (div_cnt == CW'(DIV - 1));

  always_ff @(posedge ck) begin
    if (rst) begin
      div_cnt <= '0;
      reg_a   <= '0;
      reg_b   <= '0;
    end else begin
      div_cnt <= load ? '0 : div_cnt + 1'b1;
      if (load) begin
        if (bypass) reg_a <= ct;
        else        reg_b <= ct;
      end
    end
  end
endmodule
