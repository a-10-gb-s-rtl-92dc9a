// tb_transceiver_chip: end-to-end test of the transceiver test chip at its
// default parameters.
//
// The testbench plays the tester: a 10-GHz clock and a PRBS
// (x^31 + x^3 + 1) 10-Gb/s data stream with a chosen phase, frequency
// error and random edge jitter. Phases:
//  1. nominal mode (bypass = 0, Ct = 01010): the CDR locks, the recovered
//     data come back through the serializer, and the 10-Gb/s output must
//     equal the input at one fixed bit offset with no errors. Register B
//     takes 10, and the output amplitude must then show a pre-emphasis of
//     10 units (74 on a transition, 54 on a repeated bit).
//     Debug outputs: dbg[0] pulses with lead_cc, dbg[1] with lag_cc.
//  2. debug select (Ct<0> = 1): dbg[1] carries the recovered bit D<0>.
//  3. a burst at +3000 ppm: the delay line reaches its end (over_flag).
//  4. bypass mode (bypass = 1): register A is loaded with codes 0, 13 and
//     27 in turn and the input-to-output delay must be 54 + 6*code ps.
// Every mechanism (lead_cc, lag_cc, accumulator reset, majority-vote false
// events, coarse tap moves, delay-line overflow, register A and B loads,
// bypass and debug switching) is counted and must have happened.
`timescale 1ps/1fs
module tb_transceiver_chip;
  logic clk10 = 0, rst = 1, di = 0, bypass = 0;
  logic [4:0] ct = 5'b01010;
  logic to;
  int to_level;
  logic [1:0] dbg;
  int checks = 0, failures = 0;
  int n_lead = 0, n_lag = 0, n_false = 0, n_coarse = 0, n_over = 0, n_load_a = 0, n_load_b = 0;
  int n_dbg_lead = 0, n_dbg_lag = 0, n_dbg_data = 0, n_bypass = 0, max_code = 0;
  bit tx [$];
  bit rxs [$];
  bit collect = 0;
  logic [31:1] lfsr = 31'h5A5A5A5;
  logic [4:0] code_q = 5'd14;
  real t_di, t_to;

  transceiver_chip dut (.clk10(clk10), .rst(rst), .di(di), .bypass(bypass), .ct(ct),
                        .to(to), .to_level(to_level), .dbg(dbg));

  always #50 clk10 = ~clk10;

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --- monitors -----------------------------------------------------------
  wire [7:0] p = dut.p;
  always @(posedge p[0]) if (!rst) begin
    n_lead   += int'(dut.lead_cc);
    n_lag    += int'(dut.lag_cc);
    n_over   += int'(dut.over_flag);
    if (dut.code[4:2] != code_q[4:2]) n_coarse++;
    if (int'(dut.code) > max_code) max_code = int'(dut.code);
    code_q   <= dut.code;
    if (dut.load && bypass)  n_load_a++;
    if (dut.load && !bypass) n_load_b++;
    // debug outputs follow the internal signals
    if (!ct[0]) begin
      checks++;
      if (dbg[0] != dut.lead_cc || dbg[1] != dut.lag_cc) begin failures++; $display("FAIL debug lead/lag"); end
      n_dbg_lead += int'(dbg[0]);
      n_dbg_lag  += int'(dbg[1]);
    end else begin
      checks++;
      if (dbg[1] != dut.d[0]) begin failures++; $display("FAIL debug data"); end
      n_dbg_data++;
    end
  end
  always @(posedge p[4]) if (!rst) n_false += $countones(dut.u_cdr.lead & dut.u_cdr.lag);
  // output sampled in the middle of every serializer slot (odd phases)
  always @(posedge p[1] or posedge p[3] or posedge p[5] or posedge p[7])
    if (collect) rxs.push_back(to);
  // output amplitude against the sample one bit earlier
  bit chk_level = 0, last_to = 0;
  int n_trans = 0, n_rep = 0, n_lvl_bad = 0;
  always @(posedge p[1] or posedge p[3] or posedge p[5] or posedge p[7]) begin
    if (chk_level) begin
      if (to_level != (to ? 64 : -64) - (last_to ? 10 : -10)) n_lvl_bad++;
      if (to != last_to) n_trans++; else n_rep++;
    end
    last_to = to;
  end
  always @(posedge di or negedge di) t_di = $realtime;
  always @(posedge to or negedge to) t_to = $realtime;

  function automatic bit prbs();
    bit nb = lfsr[31] ^ lfsr[3];
    lfsr = {lfsr[30:1], nb};
    return nb;
  endfunction

  task automatic send(int nbits, real ppm, real jit_pp);
    real ui, t0, tn;
    ui = 100.0 * (1.0 - ppm * 1.0e-6);
    t0 = $realtime;
    for (int k = 0; k < nbits; k++) begin
      di = prbs();
      tx.push_back(di);
      tn = t0 + (k + 1) * ui + (jit_pp > 0.0 ? (real'($urandom_range(0, 1000)) / 1000.0 - 0.5) * jit_pp : 0.0);
      #(tn - $realtime);
    end
  endtask

  // bit errors of rxs against tx after sample index start
  function automatic int errors_from(int start);
    for (int off = -100; off <= 100; off++) begin
      int bad = 0;
      for (int i = start; i < start + 128; i++)
        if (i + off < 0 || i + off >= tx.size() || i >= rxs.size() || rxs[i] != tx[i + off]) bad++;
      if (bad == 0) begin
        for (int i = start; i < rxs.size() - 8 && i + off < tx.size() - 8; i++)
          if (rxs[i] != tx[i + off]) bad++;
        return bad;
      end
    end
    return -1;
  endfunction

  initial begin : main
    int err, nt, nr, lvl_bad;
    real dly;
    repeat (16) @(posedge clk10);
    rst = 0;
    repeat (8) @(posedge clk10);
    // phase 1: nominal mode with jitter
    @(posedge p[0]);
    #37;
    collect = 1;
    send(6000, 0.0, 30.0);
    collect = 0;
    err = errors_from(2400);
    $display("nominal: %0d output bits, errors %0d, code %0d, reg_b %0d", rxs.size(), err, dut.code, dut.reg_b);
    checks++; if (err != 0) begin failures++; $display("FAIL nominal data"); end
    checks++; if (dut.reg_b != 5'd10) begin failures++; $display("FAIL register B"); end
    // pre-emphasis amplitude on the output
    nt = 0; nr = 0; lvl_bad = 0;
    chk_level = 1;
    send(400, 0.0, 0.0);
    chk_level = 0;
    nt = n_trans; nr = n_rep; lvl_bad = n_lvl_bad;
    checks++; if (lvl_bad != 0 || nt == 0 || nr == 0) begin failures++; $display("FAIL pre-emphasis %0d", lvl_bad); end

    // phase 2: debug data select
    ct = 5'b01011;
    send(400, 0.0, 0.0);
    ct = 5'b01010;

    // phase 3: large frequency error, delay line runs out of range
    rst = 1; repeat (3) @(posedge p[0]); rst = 0;
    n_over = 0;
    send(2000, 3000.0, 0.0);
    $display("overflow burst: highest code %0d, over_flag %0d", max_code, n_over);
    checks++; if (max_code != 27 || n_over == 0) begin failures++; $display("FAIL overflow"); end

    // phase 4: bypass mode, step DCDL_T through codes
    bypass = 1;
    n_bypass++;
    for (int s = 0; s < 3; s++) begin
      int c;
      c = (s == 0) ? 0 : (s == 1) ? 13 : 27;
      ct = 5'(c);
      repeat (520) @(posedge p[0]);          // one load period
      checks++; if (dut.reg_a != 5'(c)) begin failures++; $display("FAIL register A %0d", dut.reg_a); end
      #33;
      di = ~di;
      #300;
      dly = t_to - t_di;
      $display("bypass code %0d: delay %0.1f ps", c, dly);
      checks++;
      if (dly < 54.0 + 6.0 * c - 0.01 || dly > 54.0 + 6.0 * c + 0.01) begin
        failures++; $display("FAIL bypass delay, expected %0d", 54 + 6 * c);
      end
    end

    $display("mechanisms: lead_cc=%0d lag_cc=%0d false_events=%0d coarse=%0d over=%0d loadA=%0d loadB=%0d dbg_lead=%0d dbg_lag=%0d dbg_data=%0d bypass=%0d",
             n_lead, n_lag, n_false, n_coarse, n_over, n_load_a, n_load_b, n_dbg_lead, n_dbg_lag, n_dbg_data, n_bypass);
    checks++;
    if (n_lead == 0 || n_lag == 0 || n_false == 0 || n_coarse == 0 || n_over == 0 || n_load_a == 0 ||
        n_load_b == 0 || n_dbg_lead == 0 || n_dbg_lag == 0 || n_dbg_data == 0 || n_bypass == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
