// tb_deskew_cdr: closed-loop test of the data-deskew CDR.
//
// The testbench plays the receive PLL (eight 2.5-GHz phases, 50 ps apart)
// and the transmitter: a PRBS (x^31 + x^3 + 1) bit stream whose bit time
// can be off by a given ppm and whose edges can carry random jitter. Each
// burst starts with the global reset. Per burst it checks:
//  * acquisition: the delay code first reverses direction within 400 bit
//    times, and lands within one step of the code predicted from the input
//    phase (delay = 54 ps + 6 ps * code; lock puts data edges on the odd
//    phases);
//  * data: after acquisition, the recovered D<0:3> stream equals the
//    transmitted stream at one fixed bit offset, with no errors;
//  * tracking: with a frequency error the code moves by the expected
//    number of 6-ps steps (drift = bits * ppm * 100 fs);
//  * overflow: with a large frequency error the code reaches 27 and
//    over_flag is raised.
// Bursts: 0 ppm (4-step case), +500 ppm, -500 ppm with jitter, +3000 ppm.
`timescale 1ps/1fs
module tb_deskew_cdr;
  import cdr_pkg::*;
  localparam real PBASE = 1000.0;
  logic [7:0] p = 0;
  logic rst = 1, di = 0;
  logic [3:0] d;
  logic lead_cc, lag_cc, over_flag, dout;
  logic [4:0] code;
  int checks = 0, failures = 0;
  int max_code = 0;
  int n_lead_cc = 0, n_lag_cc = 0, n_false = 0, n_over = 0, n_coarse = 0, n_acc_reset = 0;
  bit tx [$];
  bit rx [$];
  logic [3:0] rxw [$];
  bit collect = 0;
  logic [31:1] lfsr = 31'h1234567;

  deskew_cdr dut (.p(p), .rst(rst), .di(di), .d(d), .lead_cc(lead_cc), .lag_cc(lag_cc),
                  .code(code), .over_flag(over_flag), .dout(dout));

  for (genvar n = 0; n < 8; n++) begin : g_clk
    initial begin
      #(PBASE + n * 50);
      forever begin p[n] = 1; #200; p[n] = 0; #200; end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  logic [4:0] code_q = CODE_INIT;
  always @(posedge p[0]) begin
    if (!rst) begin
      n_lead_cc += int'(lead_cc);
      n_lag_cc  += int'(lag_cc);
      n_over    += int'(over_flag);
      n_acc_reset += int'(lead_cc | lag_cc);
      if (code[4:2] != code_q[4:2]) n_coarse++;
      if (int'(code) > max_code) max_code = int'(code);
    end
    code_q <= code;
    if (collect) rxw.push_back(d);
  end
  always @(posedge p[4]) if (!rst) n_false += $countones(dut.lead & dut.lag);

  function automatic bit prbs();
    bit nb = lfsr[31] ^ lfsr[3];
    lfsr = {lfsr[30:1], nb};
    return nb;
  endfunction

  // Runs one burst; returns code at the end, first-reversal time and errors.
  task automatic burst(input int nbits, input real ppm, input real jit_pp,
                       input int exp_lock, output int code_end, output int acq_bits,
                       output int errors, output int code_acq);
    real ui, t0, t_start;
    int  last_dir, rev_seen;
    ui = 100.0 * (1.0 - ppm * 1.0e-6);
    // choose t0 so that the predicted lock code is exp_lock
    @(posedge p[0]);
    rst = 1;
    repeat (3) @(posedge p[0]);
    tx.delete(); rx.delete(); rxw.delete();
    t_start = $realtime;
    t0 = $realtime + 400.0 + 50.0 - 54.0 - 6.0 * exp_lock + 200.0;
    rev_seen = 0; last_dir = 0; acq_bits = -1; code_acq = -1;
    fork
      begin
        #(t0 - $realtime);
        for (int k = 0; k < nbits; k++) begin
          real tn;
          di = prbs();
          tx.push_back(di);
          tn = t0 + (k + 1) * ui + (jit_pp > 0.0 ? (real'($urandom_range(0, 1000)) / 1000.0 - 0.5) * jit_pp : 0.0);
          #(tn - $realtime);
        end
      end
      begin
        @(posedge p[0]);
        #1 rst = 0;
        collect = 1;
        while (!rev_seen && $realtime < t0 + nbits * ui) begin
          @(posedge p[0]);
          #1;
          if (lead_cc || lag_cc) begin
            int dir = lead_cc ? 1 : -1;
            if (last_dir != 0 && dir != last_dir) begin
              rev_seen = 1;
              acq_bits = int'(($realtime - t0) / 100.0);
              code_acq = int'(code);
            end
            last_dir = dir;
          end
        end
      end
    join
    collect = 0;
    foreach (rxw[w]) for (int b = 0; b < 4; b++) rx.push_back(rxw[w][b]);
    code_end = int'(code);
    // data check: rx bit i (from the burst start) against tx bit i+off
    errors = -1;
    begin
      int start = (acq_bits > 0 ? acq_bits : 400) + 200;
      for (int off = -80; off <= 80 && errors < 0; off++) begin
        int bad = 0;
        for (int i = start; i < start + 128; i++)
          if (i + off < 0 || i + off >= tx.size() || i >= rx.size() || rx[i] != tx[i + off]) bad++;
        if (bad == 0) begin
          errors = 0;
          for (int i = start; i < rx.size() - 8 && i + off < tx.size() - 8; i++)
            if (rx[i] != tx[i + off]) errors++;
        end
      end
    end
    if (t_start < 0) $display("unused");
  endtask

  initial begin : main
    int ce, acq, err, ca;
    repeat (4) @(posedge p[0]);

    // Burst 1: no frequency error, 4 steps (24 ps) to acquire.
    burst(1200, 0.0, 0.0, 18, ce, acq, err, ca);
    $display("burst 0 ppm: acquired after %0d bits at code %0d, end code %0d, errors %0d", acq, ca, ce, err);
    checks++; if (acq < 0 || acq > 400) begin failures++; $display("FAIL acquisition"); end
    checks++; if (ca < 17 || ca > 19) begin failures++; $display("FAIL lock code"); end
    checks++; if (ce < 17 || ce > 19) begin failures++; $display("FAIL end code"); end
    checks++; if (err != 0) begin failures++; $display("FAIL data errors %0d", err); end

    // Burst 2: +500 ppm: about 60 ps of drift over 1200 bits = 10 steps up.
    burst(1200, 500.0, 0.0, 8, ce, acq, err, ca);
    $display("burst +500 ppm: acquired after %0d bits at code %0d, end code %0d, errors %0d", acq, ca, ce, err);
    checks++; if (acq < 0 || acq > 400) begin failures++; $display("FAIL acquisition"); end
    checks++; if (ce < 8 + 7 || ce > 8 + 11) begin failures++; $display("FAIL tracking end code"); end
    checks++; if (err != 0) begin failures++; $display("FAIL data errors %0d", err); end

    // Burst 3: -500 ppm with 20 ps p-p jitter: the code walks down.
    burst(1200, -500.0, 20.0, 20, ce, acq, err, ca);
    $display("burst -500 ppm: acquired after %0d bits at code %0d, end code %0d, errors %0d", acq, ca, ce, err);
    checks++; if (ce > 20 - 7 || ce < 20 - 12) begin failures++; $display("FAIL tracking end code"); end
    checks++; if (err != 0) begin failures++; $display("FAIL data errors %0d", err); end

    // Burst 4: +3000 ppm: the delay line runs out of range (code 27,
    // over_flag) after about (27-18)*6 ps / 0.3 ps = 180 bits.
    n_over = 0; max_code = 0;
    burst(1200, 3000.0, 0.0, 18, ce, acq, err, ca);
    $display("burst +3000 ppm: highest code %0d, over_flag pulses %0d", max_code, n_over);
    checks++; if (max_code != 27 || n_over == 0) begin failures++; $display("FAIL overflow"); end

    $display("mechanisms: lead_cc=%0d lag_cc=%0d false_events=%0d coarse_moves=%0d",
             n_lead_cc, n_lag_cc, n_false, n_coarse);
    checks++; if (n_lead_cc == 0 || n_lag_cc == 0 || n_coarse == 0 || n_over == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
