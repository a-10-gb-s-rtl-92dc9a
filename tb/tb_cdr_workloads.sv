// tb_cdr_workloads: the frequency-error cases the CDR was specified with,
// run on deskew_cdr at its default parameters.
//
// Same stimulus as tb_deskew_cdr (PRBS x^31 + x^3 + 1, bit time off by a
// given ppm), but every burst starts with the input phase already at the
// lock point of the initial code 14, so every delay step taken afterwards
// is frequency tracking. The drift after k bits at f ppm is
// k * f * 1e-4 ps, and the delay line moves 6 ps per step:
//  * 600 bits at 0, +300 and +500 ppm: net steps (lead_cc - lag_cc)
//    0, 3 and 5, each within one step; no data errors;
//  * 1300 bits at +1000 ppm: 130 ps would be needed but only 13 steps
//    (78 ps) are left above code 14, so the line saturates. over_flag must
//    first rise between bit 600 and bit 950 (78 ps / 0.1 ps per bit = 780),
//    and Lead requests must keep coming with the code held at 27.
//  * loop latency: 1200 bits of a 1010... pattern (every bit an edge, the
//    most decisions per cycle) at 0 ppm. A loop whose latency is below
//    N = 24 bit times settles into strictly alternating steps, Lead, Lag,
//    Lead, Lag; a slower loop would show pairs (Lead, Lead, Lag, Lag).
//    After acquisition, every step must reverse the previous one.
//  * random noise: the average acquisition case (about 25 ps, here four
//    6-ps steps from the initial code) without input jitter and with
//    0.2 UI peak-to-peak random jitter. Both must come within one step of
//    the lock code within 400 bits (average 107, worst 213 predicted for
//    the noise-free case) and recover
//    the data without errors; with jitter the loop must step no more
//    often at lock than without it.
`timescale 1ps/1fs
module tb_cdr_workloads;
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

  bit periodic = 0;
  function automatic bit prbs();
    bit nb;
    if (periodic) nb = ~lfsr[1];
    else          nb = lfsr[31] ^ lfsr[3];
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

  // first over_flag, as a bit index from the start of the burst data
  real t_data0 = 0.0;
  int  first_over = -1;
  int  lead_at_top = 0;
  bit  seq_on = 0;
  int  near_code = -1, first_near = -1;   // first bit at which code >= near_code
  bit  seq [$];          // step directions, 1 = Lead
  always @(posedge p[0]) begin
    if (!rst && over_flag && first_over < 0)
      first_over = int'(($realtime - t_data0) / 100.0);
    if (!rst && lead_cc && code == 5'd27) lead_at_top++;
    if (!rst && seq_on && (lead_cc || lag_cc)) seq.push_back(lead_cc);
    if (!rst && near_code >= 0 && first_near < 0 && int'(code) >= near_code)
      first_near = int'(($realtime - t_data0) / 100.0);
  end

  initial begin : main
    int ce, acq, err, ca, l0, g0, net;
    real ppm_list [3];
    ppm_list[0] = 0.0; ppm_list[1] = 300.0; ppm_list[2] = 500.0;
    repeat (4) @(posedge p[0]);

    for (int c = 0; c < 3; c++) begin
      int want;
      want = int'(600.0 * ppm_list[c] * 1.0e-4 / 6.0);
      l0 = n_lead_cc; g0 = n_lag_cc;
      burst(600, ppm_list[c], 0.0, 14, ce, acq, err, ca);
      net = (n_lead_cc - l0) - (n_lag_cc - g0);
      $display("%0.0f ppm over 600 bits: net steps %0d (expected %0d), end code %0d, errors %0d",
               ppm_list[c], net, want, ce, err);
      checks++; if (net < want - 1 || net > want + 1) begin failures++; $display("FAIL net steps"); end
      checks++; if (err != 0) begin failures++; $display("FAIL data errors"); end
    end

    // Overflow case: +1000 ppm for 1300 bits from the lock point of code 14.
    n_over = 0; max_code = 0; first_over = -1; lead_at_top = 0;
    fork
      burst(1300, 1000.0, 0.0, 14, ce, acq, err, ca);
      begin
        @(negedge rst);
        t_data0 = $realtime + 400.0;
      end
    join
    $display("1000 ppm over 1300 bits: first over_flag near bit %0d, highest code %0d, Lead requests at code 27: %0d",
             first_over, max_code, lead_at_top);
    checks++; if (max_code != 27) begin failures++; $display("FAIL no saturation"); end
    checks++; if (first_over < 600 || first_over > 950) begin failures++; $display("FAIL overflow time"); end
    checks++; if (lead_at_top < 2) begin failures++; $display("FAIL no Lead requests at the top"); end

    // Loop-latency case: periodic input, record the step directions.
    periodic = 1;
    seq_on = 0;
    fork
      burst(1200, 0.0, 0.0, 14, ce, acq, err, ca);
      begin
        @(negedge rst);
        #(40000);          // 400 bits for acquisition
        seq_on = 1;
      end
    join
    periodic = 0;
    begin
      int same = 0;
      for (int i = 1; i < seq.size(); i++) if (seq[i] == seq[i-1]) same++;
      $display("periodic input: %0d steps after acquisition, %0d repeated directions, errors %0d",
               seq.size(), same, err);
      checks++; if (seq.size() < 10) begin failures++; $display("FAIL too few steps"); end
      checks++; if (same != 0) begin failures++; $display("FAIL steps do not alternate"); end
      checks++; if (err != 0) begin failures++; $display("FAIL data errors"); end
    end

    // Random-noise cases: 4 steps to acquire, without and with jitter.
    begin
      int steps_clean, steps_noisy;
      real jit [2];
      jit[0] = 0.0; jit[1] = 20.0;
      for (int c = 0; c < 2; c++) begin
        seq.delete();
        near_code = 17; first_near = -1;
        fork
          burst(1200, 0.0, jit[c], 18, ce, acq, err, ca);
          begin
            @(negedge rst);
            t_data0 = $realtime + 400.0;
            seq_on = 0;
            #(40000);
            seq_on = 1;
          end
        join
        seq_on = 0;
        $display("jitter %0.0f ps p-p: within one step of lock after %0d bits, end code %0d, %0d steps at lock, errors %0d",
                 jit[c], first_near, ce, seq.size(), err);
        checks++; if (first_near < 0 || first_near > 400) begin failures++; $display("FAIL acquisition"); end
        checks++; if (err != 0) begin failures++; $display("FAIL data errors"); end
        if (c == 0) steps_clean = seq.size(); else steps_noisy = seq.size();
      end
      checks++; if (steps_noisy > steps_clean) begin failures++; $display("FAIL noise raised the step rate"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
