// tb_phase_detector: drives a random 10-Gb/s bit stream whose edges sit a
// chosen offset from the odd clock phases and compares the Lead/Lag flags,
// sampled on every P<4> edge, with flags the testbench derives from the
// bit sequence itself (which bit is on the line at each clock instant).
// Offsets before the odd phase must give Lead on every transition, after
// it Lag. It also checks the pattern 010/101 (both flags) occurs with a
// glitchy stream, and that q_even returns the even-phase bits.
`timescale 1ps/1fs
module tb_phase_detector;
  localparam int NB = 4000;
  logic [7:0] p = 0;
  logic din = 0;
  logic [3:0] lead, lag, q_even;
  bit   bits [NB];
  int   checks = 0, failures = 0, n_lead = 0, n_lag = 0, n_both = 0;
  int   t0;   // time of the first data edge, ps

  phase_detector dut (.p(p), .din(din), .lead(lead), .lag(lag), .q_even(q_even));

  for (genvar n = 0; n < 8; n++) begin : g_clk
    initial begin
      #(1000 + n * 50);
      forever begin p[n] = 1; #200; p[n] = 0; #200; end
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value of the line at time t (ps)
  function automatic bit line_at(longint t);
    longint k = (t - t0 + 100000) / 100 - 1000;
    if (k < 0) return 0;
    return bits[k];
  endfunction


  initial begin : main
    int offs [4] = '{20, 35, 65, 80};
    longint base;
    for (int run_i = 0; run_i < 4; run_i++) begin
      int off;
      off = offs[run_i];
      // align the stream start to a 400-ps boundary plus the offset
      @(posedge p[0]);
      base = $time + 400;
      t0 = int'(base) + off;
      for (int i = 0; i < NB; i++) bits[i] = bit'($urandom);
      fork
        begin
          #(t0 - $time);
          for (int i = 0; i < NB; i++) begin din = bits[i]; #100; end
        end
        begin
          repeat (4) @(posedge p[0]);
          for (int c = 0; c < NB / 4 - 8; c++) begin
            longint tc;
            bit a, b, cc;
            @(posedge p[4]);
            #1;
            // samples: cycle m phases 0..7 and cycle m+1 phase 0
            tc = $time - 1 - 200 - 400;         // P<0> time of cycle m
            for (int j = 0; j < 4; j++) begin
              a  = line_at(tc + 100 * j);
              b  = line_at(tc + 100 * j + 50);
              cc = line_at(tc + 100 * j + 100);
              checks++;
              if (lead[j] != (a ^ b) || lag[j] != (b ^ cc)) begin
                failures++;
                if (failures < 10) $display("FAIL off=%0d j=%0d abc=%b%b%b lead=%b lag=%b", off, j, a, b, cc, lead[j], lag[j]);
              end
              // clean stream: edge position decides the flag
              if (a != cc) begin
                checks++;
                if (off < 50 && !(lead[j] && !lag[j])) failures++;
                if (off > 50 && !(lag[j] && !lead[j])) failures++;
              end
              n_lead += int'(lead[j] & ~lag[j]);
              n_lag  += int'(lag[j] & ~lead[j]);
            end
            if (c % 16 == 3) begin
              checks++;
              // Q<0>, Q<2>, Q<4> already hold cycle m+1, Q<6> still cycle m
              if (q_even[0] != line_at(tc + 400) || q_even[1] != line_at(tc + 500) ||
                  q_even[2] != line_at(tc + 600) || q_even[3] != line_at(tc + 300)) begin
                failures++;
                $display("FAIL q_even=%b", q_even);
              end
            end
          end
        end
      join
    end
    // A stream with one-bit pulses shorter than a UI: b differs from a and c.
    @(posedge p[0]);
    #(20);
    for (int c = 0; c < 200; c++) begin
      din = 0; #40; din = 1; #20; din = 0; #340;
    end
    checks++;
    if (n_lead == 0 || n_lag == 0) failures++;
    $display("lead-only %0d, lag-only %0d", n_lead, n_lag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count both-flag events during the pulse stream
  always @(posedge p[4]) n_both += int'(|(lead & lag));
  final if (n_both == 0) $display("no false events seen");
endmodule
