// tb_control_registers: applies pad values with bypass high and low and
// checks that only the chosen register takes them, exactly on the load
// strobe that comes every 512 Ck cycles, and never in between.
`timescale 1ps/1fs
module tb_control_registers;
  logic ck = 0, rst = 1, bypass = 0, load;
  logic [4:0] ct = 0, reg_a, reg_b;
  int checks = 0, failures = 0, cyc = 0, last_load = -1, n_load = 0;
  logic [4:0] ea = 0, eb = 0;

  control_registers dut (.ck(ck), .rst(rst), .bypass(bypass), .ct(ct),
                         .reg_a(reg_a), .reg_b(reg_b), .load(load));

  always #200 ck = ~ck;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge ck);
    #1 rst = 0;
    for (int i = 0; i < 6000; i++) begin
      logic was_load;
      if (i % 700 == 0) begin ct = 5'($urandom); bypass = ~bypass; end
      was_load = load;
      @(posedge ck);
      #1;
      cyc++;
      if (was_load) begin
        if (last_load >= 0) begin
          checks++;
          if (cyc - last_load != 512) begin failures++; $display("FAIL load spacing %0d", cyc - last_load); end
        end
        last_load = cyc;
        n_load++;
        if (bypass) ea = ct; else eb = ct;
      end
      checks++;
      if (reg_a != ea || reg_b != eb) begin
        failures++;
        $display("FAIL cyc %0d reg_a=%0d/%0d reg_b=%0d/%0d", cyc, reg_a, ea, reg_b, eb);
      end
    end
    checks++;
    if (n_load < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
