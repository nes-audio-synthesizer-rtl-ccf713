// pulse_gen_tb: checks the average CPU pulse rate (1.79 MHz from 25 MHz),
// the 13/14-clock spacing of pulse_cpu, and that pulse_apu is every second
// CPU pulse.
module pulse_gen_tb;
  logic clk = 0, rst = 1;
  logic pulse_cpu, pulse_apu;
  int checks = 0, failures = 0;
  int ncpu = 0, napu = 0, last = -1, cyc = 0, bad_gap = 0, between = 0, bad_apu = 0;

  pulse_gen dut (.clk, .rst, .pulse_cpu, .pulse_apu);

  always #20 clk = ~clk;   // 25 MHz

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (pulse_cpu) begin
      if (last >= 0 && (cyc - last < 13 || cyc - last > 14)) bad_gap++;
      last = cyc;
      ncpu++;
      between++;
    end
    if (pulse_apu) begin
      napu++;
      if (!pulse_cpu || between != 2) bad_apu++;
      between = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (250_000) @(posedge clk);   // 10 ms
    checks++; if (bad_gap != 0) begin failures++; $display("FAIL gap"); end
    // 10 ms at 1,789,773 Hz = 17897.7 pulses
    checks++; if (ncpu < 17896 || ncpu > 17899) begin failures++; $display("FAIL ncpu=%0d", ncpu); end
    checks++; if (napu < 8947 || napu > 8950) begin failures++; $display("FAIL napu=%0d", napu); end
    checks++; if (bad_apu > 1) begin failures++; $display("FAIL apu alignment %0d", bad_apu); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
