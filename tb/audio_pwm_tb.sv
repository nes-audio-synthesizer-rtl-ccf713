// audio_pwm_tb: measures the PWM duty cycle over whole 256-clock periods
// for several samples; the high count per period must equal the sample.
module audio_pwm_tb;
  logic clk = 0, rst = 1;
  logic [7:0] sample;
  logic pwm;
  int checks = 0, failures = 0;

  audio_pwm dut (.clk, .rst, .sample, .pwm);
  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int highs;
    int vals[6] = '{0, 1, 77, 128, 200, 255};
    sample = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    foreach (vals[k]) begin
      sample = 8'(vals[k]);
      repeat (600) @(posedge clk);         // let the new sample be latched
      // align to a period start: wait for the counter to wrap
      wait (dut.cnt == 8'hFF); @(posedge clk); @(posedge clk);
      highs = 0;
      repeat (256) begin #1; if (pwm) highs++; @(posedge clk); end
      checks++;
      if (highs != vals[k]) begin failures++; $display("FAIL sample %0d: %0d high", vals[k], highs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
