// controller_poll_tb: a gamepad model with random button patterns that
// change between polls. Checks each decoded button byte, one valid pulse
// per poll, the poll interval (CLK_HZ/POLL_HZ clocks), the latch width
// (one bit period) and seven shift pulses per poll. Runs with a 1 MHz
// clock, 1 kHz polls and a 50 kHz bit rate to keep the run short.
module controller_poll_tb;
  localparam int CLK_HZ = 1_000_000, POLL_HZ = 1000, BIT_HZ = 50_000;
  logic clk = 0, rst = 1;
  logic data, latch, pulse, valid;
  logic [7:0] buttons, pressed = 0;
  int checks = 0, failures = 0;

  controller_poll #(.CLK_HZ(CLK_HZ), .POLL_HZ(POLL_HZ), .BIT_HZ(BIT_HZ)) dut (
    .clk, .rst, .data, .latch, .pulse, .buttons, .valid);
  pad_model u_pad (.latch, .pulse, .buttons(pressed), .data);

  always #5 clk = ~clk;
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  int n_pulse = 0, latch_w = 0, last_latch_w = 0;
  logic pulse_q = 0, latch_q = 0;
  always @(posedge clk) begin
    pulse_q <= pulse; latch_q <= latch;
    if (pulse && !pulse_q) n_pulse++;
    if (latch) latch_w++;
    if (!latch && latch_q) begin last_latch_w = latch_w; latch_w = 0; end
  end

  initial begin
    int t_last = -1, t = 0;
    logic [7:0] exp_b;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    for (int n = 0; n < 60; n++) begin
      // set a new pattern well away from the latch
      exp_b = 8'($urandom);
      if (n == 0) exp_b = 8'h00;
      if (n == 1) exp_b = 8'hFF;
      pressed = exp_b;
      n_pulse = 0;
      while (!valid) begin @(posedge clk); t++; end
      #1;
      chk($sformatf("poll %0d buttons", n), buttons, exp_b);
      chk($sformatf("poll %0d pulses", n), n_pulse, 7);
      if (n > 0) chk($sformatf("poll %0d latch width", n), last_latch_w, CLK_HZ / BIT_HZ);
      if (t_last >= 0) chk($sformatf("poll %0d interval", n), t - t_last, CLK_HZ / POLL_HZ);
      t_last = t;
      @(posedge clk); t++; #1;
      chk("valid is one clock", valid, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
