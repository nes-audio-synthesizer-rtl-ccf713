// level_sample_tb: feeds a ramp waveform whose step length changes for
// every capture, with a frame_start every 2000 clocks and a sample pulse
// every 5 clocks. Each capture must begin at the 0-to-non-zero edge and
// hold 320 consecutive samples; the display buffer must show the previous
// capture, change only at an armed frame start (read continuously between
// frame starts to catch tearing) and read 0 beyond the last sample.
module level_sample_tb;
  localparam int N = 320, FRAME = 2000, SP = 5;
  logic clk = 0, rst = 1;
  logic frame_start = 0, sample_pulse = 0;
  logic [3:0] level = 0, rd_data;
  logic [8:0] rd_addr = 0;
  int checks = 0, failures = 0;

  level_sample #(.N_SAMPLES(N)) dut (.clk, .rst, .frame_start, .sample_pulse, .level,
                                     .rd_addr, .rd_data);

  always #5 clk = ~clk;
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // stimulus: frame and sample pulses; ramp restarts at each armed frame
  int t = 0, nframe = 0, m = 0, L = 2;
  int Lhist [$];
  always @(posedge clk) if (!rst) begin
    t++;
    frame_start <= (t % FRAME == 0);
    sample_pulse <= (t % SP == 0) && (t % FRAME != 0);
    if (t % FRAME == 0) begin
      if (nframe % 2 == 0) begin
        L = 2 + (nframe / 2) % 4;
        Lhist.push_back(L);
        m = 0;
      end
      nframe++;
    end
    if (sample_pulse) begin
      m++;
      level <= (m < 4) ? 4'd0 : 4'((((m - 4) / L) + 1) % 16);
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1;
    rst = 0;
    // frames 0,1: capture with Lhist[0]; frame 2 start: swap -> display it
    for (int k = 0; k < 6; k++) begin
      int exp_l, errs, tear;
      logic [3:0] first [N];
      while (nframe != 2 * k + 3) @(posedge clk);   // just after an armed frame start
      repeat (3) @(posedge clk); #1;
      exp_l = Lhist[k];
      errs = 0;
      for (int i = 0; i < N; i++) begin
        rd_addr = 9'(i); @(posedge clk); #1;
        first[i] = rd_data;
        if (rd_data != 4'(((i / exp_l) + 1) % 16)) errs++;
      end
      chk($sformatf("capture %0d (step %0d)", k, exp_l), errs, 0);
      // read again repeatedly until just before the next armed frame start
      tear = 0;
      while (t % FRAME < FRAME - 2 || nframe % 2 == 1) begin
        for (int i = 0; i < N && (t % FRAME < FRAME - 2 || nframe % 2 == 1); i += 7) begin
          rd_addr = 9'(i); @(posedge clk); #1;
          if (rd_data != first[i]) tear++;
        end
      end
      chk($sformatf("display stable %0d", k), tear, 0);
    end
    rd_addr = 9'(N + 5); @(posedge clk); #1;
    chk("beyond last sample", rd_data, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
