// vga_tb: runs two full 640x480 frames at default timing and checks the
// line length (800 clocks), the frame length (525 lines), the hsync pulse
// (96 clocks starting at pixel 656), the vsync pulse (lines 490-491), the
// blank flag against the visible area on every clock and one frame_start
// per frame at the start of line 480.
module vga_tb;
  logic clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic hsync, vsync, blank, frame_start;
  int checks = 0, failures = 0;

  vga dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .frame_start);

  always #20 clk = ~clk;
  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int blank_err = 0, hs_err = 0, vs_err = 0, fs = 0, fs_err = 0, cnt_err = 0;
    int ph, pv;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    ph = hcount; pv = vcount;
    for (int n = 0; n < 2 * 420_000; n++) begin
      @(posedge clk); #1;
      // counters step by one and wrap at 800 / 525
      if (!((hcount == ph + 1 && vcount == pv) ||
            (ph == 799 && hcount == 0 && (vcount == pv + 1 || (pv == 524 && vcount == 0)))))
        cnt_err++;
      ph = hcount; pv = vcount;
      if (blank != !(hcount < 640 && vcount < 480)) blank_err++;
      if (hsync != !(hcount >= 656 && hcount < 752)) hs_err++;
      if (vsync != !(vcount >= 490 && vcount < 492)) vs_err++;
      if (frame_start) begin
        fs++;
        if (!(hcount == 0 && vcount == 480)) fs_err++;
      end
    end
    chk("counter sequence", cnt_err, 0);
    chk("blank", blank_err, 0);
    chk("hsync 656..751 low", hs_err, 0);
    chk("vsync lines 490..491 low", vs_err, 0);
    chk("frame_start count", fs, 2);
    chk("frame_start position", fs_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
