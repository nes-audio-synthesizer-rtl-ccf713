// level_display_tb: the real VGA timing block drives the display; four
// channels play square waves (levels 0 and 3, 6, 9, 12, period 40
// samples) sampled at 15 kHz. After the capture buffers fill, one full
// frame is checked pixel by pixel: every lit pixel must lie on the
// stroke rows of level 0 or of the channel's high level in its own
// 120-line band and carry the band's colour, both levels must appear in
// every band, nothing is lit in blanking, and hsync/vsync come out two
// clocks after the timing block's.
module level_display_tb;
  logic clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic hs, vs, blank, frame_start, hsync, vsync;
  logic sample_pulse = 0;
  logic [3:0] ch [4];
  logic [3:0] r, g, b;
  int checks = 0, failures = 0;

  vga u_vga (.clk, .rst, .hcount, .vcount, .hsync(hs), .vsync(vs), .blank, .frame_start);
  level_display dut (.clk, .rst, .hcount, .vcount, .hsync_in(hs), .vsync_in(vs), .blank,
    .frame_start, .sample_pulse, .ch0(ch[0]), .ch1(ch[1]), .ch2(ch[2]), .ch3(ch[3]),
    .r, .g, .b, .hsync, .vsync);

  always #20 clk = ~clk;
  int sp = 0, ns = 0;
  always @(posedge clk) begin
    sp <= (sp == 1666) ? 0 : sp + 1;
    sample_pulse <= (sp == 1666);
    if (sample_pulse) ns++;
  end
  always_comb for (int c = 0; c < 4; c++) ch[c] = ((ns / 20) % 2) ? 4'(3 * (c + 1)) : 4'd0;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  logic [11:0] colour [4] = '{12'h0FF, 12'hFF0, 12'hF0F, 12'hFFF};

  initial begin
    int nf, bad_pos, bad_col, lit_blank, sync_err;
    int hi_seen [4], lo_seen [4];
    logic [9:0] h1, h2, v1, v2;
    logic hs1, hs2, vs1, vs2, bl1, bl2;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    nf = 0;
    while (nf < 4) begin @(posedge clk); if (frame_start) nf++; end
    // check the frame after the 4th frame start
    bad_pos = 0; bad_col = 0; lit_blank = 0; sync_err = 0;
    for (int c = 0; c < 4; c++) begin hi_seen[c] = 0; lo_seen[c] = 0; end
    h1 = 0; h2 = 0; v1 = 0; v2 = 0; hs1 = 1; hs2 = 1; vs1 = 1; vs2 = 1; bl1 = 1; bl2 = 1;
    for (int n = 0; n < 420_000; n++) begin
      @(posedge clk); #1;
      // outputs now belong to the position of two clocks ago (h2, v2)
      if (hsync != hs2 || vsync != vs2) sync_err++;
      if ({r, g, b} != 0) begin
        int band, row, y0, yh;
        if (bl2) lit_blank++;
        else begin
          band = v2 / 120; row = v2 % 120;
          y0 = 92; yh = 92 - 4 * 3 * (band + 1);
          if ({r, g, b} != colour[band]) bad_col++;
          if (row == y0 || row == y0 - 1) lo_seen[band]++;
          else if (row == yh || row == yh - 1) hi_seen[band]++;
          else bad_pos++;
        end
      end
      h2 = h1; v2 = v1; hs2 = hs1; vs2 = vs1; bl2 = bl1;
      h1 = hcount; v1 = vcount; hs1 = hs; vs1 = vs; bl1 = blank;
    end
    chk("lit pixels on stroke rows", bad_pos, 0);
    chk("band colours", bad_col, 0);
    chk("nothing lit in blanking", lit_blank, 0);
    chk("sync delayed two clocks", sync_err, 0);
    for (int c = 0; c < 4; c++) begin
      chk($sformatf("band %0d low level drawn", c), int'(lo_seen[c] > 100), 1);
      chk($sformatf("band %0d high level drawn", c), int'(hi_seen[c] > 100), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
