// nes_top_tb: end-to-end run of the whole synthesizer at its default
// parameters (25 MHz clock, 38,400 baud, 500 Hz pad polling, NTSC frame
// counter). An SD card model holds one NSF file whose INIT routine
// programs square 1, triangle, noise and a looping DMC sample, and whose
// PLAY routine (called at 1 kHz) bumps a counter, sweeps the square
// period, reads $4015, and switches the $C000 bank to read a byte of its
// own code. A gamepad model walks the file-select menu (A, A to load and
// play, Start to pause and resume, Left to turn the volume down); a
// terminal model reads a RAM byte through the debugger; a font ROM model
// serves the title text.
// Every mechanism is counted and each must have happened at least once:
// SD scan, file load, CPU reset release, each main device owning the bus,
// DMC DMA and the CPU stall it causes, pause stall, player and frame IRQs,
// APU writes and $4015 reads, CPU bank switching, each channel sounding,
// mixer and PWM output, video frames, waveform and title pixels, every
// menu state change, volume change, pad polls, the debugger reply and a
// debugger write of a CPU register while the program runs.
// The program's results in RAM are checked as well, and the CPU must
// never reach its error state.
module nes_top_tb;
  import nes_pkg::*;
  localparam int BC = 25_000_000 / 38_400;
  logic clk = 0, rst = 1;
  logic sd_rd, sd_ba, sd_ready;
  logic [31:0] sd_addr;
  logic [7:0] sd_dout;
  logic pad_data, pad_latch, pad_pulse;
  logic [7:0] pressed = 0;
  logic urx = 1, utx;
  logic pwm;
  logic [7:0] sample, font_addr, song_index, volume_leds;
  logic [63:0] font_data, font_q;
  logic [3:0] r, g, b, file_index, sq1, sq2, tri_o, noi;
  logic hs, vs, scan_done, playing, cpu_error;
  logic [4:0] num_files;
  logic [6:0] dmc;
  fs_state_t fs_state;
  int checks = 0, failures = 0;

  nes_top dut (
    .clk, .rst, .sd_rd, .sd_addr, .sd_dout, .sd_byte_available(sd_ba), .sd_ready,
    .pad_data, .pad_latch, .pad_pulse, .uart_rx_in(urx), .uart_tx_out(utx),
    .audio_pwm_out(pwm), .audio_sample(sample), .vga_r(r), .vga_g(g), .vga_b(b),
    .vga_hs(hs), .vga_vs(vs), .font_addr, .font_data, .file_index, .song_index,
    .volume_leds, .fs_state, .num_files, .scan_done, .playing, .cpu_error,
    .sq1_out(sq1), .sq2_out(sq2), .tri_out(tri_o), .noise_out(noi), .dmc_out(dmc));

  sd_model #(.N_SECTORS(8), .BYTE_GAP(4)) u_sd (.clk, .rst, .rd(sd_rd), .addr(sd_addr),
    .dout(sd_dout), .byte_available(sd_ba), .ready(sd_ready));
  pad_model u_pad (.latch(pad_latch), .pulse(pad_pulse), .buttons(pressed), .data(pad_data));

  always #20 clk = ~clk;
  always @(posedge clk) begin font_q <= {8{font_addr ^ 8'h3C}}; font_data <= font_q; end

  initial begin
    repeat (8_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ mechanism counters
  int n_grant [4];
  int n_dma = 0, n_dmc_cpu_stall = 0, n_pause_stall = 0, n_nsf_irq = 0, n_apu_irq = 0;
  int n_apu_wr = 0, n_apu_rd = 0, n_bank_sw = 0, n_sq1 = 0, n_tri = 0, n_noise = 0;
  int n_dmc_change = 0, n_sample = 0, n_pwm_edge = 0, n_frames = 0, n_lit = 0, n_title = 0;
  int n_to_song = 0, n_to_play = 0, n_vol = 0, n_polls = 0, n_err = 0, n_cpu_release = 0;
  int n_loads = 0, n_dbg_wr = 0;
  logic [6:0] dmc_q = 0;
  logic pwm_q = 0, nsf_irq_q = 0, apu_irq_q = 0, rst_q = 1, play_q = 0;
  fs_state_t fs_q = FS_FILE_SELECT;
  logic [3:0] vol_q = 8;
  initial foreach (n_grant[i]) n_grant[i] = 0;
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 4; i++) if (dut.grant[i] && (dut.m_rd[i] || dut.m_wr[i])) n_grant[i]++;
    if (dut.dma_req && dut.grant[2]) n_dma++;
    if (dut.dmc_stall && dut.cpu_waiting) n_dmc_cpu_stall++;
    if (dut.nsf_stall && dut.playing) n_pause_stall++;
    if (dut.nsf_irq && !nsf_irq_q) n_nsf_irq++;
    if (dut.apu_irq && !apu_irq_q) n_apu_irq++;
    nsf_irq_q <= dut.nsf_irq; apu_irq_q <= dut.apu_irq;
    if (dut.apu_we) n_apu_wr++;
    if (dut.apu_re && dut.apu_addr == 5'h15) n_apu_rd++;
    if (dut.grant[3] && dut.m_wr[3] && dut.m_addr[3][15:3] == 13'h0BFF) n_bank_sw++;
    if (sq1 != 0) n_sq1++;
    if (tri_o != 0) n_tri++;
    if (noi != 0) n_noise++;
    if (dmc != dmc_q) n_dmc_change++;
    dmc_q <= dmc;
    if (sample != 0) n_sample++;
    if (pwm != pwm_q) n_pwm_edge++;
    pwm_q <= pwm;
    if (dut.frame_start) n_frames++;
    if (dut.wr != 0 || dut.wg != 0 || dut.wb != 0) n_lit++;
    if (dut.title_px) n_title++;
    if (fs_state != fs_q && fs_state == FS_SONG_SELECT) n_to_song++;
    if (fs_state != fs_q && fs_state == FS_PLAYING) n_to_play++;
    fs_q <= fs_state;
    if (dut.vol_level != vol_q) n_vol++;
    vol_q <= dut.vol_level;
    if (dut.buttons_valid) n_polls++;
    if (cpu_error) n_err++;
    if (dut.dbg_we) n_dbg_wr++;
    if (rst_q && !dut.nsf_cpu_rst) n_cpu_release++;
    rst_q <= dut.nsf_cpu_rst;
    if (playing && !play_q) n_loads++;
    play_q <= playing;
  end

  // ------------------------------------------------ terminal model
  string rxs = "";
  initial begin
    forever begin
      logic [7:0] c;
      @(negedge utx);
      repeat (BC / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BC) @(posedge clk); c[i] = utx; end
      repeat (BC) @(posedge clk);
      rxs = {rxs, string'(c)};
    end
  end
  task automatic send_char(logic [7:0] c);
    logic [9:0] f;
    f = {1'b1, c, 1'b0};
    for (int i = 0; i < 10; i++) begin urx = f[i]; repeat (BC) @(posedge clk); end
  endtask
  task automatic term(string s, int wait_clocks);
    int n, idle;
    rxs = "";
    for (int i = 0; i < s.len(); i++) begin
      n = rxs.len();
      send_char(s[i]);
      idle = 0;
      while (rxs.len() == n && idle < 40 * BC) begin @(posedge clk); idle++; end
    end
    repeat (wait_clocks) @(posedge clk);
  endtask

  task automatic press(int bt);
    pressed[bt] = 1; repeat (60_000) @(posedge clk);
    pressed[bt] = 0; repeat (60_000) @(posedge clk);
  endtask

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  // NSF image: header in sector 0, code from byte 128, END DATA in sector 3
  logic [7:0] code_init [] = '{
    8'hA9, 8'h1F, 8'h8D, 8'h15, 8'h40, 8'hA9, 8'hBF, 8'h8D, 8'h00, 8'h40,
    8'hA9, 8'h40, 8'h8D, 8'h02, 8'h40, 8'hA9, 8'h08, 8'h8D, 8'h03, 8'h40,
    8'hA9, 8'hFF, 8'h8D, 8'h08, 8'h40, 8'hA9, 8'h30, 8'h8D, 8'h0A, 8'h40,
    8'hA9, 8'h08, 8'h8D, 8'h0B, 8'h40, 8'hA9, 8'h3F, 8'h8D, 8'h0C, 8'h40,
    8'hA9, 8'h04, 8'h8D, 8'h0E, 8'h40, 8'hA9, 8'h08, 8'h8D, 8'h0F, 8'h40,
    8'hA9, 8'h4F, 8'h8D, 8'h10, 8'h40, 8'hA9, 8'h00, 8'h8D, 8'h12, 8'h40,
    8'h8D, 8'h13, 8'h40, 8'hA9, 8'h1F, 8'h8D, 8'h15, 8'h40, 8'h8D, 8'h03,
    8'h02, 8'h60};
  logic [7:0] code_play [] = '{
    8'hEE, 8'h00, 8'h02, 8'hAD, 8'h00, 8'h02, 8'h8D, 8'h02, 8'h40, 8'hAD,
    8'h15, 8'h40, 8'h8D, 8'h01, 8'h02, 8'hA9, 8'h00, 8'h8D, 8'hFC, 8'h5F,
    8'hAD, 8'h00, 8'hC0, 8'h8D, 8'h02, 8'h02, 8'hA9, 8'h04, 8'h8D, 8'hFC,
    8'h5F, 8'h60};

  initial begin
    string m = "NESM", e = "END DATA", reply;
    int plays;
    for (int i = 0; i < 4; i++) u_sd.img[i] = m[i];
    u_sd.img[4] = 8'h1A; u_sd.img[5] = 8'h01; u_sd.img[6] = 8'd2; u_sd.img[7] = 8'd1;
    u_sd.img[8] = 8'h00; u_sd.img[9] = 8'h80;      // load $8000
    u_sd.img[10] = 8'h00; u_sd.img[11] = 8'h80;    // INIT $8000
    u_sd.img[12] = 8'h50; u_sd.img[13] = 8'h80;    // PLAY $8050
    u_sd.img[8'h6E] = 8'hE8; u_sd.img[8'h6F] = 8'h03;  // 1000 us
    foreach (code_init[i]) u_sd.img[128 + i] = code_init[i];
    foreach (code_play[i]) u_sd.img[128 + 16'h50 + i] = code_play[i];
    for (int i = 0; i < 8; i++) u_sd.img[3 * 512 + i] = e[i];
    repeat (5) @(posedge clk);
    rst = 0;
    while (!scan_done) @(posedge clk);
    chk("files on card", num_files, 1);
    repeat (100_000) @(posedge clk);
    chk("file select state", fs_state, FS_FILE_SELECT);
    press(BTN_A);                       // -> song select
    chk("song select state", fs_state, FS_SONG_SELECT);
    press(BTN_UP);                      // song 1 of 2
    chk("song index", song_index, 1);
    press(BTN_A);                       // -> playing, load the file
    chk("playing state", fs_state, FS_PLAYING);
    while (!playing) @(posedge clk);
    repeat (1_200_000) @(posedge clk);
    chk("INIT ran", dut.u_mem.wram[16'h0203], 8'h1F);
    chk("song number passed to INIT", dut.u_mem.wram[16'h5081], 1);
    plays = dut.u_mem.wram[16'h0200];
    chk("PLAY ran many times", int'(plays > 20), 1);
    chk("bank switch read of own code", dut.u_mem.wram[16'h0202], 8'hA9);
    chk("$4015 status: sq1,tri,noise,DMC on, sq2 off", dut.u_mem.wram[16'h0201] & 8'h1F, 8'h1D);
    // pause, check the counter holds, resume
    press(BTN_START);
    plays = dut.u_mem.wram[16'h0200];
    repeat (200_000) @(posedge clk);
    chk("paused: PLAY not called", dut.u_mem.wram[16'h0200], plays);
    press(BTN_START);
    repeat (100_000) @(posedge clk);
    chk("resumed", int'(dut.u_mem.wram[16'h0200] != plays), 1);
    press(BTN_LEFT);
    chk("volume down", dut.vol_level, 7);
    // debugger: read the INIT marker byte
    term("RD@0203", 120 * BC);
    reply = rxs;
    chk("debugger reply", int'(reply == "RD@0203\r\n1F\r\n"), 1);
    if (reply != "RD@0203\r\n1F\r\n") $display("reply was \"%s\"", reply);
    // debugger: write Y (which PLAY never touches) while the program runs, read it back
    term("WY=3C", 60 * BC);
    term("RY", 120 * BC);
    chk("debugger register write and read", int'(rxs == "RY\r\n3C\r\n"), 1);
    if (rxs != "RY\r\n3C\r\n") $display("reply was \"%s\"", rxs);
    chk("PLAY still running after the write", int'(dut.u_mem.wram[16'h0200] != 0), 1);
    repeat (400_000) @(posedge clk);
    $display("mechanism counts:");
    seen("SD scan reads", u_sd.n_reads);
    seen("file loads", n_loads);
    seen("CPU reset released", n_cpu_release);
    seen("bus: debugger", n_grant[0]);
    seen("bus: NSF player", n_grant[1]);
    seen("bus: DMC DMA", n_grant[2]);
    seen("bus: CPU", n_grant[3]);
    seen("DMC DMA reads", n_dma);
    seen("CPU stalled by DMC", n_dmc_cpu_stall);
    seen("CPU stalled by pause", n_pause_stall);
    seen("player IRQs", n_nsf_irq);
    seen("frame counter IRQs", n_apu_irq);
    seen("APU register writes", n_apu_wr);
    seen("$4015 reads", n_apu_rd);
    seen("CPU bank switches", n_bank_sw);
    seen("square 1 sounding", n_sq1);
    seen("triangle sounding", n_tri);
    seen("noise sounding", n_noise);
    seen("DMC level changes", n_dmc_change);
    seen("mixer output non-zero", n_sample);
    seen("PWM edges", n_pwm_edge);
    seen("video frames", n_frames);
    seen("waveform pixels", n_lit);
    seen("title pixels", n_title);
    seen("menu -> song select", n_to_song);
    seen("menu -> playing", n_to_play);
    seen("volume changes", n_vol);
    seen("pad polls", n_polls);
    seen("debugger CPU register writes", n_dbg_wr);
    chk("CPU error state never reached", n_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
