// nsf_player_tb: the player runs against the SD card model holding two
// NSF files and an end marker, and writes through the real memory block
// with a bus grant that is randomly withheld. Checks the scan (file count,
// one read per sector up to the marker), the RAM clear, the header fields
// (song count, play period), the linear placement of an unbanked file and
// the banked placement of a file that spans a 4 kB bank boundary, the
// playback stub and variables at $5000-$5082, the bank registers, the
// vectors, the CPU reset/stall handling, the IRQ period and pause.
module nsf_player_tb;
  logic clk = 0, rst = 1;
  logic sd_rd, sd_ba, sd_ready;
  logic [31:0] sd_addr;
  logic [7:0] sd_dout;
  logic file_select = 0, play_pause = 0;
  logic [3:0] file = 0;
  logic [7:0] song = 0, num_songs;
  logic [4:0] num_files;
  logic scan_done, playing;
  logic [15:0] bus_addr;
  logic [7:0] bus_wdata, rdata;
  logic bus_wr, bus_grant = 1;
  logic cpu_rst, cpu_stall, irq;
  logic [7:0] bank_out [8];
  int checks = 0, failures = 0;

  sd_model #(.N_SECTORS(16)) u_sd (.clk, .rst, .rd(sd_rd), .addr(sd_addr), .dout(sd_dout),
                                   .byte_available(sd_ba), .ready(sd_ready));
  nsf_player dut (.clk, .rst, .sd_rd, .sd_addr, .sd_dout, .sd_byte_available(sd_ba), .sd_ready,
    .file_select, .file, .song, .play_pause, .num_files, .scan_done, .num_songs, .playing,
    .bus_addr, .bus_wdata, .bus_wr, .bus_grant, .cpu_rst, .cpu_stall, .irq);
  memory u_mem (.clk, .rst, .addr(bus_addr), .wdata(bus_wdata), .we(bus_wr && bus_grant),
                .rdata, .bank_out);

  always #5 clk = ~clk;
  int n_held = 0;
  always @(posedge clk) begin
    // withheld at random, never two clocks in a row (see the player's notes)
    bus_grant <= !bus_grant ? 1'b1 : ($urandom_range(0, 9) < 7);
    if (bus_wr && !bus_grant) n_held++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic header(int sec, int songs, int load, int init, int play, int speed, int banks[8]);
    int b = sec * 512;
    string m = "NESM";
    for (int i = 0; i < 4; i++) u_sd.img[b + i] = m[i];
    u_sd.img[b + 4] = 8'h1A; u_sd.img[b + 5] = 8'd1;
    u_sd.img[b + 6] = 8'(songs); u_sd.img[b + 7] = 8'd1;
    u_sd.img[b + 8] = 8'(load); u_sd.img[b + 9] = 8'(load >> 8);
    u_sd.img[b + 10] = 8'(init); u_sd.img[b + 11] = 8'(init >> 8);
    u_sd.img[b + 12] = 8'(play); u_sd.img[b + 13] = 8'(play >> 8);
    u_sd.img[b + 8'h6E] = 8'(speed); u_sd.img[b + 8'h6F] = 8'(speed >> 8);
    for (int i = 0; i < 8; i++) u_sd.img[b + 8'h70 + i] = 8'(banks[i]);
  endtask

  function automatic logic [7:0] pa(int k); return 8'(k * 7 + 3); endfunction
  function automatic logic [7:0] pb(int k); return 8'(k * 13 + 5); endfunction

  task automatic select(int f, int s);
    file = 4'(f); song = 8'(s);
    @(posedge clk); #1; file_select = 1; @(posedge clk); #1; file_select = 0;
  endtask

  task automatic irq_period(output int p);
    int t = 0;
    while (!irq) @(posedge clk);
    @(posedge clk);
    while (!irq) begin @(posedge clk); t++; end
    p = t + 1;
  endtask

  initial begin
    int z[8] = '{0, 0, 0, 0, 0, 0, 0, 0};
    int bk[8] = '{2, 3, 4, 5, 6, 7, 8, 9};
    int errs, p;
    string e = "END DATA";
    header(0, 3, 16'h8000, 16'h8000, 16'h8003, 100, z);
    for (int k = 0; k < 3 * 512 - 128; k++) u_sd.img[128 + k] = pa(k);
    header(3, 5, 16'h8100, 16'h8100, 16'h8106, 200, bk);
    for (int k = 0; k < 10 * 512 - 128; k++) u_sd.img[3 * 512 + 128 + k] = pb(k);
    for (int i = 0; i < 8; i++) u_sd.img[13 * 512 + i] = e[i];
    repeat (3) @(posedge clk); #1;
    rst = 0;
    while (!scan_done) @(posedge clk);
    chk("files found", num_files, 2);
    chk("scan reads", u_sd.n_reads, 14);
    chk("CPU held in reset before play", cpu_rst, 1);
    file = 4'd1; #1;
    chk("song count of file 1 from the scan", num_songs, 5);
    file = 4'd0; #1;
    chk("song count of file 0 from the scan", num_songs, 3);
    // garbage in RAM that the load must clear
    u_mem.wram[16'h0000] = 8'hAA; u_mem.wram[16'h0234] = 8'h55; u_mem.wram[16'h7FFF] = 8'h77;
    // ---------------- file 0, song 1
    select(0, 1);
    @(posedge clk);
    chk("not playing while loading", playing, 0);
    while (!playing) @(posedge clk);
    #1;
    chk("RAM cleared 0000", u_mem.wram[16'h0000], 0);
    chk("RAM cleared 0234", u_mem.wram[16'h0234], 0);
    chk("RAM cleared 7FFF", u_mem.wram[16'h7FFF], 0);
    chk("song count", num_songs, 3);
    errs = 0;
    for (int k = 0; k < 3 * 512 - 128; k++) if (u_mem.prg[k] != pa(k)) errs++;
    chk("unbanked data", errs, 0);
    chk("stub SEI", u_mem.wram[16'h5000], 8'h78);
    chk("stub PLAY lo", u_mem.wram[16'h500C], 8'h03);
    chk("stub PLAY hi", u_mem.wram[16'h500D], 8'h80);
    chk("stub INIT lo", u_mem.wram[16'h501F], 8'h00);
    chk("stub INIT hi", u_mem.wram[16'h5020], 8'h80);
    chk("init flag", u_mem.wram[16'h5080], 0);
    chk("song var", u_mem.wram[16'h5081], 1);
    chk("NTSC var", u_mem.wram[16'h5082], 0);
    chk("reset vector lo", u_mem.prg[18'h3FFFC], 8'h21);
    chk("reset vector hi", u_mem.prg[18'h3FFFD], 8'h50);
    chk("irq vector lo", u_mem.prg[18'h3FFFE], 8'h00);
    chk("irq vector hi", u_mem.prg[18'h3FFFF], 8'h50);
    errs = 0;
    for (int i = 0; i < 8; i++) if (bank_out[i] != 8'(i)) errs++;
    chk("linear banks", errs, 0);
    chk("CPU released", cpu_rst, 0);
    chk("CPU running", cpu_stall, 0);
    irq_period(p);
    chk("irq period 100 us", p, 2500);
    #1;
    play_pause = 1; @(posedge clk); #1; play_pause = 0;
    chk("pause stalls CPU", cpu_stall, 1);
    play_pause = 1; @(posedge clk); #1; play_pause = 0;
    chk("resume", cpu_stall, 0);
    // ---------------- file 1 (banked), song 4
    select(1, 4);
    @(posedge clk); #1;
    chk("reset during reload", cpu_rst, 1);
    while (!playing) @(posedge clk);
    #1;
    chk("song count file 1", num_songs, 5);
    errs = 0;
    for (int k = 0; k < 10 * 512 - 128; k++) if (u_mem.prg[16'h100 + k] != pb(k)) errs++;
    chk("banked data across bank boundary", errs, 0);
    errs = 0;
    for (int i = 0; i < 8; i++) if (bank_out[i] != 8'(bk[i])) errs++;
    chk("bank init values", errs, 0);
    chk("song var 4", u_mem.wram[16'h5081], 4);
    chk("stub PLAY lo file 1", u_mem.wram[16'h500C], 8'h06);
    irq_period(p);
    chk("irq period 200 us", p, 5000);
    chk("bus writes held for grant", int'(n_held > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
