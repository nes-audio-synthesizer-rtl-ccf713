// file_select_tb: presses gamepad buttons (each press held a few clocks,
// then released) and checks the three-state selection machine: file index
// limits and Start reset, A moving to song select with song index 0, the
// song index limits, B/Select going back, A starting playback with one
// file_sel pulse, Start in PLAYING giving one play_toggle pulse, Select
// and B leaving PLAYING, the volume limits 1..8 and the LED bar, and that
// a held button acts only once.
module file_select_tb;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] buttons = 0, num_songs = 8'd3, volume, song_index;
  logic [4:0] num_files = 5'd4;
  fs_state_t state;
  logic [3:0] file_index, vol_level;
  logic file_sel, play_toggle;
  int checks = 0, failures = 0;

  file_select dut (.clk, .rst, .buttons, .num_files, .num_songs, .state, .file_index,
                   .song_index, .vol_level, .volume, .file_sel, .play_toggle);

  always #5 clk = ~clk;
  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_sel = 0, n_tog = 0;
  always @(posedge clk) begin
    if (file_sel) n_sel++;
    if (play_toggle) n_tog++;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic press(int b, int hold = 5);
    buttons[b] = 1; repeat (hold) @(posedge clk); #1;
    buttons[b] = 0; repeat (3) @(posedge clk); #1;
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst = 0;
    chk("reset state", state, FS_FILE_SELECT);
    chk("reset volume", vol_level, 8);
    chk("volume bar", volume, 8'hFF);
    for (int i = 0; i < 6; i++) press(BTN_UP);
    chk("file index top limit", file_index, 3);
    press(BTN_DOWN);
    chk("file down", file_index, 2);
    press(BTN_B); press(BTN_SELECT);
    chk("B/Select ignored in file select", state, FS_FILE_SELECT);
    press(BTN_START);
    chk("start resets file", file_index, 0);
    press(BTN_DOWN);
    chk("file bottom limit", file_index, 0);
    press(BTN_UP, 200);
    chk("held press acts once", file_index, 1);
    press(BTN_A);
    chk("A to song select", state, FS_SONG_SELECT);
    chk("song index reset", song_index, 0);
    for (int i = 0; i < 5; i++) press(BTN_UP);
    chk("song top limit", song_index, 2);
    press(BTN_START);
    chk("start resets song", song_index, 0);
    press(BTN_B);
    chk("B back to file select", state, FS_FILE_SELECT);
    chk("file kept", file_index, 1);
    press(BTN_A); press(BTN_UP);
    press(BTN_SELECT);
    chk("Select back to file select", state, FS_FILE_SELECT);
    press(BTN_A); press(BTN_UP);
    chk("no file_sel yet", n_sel, 0);
    press(BTN_A);
    chk("A to playing", state, FS_PLAYING);
    chk("one file_sel pulse", n_sel, 1);
    chk("song chosen", song_index, 1);
    press(BTN_UP); press(BTN_DOWN); press(BTN_A);
    chk("Up/Down/A ignored while playing", song_index, 1);
    chk("no extra file_sel", n_sel, 1);
    press(BTN_START);
    chk("one play_toggle", n_tog, 1);
    press(BTN_START, 50);
    chk("second play_toggle", n_tog, 2);
    press(BTN_B);
    chk("B to song select", state, FS_SONG_SELECT);
    press(BTN_A); press(BTN_SELECT);
    chk("Select to file select", state, FS_FILE_SELECT);
    chk("file_sel count", n_sel, 2);
    for (int i = 0; i < 10; i++) press(BTN_LEFT);
    chk("volume lower limit", vol_level, 1);
    chk("volume bar 1", volume, 8'h01);
    press(BTN_RIGHT); press(BTN_RIGHT);
    chk("volume up", vol_level, 3);
    chk("volume bar 3", volume, 8'h07);
    for (int i = 0; i < 10; i++) press(BTN_RIGHT);
    chk("volume upper limit", vol_level, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
