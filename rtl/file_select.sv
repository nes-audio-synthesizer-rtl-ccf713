// file_select: gamepad-driven file / song selection and playback control.
// Three states. FILE_SELECT: Up/Down move file_index within
// 0..num_files-1, Start resets it to 0, A confirms, clears song_index and
// goes to SONG_SELECT. SONG_SELECT: Up/Down move song_index within
// 0..num_songs-1, Start resets it to 0, B or Select return to FILE_SELECT,
// A goes to PLAYING and pulses file_sel (which starts loading the file
// with that song). PLAYING: Select returns to FILE_SELECT, B to
// SONG_SELECT, Start pulses play_toggle (pause / resume). In every state
// Left/Right lower/raise the volume between 1/8 and 8/8; vol_level is the
// number of eighths and volume[7:0] shows it as a bar on eight LEDs.
// Buttons are level inputs (active high); each press acts once, on the
// clock after its rising edge. Index counters stop at their limits.
module file_select
  import nes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] buttons,
  input  logic [4:0] num_files,
  input  logic [7:0] num_songs,
  output fs_state_t  state,
  output logic [3:0] file_index,
  output logic [7:0] song_index,
  output logic [3:0] vol_level,
  output logic [7:0] volume,
  output logic       file_sel,
  output logic       play_toggle
);
  logic [7:0] prev, press;

  assign press = buttons & ~prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev        <= '0;
      state       <= FS_FILE_SELECT;
      file_index  <= '0;
      song_index  <= '0;
      vol_level   <= 4'd8;
      file_sel <= 1'b0;
      play_toggle <= 1'b0;
    end else begin
      prev        <= buttons;
      file_sel <= 1'b0;
      play_toggle <= 1'b0;
      if (press[BTN_LEFT]  && vol_level > 4'd1) vol_level <= vol_level - 1'b1;
      if (press[BTN_RIGHT] && vol_level < 4'd8) vol_level <= vol_level + 1'b1;
      case (state)
        FS_FILE_SELECT: begin
          if (press[BTN_UP] && 5'(file_index) + 5'd1 < num_files) file_index <= file_index + 1'b1;
          if (press[BTN_DOWN] && file_index != '0)                file_index <= file_index - 1'b1;
          if (press[BTN_START]) file_index <= '0;
          if (press[BTN_A]) begin
            song_index <= '0;
            state      <= FS_SONG_SELECT;
          end
        end
        FS_SONG_SELECT: begin
          if (press[BTN_UP] && 9'(song_index) + 9'd1 < 9'(num_songs)) song_index <= song_index + 1'b1;
          if (press[BTN_DOWN] && song_index != '0)                   song_index <= song_index - 1'b1;
          if (press[BTN_START]) song_index <= '0;
          if (press[BTN_B] || press[BTN_SELECT]) state <= FS_FILE_SELECT;
          else if (press[BTN_A]) begin
            state       <= FS_PLAYING;
            file_sel <= 1'b1;
          end
        end
        default: begin
          if (press[BTN_SELECT])     state <= FS_FILE_SELECT;
          else if (press[BTN_B])     state <= FS_SONG_SELECT;
          if (press[BTN_START])      play_toggle <= 1'b1;
        end
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) volume[i] = (4'(i) < vol_level);
  end
endmodule
