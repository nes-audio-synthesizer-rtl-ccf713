// level_sample: captures one APU channel's 4-bit output for the waveform
// display, with separate capture and display buffers to avoid tearing.
// Every second frame_start it arms a capture; it then waits for a rising
// edge of the channel (level going from 0 to non-zero) and stores
// N_SAMPLES samples, one per sample_pulse. At the start of the next
// armed frame (during vertical blank, outside the visible waveform) a
// finished capture becomes the display buffer by swapping the two
// buffers. rd_addr selects a display sample; rd_data follows one clock
// later. With 15 kHz sample pulses, 320 samples take 21 ms, within the
// 33.6 ms of two 640x480 frames.
module level_sample #(
  parameter int N_SAMPLES = 320
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       frame_start,
  input  logic       sample_pulse,
  input  logic [3:0] level,
  input  logic [8:0] rd_addr,
  output logic [3:0] rd_data
);
  logic [3:0] buf0 [N_SAMPLES];
  logic [3:0] buf1 [N_SAMPLES];
  logic       cap_sel;        // buffer being captured into
  logic       odd_frame;
  logic       armed, capturing, done;
  logic [8:0] widx;
  logic [3:0] prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      cap_sel   <= 1'b0;
      odd_frame <= 1'b0;
      armed     <= 1'b0;
      capturing <= 1'b0;
      done      <= 1'b0;
      widx      <= '0;
      prev      <= '0;
    end else begin
      if (sample_pulse) prev <= level;
      if (frame_start) begin
        odd_frame <= ~odd_frame;
        if (!odd_frame) begin
          if (done) cap_sel <= ~cap_sel;
          done      <= 1'b0;
          armed     <= 1'b1;
          capturing <= 1'b0;
          widx      <= '0;
        end
      end else if (sample_pulse) begin
        if (armed && prev == 4'd0 && level != 4'd0) begin
          armed     <= 1'b0;
          capturing <= 1'b1;
        end
        if (capturing || (armed && prev == 4'd0 && level != 4'd0)) begin
          if (cap_sel) buf1[widx] <= level;
          else         buf0[widx] <= level;
          if (widx == 9'(N_SAMPLES - 1)) begin
            capturing <= 1'b0;
            done      <= 1'b1;
          end else begin
            widx <= widx + 1'b1;
          end
        end
      end
    end
  end

  // Display buffer is the one not being captured into.
  always_ff @(posedge clk) begin
    if (rd_addr < 9'(N_SAMPLES)) rd_data <= cap_sel ? buf0[rd_addr] : buf1[rd_addr];
    else                         rd_data <= '0;
  end
endmodule
