// vga: 640x480 @ 60 Hz video timing from a 25 MHz pixel clock.
// Horizontal: 640 visible + 16 front porch + 96 sync + 48 back porch = 800
// clocks per line; vertical: 480 + 10 + 2 + 33 = 525 lines, 420,000 clocks
// a frame. hcount/vcount give the current pixel, blank is high outside
// the visible area, hsync/vsync are active low (standard VGA polarity) and
// frame_start pulses for one clock when the first blank line (480) starts.
module vga #(
  parameter int H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33
) (
  input  logic       clk,
  input  logic       rst,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync,
  output logic       vsync,
  output logic       blank,
  output logic       frame_start
);
  localparam int H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 10'(H_TOT - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOT - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign hsync = !(hcount >= 10'(H_VIS + H_FP) && hcount < 10'(H_VIS + H_FP + H_SYNC));
  assign vsync = !(vcount >= 10'(V_VIS + V_FP) && vcount < 10'(V_VIS + V_FP + V_SYNC));
  assign blank = (hcount >= 10'(H_VIS)) || (vcount >= 10'(V_VIS));
  assign frame_start = (hcount == '0) && (vcount == 10'(V_VIS));
endmodule
