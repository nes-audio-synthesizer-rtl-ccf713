// level_display: real-time waveform visualizer for four APU channels
// (square 1, square 2, triangle, noise) on a 640x480 VGA screen.
// Each channel has a level_sample capture unit. The screen is split into
// four 120-line bands, one per channel; in each band sample hcount/2 is
// drawn as a short horizontal stroke at height 4*sample above the band's
// baseline (4-bit samples scaled to 64 pixels). The pixel colour per
// channel is this design's choice. Because the sample memories answer one
// clock after the address, the colour and the hsync/vsync outputs are all
// registered one extra clock so they stay aligned.
module level_display #(
  parameter int N_SAMPLES = 320
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  input  logic       hsync_in,
  input  logic       vsync_in,
  input  logic       blank,
  input  logic       frame_start,
  input  logic       sample_pulse,
  input  logic [3:0] ch0, ch1, ch2, ch3,
  output logic [3:0] r, g, b,
  output logic       hsync,
  output logic       vsync
);
  logic [3:0] lvl  [4];
  logic [3:0] samp [4];
  logic [8:0] rd_addr;
  logic [1:0] band_q;
  logic [6:0] row_q;       // row inside the band, 0 at the top
  logic       blank_q;
  logic       hs_q, vs_q;
  logic       lit;
  logic [6:0] y_line;

  assign lvl[0] = ch0;
  assign lvl[1] = ch1;
  assign lvl[2] = ch2;
  assign lvl[3] = ch3;
  assign rd_addr = hcount[9:1];

  for (genvar c = 0; c < 4; c++) begin : g_ch
    level_sample #(.N_SAMPLES(N_SAMPLES)) u_samp (
      .clk, .rst, .frame_start, .sample_pulse, .level(lvl[c]),
      .rd_addr, .rd_data(samp[c])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      band_q <= '0; row_q <= '0; blank_q <= 1'b1; hs_q <= 1'b1; vs_q <= 1'b1;
    end else begin
      band_q  <= (vcount < 10'd120) ? 2'd0 : (vcount < 10'd240) ? 2'd1 :
                 (vcount < 10'd360) ? 2'd2 : 2'd3;
      row_q   <= 7'(vcount - 10'(120 * ((vcount < 10'd120) ? 0 : (vcount < 10'd240) ? 1 :
                                        (vcount < 10'd360) ? 2 : 3)));
      blank_q <= blank;
      hs_q    <= hsync_in;
      vs_q    <= vsync_in;
    end
  end

  // Baseline at row 92 of the band; sample s is drawn on rows y-1..y.
  assign y_line = 7'd92 - {samp[band_q], 2'b00};
  assign lit    = !blank_q && (row_q == y_line || row_q + 7'd1 == y_line);

  always_ff @(posedge clk) begin
    if (rst) begin
      r <= '0; g <= '0; b <= '0; hsync <= 1'b1; vsync <= 1'b1;
    end else begin
      hsync <= hs_q;
      vsync <= vs_q;
      {r, g, b} <= '0;
      if (lit) begin
        case (band_q)
          2'd0:    {r, g, b} <= 12'h0FF;
          2'd1:    {r, g, b} <= 12'hFF0;
          2'd2:    {r, g, b} <= 12'hF0F;
          default: {r, g, b} <= 12'hFFF;
        endcase
      end
    end
  end
endmodule
