// title_blob: draws one line of 8x8 text on the VGA screen showing the
// file-select state: "Select a File", "Select a Song" or "Now Playing".
// The text area starts at (x_in, y_in) and is WIDTH*NUM_ITEMS pixels wide
// and HEIGHT high. For the pixel at (hcount, vcount) inside it,
// curnt_x = hcount - x_in and curnt_y = vcount - y_in; character
// curnt_x >> 3 (0 = leftmost, the most significant byte of the message)
// is sent to an external font ROM as its ASCII code. The ROM answers
// after two clocks with 64 bits, eight rows of eight; the pixel is bit
// {~curnt_y[2:0], curnt_x[2:0]} (rows are stored bottom-up). The in-area
// flag and the bit index travel through a two-stage pipeline to meet the
// ROM data, so 'pixel' is valid two clocks after hcount/vcount (the same
// delay as the waveform display's colour outputs).
// SIZE_ITEMS is the width of a character index (enough bits for
// NUM_ITEMS).
module title_blob
  import nes_pkg::*;
#(
  parameter int NUM_ITEMS  = 13,
  parameter int SIZE_ITEMS = 4,
  parameter int WIDTH      = 8,
  parameter int HEIGHT     = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  fs_state_t   state,
  input  logic [9:0]  x_in,
  input  logic [9:0]  y_in,
  input  logic [9:0]  hcount,
  input  logic [9:0]  vcount,
  output logic [7:0]  rom_addr,
  input  logic [63:0] rom_data,
  output logic        pixel
);
  logic [NUM_ITEMS*8-1:0] text;
  logic [9:0]  curnt_x, curnt_y;
  logic        in_area;
  logic [SIZE_ITEMS-1:0] idx;
  logic [5:0]  bit_sel [2];
  logic        area_q  [2];

  // Messages, padded with spaces to NUM_ITEMS characters.
  always_comb begin
    case (state)
      FS_FILE_SELECT: text = (NUM_ITEMS*8)'("Select a File");
      FS_SONG_SELECT: text = (NUM_ITEMS*8)'("Select a Song");
      default:        text = (NUM_ITEMS*8)'("Now Playing  ");
    endcase
  end

  assign curnt_x = hcount - x_in;
  assign curnt_y = vcount - y_in;
  assign in_area = (hcount >= x_in) && (curnt_x < 10'(WIDTH * NUM_ITEMS)) &&
                   (vcount >= y_in) && (curnt_y < 10'(HEIGHT));
  assign idx     = SIZE_ITEMS'(curnt_x >> 3);

  always_comb begin
    rom_addr = 8'h20;
    if (in_area) rom_addr = text[(NUM_ITEMS - 32'(idx)) * 8 - 1 -: 8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      area_q[0] <= 1'b0; area_q[1] <= 1'b0;
      bit_sel[0] <= '0;  bit_sel[1] <= '0;
    end else begin
      area_q[0]  <= in_area;
      bit_sel[0] <= {~curnt_y[2:0], curnt_x[2:0]};
      area_q[1]  <= area_q[0];
      bit_sel[1] <= bit_sel[0];
    end
  end

  assign pixel = area_q[1] && rom_data[bit_sel[1]];
endmodule
