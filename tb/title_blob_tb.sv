// title_blob_tb: scans a raster around the text area for each of the
// three states with a font ROM model that answers two clocks after the
// address. The model's glyph for code c is an arbitrary 64-bit pattern
// derived from c. Checks on every clock that the ROM address is the right
// character of the state's message, and that 'pixel' two clocks later is
// the glyph bit {~row, column} in_txt the area and 0 outside it.
module title_blob_tb;
  import nes_pkg::*;
  localparam int X0 = 17, Y0 = 5;
  logic clk = 0, rst = 1;
  fs_state_t state = FS_FILE_SELECT;
  logic [9:0] hcount = 0, vcount = 0;
  logic [7:0] rom_addr;
  logic [63:0] rom_data, rom_q;
  logic pixel;
  int checks = 0, failures = 0;

  title_blob dut (.clk, .rst, .state, .x_in(10'(X0)), .y_in(10'(Y0)), .hcount, .vcount,
                  .rom_addr, .rom_data, .pixel);

  function automatic logic [63:0] glyph(logic [7:0] c);
    return {c, ~c, c ^ 8'h55, c + 8'd7, {c[3:0], c[7:4]}, c ^ 8'hF0, c * 8'd3, 8'h81 ^ c};
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) begin rom_q <= glyph(rom_addr); rom_data <= rom_q; end

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
    string msgs[3] = '{"Select a File", "Select a Song", "Now Playing  "};
    repeat (3) @(posedge clk); #1;
    rst = 0;
    for (int s = 0; s < 3; s++) begin
      int addr_err, pix_err, lit;
      bit e1, e2;
      addr_err = 0; pix_err = 0; lit = 0; e1 = 0; e2 = 0;
      state = fs_state_t'(s);
      for (int y = 0; y < 20; y++) begin
        for (int x = 0; x < 140; x++) begin
          bit in_txt, e0;
          hcount = 10'(x); vcount = 10'(y);
          #1;
          in_txt = x >= X0 && x < X0 + 8 * 13 && y >= Y0 && y < Y0 + 8;
          e0 = 0;
          if (in_txt) begin
            int cx, cy;
            logic [7:0] ch;
            logic [5:0] bi;
            cx = x - X0; cy = y - Y0;
            ch = msgs[s][cx / 8];
            bi = {~3'(cy), 3'(cx)};
            if (rom_addr != ch) addr_err++;
            e0 = glyph(ch)[bi];
          end
          // pixel now belongs to the position two clocks ago
          if (pixel != e2) pix_err++;
          if (pixel) lit++;
          @(posedge clk);
          #1;
          e2 = e1; e1 = e0;
        end
      end
      chk($sformatf("state %0d rom address", s), addr_err, 0);
      chk($sformatf("state %0d pixels", s), pix_err, 0);
      chk($sformatf("state %0d something drawn", s), int'(lit > 50), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
