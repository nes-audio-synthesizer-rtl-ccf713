// memory: the system RAM, a secondary device on the 16-bit bus.
// Two RAM blocks: a work RAM covering $0000-$7FFF (the NES RAM plus the
// player's scratch area at $5000-$5FFF; the APU range $4000-$4017 is
// routed to the APU by the bus and never reaches here) and the program
// RAM that stands in for the cartridge. $8000-$FFFF is split into eight
// 4 kB banks; bank registers at $5FF8-$5FFF (also visible as RAM) map
// each of them to one of 256 4 kB banks of a 20-bit (1 MB) space:
// phys = {bank[addr[14:12]], addr[11:0]}. Only the low PRG_AW bits of the
// 20-bit address reach the program RAM (18 bits = 256 kB by default).
// The six vector bytes $FFFA-$FFFF always map to the last bytes of the
// 20-bit space ($FFFFA-$FFFFF) whatever bank 7 holds, so the loader can
// place the reset/IRQ vectors there.
// Timing: synchronous RAM, write on the clock where we is high, read data
// registered one clock after the address (re needs not be held).
module memory #(
  parameter int PRG_AW  = 18,   // program RAM address bits
  parameter int WRAM_AW = 15    // work RAM address bits ($0000-$7FFF)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] addr,
  input  logic [7:0]  wdata,
  input  logic        we,
  output logic [7:0]  rdata,
  output logic [7:0]  bank_out [8]   // current bank registers (for display/test)
);
  logic [7:0]  wram [2**WRAM_AW];
  logic [7:0]  prg  [2**PRG_AW];
  logic [7:0]  bank [8];
  logic [19:0] phys;
  logic        is_prg;

  assign is_prg = addr[15];

  always_comb begin
    if (addr >= 16'hFFFA) phys = {8'hFF, addr[11:0]};
    else                  phys = {bank[addr[14:12]], addr[11:0]};
  end

  always_ff @(posedge clk) begin
    if (we) begin
      if (is_prg) prg[phys[PRG_AW-1:0]] <= wdata;
      else        wram[addr[WRAM_AW-1:0]] <= wdata;
    end
    rdata <= is_prg ? prg[phys[PRG_AW-1:0]] : wram[addr[WRAM_AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) bank[i] <= 8'(i);
    end else if (we && addr[15:3] == 13'(16'h5FF8 >> 3)) begin
      bank[addr[2:0]] <= wdata;
    end
  end

  assign bank_out = bank;
endmodule
