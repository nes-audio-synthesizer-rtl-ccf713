// noise_channel: APU noise channel.
// Units: envelope generator (r0[5:0] of $400C), length counter (r0[5] halt,
// r2[7:3] index of $400F, enable $4015[3]), a divider clocked by the
// 895 kHz pulse whose period comes from a 16-entry table indexed by
// r1[3:0] ($400E), and a 15-bit shift register loaded with 1 at reset.
// On each divider pulse the register computes bit0 XOR (r1[7] ? bit6 :
// bit1), shifts right and puts the result in bit 14. The channel outputs
// the envelope volume while bit 0 is clear and the length counter is
// non-zero, otherwise 0. Writing r2 ($400F) restarts the envelope and
// reloads the length counter.
module noise_channel
  import nes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       pulse_apu,   // 895 kHz
  input  logic       pulse_e,
  input  logic       pulse_l,
  input  logic [7:0] r0, r1, r2,  // $400C, $400E, $400F
  input  logic       wr_r2,
  input  logic       enable,
  output logic [3:0] out,
  output logic       len_active,
  output logic [14:0] lfsr
);
  logic [3:0]  vol;
  logic        tick;
  logic        fb;

  envelope u_env (
    .clk, .rst, .r0(r0[5:0]), .start(wr_r2), .pulse_e, .vol
  );

  length_counter u_len (
    .clk, .rst, .enable, .halt(r0[5]), .load(wr_r2), .idx(r2[7:3]),
    .pulse_l, .active(len_active)
  );

  // The table holds timer lengths; the divider needs length-1.
  divider #(.W(12)) u_div (
    .clk, .rst, .pulse_in(pulse_apu), .period(noise_lut(r1[3:0]) - 12'd1),
    .reload(1'b0), .pulse_out(tick)
  );

  assign fb = lfsr[0] ^ (r1[7] ? lfsr[6] : lfsr[1]);

  always_ff @(posedge clk) begin
    if (rst)       lfsr <= 15'd1;
    else if (tick) lfsr <= {fb, lfsr[14:1]};
  end

  assign out = (lfsr[0] || !len_active) ? 4'd0 : vol;
endmodule
