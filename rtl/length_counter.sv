// length_counter: APU note-duration counter (square, triangle, noise).
// A 'load' strobe (write to the channel's last register) loads the count
// from the 32-entry length table indexed by idx (register bits 7:3), but
// only while the channel is enabled in $4015. Each 120 Hz pulse_l
// decrements the count unless 'halt' is set. Clearing 'enable' forces the
// count to 0. 'active' is high while the count is non-zero; the channel
// is muted otherwise.
module length_counter
  import nes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       halt,
  input  logic       load,
  input  logic [4:0] idx,
  input  logic       pulse_l,
  output logic       active
);
  logic [7:0] count;

  always_ff @(posedge clk) begin
    if (rst || !enable)            count <= '0;
    else if (load)                 count <= length_lut(idx);
    else if (pulse_l && !halt && count != '0) count <= count - 1'b1;
  end

  assign active = (count != '0);
endmodule
