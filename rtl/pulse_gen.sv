// pulse_gen: derives the APU/CPU timing pulses from the 25 MHz system clock.
// A phase accumulator adds CPU_HZ every clock and wraps at CLK_HZ; each
// wrap is one single-clock pulse_cpu, giving 1.79 MHz on average (one
// pulse every 13 or 14 clocks). pulse_apu is every second pulse_cpu
// (895 kHz), used by the square and noise dividers.
module pulse_gen #(
  parameter int unsigned CLK_HZ = 25_000_000,
  parameter int unsigned CPU_HZ = 1_789_773
) (
  input  logic clk,
  input  logic rst,
  output logic pulse_cpu,
  output logic pulse_apu
);
  logic [31:0] acc;
  logic        half;
  logic [31:0] nxt;

  assign nxt = acc + CPU_HZ;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      half      <= 1'b0;
      pulse_cpu <= 1'b0;
      pulse_apu <= 1'b0;
    end else begin
      pulse_cpu <= 1'b0;
      pulse_apu <= 1'b0;
      if (nxt >= CLK_HZ) begin
        acc       <= nxt - CLK_HZ;
        pulse_cpu <= 1'b1;
        half      <= ~half;
        pulse_apu <= half;
      end else begin
        acc <= nxt;
      end
    end
  end
endmodule
