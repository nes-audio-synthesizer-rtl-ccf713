// frame_counter: APU frame sequencer ($4017).
// It counts CPU pulses and every QUARTER of them (about 240 Hz) advances a
// step. In 4-step mode ($4017 bit 7 clear) every step gives pulse_e
// (240 Hz), every second step gives pulse_l (120 Hz), and the last step
// sets the frame IRQ (60 Hz) unless $4017 bit 6 (inhibit) is set. In
// 5-step mode the fifth step gives no pulse, so pulse_e and pulse_l run
// at 4/5 of those rates, and no IRQ is raised. A write to $4017 restarts
// the sequence; setting the inhibit bit or irq_clear (a read of $4015)
// clears the IRQ flag. NTSC timing only.
module frame_counter #(
  parameter int QUARTER = 7457   // CPU cycles per 240 Hz step
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       pulse_cpu,
  input  logic [7:0] r4017,
  input  logic       wr_4017,
  input  logic       irq_clear,
  output logic       pulse_e,
  output logic       pulse_l,
  output logic       irq
);
  logic [$clog2(QUARTER+1)-1:0] cnt;
  logic [2:0]  step;
  logic        last;

  assign last = r4017[7] ? (step == 3'd4) : (step == 3'd3);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; step <= '0; irq <= 1'b0;
      pulse_e <= 1'b0; pulse_l <= 1'b0;
    end else begin
      pulse_e <= 1'b0;
      pulse_l <= 1'b0;
      if (irq_clear || r4017[6]) irq <= 1'b0;
      if (wr_4017) begin
        cnt <= '0; step <= '0;
      end else if (pulse_cpu) begin
        if (cnt == $bits(cnt)'(QUARTER - 1)) begin
          cnt  <= '0;
          step <= last ? 3'd0 : step + 1'b1;
          if (step != 3'd4) begin
            pulse_e <= 1'b1;
            pulse_l <= step[0];
          end
          if (!r4017[7] && last && !r4017[6]) irq <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
