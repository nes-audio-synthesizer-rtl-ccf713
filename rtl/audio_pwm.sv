// audio_pwm: 8-bit pulse-width modulator for the audio output pin.
// A free-running 8-bit counter is compared with the sample latched at the
// start of each 256-clock period; pwm is high while counter < sample, so
// the duty cycle is sample/256 (about 98 kHz carrier at 25 MHz).
module audio_pwm (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] sample,
  output logic       pwm
);
  logic [7:0] cnt;
  logic [7:0] held;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      held <= '0;
      pwm  <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == 8'hFF) held <= sample;
      pwm <= (cnt < held);
    end
  end
endmodule
