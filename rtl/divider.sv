// divider: programmable pulse divider used by every APU channel.
// It counts input pulses and emits one output pulse for every P+1 input
// pulses, where P is the period input (the APU's timer convention).
// Internally a down-counter is reloaded with P when it passes zero; the
// output is combinational: pulse_out is high in the same clock as the
// pulse_in that ends a period. A 'reload' strobe restarts the count at P.
// The P+1 behaviour follows the APU description; the counter width is a
// parameter (12 bits by default, enough for the 11-bit timer periods).
module divider #(
  parameter int W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         pulse_in,
  input  logic [W-1:0] period,
  input  logic         reload,
  output logic         pulse_out
);
  logic [W-1:0] cnt;

  assign pulse_out = pulse_in && (cnt == '0);

  always_ff @(posedge clk) begin
    if (rst || reload)      cnt <= period;
    else if (pulse_in) begin
      if (cnt == '0)        cnt <= period;
      else                  cnt <= cnt - 1'b1;
    end
  end
endmodule
