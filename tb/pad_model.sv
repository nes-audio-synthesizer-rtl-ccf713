// pad_model: behavioural NES gamepad for the testbenches: an 8-bit
// parallel-in shift register. While latch is high it holds the inverted
// buttons (bit 0 = A ... bit 7 = Right) and shows bit 0 on data; each
// rising edge of pulse after the latch shifts the next button onto data.
// Buttons are active high on this model's input and active low on data,
// like the pad.
module pad_model (
  input  logic       latch,
  input  logic       pulse,
  input  logic [7:0] buttons,
  output logic       data
);
  logic [7:0] snap = 8'hFF;
  int shifts = 0;
  always @(posedge pulse or posedge latch) begin
    if (latch) shifts <= 0;
    else       shifts <= shifts + 1;
  end
  always @(latch or buttons) if (latch) snap = ~buttons;
  assign data = (shifts < 8) ? snap[shifts] : 1'b0;
endmodule
