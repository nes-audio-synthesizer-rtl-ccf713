// triangle_channel: APU triangle channel.
// Units: linear counter (r0[6:0] reload value, r0[7] control/halt, clocked
// by the 240 Hz pulse_e), length counter (r0[7] halt, r2[7:3] index,
// enable $4015[2]), a divider clocked by the 1.79 MHz CPU pulse with period
// {r2[2:0], r1}, and a 32-step sequencer producing 0..15,15..0.
// Output frequency is 1.79MHz/(32*(P+1)). When either counter reaches zero
// (or the channel is disabled) the sequencer keeps stepping only until its
// output reaches 0 and then stops, which avoids a click. Writing r2
// ($400B) reloads the length counter and sets the linear counter's reload
// flag; the reload flag is cleared on a pulse_e while r0[7] is clear.
// Register values must be valid when the wr_r2 strobe is high.
module triangle_channel (
  input  logic       clk,
  input  logic       rst,
  input  logic       pulse_cpu,   // 1.79 MHz
  input  logic       pulse_e,
  input  logic       pulse_l,
  input  logic [7:0] r0, r1, r2,  // $4008, $400A, $400B
  input  logic       wr_r2,
  input  logic       enable,
  output logic [3:0] out,
  output logic       len_active
);
  logic       tick;
  logic [6:0] lin;
  logic       lin_reload;
  logic [4:0] step;
  logic       running;

  length_counter u_len (
    .clk, .rst, .enable, .halt(r0[7]), .load(wr_r2), .idx(r2[7:3]),
    .pulse_l, .active(len_active)
  );

  divider #(.W(12)) u_div (
    .clk, .rst, .pulse_in(pulse_cpu), .period({1'b0, r2[2:0], r1}),
    .reload(1'b0), .pulse_out(tick)
  );

  // Linear counter
  always_ff @(posedge clk) begin
    if (rst) begin
      lin        <= '0;
      lin_reload <= 1'b0;
    end else begin
      if (wr_r2) lin_reload <= 1'b1;
      else if (pulse_e) begin
        if (lin_reload)       lin <= r0[6:0];
        else if (lin != '0)   lin <= lin - 1'b1;
        if (!r0[7])           lin_reload <= 1'b0;
      end
    end
  end

  assign running = len_active && (lin != '0) && enable;

  always_ff @(posedge clk) begin
    if (rst) step <= '0;
    else if (tick && (running || out != '0)) step <= step + 1'b1;
  end

  assign out = step[4] ? ~step[3:0] : step[3:0];
endmodule
