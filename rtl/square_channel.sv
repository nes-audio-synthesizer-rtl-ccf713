// square_channel: one APU square (pulse) channel.
// Built from the five units of the APU description: envelope generator
// (r0[5:0]), sweep unit (r1), length counter (r0[5] halt, r3[7:3] index,
// enable from $4015), a divider clocked by the 895 kHz pulse with period
// {r3[2:0], r2} as modified by the sweep, and an 8-step duty sequencer
// (duty r0[7:6]). The channel output is the envelope volume while the
// sequencer is in a sounding step, and 0 when the sweep mutes it, the
// sequencer is in a silent step or the length counter has run out.
// Output frequency is 895kHz/(8*(P+1)).
// Register values r0..r3 must already hold the new byte when the matching
// wr_r* strobe is high (the APU register file delays its strobes by one
// clock for this). Writing r3 restarts the envelope, reloads the length
// counter and resets the sequencer to its first step.
// SWEEP_ONES_COMPLEMENT selects channel 1's subtract-(shift+1) behaviour.
module square_channel
  import nes_pkg::*;
#(
  parameter bit SWEEP_ONES_COMPLEMENT = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       pulse_apu,   // 895 kHz
  input  logic       pulse_e,     // 240 Hz
  input  logic       pulse_l,     // 120 Hz
  input  logic [7:0] r0, r1, r2, r3,
  input  logic       wr_r1, wr_r2, wr_r3,
  input  logic       enable,
  output logic [3:0] out,
  output logic       len_active
);
  logic [3:0]  vol;
  logic [10:0] period;
  logic        sweep_mute;
  logic        tick;
  logic [2:0]  step;

  envelope u_env (
    .clk, .rst, .r0(r0[5:0]), .start(wr_r3), .pulse_e, .vol
  );

  sweep #(.ONES_COMPLEMENT(SWEEP_ONES_COMPLEMENT)) u_sweep (
    .clk, .rst, .r1, .reload(wr_r1), .period_load(wr_r2 || wr_r3),
    .period_in({r3[2:0], r2}), .pulse_l, .period, .mute(sweep_mute)
  );

  length_counter u_len (
    .clk, .rst, .enable, .halt(r0[5]), .load(wr_r3), .idx(r3[7:3]),
    .pulse_l, .active(len_active)
  );

  divider #(.W(12)) u_div (
    .clk, .rst, .pulse_in(pulse_apu), .period({1'b0, period}),
    .reload(1'b0), .pulse_out(tick)
  );

  always_ff @(posedge clk) begin
    if (rst || wr_r3) step <= '0;
    else if (tick)    step <= step + 1'b1;
  end

  always_comb begin
    out = vol;
    if (sweep_mute)                              out = '0;
    if ({1'b0, step} >= duty_steps(r0[7:6]))     out = '0;
    if (!len_active)                             out = '0;
  end
endmodule
