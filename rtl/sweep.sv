// sweep: square-channel sweep unit. It owns the channel's current timer
// period. A timer write (period_load) sets the period from the registers;
// each sweep tick (every Ps+1 pulses of the 120 Hz pulse_l, Ps = r1[6:4])
// with the sweep enabled (r1[7]) and a non-zero shift (r1[2:0]) replaces
// the period with the target: period +/- (period >> shift). With r1[3] set
// channel 1 subtracts shift+1 (ONES_COMPLEMENT=1) while channel 2 subtracts
// only the shifted value. The unit mutes the channel when the period is
// below 8, or when the sweep is enabled and the target exceeds 2047.
// A write to $4001/$4005 (reload) restarts the sweep divider.
module sweep #(
  parameter bit ONES_COMPLEMENT = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  r1,
  input  logic        reload,
  input  logic        period_load,
  input  logic [10:0] period_in,
  input  logic        pulse_l,
  output logic [10:0] period,
  output logic        mute
);
  logic [11:0] target;
  logic [10:0] shifted;
  logic [2:0]  cnt;
  logic        reload_flag;

  always_comb begin
    shifted = period >> r1[2:0];
    if (r1[3])
      target = {1'b0, period} - {1'b0, shifted} - (ONES_COMPLEMENT ? 12'd1 : 12'd0);
    else
      target = {1'b0, period} + {1'b0, shifted};
    // A subtraction that underflows wraps into bit 11 and is also muted.
    mute = (period < 11'd8) || (r1[7] && target > 12'd2047);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      period      <= '0;
      cnt         <= '0;
      reload_flag <= 1'b0;
    end else begin
      if (period_load) period <= period_in;
      if (reload) reload_flag <= 1'b1;
      if (pulse_l) begin
        if (cnt == '0 || reload_flag) begin
          cnt         <= r1[6:4];
          reload_flag <= 1'b0;
          if (cnt == '0 && r1[7] && r1[2:0] != '0 && !mute && !period_load)
            period <= target[10:0];
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end
endmodule
