// envelope: APU envelope generator shared by the square and noise channels.
// Register bits r0[3:0] give either the constant volume (r0[4]=1) or the
// decay period Pd; r0[5] makes the decay loop from 0 back to 15.
// A 'start' strobe (write to $4003/$4007/$400F) restarts the envelope: on
// the next 240 Hz pulse_e the decay level is set to 15 and the internal
// divider reloads. Afterwards the decay level drops by one every Pd+1
// pulse_e pulses, i.e. at 240Hz/(Pd+1). Output vol is valid every cycle.
module envelope (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] r0,
  input  logic       start,
  input  logic       pulse_e,
  output logic [3:0] vol
);
  logic       start_flag;
  logic [3:0] decay;
  logic [3:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_flag <= 1'b0;
      decay      <= '0;
      cnt        <= '0;
    end else begin
      if (start) start_flag <= 1'b1;
      if (pulse_e) begin
        if (start_flag && !start) begin
          start_flag <= 1'b0;
          decay      <= 4'd15;
          cnt        <= r0[3:0];
        end else if (cnt == '0) begin
          cnt <= r0[3:0];
          if (decay != '0)  decay <= decay - 1'b1;
          else if (r0[5])   decay <= 4'd15;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

  assign vol = r0[4] ? r0[3:0] : decay;
endmodule
