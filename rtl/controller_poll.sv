// controller_poll: reads an NES gamepad (an 8-bit parallel-in shift
// register with active-low buttons).
// POLL_HZ times a second it raises 'latch' for one bit period, which makes
// the pad capture its buttons and present the first one (A) on 'data'.
// Then, at BIT_HZ, it gives seven 'pulse' clocks, sampling 'data' after
// each, in the pad's order A, B, Select, Start, Up, Down, Left, Right.
// After the eighth bit the inverted buffer is copied to 'buttons' (active
// high, bit 0 = A ... bit 7 = Right) and 'valid' pulses for one clock.
// Latch and bit rates (500 Hz, 50 kHz) follow the design; the exact
// placement of pulse edges inside a bit period is this design's choice.
module controller_poll #(
  parameter int CLK_HZ  = 25_000_000,
  parameter int POLL_HZ = 500,
  parameter int BIT_HZ  = 50_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       data,
  output logic       latch,
  output logic       pulse,
  output logic [7:0] buttons,
  output logic       valid
);
  localparam int BIT_DIV   = CLK_HZ / BIT_HZ;
  localparam int TICKS_POLL = BIT_HZ / POLL_HZ;

  logic [$clog2(BIT_DIV)-1:0]    div;
  logic [$clog2(TICKS_POLL)-1:0] tick_cnt;
  logic [7:0] buffer;
  logic       tick;

  assign tick = (div == $bits(div)'(BIT_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div      <= '0;
      tick_cnt <= '0;
      buffer   <= '0;
      buttons  <= '0;
      latch    <= 1'b0;
      pulse    <= 1'b0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      div   <= tick ? '0 : div + 1'b1;
      if (tick) begin
        tick_cnt <= (tick_cnt == $bits(tick_cnt)'(TICKS_POLL - 1)) ? '0 : tick_cnt + 1'b1;
        latch <= (tick_cnt == $bits(tick_cnt)'(TICKS_POLL - 1));   // high during tick 0
        pulse <= 1'b0;
        if (tick_cnt >= 1 && tick_cnt <= 15) begin
          if (tick_cnt[0]) begin
            // odd ticks 1,3,..,15: sample bit (tick_cnt-1)/2
            buffer[tick_cnt[3:1]] <= data;
            if (tick_cnt == 15) begin
              buttons <= ~{data, buffer[6:0]};
              valid   <= 1'b1;
            end else begin
              pulse <= 1'b1;     // next bit clocked out during the even tick
            end
          end
        end
      end
    end
  end
endmodule
