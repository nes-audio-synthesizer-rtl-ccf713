// dmc_channel: APU delta-modulation channel, which plays 1-bit delta
// samples straight from memory.
// Divider: clocked by the 1.79 MHz CPU pulse, period from a 16-entry rate
// table indexed by r0[3:0] ($4010).
// Memory reader: when the one-byte sample buffer is empty and bytes remain,
// it stalls the CPU for 8 CPU cycles (long enough for the CPU to finish its
// current instruction), drives dma_req/dma_addr during the last two of
// them and latches dma_data at the end. The address then increments
// (wrapping $FFFF to $8000) and the remaining count decrements. Sample
// start is $C000 + (r2 << ADDR_SHIFT); length is (r3 << 4) + 1 bytes. When
// the count reaches 0 the reader restarts the sample if r0[6] (loop) is
// set, or raises irq if r0[7] is set. A write to $4015 with bit 4 set
// starts a sample only when none is playing; with bit 4 clear it stops the
// channel. Any $4015 write clears the DMC IRQ.
// Output unit: on each divider pulse it takes bit 0 of the shift register:
// 1 adds 2 to the 7-bit level if it is below 126, 0 subtracts 2 if it is
// above 1. After 8 bits it reloads from the buffer, or falls silent (level
// frozen) if the buffer is empty. Writing $4011 sets the level to r1[6:0].
// ADDR_SHIFT defaults to 5 as the design specifies the start address as
// $C000 + (A << 5); set it to 6 for the NES hardware's 64-byte granularity.
module dmc_channel
  import nes_pkg::*;
#(
  parameter int ADDR_SHIFT = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pulse_cpu,
  input  logic [7:0]  r0, r1, r2, r3,  // $4010..$4013
  input  logic        wr_r1,           // $4011 written
  input  logic        wr_status,       // $4015 written
  input  logic        status_en,       // $4015 bit 4 (valid with wr_status)
  output logic        stall,
  output logic        dma_req,
  output logic [15:0] dma_addr,
  input  logic [7:0]  dma_data,
  output logic        irq,
  output logic        active,          // bytes remain
  output logic [6:0]  out
);
  logic        tick;
  logic [15:0] cur_addr;
  logic [11:0] remaining;
  logic [7:0]  sample_buf;
  logic        buf_full;
  logic        reading;
  logic [2:0]  stall_cnt;
  logic [7:0]  shreg;
  logic [2:0]  bits_rem;
  logic        silence;

  logic [15:0] start_addr;
  logic [11:0] start_len;
  assign start_addr = 16'hC000 + (16'(r2) << ADDR_SHIFT);
  assign start_len  = (12'(r3) << 4) + 12'd1;

  divider #(.W(12)) u_div (
    .clk, .rst, .pulse_in(pulse_cpu), .period(dmc_lut(r0[3:0]) - 12'd1),
    .reload(1'b0), .pulse_out(tick)
  );

  assign stall    = reading;
  assign dma_req  = reading && (stall_cnt >= 3'd6);
  assign dma_addr = cur_addr;
  assign active   = (remaining != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_addr   <= 16'hC000;
      remaining  <= '0;
      sample_buf <= '0;
      buf_full   <= 1'b0;
      reading    <= 1'b0;
      stall_cnt  <= '0;
      irq        <= 1'b0;
      shreg      <= '0;
      bits_rem   <= '0;
      silence    <= 1'b1;
      out        <= '0;
    end else begin
      // ---------------- memory reader ----------------
      if (wr_status) begin
        irq <= 1'b0;
        if (!status_en) remaining <= '0;
        else if (remaining == '0) begin
          cur_addr  <= start_addr;
          remaining <= start_len;
        end
      end
      if (!reading) begin
        if (!buf_full && remaining != '0 && !wr_status) begin
          reading   <= 1'b1;
          stall_cnt <= '0;
        end
      end else if (pulse_cpu) begin
        stall_cnt <= stall_cnt + 1'b1;
        if (stall_cnt == 3'd7) begin
          reading    <= 1'b0;
          sample_buf <= dma_data;
          buf_full   <= 1'b1;
          cur_addr   <= (cur_addr == 16'hFFFF) ? 16'h8000 : cur_addr + 1'b1;
          if (remaining == 12'd1) begin
            if (r0[6]) begin
              cur_addr  <= start_addr;
              remaining <= start_len;
            end else begin
              remaining <= '0;
              if (r0[7]) irq <= 1'b1;
            end
          end else begin
            remaining <= remaining - 1'b1;
          end
        end
      end
      // ---------------- output unit ----------------
      if (wr_r1) out <= r1[6:0];
      else if (tick) begin
        if (!silence) begin
          if (shreg[0]  && out < 7'd126) out <= out + 7'd2;
          if (!shreg[0] && out > 7'd1)   out <= out - 7'd2;
        end
        shreg <= shreg >> 1;
        if (bits_rem == '0) begin
          bits_rem <= 3'd7;
          if (buf_full) begin
            shreg    <= sample_buf;
            buf_full <= 1'b0;
            silence  <= 1'b0;
          end else begin
            silence  <= 1'b1;
          end
        end else begin
          bits_rem <= bits_rem - 1'b1;
        end
      end
      if (!r0[7]) irq <= 1'b0;
    end
  end
endmodule
