// apu: NES Audio Processing Unit, a secondary device on the memory bus
// at $4000-$4017.
// It holds the write-only channel registers ($4000-$4013), the channel
// enable / status register $4015 and the frame counter register $4017, and
// instantiates two square channels ($4000-$4003, $4004-$4007), the
// triangle ($4008-$400B), noise ($400C-$400F) and DMC ($4010-$4013)
// channels and the frame counter. A bus write updates the register at
// once; the matching write strobe reaches the channels one clock later so
// they see the new value together with the strobe. Reading $4015 returns
// {dmc_irq, frame_irq, 0, dmc_active, noise, tri, sq2, sq1 length status}
// one clock after 're' (registered read data) and clears the frame IRQ.
// irq is the OR of the frame and DMC interrupts. The DMC's stall and DMA
// request go to the CPU and the bus arbiter.
module apu
  import nes_pkg::*;
#(
  parameter int FRAME_QUARTER = 7457,
  parameter int DMC_ADDR_SHIFT = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pulse_cpu,
  input  logic        pulse_apu,
  // bus (secondary side)
  input  logic        sel,
  input  logic [4:0]  addr,
  input  logic [7:0]  wdata,
  input  logic        we,
  input  logic        re,
  output logic [7:0]  rdata,
  // DMC memory access
  output logic        stall,
  output logic        dma_req,
  output logic [15:0] dma_addr,
  input  logic [7:0]  dma_data,
  output logic        irq,
  // channel outputs
  output logic [3:0]  sq1_out,
  output logic [3:0]  sq2_out,
  output logic [3:0]  tri_out,
  output logic [3:0]  noise_out,
  output logic [6:0]  dmc_out
);
  logic [7:0]  regs [24];
  logic [23:0] wr_q;          // delayed write strobes, one per register
  logic        pulse_e, pulse_l, frame_irq, dmc_irq;
  logic        len1, len2, len3, len4, dmc_active;
  logic [14:0] lfsr_unused;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 24; i++) regs[i] <= '0;
      wr_q  <= '0;
      rdata <= '0;
    end else begin
      wr_q <= '0;
      if (sel && we && addr < 5'd24) begin
        regs[addr]  <= wdata;
        wr_q[addr]  <= 1'b1;
      end
      if (sel && re && addr == 5'h15)
        rdata <= {dmc_irq, frame_irq, 1'b0, dmc_active, len4, len3, len2, len1};
      else if (sel && re)
        rdata <= '0;
    end
  end

  frame_counter #(.QUARTER(FRAME_QUARTER)) u_frame (
    .clk, .rst, .pulse_cpu, .r4017(regs[5'h17]), .wr_4017(wr_q[5'h17]),
    .irq_clear(sel && re && addr == 5'h15), .pulse_e, .pulse_l, .irq(frame_irq)
  );

  square_channel #(.SWEEP_ONES_COMPLEMENT(1'b1)) u_sq1 (
    .clk, .rst, .pulse_apu, .pulse_e, .pulse_l,
    .r0(regs[0]), .r1(regs[1]), .r2(regs[2]), .r3(regs[3]),
    .wr_r1(wr_q[1]), .wr_r2(wr_q[2]), .wr_r3(wr_q[3]),
    .enable(regs[5'h15][0]), .out(sq1_out), .len_active(len1)
  );

  square_channel #(.SWEEP_ONES_COMPLEMENT(1'b0)) u_sq2 (
    .clk, .rst, .pulse_apu, .pulse_e, .pulse_l,
    .r0(regs[4]), .r1(regs[5]), .r2(regs[6]), .r3(regs[7]),
    .wr_r1(wr_q[5]), .wr_r2(wr_q[6]), .wr_r3(wr_q[7]),
    .enable(regs[5'h15][1]), .out(sq2_out), .len_active(len2)
  );

  triangle_channel u_tri (
    .clk, .rst, .pulse_cpu, .pulse_e, .pulse_l,
    .r0(regs[8]), .r1(regs[10]), .r2(regs[11]), .wr_r2(wr_q[11]),
    .enable(regs[5'h15][2]), .out(tri_out), .len_active(len3)
  );

  noise_channel u_noise (
    .clk, .rst, .pulse_apu, .pulse_e, .pulse_l,
    .r0(regs[12]), .r1(regs[14]), .r2(regs[15]), .wr_r2(wr_q[15]),
    .enable(regs[5'h15][3]), .out(noise_out), .len_active(len4),
    .lfsr(lfsr_unused)
  );

  dmc_channel #(.ADDR_SHIFT(DMC_ADDR_SHIFT)) u_dmc (
    .clk, .rst, .pulse_cpu,
    .r0(regs[16]), .r1(regs[17]), .r2(regs[18]), .r3(regs[19]),
    .wr_r1(wr_q[17]), .wr_status(wr_q[5'h15]), .status_en(regs[5'h15][4]),
    .stall, .dma_req, .dma_addr, .dma_data, .irq(dmc_irq),
    .active(dmc_active), .out(dmc_out)
  );

  assign irq = frame_irq | dmc_irq;
endmodule
