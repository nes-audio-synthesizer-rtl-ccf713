// nes_top: the NES audio synthesizer. It plays NES music (NSF files) by
// running the original game code on an instruction-level 6502 and feeding
// its register writes to an APU model whose five channels are mixed into
// an 8-bit PWM audio output.
// Blocks and bus (main devices in priority order: debugger, NSF player,
// DMC DMA, CPU; secondary devices: memory, APU):
//   controller_poll -> file_select -> nsf_player (file, song, pause)
//   nsf_player: SD card scan and load, CPU reset/stall, playback IRQ
//   cpu <-> mem_bus <-> memory (banked program RAM), apu ($4000-$4017)
//   apu -> mixer -> audio_pwm; apu -> level_display (+ title_blob) -> VGA
//   debugger: UART terminal, memory access, CPU registers and control.
// The SD card controller and the font ROM are outside this design: their
// byte-level ports are brought out (sd_*, font_*). The CPU is stalled by
// the player (loading / pause), the debugger and the DMC's DMA, and
// interrupted by the player's playback IRQ and the APU's IRQ.
// All logic runs on one 25 MHz clock with synchronous, active-high reset.
module nes_top
  import nes_pkg::*;
#(
  parameter int CLK_HZ    = 25_000_000,
  parameter int PRG_AW    = 18,
  parameter int SAMPLE_HZ = 15_000,
  parameter int BAUD      = 38_400,
  parameter int FRAME_QUARTER = 7457,
  parameter int PAD_BIT_HZ    = 50_000,
  parameter int PAD_POLL_HZ   = 500
) (
  input  logic        clk,
  input  logic        rst,
  // SD controller (byte interface)
  output logic        sd_rd,
  output logic [31:0] sd_addr,
  input  logic [7:0]  sd_dout,
  input  logic        sd_byte_available,
  input  logic        sd_ready,
  // NES gamepad
  input  logic        pad_data,
  output logic        pad_latch,
  output logic        pad_pulse,
  // debugger UART
  input  logic        uart_rx_in,
  output logic        uart_tx_out,
  // audio
  output logic        audio_pwm_out,
  output logic [7:0]  audio_sample,
  // VGA
  output logic [3:0]  vga_r, vga_g, vga_b,
  output logic        vga_hs, vga_vs,
  // font ROM for the title text
  output logic [7:0]  font_addr,
  input  logic [63:0] font_data,
  // hex display / LEDs
  output logic [3:0]  file_index,
  output logic [7:0]  song_index,
  output logic [7:0]  volume_leds,
  output fs_state_t   fs_state,
  output logic [4:0]  num_files,
  output logic        scan_done,
  output logic        playing,
  output logic        cpu_error,
  output logic [3:0]  sq1_out, sq2_out, tri_out, noise_out,
  output logic [6:0]  dmc_out
);
  localparam int N_MAIN = 4;
  localparam int M_DBG = 0, M_NSF = 1, M_DMA = 2, M_CPU = 3;

  logic        pulse_cpu, pulse_apu;
  logic [15:0] m_addr  [N_MAIN];
  logic [7:0]  m_wdata [N_MAIN];
  logic        m_rd    [N_MAIN];
  logic        m_wr    [N_MAIN];
  logic        grant   [N_MAIN];
  logic [7:0]  m_rdata;
  logic [15:0] mem_addr;
  logic [7:0]  mem_wdata, mem_rdata;
  logic        mem_we;
  logic [7:0]  bank_regs [8];
  logic        apu_sel, apu_we, apu_re;
  logic [4:0]  apu_addr;
  logic [7:0]  apu_wdata, apu_rdata;

  logic        dmc_stall, dma_req, apu_irq;
  logic [15:0] dma_addr;
  logic        nsf_cpu_rst, nsf_stall, nsf_irq;
  logic [7:0]  num_songs;
  logic        file_sel, play_toggle;
  logic [7:0]  buttons;
  logic        buttons_valid;
  logic [3:0]  vol_level;
  logic        dbg_cpu_rst;
  dbg_reg_t    dbg_sel;
  logic        dbg_we;
  logic [31:0] dbg_wdata, dbg_rdata;
  logic        cpu_waiting, cpu_inst_done, dbg_stall;
  logic [15:0] cpu_pc;
  logic [9:0]  hcount, vcount;
  logic        hsync, vsync, blank, frame_start;
  logic        sample_pulse;
  logic [$clog2(CLK_HZ / SAMPLE_HZ)-1:0] sample_div;
  logic [3:0]  wr, wg, wb;
  logic        title_px;

  pulse_gen #(.CLK_HZ(CLK_HZ)) u_pulse (.clk, .rst, .pulse_cpu, .pulse_apu);

  // ------------------------------------------------------------ bus
  mem_bus #(.N_MAIN(N_MAIN)) u_bus (
    .clk, .rst, .m_addr, .m_wdata, .m_rd, .m_wr, .grant, .m_rdata,
    .mem_addr, .mem_wdata, .mem_we, .mem_rdata,
    .apu_sel, .apu_addr, .apu_wdata, .apu_we, .apu_re, .apu_rdata
  );

  memory #(.PRG_AW(PRG_AW)) u_mem (
    .clk, .rst, .addr(mem_addr), .wdata(mem_wdata), .we(mem_we),
    .rdata(mem_rdata), .bank_out(bank_regs)
  );

  // The APU is reset with the CPU while a file loads, so the DMC cannot
  // take the bus during the load.
  apu #(.FRAME_QUARTER(FRAME_QUARTER)) u_apu (
    .clk, .rst(rst || nsf_cpu_rst), .pulse_cpu, .pulse_apu,
    .sel(apu_sel), .addr(apu_addr), .wdata(apu_wdata), .we(apu_we), .re(apu_re),
    .rdata(apu_rdata), .stall(dmc_stall), .dma_req, .dma_addr, .dma_data(m_rdata),
    .irq(apu_irq), .sq1_out, .sq2_out, .tri_out, .noise_out, .dmc_out
  );

  assign m_addr[M_DMA]  = dma_addr;
  assign m_wdata[M_DMA] = 8'h00;
  assign m_rd[M_DMA]    = dma_req;
  assign m_wr[M_DMA]    = 1'b0;

  // ------------------------------------------------------------ CPU
  cpu u_cpu (
    .clk, .rst(rst || nsf_cpu_rst || dbg_cpu_rst), .pulse_cpu,
    .stall(nsf_stall || dbg_stall || dmc_stall), .irq(nsf_irq || apu_irq),
    .mem_addr(m_addr[M_CPU]), .mem_wdata(m_wdata[M_CPU]),
    .mem_rd(m_rd[M_CPU]), .mem_wr(m_wr[M_CPU]), .mem_rdata(m_rdata),
    .dbg_sel, .dbg_we, .dbg_wdata, .dbg_rdata,
    .waiting(cpu_waiting), .inst_done(cpu_inst_done), .error(cpu_error), .pc_out(cpu_pc)
  );

  // ------------------------------------------------------ NSF player
  nsf_player #(.CLK_MHZ(CLK_HZ / 1_000_000), .PRG_AW(PRG_AW)) u_nsf (
    .clk, .rst, .sd_rd, .sd_addr, .sd_dout, .sd_byte_available, .sd_ready,
    .file_select(file_sel), .file(file_index), .song(song_index),
    .play_pause(play_toggle), .num_files, .scan_done, .num_songs, .playing,
    .bus_addr(m_addr[M_NSF]), .bus_wdata(m_wdata[M_NSF]), .bus_wr(m_wr[M_NSF]),
    .bus_grant(grant[M_NSF]), .cpu_rst(nsf_cpu_rst), .cpu_stall(nsf_stall), .irq(nsf_irq)
  );
  assign m_rd[M_NSF] = 1'b0;

  // ------------------------------------------------ user interface
  controller_poll #(.CLK_HZ(CLK_HZ), .POLL_HZ(PAD_POLL_HZ), .BIT_HZ(PAD_BIT_HZ)) u_pad (
    .clk, .rst, .data(pad_data), .latch(pad_latch), .pulse(pad_pulse),
    .buttons, .valid(buttons_valid)
  );

  file_select u_fs (
    .clk, .rst, .buttons, .num_files, .num_songs, .state(fs_state),
    .file_index, .song_index, .vol_level, .volume(volume_leds),
    .file_sel, .play_toggle
  );

  // ----------------------------------------------------------- audio
  mixer u_mix (
    .clk, .sq1(sq1_out), .sq2(sq2_out), .triangle(tri_out), .noise(noise_out),
    .dmc(dmc_out), .vol_level, .sample(audio_sample)
  );

  audio_pwm u_pwm (.clk, .rst, .sample(audio_sample), .pwm(audio_pwm_out));

  // --------------------------------------------------------- display
  vga u_vga (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .frame_start);

  always_ff @(posedge clk) begin
    if (rst) sample_div <= '0;
    else     sample_div <= (sample_div == $bits(sample_div)'(CLK_HZ / SAMPLE_HZ - 1)) ? '0 : sample_div + 1'b1;
  end
  assign sample_pulse = (sample_div == '0);

  level_display u_lvl (
    .clk, .rst, .hcount, .vcount, .hsync_in(hsync), .vsync_in(vsync), .blank,
    .frame_start, .sample_pulse, .ch0(sq1_out), .ch1(sq2_out), .ch2(tri_out),
    .ch3(noise_out), .r(wr), .g(wg), .b(wb), .hsync(vga_hs), .vsync(vga_vs)
  );

  title_blob u_title (
    .clk, .rst, .state(fs_state), .x_in(10'd8), .y_in(10'd4), .hcount, .vcount,
    .rom_addr(font_addr), .rom_data(font_data), .pixel(title_px)
  );

  assign vga_r = title_px ? 4'hF : wr;
  assign vga_g = title_px ? 4'hF : wg;
  assign vga_b = title_px ? 4'hF : wb;

  // -------------------------------------------------------- debugger
  debugger #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_dbg (
    .clk, .rst, .uart_rx_in, .uart_tx_out,
    .bus_addr(m_addr[M_DBG]), .bus_wdata(m_wdata[M_DBG]), .bus_rd(m_rd[M_DBG]),
    .bus_wr(m_wr[M_DBG]), .bus_grant(grant[M_DBG]), .bus_rdata(m_rdata),
    .dbg_sel, .dbg_we, .dbg_wdata, .dbg_rdata, .cpu_waiting, .cpu_inst_done,
    .cpu_pc, .cpu_stall(dbg_stall), .cpu_reset(dbg_cpu_rst)
  );
endmodule
