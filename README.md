# NES Audio Synthesizer in SystemVerilog

A hardware player for NSF music files (the sound format of Nintendo
Entertainment System games). A file is read from an SD card into RAM, a
6502-compatible CPU runs the file's own INIT and PLAY code, and that code
drives a copy of the NES audio unit (APU): two square channels, a triangle
channel, a noise channel and a delta-modulation (DMC) sample channel. The
channels are mixed through lookup tables and sent out as 8-bit PWM. A NES
gamepad picks the file and song, pauses and sets the volume; a VGA display
shows the four tone channels as waveforms plus a line of title text; a
serial debugger can read and write memory and CPU registers.

Everything runs from one 25 MHz clock with a synchronous active-high reset.
CPU timing comes from a 1.789773 MHz pulse made by a phase accumulator.

## How a file plays

1. **Scan.** After reset the player reads the SD card sector by sector. It
   notes each sector that starts with the `NESM` file tag and the song
   count of that file. It stops at a sector that starts with `END DATA`.
2. **Load.** When a song is chosen, the CPU and APU are held in reset. The
   player then clears RAM $0000-$7FFF and copies the file's data to its load
   address. When a 4 kB bank fills, it moves to the next bank by writing the
   bank register $5FF8. Last, it writes the initial bank values, a
   37-byte player routine at $5000 and the reset and IRQ vectors.
3. **Play.** The player raises an IRQ at the file's play rate, a period in
   microseconds taken from the header. The routine calls the file's INIT
   once, with the song number in A. After that it calls PLAY once per IRQ.
   Pause holds the CPU stalled and stops the IRQs.

**CPU timing.** An instruction does its memory accesses as quickly as the
25 MHz clock allows, each taking 3 clocks. The CPU then waits until the
number of 1.79 MHz cycles the original 6502 would have used has passed.
Page crossings and taken branches add cycles. So the music plays at the
original speed, even though each instruction's work takes only 5 to 17
clocks.

**Bus sharing.** Four main devices share the bus in fixed priority:
debugger, NSF player, DMC, CPU. A DMC sample fetch first stalls the CPU
at an instruction boundary, then takes the bus.

## Blocks (rtl/)

| File | What it does |
|---|---|
| `nes_top` | Wires all blocks together; the top of the design |
| `nes_pkg` | Shared types: opcode decode record, button numbers, menu states |
| `cpu` | 6502 state machine: fetch, decode, memory work, then wait until the original cycle count has passed; IRQ, BRK, RTI, stall |
| `cpu_decode` | Opcode to addressing mode, operation, length and cycle count (151 opcodes) |
| `cpu_execute` | Combinational ALU and next-register values |
| `mem_bus` | Four main devices (debugger, NSF player, DMC, CPU) in fixed priority; APU or memory as secondary |
| `memory` | 32 kB work RAM, 256 kB program RAM behind eight 4 kB bank registers at $5FF8-$5FFF |
| `pulse_gen` | CPU and APU (half rate) clock-enable pulses |
| `frame_counter` | 240 Hz and 120 Hz unit clocks, 60 Hz IRQ, 4- and 5-step modes |
| `square_channel`, `envelope`, `sweep`, `length_counter`, `divider` | Square wave channel and its units |
| `triangle_channel`, `noise_channel`, `dmc_channel` | The other three channels; the DMC fetches its samples over the bus and stalls the CPU while it does |
| `apu` | Register file $4000-$4017, $4015 status, the five channels |
| `mixer` | Square and triangle/noise/DMC lookup tables, volume scaling |
| `audio_pwm` | 8-bit PWM output |
| `nsf_player` | Scans the SD card for files, loads one (with bank switching), writes a small player routine and the vectors, raises the PLAY interrupt at the file's rate, pauses |
| `controller_poll` | Reads the NES gamepad at 500 Hz |
| `file_select` | File/song/playing menu and volume |
| `vga`, `level_sample`, `level_display`, `title_blob` | 640x480 60 Hz video: waveform capture and drawing, one line of text from an external font ROM |
| `uart_rx`, `uart_tx`, `debugger` | 38,400 bps serial debugger |

Each file opens with a comment on how the block works, its ports and
timing, and which parts are this design's own choices.

## Outside the design

* **SD card controller.** An existing controller is assumed. `nes_top` has its
  sector-read ports (`sd_rd`, `sd_addr`, `sd_dout`, `sd_byte_available`,
  `sd_ready`). The player does not buffer bytes: each byte is written to RAM
  before the next one arrives, so the controller must leave a few clocks
  between bytes.
* **Font ROM.** The glyphs are not part of the design. `font_addr` and
  `font_data` go to an 8x8 font ROM with 2 clocks of read latency.

## Limits

* The debugger commands are RD, WR, DP, PR, LD (memory), RA, RX, RY, RP,
  RR, PC, RI, RC (CPU register and counter reads), ST, RN, SS, BK (stall,
  run, single step, breakpoint), plus register writes WA, WX, WY, WP, WS,
  JP and a CPU reset RS. The original debugger had 25 commands. The names
  of the write and reset commands are this design's own, and one
  original command is not built because nothing is known about it.
* Decimal mode, PAL timing and expansion sound chips are not supported.
* Program RAM is 256 kB (18 address bits). Files that use banks above that
  wrap around.

## Choices beyond the original description

* The song count of every file is recorded during the scan, so the song
  menu works before the file is loaded.
* The APU is reset together with the CPU while a file loads.
* A DMC fetch stalls the CPU for 8 CPU cycles and uses the bus in the last
  2 of them.
* The bus priority order, the player's RAM locations $5080-$5082, the
  title position and the PWM rate (25 MHz / 256) are this design's own.
* The player does not buffer SD bytes (see above).

## Testbenches (tb/)

Each block has a self-checking testbench `<block>_tb.sv`. It prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.
The models `sd_model.sv` (SD card sectors) and `pad_model.sv` (gamepad
shift register) are shared.

`nes_top_tb` runs the whole design at its default parameters:

1. An SD image holds one file whose INIT routine starts all five channel
   types (the DMC as a looping sample).
2. Its PLAY routine, called every millisecond, sweeps the square period,
   reads $4015 and switches a bank to read its own code.
3. The gamepad model chooses the song, starts it, pauses and resumes it,
   and lowers the volume.
4. A terminal model reads a byte through the debugger.

The testbench counts every mechanism (each bus owner, DMC stalls, pause
stalls, both IRQ sources, bank switches, each channel sounding, PWM,
video frames, waveform and title pixels, menu changes, pad polls). Any
mechanism that never happens is a failure.

Verilator 5 command for one testbench:

    verilator --binary --timing -Irtl --top-module nes_top_tb \
      rtl/nes_pkg.sv $(ls rtl/*.sv | grep -v nes_pkg) tb/*.sv -o sim
    obj_dir/sim
