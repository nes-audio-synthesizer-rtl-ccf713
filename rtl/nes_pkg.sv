// nes_pkg: types and constants shared by the NES audio synthesizer.
// It holds the 6502 decoder/executor types (instruction type, addressing
// mode, register sources and destinations), the APU register map and the
// lookup tables whose contents are fixed NES constants: the length-counter
// table, the noise and DMC period tables, and the duty-cycle step counts.
// The noise period table is given in 895 kHz ticks (half the CPU clock)
// because the noise divider in this design runs on that pulse.
package nes_pkg;

  // ---------------------------------------------------------------- CPU ---
  typedef enum logic [5:0] {
    I_ADC, I_AND, I_ASL, I_BCC, I_BCS, I_BEQ, I_BIT, I_BMI, I_BNE, I_BPL,
    I_BRK, I_BVC, I_BVS, I_CLC, I_CLD, I_CLI, I_CLV, I_CMP, I_CPX, I_CPY,
    I_DEC, I_DEX, I_DEY, I_EOR, I_INC, I_INX, I_INY, I_JMP, I_JSR, I_LDA,
    I_LDX, I_LDY, I_LSR, I_NOP, I_ORA, I_PHA, I_PHP, I_PLA, I_PLP, I_ROL,
    I_ROR, I_RTI, I_RTS, I_SBC, I_SEC, I_SED, I_SEI, I_STA, I_STX, I_STY,
    I_TAX, I_TAY, I_TSX, I_TXA, I_TXS, I_TYA, I_INVALID
  } inst_t;

  typedef enum logic [3:0] {
    AM_IMP, AM_ACC, AM_IMM, AM_ZP, AM_ZPX, AM_ZPY, AM_ABS, AM_ABX, AM_ABY,
    AM_IND, AM_IZX, AM_IZY, AM_REL
  } amode_t;

  typedef enum logic [2:0] {
    SRC_NONE, SRC_A, SRC_X, SRC_Y, SRC_SP, SRC_DATA, SRC_IMM
  } src_t;

  typedef enum logic [2:0] {
    DEST_NONE, DEST_A, DEST_X, DEST_Y, DEST_SP, DEST_DATA
  } dest_t;

  // Stack operations an instruction performs, in the order they happen.
  typedef enum logic [3:0] {
    STK_NONE, STK_PUSH_A, STK_PUSH_SR, STK_PULL_A, STK_PULL_SR,
    STK_JSR, STK_RTS, STK_BRK, STK_RTI
  } stack_t;

  // Decoded instruction (d_inst).
  typedef struct packed {
    inst_t        itype;
    amode_t       amode;
    src_t         src1;
    src_t         src2;
    dest_t        dest;
    stack_t       stack_op;
    logic         mem_read;
    logic         mem_write;
    logic [1:0]   length;      // bytes in the instruction, 1..3
    logic [2:0]   cycles;      // base 1.79 MHz cycles, 2..7
    logic         page_penalty;// +1 cycle when an indexed read crosses a page
    logic         valid;
  } d_inst_t;

  // Status register bit positions.
  localparam int SR_C = 0, SR_Z = 1, SR_I = 2, SR_D = 3,
                 SR_B = 4, SR_U = 5, SR_V = 6, SR_N = 7;

  // Execution result (e_inst).
  typedef struct packed {
    logic [7:0]  data;       // byte to write to memory
    logic [7:0]  a, x, y, sp, sr;
    logic [15:0] pc;
    logic [1:0]  extra_cycles;
  } e_inst_t;

  // Debugger access to CPU registers over the 32-bit side bus.
  typedef enum logic [2:0] {
    DBG_A, DBG_X, DBG_Y, DBG_PC, DBG_SP, DBG_SR, DBG_ICOUNT, DBG_CCOUNT
  } dbg_reg_t;

  // ---------------------------------------------------------------- APU ---
  localparam logic [15:0] APU_BASE   = 16'h4000;
  localparam logic [15:0] APU_LAST   = 16'h4017;
  localparam logic [15:0] APU_STATUS = 16'h4015;
  localparam logic [15:0] APU_FRAME  = 16'h4017;

  // Length-counter load values, indexed by register bits 7:3.
  function automatic logic [7:0] length_lut(input logic [4:0] idx);
    logic [7:0] t [32] = '{
      8'd10, 8'd254, 8'd20, 8'd2,  8'd40, 8'd4,  8'd80, 8'd6,
      8'd160,8'd8,   8'd60, 8'd10, 8'd14, 8'd12, 8'd26, 8'd14,
      8'd12, 8'd16,  8'd24, 8'd18, 8'd48, 8'd20, 8'd96, 8'd22,
      8'd192,8'd24,  8'd72, 8'd26, 8'd16, 8'd28, 8'd32, 8'd30};
    return t[idx];
  endfunction

  // Noise timer lengths in 895 kHz ticks (NTSC CPU-cycle table halved).
  function automatic logic [11:0] noise_lut(input logic [3:0] idx);
    logic [11:0] t [16] = '{
      12'd2, 12'd4, 12'd8, 12'd16, 12'd32, 12'd48, 12'd64, 12'd80,
      12'd101, 12'd127, 12'd190, 12'd254, 12'd381, 12'd508, 12'd1017, 12'd2034};
    return t[idx];
  endfunction

  // DMC bit-rate timer lengths in 1.79 MHz CPU cycles (NTSC).
  function automatic logic [11:0] dmc_lut(input logic [3:0] idx);
    logic [11:0] t [16] = '{
      12'd428, 12'd380, 12'd340, 12'd320, 12'd286, 12'd254, 12'd226, 12'd214,
      12'd190, 12'd160, 12'd142, 12'd128, 12'd106, 12'd84,  12'd72,  12'd54};
    return t[idx];
  endfunction

  // Number of sounding steps (out of 8) for duty settings 12.5/25/50/75 %.
  function automatic logic [3:0] duty_steps(input logic [1:0] duty);
    case (duty)
      2'd0: return 4'd1;
      2'd1: return 4'd2;
      2'd2: return 4'd4;
      default: return 4'd6;
    endcase
  endfunction

  // -------------------------------------------------------- file select ---
  typedef enum logic [1:0] { FS_FILE_SELECT, FS_SONG_SELECT, FS_PLAYING } fs_state_t;

  // Gamepad button positions after controller_poll (active high).
  localparam int BTN_A = 0, BTN_B = 1, BTN_SELECT = 2, BTN_START = 3,
                 BTN_UP = 4, BTN_DOWN = 5, BTN_LEFT = 6, BTN_RIGHT = 7;

endpackage
