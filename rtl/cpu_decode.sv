// cpu_decode: combinational 6502 opcode decoder.
// A 151-entry case statement maps every official opcode to its basic
// operation (one of 56), its addressing mode, its base cycle count at the
// 1.79 MHz CPU clock (2..7) and whether an indexed read that crosses a
// 256-byte page costs one more cycle. From these the rest of the decoded
// instruction (d_inst) is derived by rule: ALU sources and destination,
// memory read/write flags, instruction length (1..3 bytes) and the stack
// operation. Unofficial opcodes decode with valid = 0; the CPU then stops
// in its error state. The result is available in the same cycle.
module cpu_decode
  import nes_pkg::*;
(
  input  logic [7:0] opcode,
  output d_inst_t    d
);
  typedef struct packed {
    inst_t      itype;
    amode_t     amode;
    logic [2:0] cycles;
    logic       pp;
  } tbl_t;

  tbl_t tbl;

  always_comb begin
    case (opcode)
      8'h00: tbl = '{I_BRK, AM_IMP, 3'd7, 1'b0};
      8'h01: tbl = '{I_ORA, AM_IZX, 3'd6, 1'b0};
      8'h05: tbl = '{I_ORA, AM_ZP, 3'd3, 1'b0};
      8'h06: tbl = '{I_ASL, AM_ZP, 3'd5, 1'b0};
      8'h08: tbl = '{I_PHP, AM_IMP, 3'd3, 1'b0};
      8'h09: tbl = '{I_ORA, AM_IMM, 3'd2, 1'b0};
      8'h0A: tbl = '{I_ASL, AM_ACC, 3'd2, 1'b0};
      8'h0D: tbl = '{I_ORA, AM_ABS, 3'd4, 1'b0};
      8'h0E: tbl = '{I_ASL, AM_ABS, 3'd6, 1'b0};
      8'h10: tbl = '{I_BPL, AM_REL, 3'd2, 1'b0};
      8'h11: tbl = '{I_ORA, AM_IZY, 3'd5, 1'b1};
      8'h15: tbl = '{I_ORA, AM_ZPX, 3'd4, 1'b0};
      8'h16: tbl = '{I_ASL, AM_ZPX, 3'd6, 1'b0};
      8'h18: tbl = '{I_CLC, AM_IMP, 3'd2, 1'b0};
      8'h19: tbl = '{I_ORA, AM_ABY, 3'd4, 1'b1};
      8'h1D: tbl = '{I_ORA, AM_ABX, 3'd4, 1'b1};
      8'h1E: tbl = '{I_ASL, AM_ABX, 3'd7, 1'b0};
      8'h20: tbl = '{I_JSR, AM_ABS, 3'd6, 1'b0};
      8'h21: tbl = '{I_AND, AM_IZX, 3'd6, 1'b0};
      8'h24: tbl = '{I_BIT, AM_ZP, 3'd3, 1'b0};
      8'h25: tbl = '{I_AND, AM_ZP, 3'd3, 1'b0};
      8'h26: tbl = '{I_ROL, AM_ZP, 3'd5, 1'b0};
      8'h28: tbl = '{I_PLP, AM_IMP, 3'd4, 1'b0};
      8'h29: tbl = '{I_AND, AM_IMM, 3'd2, 1'b0};
      8'h2A: tbl = '{I_ROL, AM_ACC, 3'd2, 1'b0};
      8'h2C: tbl = '{I_BIT, AM_ABS, 3'd4, 1'b0};
      8'h2D: tbl = '{I_AND, AM_ABS, 3'd4, 1'b0};
      8'h2E: tbl = '{I_ROL, AM_ABS, 3'd6, 1'b0};
      8'h30: tbl = '{I_BMI, AM_REL, 3'd2, 1'b0};
      8'h31: tbl = '{I_AND, AM_IZY, 3'd5, 1'b1};
      8'h35: tbl = '{I_AND, AM_ZPX, 3'd4, 1'b0};
      8'h36: tbl = '{I_ROL, AM_ZPX, 3'd6, 1'b0};
      8'h38: tbl = '{I_SEC, AM_IMP, 3'd2, 1'b0};
      8'h39: tbl = '{I_AND, AM_ABY, 3'd4, 1'b1};
      8'h3D: tbl = '{I_AND, AM_ABX, 3'd4, 1'b1};
      8'h3E: tbl = '{I_ROL, AM_ABX, 3'd7, 1'b0};
      8'h40: tbl = '{I_RTI, AM_IMP, 3'd6, 1'b0};
      8'h41: tbl = '{I_EOR, AM_IZX, 3'd6, 1'b0};
      8'h45: tbl = '{I_EOR, AM_ZP, 3'd3, 1'b0};
      8'h46: tbl = '{I_LSR, AM_ZP, 3'd5, 1'b0};
      8'h48: tbl = '{I_PHA, AM_IMP, 3'd3, 1'b0};
      8'h49: tbl = '{I_EOR, AM_IMM, 3'd2, 1'b0};
      8'h4A: tbl = '{I_LSR, AM_ACC, 3'd2, 1'b0};
      8'h4C: tbl = '{I_JMP, AM_ABS, 3'd3, 1'b0};
      8'h4D: tbl = '{I_EOR, AM_ABS, 3'd4, 1'b0};
      8'h4E: tbl = '{I_LSR, AM_ABS, 3'd6, 1'b0};
      8'h50: tbl = '{I_BVC, AM_REL, 3'd2, 1'b0};
      8'h51: tbl = '{I_EOR, AM_IZY, 3'd5, 1'b1};
      8'h55: tbl = '{I_EOR, AM_ZPX, 3'd4, 1'b0};
      8'h56: tbl = '{I_LSR, AM_ZPX, 3'd6, 1'b0};
      8'h58: tbl = '{I_CLI, AM_IMP, 3'd2, 1'b0};
      8'h59: tbl = '{I_EOR, AM_ABY, 3'd4, 1'b1};
      8'h5D: tbl = '{I_EOR, AM_ABX, 3'd4, 1'b1};
      8'h5E: tbl = '{I_LSR, AM_ABX, 3'd7, 1'b0};
      8'h60: tbl = '{I_RTS, AM_IMP, 3'd6, 1'b0};
      8'h61: tbl = '{I_ADC, AM_IZX, 3'd6, 1'b0};
      8'h65: tbl = '{I_ADC, AM_ZP, 3'd3, 1'b0};
      8'h66: tbl = '{I_ROR, AM_ZP, 3'd5, 1'b0};
      8'h68: tbl = '{I_PLA, AM_IMP, 3'd4, 1'b0};
      8'h69: tbl = '{I_ADC, AM_IMM, 3'd2, 1'b0};
      8'h6A: tbl = '{I_ROR, AM_ACC, 3'd2, 1'b0};
      8'h6C: tbl = '{I_JMP, AM_IND, 3'd5, 1'b0};
      8'h6D: tbl = '{I_ADC, AM_ABS, 3'd4, 1'b0};
      8'h6E: tbl = '{I_ROR, AM_ABS, 3'd6, 1'b0};
      8'h70: tbl = '{I_BVS, AM_REL, 3'd2, 1'b0};
      8'h71: tbl = '{I_ADC, AM_IZY, 3'd5, 1'b1};
      8'h75: tbl = '{I_ADC, AM_ZPX, 3'd4, 1'b0};
      8'h76: tbl = '{I_ROR, AM_ZPX, 3'd6, 1'b0};
      8'h78: tbl = '{I_SEI, AM_IMP, 3'd2, 1'b0};
      8'h79: tbl = '{I_ADC, AM_ABY, 3'd4, 1'b1};
      8'h7D: tbl = '{I_ADC, AM_ABX, 3'd4, 1'b1};
      8'h7E: tbl = '{I_ROR, AM_ABX, 3'd7, 1'b0};
      8'h81: tbl = '{I_STA, AM_IZX, 3'd6, 1'b0};
      8'h84: tbl = '{I_STY, AM_ZP, 3'd3, 1'b0};
      8'h85: tbl = '{I_STA, AM_ZP, 3'd3, 1'b0};
      8'h86: tbl = '{I_STX, AM_ZP, 3'd3, 1'b0};
      8'h88: tbl = '{I_DEY, AM_IMP, 3'd2, 1'b0};
      8'h8A: tbl = '{I_TXA, AM_IMP, 3'd2, 1'b0};
      8'h8C: tbl = '{I_STY, AM_ABS, 3'd4, 1'b0};
      8'h8D: tbl = '{I_STA, AM_ABS, 3'd4, 1'b0};
      8'h8E: tbl = '{I_STX, AM_ABS, 3'd4, 1'b0};
      8'h90: tbl = '{I_BCC, AM_REL, 3'd2, 1'b0};
      8'h91: tbl = '{I_STA, AM_IZY, 3'd6, 1'b0};
      8'h94: tbl = '{I_STY, AM_ZPX, 3'd4, 1'b0};
      8'h95: tbl = '{I_STA, AM_ZPX, 3'd4, 1'b0};
      8'h96: tbl = '{I_STX, AM_ZPY, 3'd4, 1'b0};
      8'h98: tbl = '{I_TYA, AM_IMP, 3'd2, 1'b0};
      8'h99: tbl = '{I_STA, AM_ABY, 3'd5, 1'b0};
      8'h9A: tbl = '{I_TXS, AM_IMP, 3'd2, 1'b0};
      8'h9D: tbl = '{I_STA, AM_ABX, 3'd5, 1'b0};
      8'hA0: tbl = '{I_LDY, AM_IMM, 3'd2, 1'b0};
      8'hA1: tbl = '{I_LDA, AM_IZX, 3'd6, 1'b0};
      8'hA2: tbl = '{I_LDX, AM_IMM, 3'd2, 1'b0};
      8'hA4: tbl = '{I_LDY, AM_ZP, 3'd3, 1'b0};
      8'hA5: tbl = '{I_LDA, AM_ZP, 3'd3, 1'b0};
      8'hA6: tbl = '{I_LDX, AM_ZP, 3'd3, 1'b0};
      8'hA8: tbl = '{I_TAY, AM_IMP, 3'd2, 1'b0};
      8'hA9: tbl = '{I_LDA, AM_IMM, 3'd2, 1'b0};
      8'hAA: tbl = '{I_TAX, AM_IMP, 3'd2, 1'b0};
      8'hAC: tbl = '{I_LDY, AM_ABS, 3'd4, 1'b0};
      8'hAD: tbl = '{I_LDA, AM_ABS, 3'd4, 1'b0};
      8'hAE: tbl = '{I_LDX, AM_ABS, 3'd4, 1'b0};
      8'hB0: tbl = '{I_BCS, AM_REL, 3'd2, 1'b0};
      8'hB1: tbl = '{I_LDA, AM_IZY, 3'd5, 1'b1};
      8'hB4: tbl = '{I_LDY, AM_ZPX, 3'd4, 1'b0};
      8'hB5: tbl = '{I_LDA, AM_ZPX, 3'd4, 1'b0};
      8'hB6: tbl = '{I_LDX, AM_ZPY, 3'd4, 1'b0};
      8'hB8: tbl = '{I_CLV, AM_IMP, 3'd2, 1'b0};
      8'hB9: tbl = '{I_LDA, AM_ABY, 3'd4, 1'b1};
      8'hBA: tbl = '{I_TSX, AM_IMP, 3'd2, 1'b0};
      8'hBC: tbl = '{I_LDY, AM_ABX, 3'd4, 1'b1};
      8'hBD: tbl = '{I_LDA, AM_ABX, 3'd4, 1'b1};
      8'hBE: tbl = '{I_LDX, AM_ABY, 3'd4, 1'b1};
      8'hC0: tbl = '{I_CPY, AM_IMM, 3'd2, 1'b0};
      8'hC1: tbl = '{I_CMP, AM_IZX, 3'd6, 1'b0};
      8'hC4: tbl = '{I_CPY, AM_ZP, 3'd3, 1'b0};
      8'hC5: tbl = '{I_CMP, AM_ZP, 3'd3, 1'b0};
      8'hC6: tbl = '{I_DEC, AM_ZP, 3'd5, 1'b0};
      8'hC8: tbl = '{I_INY, AM_IMP, 3'd2, 1'b0};
      8'hC9: tbl = '{I_CMP, AM_IMM, 3'd2, 1'b0};
      8'hCA: tbl = '{I_DEX, AM_IMP, 3'd2, 1'b0};
      8'hCC: tbl = '{I_CPY, AM_ABS, 3'd4, 1'b0};
      8'hCD: tbl = '{I_CMP, AM_ABS, 3'd4, 1'b0};
      8'hCE: tbl = '{I_DEC, AM_ABS, 3'd6, 1'b0};
      8'hD0: tbl = '{I_BNE, AM_REL, 3'd2, 1'b0};
      8'hD1: tbl = '{I_CMP, AM_IZY, 3'd5, 1'b1};
      8'hD5: tbl = '{I_CMP, AM_ZPX, 3'd4, 1'b0};
      8'hD6: tbl = '{I_DEC, AM_ZPX, 3'd6, 1'b0};
      8'hD8: tbl = '{I_CLD, AM_IMP, 3'd2, 1'b0};
      8'hD9: tbl = '{I_CMP, AM_ABY, 3'd4, 1'b1};
      8'hDD: tbl = '{I_CMP, AM_ABX, 3'd4, 1'b1};
      8'hDE: tbl = '{I_DEC, AM_ABX, 3'd7, 1'b0};
      8'hE0: tbl = '{I_CPX, AM_IMM, 3'd2, 1'b0};
      8'hE1: tbl = '{I_SBC, AM_IZX, 3'd6, 1'b0};
      8'hE4: tbl = '{I_CPX, AM_ZP, 3'd3, 1'b0};
      8'hE5: tbl = '{I_SBC, AM_ZP, 3'd3, 1'b0};
      8'hE6: tbl = '{I_INC, AM_ZP, 3'd5, 1'b0};
      8'hE8: tbl = '{I_INX, AM_IMP, 3'd2, 1'b0};
      8'hE9: tbl = '{I_SBC, AM_IMM, 3'd2, 1'b0};
      8'hEA: tbl = '{I_NOP, AM_IMP, 3'd2, 1'b0};
      8'hEC: tbl = '{I_CPX, AM_ABS, 3'd4, 1'b0};
      8'hED: tbl = '{I_SBC, AM_ABS, 3'd4, 1'b0};
      8'hEE: tbl = '{I_INC, AM_ABS, 3'd6, 1'b0};
      8'hF0: tbl = '{I_BEQ, AM_REL, 3'd2, 1'b0};
      8'hF1: tbl = '{I_SBC, AM_IZY, 3'd5, 1'b1};
      8'hF5: tbl = '{I_SBC, AM_ZPX, 3'd4, 1'b0};
      8'hF6: tbl = '{I_INC, AM_ZPX, 3'd6, 1'b0};
      8'hF8: tbl = '{I_SED, AM_IMP, 3'd2, 1'b0};
      8'hF9: tbl = '{I_SBC, AM_ABY, 3'd4, 1'b1};
      8'hFD: tbl = '{I_SBC, AM_ABX, 3'd4, 1'b1};
      8'hFE: tbl = '{I_INC, AM_ABX, 3'd7, 1'b0};
      default: tbl = '{I_INVALID, AM_IMP, 3'd2, 1'b0};
    endcase

    d              = '0;
    d.itype        = tbl.itype;
    d.amode        = tbl.amode;
    d.cycles       = tbl.cycles;
    d.page_penalty = tbl.pp;
    d.valid        = (tbl.itype != I_INVALID);

    case (tbl.amode)
      AM_IMP, AM_ACC:                                d.length = 2'd1;
      AM_ABS, AM_ABX, AM_ABY, AM_IND:                d.length = 2'd3;
      default:                                       d.length = 2'd2;
    endcase

    // Memory accesses for the operand
    case (tbl.itype)
      I_STA, I_STX, I_STY: d.mem_write = 1'b1;
      I_ASL, I_LSR, I_ROL, I_ROR, I_INC, I_DEC: begin
        d.mem_read  = (tbl.amode != AM_ACC);
        d.mem_write = (tbl.amode != AM_ACC);
      end
      I_JMP, I_JSR: ;
      default: d.mem_read = !(tbl.amode inside {AM_IMP, AM_ACC, AM_IMM, AM_REL});
    endcase

    // Sources and destination (informational for the executor)
    d.src1 = (tbl.amode == AM_IMM) ? SRC_IMM : (d.mem_read ? SRC_DATA : SRC_NONE);
    d.src2 = SRC_NONE;
    d.dest = DEST_NONE;
    case (tbl.itype)
      I_ADC, I_SBC, I_AND, I_ORA, I_EOR, I_CMP: d.src2 = SRC_A;
      I_CPX: d.src2 = SRC_X;
      I_CPY: d.src2 = SRC_Y;
      I_BIT: d.src2 = SRC_A;
      default: ;
    endcase
    case (tbl.itype)
      I_ADC, I_SBC, I_AND, I_ORA, I_EOR, I_LDA, I_TXA, I_TYA, I_PLA: d.dest = DEST_A;
      I_LDX, I_TAX, I_TSX, I_INX, I_DEX: d.dest = DEST_X;
      I_LDY, I_TAY, I_INY, I_DEY: d.dest = DEST_Y;
      I_TXS: d.dest = DEST_SP;
      I_STA, I_STX, I_STY, I_INC, I_DEC: d.dest = DEST_DATA;
      I_ASL, I_LSR, I_ROL, I_ROR: d.dest = (tbl.amode == AM_ACC) ? DEST_A : DEST_DATA;
      default: ;
    endcase
    case (tbl.itype)
      I_STA, I_PHA, I_TAX, I_TAY: d.src1 = SRC_A;
      I_STX, I_TXA, I_TXS, I_INX, I_DEX: d.src1 = SRC_X;
      I_STY, I_TYA, I_INY, I_DEY: d.src1 = SRC_Y;
      I_TSX: d.src1 = SRC_SP;
      I_ASL, I_LSR, I_ROL, I_ROR: if (tbl.amode == AM_ACC) d.src1 = SRC_A;
      default: ;
    endcase

    case (tbl.itype)
      I_PHA: d.stack_op = STK_PUSH_A;
      I_PHP: d.stack_op = STK_PUSH_SR;
      I_PLA: d.stack_op = STK_PULL_A;
      I_PLP: d.stack_op = STK_PULL_SR;
      I_JSR: d.stack_op = STK_JSR;
      I_RTS: d.stack_op = STK_RTS;
      I_BRK: d.stack_op = STK_BRK;
      I_RTI: d.stack_op = STK_RTI;
      default: d.stack_op = STK_NONE;
    endcase
  end
endmodule
