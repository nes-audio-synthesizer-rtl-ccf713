// cpu_execute: combinational 6502 executor (ALU and next-register logic).
// Given the decoded instruction, the current registers, the operand byte
// (the immediate byte in immediate mode, otherwise the byte read from
// memory) and the instruction's address, it computes the byte to write
// back to memory, the next A/X/Y/SP/SR and the next PC, plus the extra
// cycles caused by a taken branch (+1) and by a page crossing (+1 for a
// branch into another page or an indexed read crossing a page).
// Stack instructions (PHA/PHP/PLA/PLP/JSR/RTS/BRK/RTI) are completed by the
// CPU state machine; here they only leave the registers unchanged apart
// from the PC. JMP takes its target from 'target' (the absolute operand or
// the word fetched by the indirect mode). ADC/SBC work in binary only: the
// NES CPU has no decimal mode, so the D flag is stored but has no effect.
module cpu_execute
  import nes_pkg::*;
(
  input  d_inst_t     d,
  input  logic [7:0]  a, x, y, sp, sr,
  input  logic [15:0] pc,          // address of the opcode
  input  logic [7:0]  operand,
  input  logic [15:0] target,      // jump target / effective address
  input  logic        page_cross,  // indexed address crossed a page
  output e_inst_t     e
);
  logic [8:0]  sum;
  logic [7:0]  m, r;
  logic        take;
  logic [15:0] next_pc, br_pc;

  function automatic logic [7:0] nz(input logic [7:0] s, input logic [7:0] v);
    logic [7:0] o;
    o = s;
    o[SR_N] = v[7];
    o[SR_Z] = (v == 8'h00);
    return o;
  endfunction

  always_comb begin
    e              = '0;
    e.a            = a;
    e.x            = x;
    e.y            = y;
    e.sp           = sp;
    e.sr           = sr;
    next_pc        = pc + 16'(d.length);
    e.pc           = next_pc;
    e.data         = operand;
    e.extra_cycles = (d.page_penalty && page_cross) ? 2'd1 : 2'd0;
    m              = operand;
    sum            = '0;
    r              = '0;
    take           = 1'b0;
    br_pc          = next_pc + {{8{operand[7]}}, operand};

    case (d.itype)
      I_ADC, I_SBC: begin
        m      = (d.itype == I_SBC) ? ~operand : operand;
        sum    = {1'b0, a} + {1'b0, m} + {8'h00, sr[SR_C]};
        e.a    = sum[7:0];
        e.sr   = nz(sr, sum[7:0]);
        e.sr[SR_C] = sum[8];
        e.sr[SR_V] = (~(a[7] ^ m[7])) & (a[7] ^ sum[7]);
      end
      I_AND: begin e.a = a & operand; e.sr = nz(sr, a & operand); end
      I_ORA: begin e.a = a | operand; e.sr = nz(sr, a | operand); end
      I_EOR: begin e.a = a ^ operand; e.sr = nz(sr, a ^ operand); end
      I_CMP, I_CPX, I_CPY: begin
        r   = (d.itype == I_CMP) ? a : (d.itype == I_CPX) ? x : y;
        sum = {1'b0, r} - {1'b0, operand};
        e.sr = nz(sr, sum[7:0]);
        e.sr[SR_C] = (r >= operand);
      end
      I_BIT: begin
        e.sr = sr;
        e.sr[SR_Z] = ((a & operand) == 8'h00);
        e.sr[SR_N] = operand[7];
        e.sr[SR_V] = operand[6];
      end
      I_ASL, I_LSR, I_ROL, I_ROR: begin
        m = (d.amode == AM_ACC) ? a : operand;
        case (d.itype)
          I_ASL:   begin r = {m[6:0], 1'b0};      e.sr[SR_C] = m[7]; end
          I_ROL:   begin r = {m[6:0], sr[SR_C]};  e.sr[SR_C] = m[7]; end
          I_LSR:   begin r = {1'b0, m[7:1]};      e.sr[SR_C] = m[0]; end
          default: begin r = {sr[SR_C], m[7:1]};  e.sr[SR_C] = m[0]; end
        endcase
        e.sr[SR_N] = r[7];
        e.sr[SR_Z] = (r == 8'h00);
        if (d.amode == AM_ACC) e.a = r; else e.data = r;
      end
      I_INC: begin e.data = operand + 8'd1; e.sr = nz(sr, operand + 8'd1); end
      I_DEC: begin e.data = operand - 8'd1; e.sr = nz(sr, operand - 8'd1); end
      I_INX: begin e.x = x + 8'd1; e.sr = nz(sr, x + 8'd1); end
      I_INY: begin e.y = y + 8'd1; e.sr = nz(sr, y + 8'd1); end
      I_DEX: begin e.x = x - 8'd1; e.sr = nz(sr, x - 8'd1); end
      I_DEY: begin e.y = y - 8'd1; e.sr = nz(sr, y - 8'd1); end
      I_LDA: begin e.a = operand; e.sr = nz(sr, operand); end
      I_LDX: begin e.x = operand; e.sr = nz(sr, operand); end
      I_LDY: begin e.y = operand; e.sr = nz(sr, operand); end
      I_STA: e.data = a;
      I_STX: e.data = x;
      I_STY: e.data = y;
      I_TAX: begin e.x = a;  e.sr = nz(sr, a); end
      I_TAY: begin e.y = a;  e.sr = nz(sr, a); end
      I_TSX: begin e.x = sp; e.sr = nz(sr, sp); end
      I_TXA: begin e.a = x;  e.sr = nz(sr, x); end
      I_TYA: begin e.a = y;  e.sr = nz(sr, y); end
      I_TXS: e.sp = x;
      I_CLC: e.sr[SR_C] = 1'b0;
      I_SEC: e.sr[SR_C] = 1'b1;
      I_CLI: e.sr[SR_I] = 1'b0;
      I_SEI: e.sr[SR_I] = 1'b1;
      I_CLV: e.sr[SR_V] = 1'b0;
      I_CLD: e.sr[SR_D] = 1'b0;
      I_SED: e.sr[SR_D] = 1'b1;
      I_JMP: e.pc = target;
      I_BPL, I_BMI, I_BVC, I_BVS, I_BCC, I_BCS, I_BNE, I_BEQ: begin
        case (d.itype)
          I_BPL:   take = !sr[SR_N];
          I_BMI:   take =  sr[SR_N];
          I_BVC:   take = !sr[SR_V];
          I_BVS:   take =  sr[SR_V];
          I_BCC:   take = !sr[SR_C];
          I_BCS:   take =  sr[SR_C];
          I_BNE:   take = !sr[SR_Z];
          default: take =  sr[SR_Z];
        endcase
        if (take) begin
          e.pc = br_pc;
          e.extra_cycles = (br_pc[15:8] != next_pc[15:8]) ? 2'd2 : 2'd1;
        end
      end
      default: ;
    endcase
  end
endmodule
