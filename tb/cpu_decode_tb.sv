// cpu_decode_tb: checks the decoder against a hand-written table of
// reference opcodes (operation, addressing mode, base cycles, length,
// page-cross penalty, memory read/write flags and stack operation),
// checks that exactly 151 opcodes are valid, that a set of unofficial
// opcodes are invalid, and that length and memory flags agree with the
// addressing mode for every valid opcode.
module cpu_decode_tb;
  import nes_pkg::*;
  logic [7:0] opcode;
  d_inst_t d;
  int checks = 0, failures = 0;
  logic clk = 0;

  cpu_decode dut (.opcode, .d);

  always #5 clk = ~clk;
  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [7:0] op; inst_t it; amode_t am; int cyc; int len; bit pp; bit rd; bit wr; stack_t st;
  } ref_t;

  ref_t refs[$] = '{
    '{8'hA9, I_LDA, AM_IMM, 2, 2, 0, 0, 0, STK_NONE},
    '{8'hA5, I_LDA, AM_ZP,  3, 2, 0, 1, 0, STK_NONE},
    '{8'hB5, I_LDA, AM_ZPX, 4, 2, 0, 1, 0, STK_NONE},
    '{8'hAD, I_LDA, AM_ABS, 4, 3, 0, 1, 0, STK_NONE},
    '{8'hBD, I_LDA, AM_ABX, 4, 3, 1, 1, 0, STK_NONE},
    '{8'hB9, I_LDA, AM_ABY, 4, 3, 1, 1, 0, STK_NONE},
    '{8'hA1, I_LDA, AM_IZX, 6, 2, 0, 1, 0, STK_NONE},
    '{8'hB1, I_LDA, AM_IZY, 5, 2, 1, 1, 0, STK_NONE},
    '{8'h9D, I_STA, AM_ABX, 5, 3, 0, 0, 1, STK_NONE},
    '{8'h91, I_STA, AM_IZY, 6, 2, 0, 0, 1, STK_NONE},
    '{8'h85, I_STA, AM_ZP,  3, 2, 0, 0, 1, STK_NONE},
    '{8'h0E, I_ASL, AM_ABS, 6, 3, 0, 1, 1, STK_NONE},
    '{8'h1E, I_ASL, AM_ABX, 7, 3, 0, 1, 1, STK_NONE},
    '{8'h0A, I_ASL, AM_ACC, 2, 1, 0, 0, 0, STK_NONE},
    '{8'h6A, I_ROR, AM_ACC, 2, 1, 0, 0, 0, STK_NONE},
    '{8'h4C, I_JMP, AM_ABS, 3, 3, 0, 0, 0, STK_NONE},
    '{8'h6C, I_JMP, AM_IND, 5, 3, 0, 0, 0, STK_NONE},
    '{8'h20, I_JSR, AM_ABS, 6, 3, 0, 0, 0, STK_JSR},
    '{8'h60, I_RTS, AM_IMP, 6, 1, 0, 0, 0, STK_RTS},
    '{8'h40, I_RTI, AM_IMP, 6, 1, 0, 0, 0, STK_RTI},
    '{8'h00, I_BRK, AM_IMP, 7, 1, 0, 0, 0, STK_BRK},
    '{8'h48, I_PHA, AM_IMP, 3, 1, 0, 0, 0, STK_PUSH_A},
    '{8'h68, I_PLA, AM_IMP, 4, 1, 0, 0, 0, STK_PULL_A},
    '{8'h08, I_PHP, AM_IMP, 3, 1, 0, 0, 0, STK_PUSH_SR},
    '{8'h28, I_PLP, AM_IMP, 4, 1, 0, 0, 0, STK_PULL_SR},
    '{8'hD0, I_BNE, AM_REL, 2, 2, 0, 0, 0, STK_NONE},
    '{8'h10, I_BPL, AM_REL, 2, 2, 0, 0, 0, STK_NONE},
    '{8'hEA, I_NOP, AM_IMP, 2, 1, 0, 0, 0, STK_NONE},
    '{8'hB6, I_LDX, AM_ZPY, 4, 2, 0, 1, 0, STK_NONE},
    '{8'hBE, I_LDX, AM_ABY, 4, 3, 1, 1, 0, STK_NONE},
    '{8'hBC, I_LDY, AM_ABX, 4, 3, 1, 1, 0, STK_NONE},
    '{8'h96, I_STX, AM_ZPY, 4, 2, 0, 0, 1, STK_NONE},
    '{8'h8C, I_STY, AM_ABS, 4, 3, 0, 0, 1, STK_NONE},
    '{8'hE6, I_INC, AM_ZP,  5, 2, 0, 1, 1, STK_NONE},
    '{8'hFE, I_INC, AM_ABX, 7, 3, 0, 1, 1, STK_NONE},
    '{8'hCE, I_DEC, AM_ABS, 6, 3, 0, 1, 1, STK_NONE},
    '{8'h24, I_BIT, AM_ZP,  3, 2, 0, 1, 0, STK_NONE},
    '{8'h2C, I_BIT, AM_ABS, 4, 3, 0, 1, 0, STK_NONE},
    '{8'hC0, I_CPY, AM_IMM, 2, 2, 0, 0, 0, STK_NONE},
    '{8'hE0, I_CPX, AM_IMM, 2, 2, 0, 0, 0, STK_NONE},
    '{8'hD9, I_CMP, AM_ABY, 4, 3, 1, 1, 0, STK_NONE},
    '{8'h71, I_ADC, AM_IZY, 5, 2, 1, 1, 0, STK_NONE},
    '{8'hE9, I_SBC, AM_IMM, 2, 2, 0, 0, 0, STK_NONE},
    '{8'h5D, I_EOR, AM_ABX, 4, 3, 1, 1, 0, STK_NONE},
    '{8'h01, I_ORA, AM_IZX, 6, 2, 0, 1, 0, STK_NONE},
    '{8'h3D, I_AND, AM_ABX, 4, 3, 1, 1, 0, STK_NONE},
    '{8'h9A, I_TXS, AM_IMP, 2, 1, 0, 0, 0, STK_NONE},
    '{8'hBA, I_TSX, AM_IMP, 2, 1, 0, 0, 0, STK_NONE},
    '{8'hAA, I_TAX, AM_IMP, 2, 1, 0, 0, 0, STK_NONE},
    '{8'h98, I_TYA, AM_IMP, 2, 1, 0, 0, 0, STK_NONE},
    '{8'hF8, I_SED, AM_IMP, 2, 1, 0, 0, 0, STK_NONE},
    '{8'h58, I_CLI, AM_IMP, 2, 1, 0, 0, 0, STK_NONE},
    '{8'hB8, I_CLV, AM_IMP, 2, 1, 0, 0, 0, STK_NONE},
    '{8'h56, I_LSR, AM_ZPX, 6, 2, 0, 1, 1, STK_NONE},
    '{8'h3E, I_ROL, AM_ABX, 7, 3, 0, 1, 1, STK_NONE}
  };
  logic [7:0] bad[$] = '{8'h02, 8'h03, 8'h04, 8'h1A, 8'h80, 8'h89, 8'h9E, 8'h9C,
                         8'hFF, 8'hEB, 8'h0C, 8'hB3};

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int nvalid, lerr, merr;
    foreach (refs[i]) begin
      opcode = refs[i].op; #1;
      chk($sformatf("%h valid", opcode), d.valid, 1);
      chk($sformatf("%h itype", opcode), d.itype, refs[i].it);
      chk($sformatf("%h amode", opcode), d.amode, refs[i].am);
      chk($sformatf("%h cycles", opcode), d.cycles, refs[i].cyc);
      chk($sformatf("%h length", opcode), d.length, refs[i].len);
      chk($sformatf("%h page", opcode), d.page_penalty, refs[i].pp);
      chk($sformatf("%h mem_read", opcode), d.mem_read, refs[i].rd);
      chk($sformatf("%h mem_write", opcode), d.mem_write, refs[i].wr);
      chk($sformatf("%h stack", opcode), d.stack_op, refs[i].st);
    end
    foreach (bad[i]) begin
      opcode = bad[i]; #1;
      chk($sformatf("%h invalid", opcode), d.valid, 0);
    end
    nvalid = 0; lerr = 0; merr = 0;
    for (int o = 0; o < 256; o++) begin
      opcode = 8'(o); #1;
      if (d.valid) begin
        int el;
        nvalid++;
        el = (d.amode inside {AM_IMP, AM_ACC}) ? 1 :
             (d.amode inside {AM_ABS, AM_ABX, AM_ABY, AM_IND}) ? 3 : 2;
        if (d.length != el) lerr++;
        if ((d.amode inside {AM_IMP, AM_ACC, AM_IMM, AM_REL}) && (d.mem_read || d.mem_write)) merr++;
        if (d.cycles < 2 || d.cycles > 7) lerr++;
      end
    end
    chk("151 valid opcodes", nvalid, 151);
    chk("length by mode", lerr, 0);
    chk("no memory access in implied/imm/rel", merr, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
