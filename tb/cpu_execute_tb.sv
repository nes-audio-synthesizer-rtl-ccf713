// cpu_execute_tb: feeds the executor random registers and operands for a
// list of opcodes (decoded by cpu_decode) and compares every result field
// with a reference model written with integer arithmetic: ADC/SBC carry
// and signed overflow, compares, logic ops, shifts and rotates on A and
// memory, INC/DEC, loads/stores/transfers, flag instructions, JMP, and
// branches (taken/not taken, +1 cycle, +2 across a page) plus the indexed
// page-cross penalty.
module cpu_execute_tb;
  import nes_pkg::*;
  logic [7:0] opcode;
  d_inst_t d;
  logic [7:0] a, x, y, sp, sr, operand;
  logic [15:0] pc, target;
  logic page_cross;
  e_inst_t e;
  int checks = 0, failures = 0;
  logic clk = 0;

  cpu_decode  u_dec (.opcode, .d);
  cpu_execute dut (.d, .a, .x, .y, .sp, .sr, .pc, .operand, .target, .page_cross, .e);

  always #5 clk = ~clk;
  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] ops[$] = '{
    8'h69, 8'h65, 8'hE9, 8'hE5, 8'hC9, 8'hE0, 8'hC0, 8'h29, 8'h09, 8'h49, 8'h24,
    8'h0A, 8'h4A, 8'h2A, 8'h6A, 8'h06, 8'h46, 8'h26, 8'h66, 8'hE6, 8'hC6,
    8'hE8, 8'hC8, 8'hCA, 8'h88, 8'hA9, 8'hA2, 8'hA0, 8'h85, 8'h86, 8'h84,
    8'hAA, 8'hA8, 8'hBA, 8'h8A, 8'h98, 8'h9A, 8'h18, 8'h38, 8'h58, 8'h78,
    8'hB8, 8'hD8, 8'hF8, 8'h4C, 8'h10, 8'h30, 8'h50, 8'h70, 8'h90, 8'hB0,
    8'hD0, 8'hF0, 8'hBD, 8'hEA};

  int errs = 0;
  task automatic cmp(string f, int got, int exp);
    if (got != exp) begin
      errs++;
      if (errs < 10) $display("op %h %s: got %h exp %h (a=%h x=%h y=%h sr=%h m=%h)",
                              opcode, f, got, exp, a, x, y, sr, operand);
    end
  endtask

  initial begin
    int ea, ex, ey, esp, esr, epc, edata, ecyc, res, len;
    bit take;
    for (int it = 0; it < 20000; it++) begin
      int e0;
      e0 = errs;
      opcode = ops[$urandom_range(0, ops.size() - 1)];
      a = 8'($urandom); x = 8'($urandom); y = 8'($urandom); sp = 8'($urandom);
      sr = 8'($urandom) | 8'h20; operand = 8'($urandom);
      pc = 16'($urandom); target = 16'($urandom); page_cross = 1'($urandom);
      #1;
      len = (opcode inside {8'h0A, 8'h4A, 8'h2A, 8'h6A, 8'hE8, 8'hC8, 8'hCA, 8'h88, 8'hAA,
                            8'hA8, 8'hBA, 8'h8A, 8'h98, 8'h9A, 8'h18, 8'h38, 8'h58, 8'h78,
                            8'hB8, 8'hD8, 8'hF8, 8'hEA}) ? 1 :
            (opcode inside {8'h4C, 8'hBD}) ? 3 : 2;
      ea = a; ex = x; ey = y; esp = sp; esr = sr; epc = (pc + len) & 16'hFFFF;
      edata = operand; ecyc = 0; take = 0;
      case (opcode)
        8'h69, 8'h65, 8'hE9, 8'hE5: begin
          int m, s, sa, sm, ss;
          m = (opcode inside {8'hE9, 8'hE5}) ? (255 - operand) : operand;
          s = a + m + sr[0];
          ea = s & 255;
          sa = (a > 127) ? a - 256 : a; sm = (m > 127) ? m - 256 : m;
          ss = sa + sm + sr[0];
          esr[0] = s > 255; esr[6] = (ss > 127) || (ss < -128);
          esr[1] = ea == 0; esr[7] = ea > 127;
        end
        8'hC9, 8'hE0, 8'hC0: begin
          int r;
          r = (opcode == 8'hC9) ? a : (opcode == 8'hE0) ? x : y;
          res = (r - operand) & 255;
          esr[0] = r >= operand; esr[1] = r == operand; esr[7] = res > 127;
        end
        8'h29, 8'h09, 8'h49: begin
          ea = (opcode == 8'h29) ? (a & operand) : (opcode == 8'h09) ? (a | operand) : (a ^ operand);
          esr[1] = ea == 0; esr[7] = ea > 127;
        end
        8'h24: begin esr[1] = (a & operand) == 0; esr[7] = operand[7]; esr[6] = operand[6]; end
        8'h0A, 8'h4A, 8'h2A, 8'h6A, 8'h06, 8'h46, 8'h26, 8'h66: begin
          int v, c;
          v = (opcode[3]) ? a : operand;
          case (opcode[6:5])
            2'b00: begin res = (v * 2) & 255; c = v / 128; end
            2'b01: begin res = ((v * 2) + sr[0]) & 255; c = v / 128; end
            2'b10: begin res = v / 2; c = v % 2; end
            default: begin res = v / 2 + 128 * sr[0]; c = v % 2; end
          endcase
          if (opcode[3]) ea = res; else edata = res;
          esr[0] = c; esr[1] = res == 0; esr[7] = res > 127;
        end
        8'hE6, 8'hC6: begin
          res = (opcode == 8'hE6) ? (operand + 1) & 255 : (operand + 255) & 255;
          edata = res; esr[1] = res == 0; esr[7] = res > 127;
        end
        8'hE8: begin ex = (x + 1) & 255; esr[1] = ex == 0; esr[7] = ex > 127; end
        8'hC8: begin ey = (y + 1) & 255; esr[1] = ey == 0; esr[7] = ey > 127; end
        8'hCA: begin ex = (x + 255) & 255; esr[1] = ex == 0; esr[7] = ex > 127; end
        8'h88: begin ey = (y + 255) & 255; esr[1] = ey == 0; esr[7] = ey > 127; end
        8'hA9, 8'hBD: begin ea = operand; esr[1] = ea == 0; esr[7] = ea > 127;
                            if (opcode == 8'hBD) ecyc = page_cross; end
        8'hA2: begin ex = operand; esr[1] = ex == 0; esr[7] = ex > 127; end
        8'hA0: begin ey = operand; esr[1] = ey == 0; esr[7] = ey > 127; end
        8'h85: edata = a;
        8'h86: edata = x;
        8'h84: edata = y;
        8'hAA: begin ex = a;  esr[1] = ex == 0; esr[7] = ex > 127; end
        8'hA8: begin ey = a;  esr[1] = ey == 0; esr[7] = ey > 127; end
        8'hBA: begin ex = sp; esr[1] = ex == 0; esr[7] = ex > 127; end
        8'h8A: begin ea = x;  esr[1] = ea == 0; esr[7] = ea > 127; end
        8'h98: begin ea = y;  esr[1] = ea == 0; esr[7] = ea > 127; end
        8'h9A: esp = x;
        8'h18: esr[0] = 0;
        8'h38: esr[0] = 1;
        8'h58: esr[2] = 0;
        8'h78: esr[2] = 1;
        8'hB8: esr[6] = 0;
        8'hD8: esr[3] = 0;
        8'hF8: esr[3] = 1;
        8'h4C: epc = target;
        8'h10, 8'h30, 8'h50, 8'h70, 8'h90, 8'hB0, 8'hD0, 8'hF0: begin
          int flag, dest, off;
          flag = (opcode[7:6] == 0) ? sr[7] : (opcode[7:6] == 1) ? sr[6] :
                 (opcode[7:6] == 2) ? sr[0] : sr[1];
          take = (flag == opcode[5]);
          off = (operand > 127) ? operand - 256 : operand;
          if (take) begin
            dest = (epc + off) & 16'hFFFF;
            ecyc = ((dest >> 8) != (epc >> 8)) ? 2 : 1;
            epc = dest;
          end
        end
        default: ;
      endcase
      cmp("a", e.a, ea); cmp("x", e.x, ex); cmp("y", e.y, ey); cmp("sp", e.sp, esp);
      cmp("sr", e.sr, esr); cmp("pc", e.pc, epc); cmp("cycles", e.extra_cycles, ecyc);
      if (opcode inside {8'h06, 8'h46, 8'h26, 8'h66, 8'hE6, 8'hC6, 8'h85, 8'h86, 8'h84})
        cmp("data", e.data, edata);
      checks++;
      if (errs != e0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
