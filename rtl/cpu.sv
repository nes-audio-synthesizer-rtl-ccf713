// cpu: instruction-level 6502 CPU, a main device on the memory bus.
// Each instruction is carried out by a state machine on the 25 MHz clock:
// opcode fetch, decode (cpu_decode), up to two operand bytes, up to two
// indirect-pointer bytes, an optional data read, one execute cycle
// (cpu_execute), an optional data write and the stack / vector states
// (push or pull of A, SR, PCH, PCL; reset and IRQ vectors). Every memory
// access state lasts 3 clocks: address and read strobe are held for all 3
// and the byte is taken on the third (the memory answers one clock after
// the address); writes pulse mem_wr on the first clock. The longest
// instruction (read-modify-write absolute, e.g. ASL $8000) takes 17 clocks.
// The CPU then waits in WAIT until the 6502's cycle count for the
// instruction (base + branch/page extras) has elapsed in 1.79 MHz
// pulse_cpu ticks, so programs run at the original speed.
// Reset loads PC from $FFFC/$FFFD. A rising edge on irq is latched at any
// time; at the next instruction boundary, if the I flag is clear, a BRK is
// injected instead of fetching an opcode (pushed B flag clear, PC of the
// next instruction pushed), which vectors through $FFFE/$FFFF.
// 'stall' holds the CPU at an instruction boundary (STALL state). An
// invalid opcode sends it to ERROR until reset or an IRQ.
// A 32-bit side bus lets the debugger read and, while the CPU waits at an
// instruction boundary, write A/X/Y/PC/SP/SR and the instruction and
// cycle counters; 'waiting' is high at instruction boundaries and
// 'inst_done' pulses once per completed instruction.
module cpu
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        pulse_cpu,
  input  logic        stall,
  input  logic        irq,
  // memory bus (main device)
  output logic [15:0] mem_addr,
  output logic [7:0]  mem_wdata,
  output logic        mem_rd,
  output logic        mem_wr,
  input  logic [7:0]  mem_rdata,
  // debugger side bus
  input  dbg_reg_t    dbg_sel,
  input  logic        dbg_we,
  input  logic [31:0] dbg_wdata,
  output logic [31:0] dbg_rdata,
  output logic        waiting,
  output logic        inst_done,
  output logic        error,
  output logic [15:0] pc_out
);
  typedef enum logic [4:0] {
    S_STALL, S_FETCH, S_DECODE, S_IMML, S_IMMH, S_IND_L, S_IND_H, S_READ,
    S_EXEC, S_WRITE, S_PUSH_PCH, S_PUSH_PCL, S_PUSH_SR, S_PUSH_A,
    S_PULL_SR, S_PULL_A, S_PULL_PCL, S_PULL_PCH, S_VEC_L, S_VEC_H,
    S_WAIT, S_ERROR
  } state_t;

  state_t      state;
  logic [1:0]  acc_cnt;
  logic        acc_done;
  logic [7:0]  a, x, y, sp, sr;
  logic [15:0] pc, pc_op;
  logic [7:0]  opcode;
  logic [15:0] op_imm;
  logic [7:0]  ind_lo, ind_hi;
  logic [7:0]  op_data;
  logic [7:0]  wr_data;
  logic [7:0]  vec_lo;
  logic        vec_reset;
  logic        brk_inj;
  logic        irq_q, irq_pending;
  logic        aligned;
  logic [3:0]  cyc_cnt, ncyc;
  logic [31:0] icount, ccount;
  d_inst_t     d;
  e_inst_t     e;
  logic [15:0] eff, ptr_lo, ptr_hi, ret_addr;
  logic        page_cross;

  cpu_decode  u_dec (.opcode, .d);
  cpu_execute u_exe (
    .d, .a, .x, .y, .sp, .sr, .pc(pc_op),
    .operand((d.amode inside {AM_IMM, AM_REL}) ? op_imm[7:0] : op_data),
    .target(eff), .page_cross, .e
  );

  // Effective address and indirect pointer locations
  always_comb begin
    eff        = op_imm;
    page_cross = 1'b0;
    ptr_lo     = op_imm;
    ptr_hi     = {op_imm[15:8], op_imm[7:0] + 8'd1};   // page-wrap bug of JMP ($xxFF)
    case (d.amode)
      AM_ZP:  eff = {8'h00, op_imm[7:0]};
      AM_ZPX: eff = {8'h00, op_imm[7:0] + x};
      AM_ZPY: eff = {8'h00, op_imm[7:0] + y};
      AM_ABS: eff = op_imm;
      AM_ABX: begin eff = op_imm + {8'h00, x}; page_cross = (eff[15:8] != op_imm[15:8]); end
      AM_ABY: begin eff = op_imm + {8'h00, y}; page_cross = (eff[15:8] != op_imm[15:8]); end
      AM_IND: eff = {ind_hi, ind_lo};
      AM_IZX: begin
        eff    = {ind_hi, ind_lo};
        ptr_lo = {8'h00, op_imm[7:0] + x};
        ptr_hi = {8'h00, op_imm[7:0] + x + 8'd1};
      end
      AM_IZY: begin
        eff        = {ind_hi, ind_lo} + {8'h00, y};
        page_cross = (eff[15:8] != ind_hi);
        ptr_lo     = {8'h00, op_imm[7:0]};
        ptr_hi     = {8'h00, op_imm[7:0] + 8'd1};
      end
      default: ;
    endcase
    ret_addr = brk_inj ? pc_op : pc_op + 16'd2;
  end

  // Memory interface
  always_comb begin
    mem_addr  = '0;
    mem_rd    = 1'b0;
    mem_wr    = 1'b0;
    mem_wdata = wr_data;
    case (state)
      S_FETCH:    begin mem_addr = pc;                 mem_rd = 1'b1; end
      S_IMML:     begin mem_addr = pc_op + 16'd1;      mem_rd = 1'b1; end
      S_IMMH:     begin mem_addr = pc_op + 16'd2;      mem_rd = 1'b1; end
      S_IND_L:    begin mem_addr = ptr_lo;             mem_rd = 1'b1; end
      S_IND_H:    begin mem_addr = ptr_hi;             mem_rd = 1'b1; end
      S_READ:     begin mem_addr = eff;                mem_rd = 1'b1; end
      S_WRITE:    begin mem_addr = eff;                mem_wr = (acc_cnt == 2'd0); end
      S_PUSH_PCH: begin mem_addr = {8'h01, sp}; mem_wdata = ret_addr[15:8]; mem_wr = (acc_cnt == 2'd0); end
      S_PUSH_PCL: begin mem_addr = {8'h01, sp}; mem_wdata = ret_addr[7:0];  mem_wr = (acc_cnt == 2'd0); end
      S_PUSH_SR:  begin
        mem_addr  = {8'h01, sp};
        mem_wdata = sr | 8'h20 | ((d.itype == I_BRK && brk_inj) ? 8'h00 : 8'h10);
        mem_wr    = (acc_cnt == 2'd0);
      end
      S_PUSH_A:   begin mem_addr = {8'h01, sp}; mem_wdata = a; mem_wr = (acc_cnt == 2'd0); end
      S_PULL_SR, S_PULL_A, S_PULL_PCL, S_PULL_PCH:
                  begin mem_addr = {8'h01, sp + 8'd1}; mem_rd = 1'b1; end
      S_VEC_L:    begin mem_addr = vec_reset ? 16'hFFFC : 16'hFFFE; mem_rd = 1'b1; end
      S_VEC_H:    begin mem_addr = vec_reset ? 16'hFFFD : 16'hFFFF; mem_rd = 1'b1; end
      default: ;
    endcase
  end

  assign acc_done  = (acc_cnt == 2'd2);
  assign waiting   = (state == S_STALL);
  assign error     = (state == S_ERROR);
  assign pc_out    = pc;

  always_comb begin
    case (dbg_sel)
      DBG_A:      dbg_rdata = {24'h0, a};
      DBG_X:      dbg_rdata = {24'h0, x};
      DBG_Y:      dbg_rdata = {24'h0, y};
      DBG_PC:     dbg_rdata = {16'h0, pc};
      DBG_SP:     dbg_rdata = {24'h0, sp};
      DBG_SR:     dbg_rdata = {24'h0, sr};
      DBG_ICOUNT: dbg_rdata = icount;
      default:    dbg_rdata = ccount;
    endcase
  end

  // Next state after the operand bytes are in
  function automatic state_t after_operands(input d_inst_t di);
    if (di.amode inside {AM_IND, AM_IZX, AM_IZY}) return S_IND_L;
    if (di.mem_read) return S_READ;
    return S_EXEC;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_VEC_L;
      vec_reset   <= 1'b1;
      acc_cnt     <= '0;
      a <= '0; x <= '0; y <= '0; sp <= 8'hFD; sr <= 8'h24;
      pc <= '0; pc_op <= '0; opcode <= 8'hEA; op_imm <= '0;
      ind_lo <= '0; ind_hi <= '0; op_data <= '0; wr_data <= '0; vec_lo <= '0;
      brk_inj     <= 1'b0;
      irq_q       <= 1'b0;
      irq_pending <= 1'b0;
      aligned     <= 1'b0;
      cyc_cnt     <= '0;
      ncyc        <= 4'd2;
      icount      <= '0;
      ccount      <= '0;
      inst_done   <= 1'b0;
    end else begin
      inst_done <= 1'b0;
      irq_q     <= irq;
      if (irq && !irq_q) irq_pending <= 1'b1;
      if (pulse_cpu && state != S_STALL && state != S_ERROR) cyc_cnt <= cyc_cnt + 1'b1;

      // memory access sub-cycle counter
      if (state inside {S_FETCH, S_IMML, S_IMMH, S_IND_L, S_IND_H, S_READ, S_WRITE,
                        S_PUSH_PCH, S_PUSH_PCL, S_PUSH_SR, S_PUSH_A, S_PULL_SR,
                        S_PULL_A, S_PULL_PCL, S_PULL_PCH, S_VEC_L, S_VEC_H})
        acc_cnt <= acc_done ? 2'd0 : acc_cnt + 1'b1;
      else
        acc_cnt <= '0;

      case (state)
        S_STALL: begin
          if (pulse_cpu) aligned <= 1'b0;
          if (dbg_we) begin
            case (dbg_sel)
              DBG_A:      a      <= dbg_wdata[7:0];
              DBG_X:      x      <= dbg_wdata[7:0];
              DBG_Y:      y      <= dbg_wdata[7:0];
              DBG_PC:     pc     <= dbg_wdata[15:0];
              DBG_SP:     sp     <= dbg_wdata[7:0];
              DBG_SR:     sr     <= dbg_wdata[7:0];
              DBG_ICOUNT: icount <= dbg_wdata;
              default:    ccount <= dbg_wdata;
            endcase
          end else if (!stall && (aligned || pulse_cpu)) begin
            cyc_cnt <= '0;
            pc_op   <= pc;
            op_imm  <= '0;
            if (irq_pending && !sr[SR_I]) begin
              irq_pending <= 1'b0;
              brk_inj     <= 1'b1;
              opcode      <= 8'h00;
              state       <= S_DECODE;
            end else begin
              brk_inj <= 1'b0;
              state   <= S_FETCH;
            end
          end
        end
        S_FETCH: if (acc_done) begin opcode <= mem_rdata; state <= S_DECODE; end
        S_DECODE: begin
          ncyc <= 4'(d.cycles);
          if (!d.valid)              state <= S_ERROR;
          else if (brk_inj)          state <= S_EXEC;
          else if (d.length != 2'd1) state <= S_IMML;
          else                       state <= after_operands(d);
        end
        S_IMML: if (acc_done) begin
          op_imm[7:0] <= mem_rdata;
          state <= (d.length == 2'd3) ? S_IMMH : after_operands(d);
        end
        S_IMMH: if (acc_done) begin op_imm[15:8] <= mem_rdata; state <= after_operands(d); end
        S_IND_L: if (acc_done) begin ind_lo <= mem_rdata; state <= S_IND_H; end
        S_IND_H: if (acc_done) begin
          ind_hi <= mem_rdata;
          state  <= d.mem_read ? S_READ : S_EXEC;
        end
        S_READ: if (acc_done) begin op_data <= mem_rdata; state <= S_EXEC; end
        S_EXEC: begin
          a  <= e.a; x <= e.x; y <= e.y; sp <= e.sp; sr <= e.sr;
          pc <= e.pc;
          wr_data <= e.data;
          ncyc <= ncyc + 4'(e.extra_cycles);
          if (d.mem_write) state <= S_WRITE;
          else case (d.stack_op)
            STK_PUSH_A:       state <= S_PUSH_A;
            STK_PUSH_SR:      state <= S_PUSH_SR;
            STK_PULL_A:       state <= S_PULL_A;
            STK_PULL_SR, STK_RTI: state <= S_PULL_SR;
            STK_JSR, STK_BRK: state <= S_PUSH_PCH;
            STK_RTS:          state <= S_PULL_PCL;
            default:          state <= S_WAIT;
          endcase
        end
        S_WRITE: if (acc_done) state <= S_WAIT;
        S_PUSH_A: if (acc_done) begin sp <= sp - 8'd1; state <= S_WAIT; end
        S_PUSH_PCH: if (acc_done) begin sp <= sp - 8'd1; state <= S_PUSH_PCL; end
        S_PUSH_PCL: if (acc_done) begin
          sp <= sp - 8'd1;
          if (d.stack_op == STK_BRK) state <= S_PUSH_SR;
          else begin pc <= op_imm; state <= S_WAIT; end   // JSR
        end
        S_PUSH_SR: if (acc_done) begin
          sp <= sp - 8'd1;
          if (d.stack_op == STK_BRK) begin vec_reset <= 1'b0; state <= S_VEC_L; end
          else state <= S_WAIT;
        end
        S_PULL_A: if (acc_done) begin
          sp <= sp + 8'd1;
          a  <= mem_rdata;
          sr[SR_N] <= mem_rdata[7];
          sr[SR_Z] <= (mem_rdata == 8'h00);
          state <= S_WAIT;
        end
        S_PULL_SR: if (acc_done) begin
          sp <= sp + 8'd1;
          sr <= (mem_rdata & 8'hCF) | 8'h20;
          state <= (d.stack_op == STK_RTI) ? S_PULL_PCL : S_WAIT;
        end
        S_PULL_PCL: if (acc_done) begin sp <= sp + 8'd1; pc[7:0] <= mem_rdata; state <= S_PULL_PCH; end
        S_PULL_PCH: if (acc_done) begin
          sp <= sp + 8'd1;
          pc <= (d.stack_op == STK_RTS) ? {mem_rdata, pc[7:0]} + 16'd1 : {mem_rdata, pc[7:0]};
          state <= S_WAIT;
        end
        S_VEC_L: if (acc_done) begin vec_lo <= mem_rdata; state <= S_VEC_H; end
        S_VEC_H: if (acc_done) begin
          pc <= {mem_rdata, vec_lo};
          if (vec_reset) begin
            state   <= S_STALL;
            aligned <= 1'b0;
          end else begin
            sr[SR_I] <= 1'b1;
            state    <= S_WAIT;
          end
        end
        S_WAIT: if (pulse_cpu && cyc_cnt + 4'd1 >= ncyc) begin
          state     <= S_STALL;
          aligned   <= 1'b1;
          inst_done <= 1'b1;
          icount    <= icount + 1'b1;
          ccount    <= ccount + 32'(ncyc);
        end
        S_ERROR: if (irq && !irq_q) begin
          state   <= S_STALL;
          aligned <= 1'b0;
        end
        default: state <= S_STALL;
      endcase
    end
  end
endmodule
