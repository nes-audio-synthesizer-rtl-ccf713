// debugger: serial-terminal debugger, a main device on the memory bus with
// a 32-bit side bus into the CPU.
// Commands are two characters, executed as soon as they (and their
// arguments) are complete; every received character is echoed. Arguments
// and results are hexadecimal. Results are printed on a new line.
//   RD@aaaa            read a byte            -> dd
//   WR@aaaa=dd         write a byte
//   DP@aaaa#llll       dump llll bytes as one hex string
//   PR@aaaa#llll       print llll bytes as raw characters
//   LD@aaaa#llll       load: then 2*llll hex digits are written from aaaa
//   RA RX RY RP RR     A, X, Y, SP, SR    -> dd
//   PC                 program counter    -> aaaa
//   RI RC              instruction / cycle counters -> 8 hex digits
//   ST RN              stall / run the CPU
//   SS                 single step: run one instruction, then stall
//   BK@aaaa            run until the PC reaches aaaa, then stall
//   WA=dd WX=dd WY=dd WP=dd WS=dd   write A, X, Y, SP, SR
//   JP@aaaa            write the program counter
//   RS                 reset the CPU (one-clock pulse on cpu_reset)
// A register write holds the CPU at its next instruction boundary
// (cpu_waiting), writes over the 32-bit side bus for one clock, then lets
// the CPU go on unless ST is in force. It never completes while the CPU is
// in its error state; RS clears that.
// The document names the read, memory, dump, load, print, stall, run,
// step and breakpoint commands and says the debugger can also write the
// CPU registers and reset the CPU; the names of those last commands are
// this design's own.
// Anything else prints "INVALID". Output goes through a 128-bit (16 char)
// shift buffer: the top character is sent, the buffer shifts left by 8 and
// the next character follows when the transmitter is free, until the
// buffer is empty (a zero byte ends it); then the machine returns to
// ret_state. Memory reads hold the address and read strobe for 3 clocks
// and take the byte on the third, like the CPU. cpu_stall is asserted
// combinationally on the clock an instruction completes in single step,
// or when the PC equals the breakpoint, so the CPU stops at that
// instruction boundary. Link rate 38,400 bps (CLK_HZ/BAUD clocks per bit).
module debugger
  import nes_pkg::*;
#(
  parameter int CLK_HZ = 25_000_000,
  parameter int BAUD   = 38_400
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        uart_rx_in,
  output logic        uart_tx_out,
  // memory bus (main device)
  output logic [15:0] bus_addr,
  output logic [7:0]  bus_wdata,
  output logic        bus_rd,
  output logic        bus_wr,
  input  logic        bus_grant,
  input  logic [7:0]  bus_rdata,
  // CPU side bus and control
  output dbg_reg_t    dbg_sel,
  output logic        dbg_we,
  output logic [31:0] dbg_wdata,
  input  logic [31:0] dbg_rdata,
  input  logic        cpu_waiting,
  input  logic        cpu_inst_done,
  input  logic [15:0] cpu_pc,
  output logic        cpu_stall,
  output logic        cpu_reset
);
  typedef enum logic [4:0] {
    D_CMD1, D_CMD2, D_SEP1, D_HEX1, D_SEP2, D_HEX2, D_DISPATCH, D_REG,
    D_MEM_RD, D_MEM_WR, D_RD_DONE, D_DUMP, D_DUMP_NEXT, D_LOAD, D_LOAD_WR,
    D_STEP, D_BREAK, D_PRINT, D_WAIT_PRINT, D_REG_WR, D_REG_WR2
  } dstate_t;

  typedef enum logic [4:0] {
    C_RD, C_WR, C_DP, C_PR, C_LD, C_RA, C_RX, C_RY, C_RP, C_RR, C_PC,
    C_RI, C_RC, C_ST, C_RN, C_SS, C_BK, C_WA, C_WX, C_WY, C_WP, C_WS,
    C_JP, C_RS, C_BAD
  } cmd_t;

  dstate_t      state, ret_state;
  cmd_t         cmd;
  logic [7:0]   c1;
  logic [7:0]   rx_data;
  logic         rx_valid;
  logic         tx_start, tx_busy;
  logic [127:0] pbuf;
  logic [15:0]  addr, len;
  logic [15:0]  arg2;
  logic [2:0]   ndig;
  logic [7:0]   sep2;
  logic [1:0]   acc_cnt;
  logic [7:0]   rd_byte;
  logic         stall_q, stepping, breaking, wr_hold;
  logic [15:0]  bk_addr;
  logic         nib_ok;
  logic [3:0]   nib;
  logic         lo_half;
  logic [7:0]   ld_byte;
  logic         is_rwr;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rx(uart_rx_in), .data(rx_data), .valid(rx_valid)
  );
  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .start(tx_start), .data(pbuf[127:120]), .tx(uart_tx_out), .busy(tx_busy)
  );

  // ASCII hex digit to value
  always_comb begin
    nib_ok = 1'b1;
    nib    = '0;
    if (rx_data >= "0" && rx_data <= "9")      nib = 4'(rx_data - "0");
    else if (rx_data >= "A" && rx_data <= "F") nib = 4'(rx_data - "A" + 8'd10);
    else if (rx_data >= "a" && rx_data <= "f") nib = 4'(rx_data - "a" + 8'd10);
    else                                      nib_ok = 1'b0;
  end

  function automatic logic [7:0] hexc(input logic [3:0] v);
    return (v < 4'd10) ? (8'h30 + 8'(v)) : (8'h37 + 8'(v));
  endfunction

  // CR LF, n hex digits of v, CR LF, left-aligned in the print buffer.
  function automatic logic [127:0] fmt_hex(input logic [31:0] v, input int n);
    logic [127:0] b;
    b = '0;
    b[127:112] = 16'h0D0A;
    for (int i = 0; i < 8; i++)
      if (i < n) b[111 - 8*i -: 8] = hexc(v[4*(n-1-i) +: 4]);
    b[111 - 8*n -: 16] = 16'h0D0A;
    return b;
  endfunction

  function automatic cmd_t decode_cmd(input logic [7:0] a, input logic [7:0] b);
    case ({a, b})
      "RD": return C_RD;  "WR": return C_WR;  "DP": return C_DP;
      "PR": return C_PR;  "LD": return C_LD;  "RA": return C_RA;
      "RX": return C_RX;  "RY": return C_RY;  "RP": return C_RP;
      "RR": return C_RR;  "PC": return C_PC;  "RI": return C_RI;
      "RC": return C_RC;  "ST": return C_ST;  "RN": return C_RN;
      "SS": return C_SS;  "BK": return C_BK;  "WA": return C_WA;
      "WX": return C_WX;  "WY": return C_WY;  "WP": return C_WP;
      "WS": return C_WS;  "JP": return C_JP;  "RS": return C_RS;
      default: return C_BAD;
    endcase
  endfunction

  assign is_rwr    = (cmd inside {C_WA, C_WX, C_WY, C_WP, C_WS});
  assign cpu_stall = stall_q || wr_hold || (stepping && cpu_inst_done) ||
                     (breaking && cpu_pc == bk_addr);
  assign bus_addr  = addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= D_CMD1; ret_state <= D_CMD1; cmd <= C_BAD; c1 <= '0;
      pbuf <= '0; tx_start <= 1'b0;
      addr <= '0; len <= '0; arg2 <= '0; ndig <= '0; sep2 <= '0;
      acc_cnt <= '0; rd_byte <= '0;
      bus_wdata <= '0; bus_rd <= 1'b0; bus_wr <= 1'b0;
      dbg_sel <= DBG_A; dbg_we <= 1'b0; dbg_wdata <= '0;
      stall_q <= 1'b0; stepping <= 1'b0; breaking <= 1'b0; bk_addr <= '0;
      wr_hold <= 1'b0; cpu_reset <= 1'b0;
      lo_half <= 1'b0; ld_byte <= '0;
    end else begin
      tx_start <= 1'b0;
      dbg_we    <= 1'b0;
      cpu_reset <= 1'b0;
      if (stepping && cpu_inst_done) begin stepping <= 1'b0; stall_q <= 1'b1; end
      if (breaking && cpu_pc == bk_addr) begin breaking <= 1'b0; stall_q <= 1'b1; end

      case (state)
        D_CMD1: if (rx_valid) begin
          c1 <= rx_data;
          pbuf <= {rx_data, 120'h0}; ret_state <= D_CMD2; state <= D_PRINT;
        end
        D_CMD2: if (rx_valid) begin
          cmd  <= decode_cmd(c1, rx_data);
          pbuf <= {rx_data, 120'h0};
          state <= D_PRINT;
          case (decode_cmd(c1, rx_data))
            C_RD, C_WR, C_DP, C_PR, C_LD, C_BK, C_JP: ret_state <= D_SEP1;
            C_WA, C_WX, C_WY, C_WP, C_WS: begin sep2 <= "="; ret_state <= D_SEP2; end
            default: ret_state <= D_DISPATCH;
          endcase
        end
        D_SEP1: if (rx_valid) begin
          pbuf <= {rx_data, 120'h0}; state <= D_PRINT;
          addr <= '0; ndig <= 3'd4;
          if (rx_data == "@") ret_state <= D_HEX1;
          else begin cmd <= C_BAD; ret_state <= D_DISPATCH; end
        end
        D_HEX1: if (rx_valid) begin
          pbuf <= {rx_data, 120'h0}; state <= D_PRINT;
          if (!nib_ok) begin cmd <= C_BAD; ret_state <= D_DISPATCH; end
          else begin
            addr <= {addr[11:0], nib};
            ndig <= ndig - 1'b1;
            if (ndig != 3'd1)                      ret_state <= D_HEX1;
            else if (cmd inside {C_RD, C_BK, C_JP}) ret_state <= D_DISPATCH;
            else begin
              ret_state <= D_SEP2;
              sep2      <= (cmd == C_WR) ? "=" : "#";
            end
          end
        end
        D_SEP2: if (rx_valid) begin
          pbuf <= {rx_data, 120'h0}; state <= D_PRINT;
          arg2 <= '0; ndig <= (cmd == C_WR || is_rwr) ? 3'd2 : 3'd4;
          if (rx_data == sep2) ret_state <= D_HEX2;
          else begin cmd <= C_BAD; ret_state <= D_DISPATCH; end
        end
        D_HEX2: if (rx_valid) begin
          pbuf <= {rx_data, 120'h0}; state <= D_PRINT;
          if (!nib_ok) begin cmd <= C_BAD; ret_state <= D_DISPATCH; end
          else begin
            arg2 <= {arg2[11:0], nib};
            ndig <= ndig - 1'b1;
            ret_state <= (ndig == 3'd1) ? D_DISPATCH : D_HEX2;
          end
        end
        D_DISPATCH: begin
          case (cmd)
            C_RD: begin acc_cnt <= '0; state <= D_MEM_RD; end
            C_WR: begin bus_wdata <= arg2[7:0]; state <= D_MEM_WR; end
            C_DP, C_PR: begin
              len <= arg2;
              pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_DUMP; state <= D_PRINT;
            end
            C_LD: begin len <= arg2; lo_half <= 1'b0; state <= D_LOAD; end
            C_RA: begin dbg_sel <= DBG_A;      state <= D_REG; end
            C_RX: begin dbg_sel <= DBG_X;      state <= D_REG; end
            C_RY: begin dbg_sel <= DBG_Y;      state <= D_REG; end
            C_RP: begin dbg_sel <= DBG_SP;     state <= D_REG; end
            C_RR: begin dbg_sel <= DBG_SR;     state <= D_REG; end
            C_PC: begin dbg_sel <= DBG_PC;     state <= D_REG; end
            C_RI: begin dbg_sel <= DBG_ICOUNT; state <= D_REG; end
            C_RC: begin dbg_sel <= DBG_CCOUNT; state <= D_REG; end
            C_ST: begin stall_q <= 1'b1; pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_CMD1; state <= D_PRINT; end
            C_RN: begin stall_q <= 1'b0; pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_CMD1; state <= D_PRINT; end
            C_SS: begin stall_q <= 1'b0; stepping <= 1'b1; state <= D_STEP; end
            C_BK: begin stall_q <= 1'b0; bk_addr <= addr; breaking <= 1'b1; state <= D_BREAK; end
            C_WA: begin dbg_sel <= DBG_A;  dbg_wdata <= 32'(arg2[7:0]); state <= D_REG_WR; end
            C_WX: begin dbg_sel <= DBG_X;  dbg_wdata <= 32'(arg2[7:0]); state <= D_REG_WR; end
            C_WY: begin dbg_sel <= DBG_Y;  dbg_wdata <= 32'(arg2[7:0]); state <= D_REG_WR; end
            C_WP: begin dbg_sel <= DBG_SP; dbg_wdata <= 32'(arg2[7:0]); state <= D_REG_WR; end
            C_WS: begin dbg_sel <= DBG_SR; dbg_wdata <= 32'(arg2[7:0]); state <= D_REG_WR; end
            C_JP: begin dbg_sel <= DBG_PC; dbg_wdata <= 32'(addr);      state <= D_REG_WR; end
            C_RS: begin cpu_reset <= 1'b1; pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_CMD1; state <= D_PRINT; end
            default: begin
              pbuf <= {16'h0D0A, "INVALID", 16'h0D0A, 40'h0};
              ret_state <= D_CMD1; state <= D_PRINT;
            end
          endcase
        end
        D_REG: begin
          case (cmd)
            C_PC:       pbuf <= fmt_hex(dbg_rdata, 4);
            C_RI, C_RC: pbuf <= fmt_hex(dbg_rdata, 8);
            default:    pbuf <= fmt_hex(dbg_rdata, 2);
          endcase
          ret_state <= D_CMD1; state <= D_PRINT;
        end
        D_MEM_RD: begin
          bus_rd <= 1'b1;
          if (bus_rd && bus_grant) acc_cnt <= acc_cnt + 1'b1;
          if (acc_cnt == 2'd2) begin
            bus_rd  <= 1'b0;
            rd_byte <= bus_rdata;
            acc_cnt <= '0;
            state   <= D_RD_DONE;
          end
        end
        D_RD_DONE: begin
          case (cmd)
            C_RD: begin pbuf <= fmt_hex(32'(rd_byte), 2); ret_state <= D_CMD1; end
            C_PR: begin pbuf <= {rd_byte, 120'h0}; ret_state <= D_DUMP_NEXT; end
            default: begin pbuf <= {hexc(rd_byte[7:4]), hexc(rd_byte[3:0]), 112'h0}; ret_state <= D_DUMP_NEXT; end
          endcase
          state <= D_PRINT;
        end
        D_MEM_WR: begin
          bus_wr <= 1'b1;
          if (bus_wr && bus_grant) begin
            bus_wr <= 1'b0;
            if (cmd == C_LD) state <= D_LOAD;
            else begin pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_CMD1; state <= D_PRINT; end
          end
        end
        D_DUMP: begin
          if (len == '0) begin pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_CMD1; state <= D_PRINT; end
          else begin acc_cnt <= '0; state <= D_MEM_RD; end
        end
        D_DUMP_NEXT: begin addr <= addr + 1'b1; len <= len - 1'b1; state <= D_DUMP; end
        D_LOAD: begin
          if (len == '0) begin pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_CMD1; state <= D_PRINT; end
          else if (rx_valid && nib_ok) begin
            pbuf <= {rx_data, 120'h0}; state <= D_PRINT;
            if (!lo_half) begin
              ld_byte[7:4] <= nib; lo_half <= 1'b1; ret_state <= D_LOAD;
            end else begin
              bus_wdata <= {ld_byte[7:4], nib}; lo_half <= 1'b0; ret_state <= D_LOAD_WR;
            end
          end
        end
        D_LOAD_WR: begin
          bus_wr <= 1'b1;
          if (bus_wr && bus_grant) begin
            bus_wr <= 1'b0; addr <= addr + 1'b1; len <= len - 1'b1; state <= D_LOAD;
          end
        end
        // Register write: hold the CPU at its next instruction boundary,
        // pulse the write, then release it (unless ST holds it anyway).
        D_REG_WR: begin
          wr_hold <= 1'b1;
          if (wr_hold && cpu_waiting) begin dbg_we <= 1'b1; state <= D_REG_WR2; end
        end
        D_REG_WR2: begin
          wr_hold <= 1'b0;
          pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_CMD1; state <= D_PRINT;
        end
        D_STEP:  if (!stepping) begin pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_CMD1; state <= D_PRINT; end
        D_BREAK: if (!breaking) begin pbuf <= {16'h0D0A, 112'h0}; ret_state <= D_CMD1; state <= D_PRINT; end
        D_PRINT: begin
          if (pbuf[127:120] == 8'h00) state <= ret_state;
          else if (!tx_busy) begin
            tx_start <= 1'b1;
            state    <= D_WAIT_PRINT;
          end
        end
        D_WAIT_PRINT: if (!tx_start && !tx_busy) begin
          pbuf  <= {pbuf[119:0], 8'h00};
          state <= D_PRINT;
        end
        default: state <= D_CMD1;
      endcase
    end
  end
endmodule
