// cpu_tb: runs hand-assembled 6502 programs from a behavioural 64 KB
// memory that answers one clock after the address, as the system memory
// does. The CPU pulse comes every 14 clocks (about 1.79 MHz at 25 MHz).
// Checked: the reset vector; loads, stores, ADC, a counted loop with a
// taken branch, JSR/RTS, PHA/PLA, read-modify-write ASL absolute in 17
// clocks of work; BRK (B set in the pushed status, return PC+2) and RTI;
// an IRQ raised while I is set that stays pending until CLI, pushes the
// status with B clear and the address of the next instruction; the
// JMP ($xxFF) page-wrap behaviour; instruction timing in CPU cycles,
// including the page-cross penalty; debugger register reads and writes
// while stalled; no bus activity while stalled; the instruction counter;
// and the error state on an unofficial opcode, left by an IRQ edge.
module cpu_tb;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  logic pulse_cpu = 0, stall = 0, irq = 0;
  logic [15:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic mem_rd, mem_wr;
  dbg_reg_t dbg_sel = DBG_A;
  logic dbg_we = 0;
  logic [31:0] dbg_wdata = 0, dbg_rdata;
  logic waiting, inst_done, error;
  logic [15:0] pc_out;
  logic [7:0] mem [65536];
  int checks = 0, failures = 0;

  cpu dut (.clk, .rst, .pulse_cpu, .stall, .irq, .mem_addr, .mem_wdata, .mem_rd, .mem_wr,
           .mem_rdata, .dbg_sel, .dbg_we, .dbg_wdata, .dbg_rdata, .waiting, .inst_done,
           .error, .pc_out);

  always #5 clk = ~clk;
  int pcnt = 0;
  always @(posedge clk) begin
    pcnt <= (pcnt == 13) ? 0 : pcnt + 1;
    pulse_cpu <= (pcnt == 13);
  end
  always @(posedge clk) begin
    mem_rdata <= mem[mem_addr];
    if (mem_wr) mem[mem_addr] <= mem_wdata;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic put(int addr, logic [7:0] b[$]);
    foreach (b[i]) mem[16'(addr + i)] = b[i];
  endtask

  // counters kept by the testbench
  int n_done = 0, asl_clocks = 0, last_done = 0, interval = 0, stall_bus = 0;
  int t = 0;
  always @(posedge clk) begin
    t++;
    if (inst_done) begin n_done++; interval = t - last_done; last_done = t; end
    if (dut.opcode == 8'h0E && !(dut.state inside {dut.S_WAIT, dut.S_STALL})) asl_clocks++;
    if (stall && waiting && (mem_rd || mem_wr)) stall_bus++;
  end

  task automatic wait_mem(int addr, logic [7:0] v, int limit);
    int n = 0;
    while (mem[addr] != v && n < limit) begin @(posedge clk); n++; end
  endtask
  task automatic wait_pc(int addr, int limit);
    int n = 0;
    while (pc_out != 16'(addr) && n < limit) begin @(posedge clk); n++; end
    repeat (60) @(posedge clk);
  endtask
  task automatic do_stall();
    stall = 1;
    while (!waiting) @(posedge clk);
    repeat (40) @(posedge clk); #1;
  endtask
  task automatic dbg_write(dbg_reg_t r, int v);
    dbg_sel = r; dbg_wdata = v; dbg_we = 1; @(posedge clk); #1; dbg_we = 0;
  endtask
  task automatic irq_pulse();
    irq = 1; repeat (20) @(posedge clk); irq = 0; repeat (20) @(posedge clk);
  endtask
  // average instruction interval over a loop of two instructions
  task automatic loop_clocks(output int c);
    int t0, n0;
    repeat (200) @(posedge clk);
    t0 = t; n0 = n_done;
    while (n_done < n0 + 20) @(posedge clk);
    c = (last_done - t0) ;
    t0 = last_done; n0 = n_done;
    while (n_done < n0 + 20) @(posedge clk);
    c = last_done - t0;       // 20 instructions = 10 loop passes
  endtask

  initial begin
    int c, ic;
    foreach (mem[i]) mem[i] = 8'h00;
    put(16'h8000, '{8'hA2, 8'hFF, 8'h9A, 8'hA9, 8'h10, 8'h85, 8'h00, 8'h18, 8'h69, 8'h25,
                    8'h8D, 8'h00, 8'h02, 8'hA2, 8'h05, 8'hA9, 8'h00, 8'h18, 8'h65, 8'h00,
                    8'hCA, 8'hD0, 8'hFA, 8'h8D, 8'h01, 8'h02, 8'h20, 8'h34, 8'h80, 8'h8D,
                    8'h02, 8'h02, 8'h0E, 8'h00, 8'h02, 8'hA9, 8'hC3, 8'h48, 8'hA9, 8'h00,
                    8'h68, 8'h8D, 8'h03, 8'h02, 8'h00, 8'hEA, 8'h58, 8'h4C, 8'h2F, 8'h80,
                    8'hEA, 8'hEA, 8'hEA, 8'hEA, 8'hA9, 8'h77, 8'h60});
    put(16'h9000, '{8'hEE, 8'h04, 8'h02, 8'h40});                     // INC $0204; RTI
    put(16'h8040, '{8'h6C, 8'hFF, 8'h03});                            // JMP ($03FF)
    put(16'h8050, '{8'hA9, 8'hAA, 8'h8D, 8'h05, 8'h02, 8'h4C, 8'h55, 8'h80});
    put(16'h9050, '{8'hA9, 8'hEE, 8'h8D, 8'h06, 8'h02, 8'h4C, 8'h55, 8'h90});
    put(16'h03FF, '{8'h50}); put(16'h0300, '{8'h80}); put(16'h0400, '{8'h90});
    put(16'h8060, '{8'h8D, 8'h07, 8'h02, 8'h4C, 8'h63, 8'h80});       // STA $0207; spin
    put(16'h8070, '{8'hBD, 8'hFF, 8'h02, 8'h4C, 8'h70, 8'h80});       // LDA $02FF,X; JMP
    put(16'h8080, '{8'h02});                                          // unofficial opcode
    put(16'hFFFC, '{8'h00, 8'h80, 8'h00, 8'h90});
    repeat (3) @(posedge clk); #1;
    rst = 0;
    // IRQ while I is set (after reset): must stay pending until CLI
    repeat (100) @(posedge clk);
    irq_pulse();
    wait_mem(16'h0203, 8'hC3, 20000);
    chk("I set after reset: irq not taken yet", mem[16'h0204], 0);
    chk("ADC result", mem[16'h0200], 8'h6A);   // 0x35 shifted left by ASL
    chk("loop sum", mem[16'h0201], 8'h50);
    chk("JSR/RTS", mem[16'h0202], 8'h77);
    chk("PHA/PLA", mem[16'h0203], 8'hC3);
    chk("ASL abs work clocks", asl_clocks, 17);
    // BRK: handler runs once, B set in the pushed status, return $802E
    wait_mem(16'h0204, 8'h01, 20000);
    chk("BRK handled", mem[16'h0204], 1);
    chk("BRK pushed B", mem[16'h01FD][4], 1);
    chk("BRK return PC", {mem[16'h01FF], mem[16'h01FE]}, 16'h802E);
    // then CLI lets the pending IRQ in
    wait_mem(16'h0204, 8'h02, 20000);
    chk("pending IRQ after CLI", mem[16'h0204], 2);
    chk("IRQ pushed B clear", mem[16'h01FD][4], 0);
    chk("IRQ return PC", {mem[16'h01FF], mem[16'h01FE]}, 16'h802F);
    wait_pc(16'h802F, 20000);
    // JMP abs spin: 3 cycles = 42 clocks per instruction
    repeat (300) @(posedge clk);
    chk("JMP abs 3 cycles", interval, 42);
    // instruction counter agrees with the completed instructions
    do_stall();
    dbg_sel = DBG_ICOUNT; #1;
    chk("icount", dbg_rdata, n_done);
    dbg_sel = DBG_SR; #1;
    chk("I clear after CLI/RTI", dbg_rdata[2], 0);
    repeat (200) @(posedge clk);
    chk("no bus activity while stalled", stall_bus, 0);
    // JMP ($03FF) takes its high byte from $0300
    dbg_write(DBG_PC, 16'h8040);
    stall = 0;
    wait_mem(16'h0205, 8'hAA, 20000);
    chk("JMP indirect page wrap", mem[16'h0205], 8'hAA);
    chk("no jump to $9050", mem[16'h0206], 0);
    // Debugger writes A and PC
    do_stall();
    dbg_write(DBG_A, 8'h5C);
    dbg_write(DBG_PC, 16'h8060);
    dbg_sel = DBG_A; #1;
    chk("dbg read A", dbg_rdata, 8'h5C);
    stall = 0;
    wait_mem(16'h0207, 8'h5C, 20000);
    chk("dbg written A stored", mem[16'h0207], 8'h5C);
    // Two more IRQs
    irq_pulse(); repeat (400) @(posedge clk);
    irq_pulse(); repeat (400) @(posedge clk);
    chk("IRQ count", mem[16'h0204], 4);
    // Timing: LDA abs,X (4, +1 across a page) + JMP (3)
    do_stall();
    dbg_write(DBG_X, 0);
    dbg_write(DBG_PC, 16'h8070);
    stall = 0;
    loop_clocks(c);
    chk("LDA abs,X no cross + JMP", c, 10 * 7 * 14);
    do_stall();
    dbg_write(DBG_X, 1);
    stall = 0;
    loop_clocks(c);
    chk("LDA abs,X page cross + JMP", c, 10 * 8 * 14);
    // Unofficial opcode -> error; an IRQ edge leaves it
    do_stall();
    dbg_write(DBG_PC, 16'h8080);
    stall = 0;
    repeat (200) @(posedge clk);
    chk("error on unofficial opcode", error, 1);
    stall = 1; repeat (300) @(posedge clk); #1;
    chk("error holds", error, 1);
    stall = 0;
    irq = 1; repeat (3) @(posedge clk); #1; irq = 0;
    repeat (3) @(posedge clk);
    chk("IRQ edge leaves error", error, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
