// debugger_tb: talks to the debugger over its serial line like a terminal
// user (each character sent after the previous echo came back) at
// 1 Mbit/s from a 25 MHz clock, with a memory model on the bus (grant
// withheld at random), a register model on the CPU side bus and a CPU
// model that completes an instruction (PC + 1) every 30 clocks unless
// stalled. Checks the full reply text of every command: RD, WR, DP, PR,
// LD, RA, RX, RY, RP, RR, PC, RI, RC, ST, RN, SS, BK, the register
// writes WA, WX, WY, WP, WS, JP (read back through the register model),
// RS (one reset pulse) and invalid input
// (unknown command, bad separator, bad hex digit), plus the memory
// contents, the stall line, one instruction per single step and the stop
// at the breakpoint.
module debugger_tb;
  import nes_pkg::*;
  localparam int CLK_HZ = 25_000_000, BAUD = 1_000_000, BC = CLK_HZ / BAUD;
  logic clk = 0, rst = 1;
  logic rx = 1, tx;
  logic [15:0] bus_addr, cpu_pc = 16'h0100;
  logic [7:0] bus_wdata, bus_rdata;
  logic bus_rd, bus_wr, bus_grant = 1;
  dbg_reg_t dbg_sel;
  logic dbg_we;
  logic [31:0] dbg_wdata, dbg_rdata;
  logic cpu_inst_done = 0, cpu_stall, cpu_reset;
  logic [7:0] ra = 8'h12, rx_ = 8'h34, ry = 8'h56, rsp = 8'hFD, rsr = 8'h24;
  int n_reset = 0, n_wr_running = 0;
  logic [7:0] mem [65536];
  int checks = 0, failures = 0;

  debugger #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst, .uart_rx_in(rx), .uart_tx_out(tx),
    .bus_addr, .bus_wdata, .bus_rd, .bus_wr, .bus_grant, .bus_rdata, .dbg_sel, .dbg_we,
    .dbg_wdata, .dbg_rdata, .cpu_waiting(1'b1), .cpu_inst_done, .cpu_pc, .cpu_stall, .cpu_reset);

  always #20 clk = ~clk;
  always @(posedge clk) begin
    bus_grant <= ($urandom_range(0, 3) != 0);
    bus_rdata <= mem[bus_addr];
    if (bus_wr && bus_grant) mem[bus_addr] <= bus_wdata;
  end
  always_comb begin
    case (dbg_sel)
      DBG_A: dbg_rdata = 32'(ra);
      DBG_X: dbg_rdata = 32'(rx_);
      DBG_Y: dbg_rdata = 32'(ry);
      DBG_SP: dbg_rdata = 32'(rsp);
      DBG_SR: dbg_rdata = 32'(rsr);
      DBG_PC: dbg_rdata = {16'h0, cpu_pc};
      DBG_ICOUNT: dbg_rdata = 32'h00001234;
      default: dbg_rdata = 32'hDEADBEEF;
    endcase
  end
  // CPU model
  int ccnt = 0;
  always @(posedge clk) begin
    cpu_inst_done <= 1'b0;
    if (cpu_reset) n_reset++;
    if (dbg_we) begin
      if (!cpu_stall) n_wr_running++;   // a write must only happen while held
      case (dbg_sel)
        DBG_A: ra <= dbg_wdata[7:0];
        DBG_X: rx_ <= dbg_wdata[7:0];
        DBG_Y: ry <= dbg_wdata[7:0];
        DBG_SP: rsp <= dbg_wdata[7:0];
        DBG_SR: rsr <= dbg_wdata[7:0];
        DBG_PC: cpu_pc <= dbg_wdata[15:0];
        default: ;
      endcase
    end else if (!rst && !cpu_stall) begin
      if (ccnt == 29) begin ccnt <= 0; cpu_inst_done <= 1'b1; cpu_pc <= cpu_pc + 1'b1; end
      else ccnt <= ccnt + 1;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial receiver
  string rxs = "";
  initial begin
    forever begin
      logic [7:0] c;
      @(negedge tx);
      repeat (BC / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BC) @(posedge clk); c[i] = tx; end
      repeat (BC) @(posedge clk);
      rxs = {rxs, string'(c)};
    end
  end

  task automatic send_char(logic [7:0] c);
    logic [9:0] f;
    f = {1'b1, c, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (BC) @(posedge clk); end
  endtask

  // send a command like a typing user, then collect the whole reply
  task automatic cmd(string s, string exp_tail, string name);
    int n, idle;
    rxs = "";
    for (int i = 0; i < s.len(); i++) begin
      n = rxs.len();
      send_char(s[i]);
      idle = 0;
      while (rxs.len() == n && idle < 40 * BC) begin @(posedge clk); idle++; end
    end
    idle = 0;
    while (idle < 30 * BC) begin
      n = rxs.len(); @(posedge clk);
      if (rxs.len() != n) idle = 0; else idle++;
    end
    checks++;
    if (rxs != {s, exp_tail}) begin
      failures++;
      $display("FAIL %s: got \"%s\" exp \"%s\"", name, rxs, {s, exp_tail});
    end
  endtask

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    string nl = "\r\n";
    int pc0;
    foreach (mem[i]) mem[i] = 8'h00;
    mem[16'h0011] = 8'hCD; mem[16'h0012] = 8'hEF;
    mem[16'h0020] = "H"; mem[16'h0021] = "e"; mem[16'h0022] = "l"; mem[16'h0023] = "l"; mem[16'h0024] = "o";
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (50) @(posedge clk);
    cmd("ST", nl, "ST");
    chk("stalled", cpu_stall, 1);
    cmd("WR@0010=AB", nl, "WR");
    chk("written", mem[16'h0010], 8'hAB);
    cmd("RD@0010", {nl, "AB", nl}, "RD");
    cmd("DP@0010#0003", {nl, "ABCDEF", nl}, "DP");
    cmd("PR@0020#0005", {nl, "Hello", nl}, "PR");
    cmd("LD@0030#0003beef01", nl, "LD");
    chk("LD byte 0", mem[16'h0030], 8'hBE);
    chk("LD byte 1", mem[16'h0031], 8'hEF);
    chk("LD byte 2", mem[16'h0032], 8'h01);
    cmd("RA", {nl, "12", nl}, "RA");
    cmd("RX", {nl, "34", nl}, "RX");
    cmd("RY", {nl, "56", nl}, "RY");
    cmd("RP", {nl, "FD", nl}, "RP");
    cmd("RR", {nl, "24", nl}, "RR");
    cmd("PC", {nl, $sformatf("%04X", cpu_pc), nl}, "PC");
    cmd("RI", {nl, "00001234", nl}, "RI");
    cmd("RC", {nl, "DEADBEEF", nl}, "RC");
    chk("still stalled", cpu_stall, 1);
    pc0 = cpu_pc;
    cmd("SS", nl, "SS");
    chk("single step: one instruction", cpu_pc - pc0, 1);
    chk("stalled after step", cpu_stall, 1);
    pc0 = cpu_pc + 8;
    cmd($sformatf("BK@%04X", pc0), nl, "BK");
    repeat (200) @(posedge clk);
    chk("stopped at breakpoint", cpu_pc, pc0);
    chk("stalled at breakpoint", cpu_stall, 1);
    cmd("RN", nl, "RN");
    repeat (100) @(posedge clk);
    chk("running", cpu_stall, 0);
    chk("pc advancing", int'(cpu_pc > pc0), 1);
    cmd("XY", {nl, "INVALID", nl}, "unknown command");
    cmd("RD#", {nl, "INVALID", nl}, "bad separator");
    cmd("RD@00G", {nl, "INVALID", nl}, "bad hex digit");
    cmd("RD@0011", {nl, "CD", nl}, "RD after errors");
    // register writes while the CPU runs
    cmd("WA=5A", nl, "WA");
    cmd("RA", {nl, "5A", nl}, "RA after WA");
    cmd("WX=6b", nl, "WX");
    cmd("RX", {nl, "6B", nl}, "RX after WX");
    cmd("WY=7C", nl, "WY");
    cmd("RY", {nl, "7C", nl}, "RY after WY");
    cmd("WP=F0", nl, "WP");
    cmd("RP", {nl, "F0", nl}, "RP after WP");
    cmd("WS=A1", nl, "WS");
    cmd("RR", {nl, "A1", nl}, "RR after WS");
    chk("CPU running after writes", cpu_stall, 0);
    cmd("JP@4000", nl, "JP");
    chk("PC written", int'(cpu_pc >= 16'h4000 && cpu_pc < 16'h4100), 1);
    cmd("WA=5G", {nl, "INVALID", nl}, "bad hex in register write");
    chk("A unchanged by bad write", ra, 8'h5A);
    chk("no reset yet", n_reset, 0);
    cmd("RS", nl, "RS");
    chk("one CPU reset pulse", n_reset, 1);
    chk("register writes only while held", n_wr_running, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
