// mem_bus_tb: four main devices make random read/write requests on random
// addresses (biased to the APU range and its edges). Checks every clock
// that only the highest-priority requester is granted, that the granted
// address, data and strobes reach the right secondary ($4000-$4017 to
// the APU, all else to memory) and not the other, and that the read data
// returned one clock later comes from the secondary addressed the clock
// before.
module mem_bus_tb;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic [15:0] m_addr [N];
  logic [7:0] m_wdata [N];
  logic m_rd [N], m_wr [N], grant [N];
  logic [7:0] m_rdata, mem_wdata, apu_wdata, mem_rdata, apu_rdata;
  logic [15:0] mem_addr;
  logic mem_we, apu_sel, apu_we, apu_re;
  logic [4:0] apu_addr;
  int checks = 0, failures = 0;

  mem_bus #(.N_MAIN(N)) dut (.clk, .rst, .m_addr, .m_wdata, .m_rd, .m_wr, .grant, .m_rdata,
    .mem_addr, .mem_wdata, .mem_we, .mem_rdata, .apu_sel, .apu_addr, .apu_wdata, .apu_we,
    .apu_re, .apu_rdata);

  always #5 clk = ~clk;
  // secondaries answer one clock after the address
  always @(posedge clk) begin
    mem_rdata <= mem_addr[7:0] ^ 8'hA5;
    apu_rdata <= {3'b110, apu_addr};
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int errs = 0;
  task automatic bad(string s);
    failures++;
    if (errs++ < 8) $display("FAIL %s at %0t", s, $time);
  endtask

  initial begin
    int win, n_apu = 0, n_mem = 0, n_idle = 0;
    logic [15:0] prev_addr; bit prev_valid = 0;
    for (int i = 0; i < N; i++) begin m_rd[i] = 0; m_wr[i] = 0; m_addr[i] = 0; m_wdata[i] = 0; end
    repeat (3) @(posedge clk); #1;
    rst = 0;
    for (int it = 0; it < 20000; it++) begin
      for (int i = 0; i < N; i++) begin
        int r;
        r = $urandom_range(0, 9);
        m_rd[i] = (r < 2); m_wr[i] = (r == 2);
        case ($urandom_range(0, 3))
          0: m_addr[i] = 16'h4000 + 16'($urandom_range(0, 23));
          1: m_addr[i] = ($urandom_range(0, 1)) ? 16'h3FFF : 16'h4018;
          default: m_addr[i] = 16'($urandom);
        endcase
        m_wdata[i] = 8'($urandom);
      end
      #1;
      win = -1;
      for (int i = N - 1; i >= 0; i--) if (m_rd[i] || m_wr[i]) win = i;
      checks++;
      for (int i = 0; i < N; i++) if (grant[i] != (i == win)) bad($sformatf("grant %0d (winner %0d)", i, win));
      if (win >= 0) begin
        bit is_apu;
        is_apu = m_addr[win] >= 16'h4000 && m_addr[win] <= 16'h4017;
        checks++;
        if (is_apu) begin
          n_apu++;
          if (!apu_sel || apu_addr != m_addr[win][4:0] || apu_we != m_wr[win] || apu_re != m_rd[win] ||
              mem_we || (m_wr[win] && apu_wdata != m_wdata[win])) bad("apu routing");
        end else begin
          n_mem++;
          if (apu_sel || apu_we || apu_re || mem_addr != m_addr[win] || mem_we != m_wr[win] ||
              (m_wr[win] && mem_wdata != m_wdata[win])) bad("memory routing");
        end
      end else begin
        n_idle++;
        if (mem_we || apu_we || apu_re) bad("strobe with no requester");
      end
      @(posedge clk);
      #1;
      // read data for the address just presented
      if (win >= 0) begin
        logic [15:0] a;
        a = m_addr[win];
        checks++;
        if (a >= 16'h4000 && a <= 16'h4017) begin
          if (m_rdata != {3'b110, a[4:0]}) bad("apu read data");
        end else if (m_rdata != (a[7:0] ^ 8'hA5)) bad("memory read data");
      end
    end
    checks++;
    if (n_apu < 100 || n_mem < 100 || n_idle < 10) bad("coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
