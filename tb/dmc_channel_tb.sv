// dmc_channel_tb: a behavioural memory answers the channel's DMA reads one
// clock late, as the system bus does. Checks the sample start address
// $C000 + (r2 << 5) and length (r3 << 4) + 1, the 8-CPU-cycle stall per
// byte, the DMA address sequence, the delta output against a reference
// model fed with random sample bytes, the clamps at 0/1 and 126, the
// $4011 direct load, the end-of-sample IRQ and its clear, looping, and
// stopping through $4015.
module dmc_channel_tb;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  logic pulse_cpu = 0;
  logic [7:0] r0 = 0, r1 = 0, r2 = 0, r3 = 0;
  logic wr_r1 = 0, wr_status = 0, status_en = 0;
  logic stall, dma_req, irq, active;
  logic [15:0] dma_addr;
  logic [7:0] dma_data;
  logic [6:0] out;
  logic [7:0] mem [logic [15:0]];
  int checks = 0, failures = 0;

  dmc_channel dut (.clk, .rst, .pulse_cpu, .r0, .r1, .r2, .r3, .wr_r1, .wr_status,
                   .status_en, .stall, .dma_req, .dma_addr, .dma_data, .irq, .active, .out);

  always #5 clk = ~clk;
  // CPU pulse every 3 clocks
  int pc_cnt = 0;
  always @(posedge clk) begin
    pc_cnt <= (pc_cnt == 2) ? 0 : pc_cnt + 1;
    pulse_cpu <= (pc_cnt == 2);
  end
  function automatic logic [7:0] memval(logic [15:0] a);
    return mem.exists(a) ? mem[a] : 8'(a ^ 8'h5A);
  endfunction
  always @(posedge clk) dma_data <= memval(dma_addr);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // Monitor: DMA address order, stall lengths, reference output model
  logic [15:0] exp_addr;
  int n_reads = 0, addr_errs = 0, stall_errs = 0, out_errs = 0;
  int stall_pulses = 0;
  logic [7:0] q [$];
  logic [7:0] m_sh; int m_bits = 0; logic m_sil = 1; int m_out = 0;
  always @(posedge clk) if (!rst) begin
    if (stall && pulse_cpu) stall_pulses++;
    if (stall && pulse_cpu && dut.stall_cnt == 3'd7) begin
      n_reads++;
      if (dma_addr != exp_addr) begin
        addr_errs++;
        if (addr_errs < 4) $display("dma addr %h exp %h", dma_addr, exp_addr);
      end
      exp_addr = (exp_addr == 16'hFFFF) ? 16'h8000 : exp_addr + 1;
      q.push_back(memval(dma_addr));
      if (stall_pulses != 8) stall_errs++;
      stall_pulses = 0;
    end
    if (wr_r1) m_out = r1[6:0];
    else if (dut.tick) begin
      if (!m_sil) begin
        if (m_sh[0] && m_out < 126) m_out += 2;
        if (!m_sh[0] && m_out > 1) m_out -= 2;
      end
      m_sh = m_sh >> 1;
      if (m_bits == 0) begin
        m_bits = 7;
        if (q.size() > 0) begin m_sh = q.pop_front(); m_sil = 0; end
        else m_sil = 1;
      end else m_bits--;
    end
  end
  always @(negedge clk) if (!rst && int'(out) != m_out) begin
    out_errs++;
    if (out_errs < 4) $display("out %0d model %0d at %0t", out, m_out, $time);
    m_out = out;
  end

  task automatic wr4015(logic en);
    status_en = en; wr_status = 1; @(posedge clk); #1; wr_status = 0;
  endtask

  initial begin
    int t;
    for (int a = 16'hC000; a < 16'hC400; a++) mem[16'(a)] = 8'($urandom);
    repeat (3) @(posedge clk); #1;
    rst = 0;
    r1 = 8'd64; wr_r1 = 1; @(posedge clk); #1; wr_r1 = 0;
    chk("direct load", int'(out), 64);
    // Rate 15 (54 cycles), IRQ on, start $C000 + (3 << 5) = $C060, 17 bytes
    r0 = 8'h8F; r2 = 8'd3; r3 = 8'd1;
    exp_addr = 16'hC060;
    wr4015(1'b1);
    chk("active after start", int'(active), 1);
    t = 0;
    while (!irq && t < 200000) begin @(posedge clk); #1; t++; end
    chk("irq at end", int'(irq), 1);
    chk("bytes read", n_reads, 17);
    chk("not active at end", int'(active), 0);
    wr4015(1'b0);
    chk("irq cleared by 4015", int'(irq), 0);
    // let the output run out
    repeat (54 * 3 * 20) @(posedge clk); #1;
    // All-ones bytes push to 126 and hold; all-zero bytes pull to 0/1.
    for (int a = 16'hC000; a < 16'hC020; a++) mem[16'(a)] = 8'hFF;
    r0 = 8'h0F; r2 = 8'd0; r3 = 8'd1;
    exp_addr = 16'hC000;
    wr4015(1'b1);
    repeat (54 * 3 * 8 * 20) @(posedge clk); #1;
    chk("clamp high", int'(out), 126);
    for (int a = 16'hC000; a < 16'hC020; a++) mem[16'(a)] = 8'h00;
    r1 = 8'd5; wr_r1 = 1; @(posedge clk); #1; wr_r1 = 0;
    exp_addr = 16'hC000;
    wr4015(1'b1);
    repeat (54 * 3 * 8 * 20) @(posedge clk); #1;
    chk("clamp low", int'(out), 1);
    // Loop: reads wrap back to the start and never end
    r0 = 8'h4F; r2 = 8'd2; r3 = 8'd0;    // 1 byte at $C040, looping
    exp_addr = 16'hC040;
    n_reads = 0;
    fork
      begin
        wr4015(1'b1);
      end
      begin
        // the monitor expects $C040 again after each loop
        forever begin @(posedge clk); if (n_reads > 0) exp_addr = 16'hC040; end
      end
    join_any
    repeat (54 * 3 * 8 * 6) @(posedge clk); #1;
    disable fork;
    chk("looping reads", int'(n_reads >= 4), 1);
    chk("looping active", int'(active), 1);
    chk("no irq when looping", int'(irq), 0);
    wr4015(1'b0);
    chk("stopped by 4015", int'(active), 0);
    t = n_reads;
    repeat (54 * 3 * 8 * 4) @(posedge clk); #1;
    chk("no reads after stop", n_reads - t, 0);
    chk("dma address order", addr_errs, 0);
    chk("8-cycle stalls", stall_errs, 0);
    chk("output model", out_errs, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
