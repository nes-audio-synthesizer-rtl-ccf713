// apu_tb: drives the APU through its bus port the way the CPU does (write
// strobes, registered reads) and checks the register decode end to end:
// $4015 enables and length status per channel, that each channel sounds
// with the written volume, the frame IRQ flag in $4015 (cleared by the
// read), the $4017 IRQ inhibit, the DMC DMA/stall and DMC IRQ flag, and
// that random writes to unused addresses $4009/$400D do nothing.
module apu_tb;
  logic clk = 0, rst = 1;
  logic pulse_cpu = 0, pulse_apu = 0;
  logic sel = 0, we = 0, re = 0;
  logic [4:0] addr = 0;
  logic [7:0] wdata = 0, rdata, dma_data;
  logic stall, dma_req, irq;
  logic [15:0] dma_addr;
  logic [3:0] sq1_out, sq2_out, tri_out, noise_out;
  logic [6:0] dmc_out;
  int checks = 0, failures = 0;

  apu #(.FRAME_QUARTER(60)) dut (.clk, .rst, .pulse_cpu, .pulse_apu, .sel, .addr, .wdata,
    .we, .re, .rdata, .stall, .dma_req, .dma_addr, .dma_data, .irq,
    .sq1_out, .sq2_out, .tri_out, .noise_out, .dmc_out);

  always #5 clk = ~clk;
  int cnt = 0;
  always @(posedge clk) begin
    cnt <= (cnt == 5) ? 0 : cnt + 1;
    pulse_cpu <= (cnt == 2) || (cnt == 5);
    pulse_apu <= (cnt == 5);
  end
  always @(posedge clk) dma_data <= 8'(dma_addr[7:0] * 8'd37);

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic wr(logic [4:0] a, logic [7:0] d);
    sel = 1; we = 1; addr = a; wdata = d; @(posedge clk); #1;
    sel = 0; we = 0;
    repeat (2) @(posedge clk); #1;     // CPU bus accesses are 3 clocks apart
  endtask
  task automatic rd(logic [4:0] a, output logic [7:0] d);
    sel = 1; re = 1; addr = a; @(posedge clk); #1;
    sel = 0; re = 0; d = rdata;
  endtask

  // peak output of a channel over n clocks
  task automatic peak(int which, int n, output int p);
    p = 0;
    repeat (n) begin
      @(posedge clk); #1;
      case (which)
        0: if (sq1_out > p) p = sq1_out;
        1: if (sq2_out > p) p = sq2_out;
        2: if (tri_out > p) p = tri_out;
        3: if (noise_out > p) p = noise_out;
      endcase
    end
  endtask

  initial begin
    logic [7:0] s;
    int p;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    wr(5'h17, 8'h40);                   // 4-step, IRQ inhibited
    rd(5'h15, s); chk("status after reset", s, 0);
    wr(5'h15, 8'h0F);
    wr(5'h00, 8'hB5); wr(5'h02, 8'd40); wr(5'h03, 8'h08);   // sq1 volume 5
    wr(5'h04, 8'h7A); wr(5'h06, 8'd60); wr(5'h07, 8'h08);   // sq2 volume 10
    wr(5'h08, 8'hFF); wr(5'h0A, 8'd20); wr(5'h0B, 8'h08);   // triangle
    wr(5'h0C, 8'h3C); wr(5'h0E, 8'h02); wr(5'h0F, 8'h08);   // noise volume 12
    rd(5'h15, s); chk("length status 4 channels", s & 8'h0F, 8'h0F);
    peak(0, 3000, p); chk("sq1 volume", p, 5);
    peak(1, 3000, p); chk("sq2 volume", p, 10);
    peak(2, 6000, p); chk("triangle peak", p, 15);
    peak(3, 3000, p); chk("noise volume", p, 12);
    // random writes to unused $4009 and $400D do nothing visible
    for (int i = 0; i < 20; i++) begin
      wr(5'h09, 8'($urandom)); wr(5'h0D, 8'($urandom));
    end
    peak(0, 2000, p); chk("sq1 unaffected", p, 5);
    // disabling sq2 clears its length status
    wr(5'h15, 8'h0D);
    rd(5'h15, s); chk("sq2 disabled", s & 8'h0F, 8'h0D);
    peak(1, 2000, p); chk("sq2 silent", p, 0);
    // frame IRQ: 4-step mode with IRQ enabled
    wr(5'h17, 8'h00);
    repeat (6 * 60 * 5) @(posedge clk); #1;
    chk("irq line", int'(irq), 1);
    rd(5'h15, s); chk("frame irq flag", int'(s[6]), 1);
    @(posedge clk); #1;
    rd(5'h15, s); chk("frame irq cleared by read", int'(s[6]), 0);
    wr(5'h17, 8'h40);
    repeat (6 * 60 * 5) @(posedge clk); #1;
    chk("irq inhibited", int'(irq), 0);
    // DMC: rate 15, IRQ on, 17 bytes at $C000
    wr(5'h10, 8'h8F); wr(5'h12, 8'h00); wr(5'h13, 8'h01);
    wr(5'h15, 8'h1D);
    @(posedge clk); #1;
    rd(5'h15, s); chk("dmc active", int'(s[4]), 1);
    p = 0;
    repeat (200000) begin
      @(posedge clk); #1;
      if (dma_req && !stall) p++;
      if (irq) break;
    end
    chk("dma only during stall", p, 0);
    rd(5'h15, s); chk("dmc irq flag", int'(s[7]), 1);
    chk("dmc finished", int'(s[4]), 0);
    wr(5'h15, 8'h0D);
    rd(5'h15, s); chk("dmc irq cleared by 4015 write", int'(s[7]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
