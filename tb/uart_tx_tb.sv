// uart_tx_tb: sends random bytes, back to back and with gaps, and decodes
// the serial line with an independent sampler in the middle of each bit.
// Checks the start bit, data bits LSB first, the stop bit, the bit time
// (CLK_HZ/BAUD clocks, measured on the start bit), that busy covers the
// whole frame and that start requests while busy are ignored.
module uart_tx_tb;
  localparam int CLK_HZ = 25_000_000, BAUD = 38_400;
  localparam int BC = CLK_HZ / BAUD;
  logic clk = 0, rst = 1, start = 0;
  logic [7:0] data = 0;
  logic tx, busy;
  int checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst, .start, .data, .tx, .busy);

  always #20 clk = ~clk;
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

  // independent receiver: low-time of each frame's first run of zeros
  logic [7:0] rxq [$];
  int start_len [$];
  int frame_err = 0;
  initial begin
    forever begin
      int w;
      @(negedge tx);
      w = 0;
      while (!tx) begin @(posedge clk); w++; end
      start_len.push_back(w);
    end
  end

  // mid-bit sampler started at each frame
  initial begin
    forever begin
      logic [9:0] f;
      @(negedge tx);
      repeat (BC / 2) @(posedge clk);
      for (int i = 0; i < 10; i++) begin
        f[i] = tx;
        if (i < 9) repeat (BC) @(posedge clk);
      end
      if (f[0] != 0 || f[9] != 1) frame_err++;
      rxq.push_back(f[8:1]);
    end
  end

  initial begin
    logic [7:0] sent [$];
    int busy_clk;
    repeat (5) @(posedge clk); #1;
    rst = 0;
    repeat (50) @(posedge clk); #1;
    chk("idle high", tx, 1);
    // first byte 0x00: the line stays low for 9 bit times
    for (int i = 0; i < 30; i++) begin
      logic [7:0] b;
      b = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      while (busy) @(posedge clk);
      #1;
      data = b; start = 1; @(posedge clk); #1; start = 0;
      sent.push_back(b);
      // a start while busy is ignored
      if (i % 3 == 1) begin
        repeat (BC * 2) @(posedge clk); #1;
        data = 8'hA5; start = 1; @(posedge clk); #1; start = 0;
      end
      busy_clk = 0;
      while (busy) begin @(posedge clk); busy_clk++; end
      if (i == 0) chk("busy covers the 10-bit frame", int'(busy_clk >= 10 * BC - 2 && busy_clk <= 10 * BC + 2), 1);
      if (i % 2 == 0) repeat ($urandom_range(0, 3 * BC)) @(posedge clk);
    end
    repeat (12 * BC) @(posedge clk);
    chk("frames", rxq.size(), sent.size());
    foreach (sent[i]) if (i < rxq.size()) chk($sformatf("byte %0d", i), rxq[i], sent[i]);
    chk("start/stop bits", frame_err, 0);
    // first frame was 0x00: low for 9 bit times exactly
    chk("bit time (0x00 frame low length / 9)", start_len[0] / 9, BC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
