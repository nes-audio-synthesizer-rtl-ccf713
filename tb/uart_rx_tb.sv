// uart_rx_tb: a testbench serial driver sends random bytes at 38400 baud
// (8N1) from a 25 MHz clock, with random idle gaps and with the bit
// rate off by up to +/-2 %. Checks every received byte, one valid pulse
// per byte, and that a short glitch on the idle line (shorter than half a
// bit) produces no byte.
module uart_rx_tb;
  localparam int CLK_HZ = 25_000_000, BAUD = 38_400;
  logic clk = 0, rst = 1, rx = 1;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst, .rx, .data, .valid);

  always #20 clk = ~clk;   // 25 MHz
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] got [$];
  always @(posedge clk) if (valid) got.push_back(data);

  task automatic send(logic [7:0] b, int bit_clk);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (bit_clk) @(posedge clk); end
  endtask

  initial begin
    logic [7:0] sent [$];
    int nominal = CLK_HZ / BAUD;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b;
      int bc;
      b = 8'($urandom);
      bc = nominal + $urandom_range(0, 2 * nominal / 50) - nominal / 50;
      if (i == 0) b = 8'h00;
      if (i == 1) b = 8'hFF;
      sent.push_back(b);
      send(b, bc);
      repeat ($urandom_range(0, 3 * nominal)) @(posedge clk);
    end
    // glitch: 1/4 bit low
    rx = 0; repeat (nominal / 4) @(posedge clk); rx = 1;
    repeat (20 * nominal) @(posedge clk);
    checks++;
    if (got.size() != sent.size()) begin
      failures++; $display("FAIL byte count %0d exp %0d", got.size(), sent.size());
    end
    foreach (sent[i]) begin
      checks++;
      if (i >= got.size() || got[i] != sent[i]) begin
        failures++;
        $display("FAIL byte %0d: exp %h", i, sent[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
