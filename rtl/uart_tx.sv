// uart_tx: 8N1 serial transmitter for the debugger terminal (38,400 bps).
// A 'start' pulse while not busy loads 'data'; the line then carries a
// start bit, the eight data bits LSB first and a stop bit, each DIV =
// CLK_HZ/BAUD clocks long. 'busy' is high from the clock after 'start'
// until the stop bit has been sent.
module uart_tx #(
  parameter int CLK_HZ = 25_000_000,
  parameter int BAUD   = 38_400
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy
);
  localparam int DIV = CLK_HZ / BAUD;

  logic [$clog2(DIV)-1:0] cnt;
  logic [3:0] bitn;
  logic [9:0] frame;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; bitn <= '0; frame <= '1; busy <= 1'b0; tx <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        busy  <= 1'b1;
        bitn  <= '0;
        cnt   <= '0;
      end
    end else begin
      tx <= frame[0];
      if (cnt == $bits(cnt)'(DIV - 1)) begin
        cnt   <= '0;
        frame <= {1'b1, frame[9:1]};
        if (bitn == 4'd9) busy <= 1'b0;
        else              bitn <= bitn + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
