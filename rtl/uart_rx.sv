// uart_rx: 8N1 serial receiver for the debugger terminal link (38,400 bps).
// The idle-high line is sampled; a falling edge starts a frame, which is
// checked again half a bit later, then each data bit is sampled in the
// middle of its bit time, LSB first. After the stop bit 'data' holds the
// byte and 'valid' pulses for one clock. A frame whose stop bit is low is
// dropped. The input is synchronised with two flip-flops first.
module uart_rx #(
  parameter int CLK_HZ = 25_000_000,
  parameter int BAUD   = 38_400
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  localparam int DIV = CLK_HZ / BAUD;

  logic [1:0]  sync;
  logic [$clog2(DIV)-1:0] cnt;
  logic [3:0]  bitn;
  logic [7:0]  sh;
  logic        busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= 2'b11; cnt <= '0; bitn <= '0; sh <= '0; busy <= 1'b0;
      data <= '0; valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      if (!busy) begin
        if (!sync[1]) begin
          busy <= 1'b1;
          cnt  <= $bits(cnt)'(DIV / 2);
          bitn <= '0;
        end
      end else if (cnt == '0) begin
        cnt <= $bits(cnt)'(DIV - 1);
        if (bitn == 4'd0) begin
          if (sync[1]) busy <= 1'b0;        // false start
          else         bitn <= 4'd1;
        end else if (bitn <= 4'd8) begin
          sh   <= {sync[1], sh[7:1]};
          bitn <= bitn + 1'b1;
        end else begin
          busy <= 1'b0;
          if (sync[1]) begin
            data  <= sh;
            valid <= 1'b1;
          end
        end
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end
endmodule
