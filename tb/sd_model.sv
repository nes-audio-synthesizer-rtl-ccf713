// sd_model: behavioural stand-in for the SD card controller, used by the
// testbenches. It holds a card image in 'img' (filled by the testbench
// through a hierarchical reference). A one-clock rd pulse while ready
// starts a 512-byte sector read at byte address addr: ready drops, after
// START_DELAY clocks the bytes come out one every BYTE_GAP clocks, each
// with a one-clock byte_available, and ready rises again after the last
// byte. n_reads counts the sector reads.
module sd_model #(
  parameter int N_SECTORS   = 32,
  parameter int BYTE_GAP    = 3,
  parameter int START_DELAY = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rd,
  input  logic [31:0] addr,
  output logic [7:0]  dout,
  output logic        byte_available,
  output logic        ready
);
  logic [7:0] img [N_SECTORS * 512];
  int n_reads = 0;
  int base, cnt, gap;
  logic busy;

  initial foreach (img[i]) img[i] = 8'h00;

  always @(posedge clk) begin
    byte_available <= 1'b0;
    if (rst) begin
      ready <= 1'b0; busy <= 1'b0; gap <= START_DELAY;
    end else if (!busy) begin
      ready <= 1'b1;
      if (rd && ready) begin
        busy <= 1'b1; ready <= 1'b0; base = int'(addr); cnt = 0; gap <= START_DELAY;
        n_reads++;
      end
    end else begin
      if (gap > 0) gap <= gap - 1;
      else if (cnt < 512) begin
        dout <= (base + cnt < N_SECTORS * 512) ? img[base + cnt] : 8'h00;
        byte_available <= 1'b1;
        cnt = cnt + 1;
        gap <= BYTE_GAP - 1;
      end else begin
        busy <= 1'b0; ready <= 1'b1;
      end
    end
  end
endmodule
