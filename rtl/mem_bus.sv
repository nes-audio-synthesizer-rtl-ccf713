// mem_bus: the shared 16-bit address / 8-bit data bus.
// Main devices (N_MAIN of them, index 0 has the highest priority) each
// drive address, write data and read/write strobes. A multiplexer passes
// the highest-priority requesting main device's address and data to every
// secondary device; grant[] tells each main device whether it owns the
// bus this clock. The address range selects the secondary: $4000-$4017 is
// the APU, everything else the memory. Secondary read data is returned
// through a second multiplexer steered by the range of the previous
// clock's address, since both secondaries answer one clock after the
// address; every main device sees that byte on m_rdata.
module mem_bus #(
  parameter int N_MAIN = 4
) (
  input  logic        clk,
  input  logic        rst,
  // main devices
  input  logic [15:0] m_addr  [N_MAIN],
  input  logic [7:0]  m_wdata [N_MAIN],
  input  logic        m_rd    [N_MAIN],
  input  logic        m_wr    [N_MAIN],
  output logic        grant   [N_MAIN],
  output logic [7:0]  m_rdata,
  // secondary: memory
  output logic [15:0] mem_addr,
  output logic [7:0]  mem_wdata,
  output logic        mem_we,
  input  logic [7:0]  mem_rdata,
  // secondary: APU
  output logic        apu_sel,
  output logic [4:0]  apu_addr,
  output logic [7:0]  apu_wdata,
  output logic        apu_we,
  output logic        apu_re,
  input  logic [7:0]  apu_rdata
);
  logic [15:0] addr;
  logic [7:0]  wdata;
  logic        rd, wr, hit_apu, apu_q;

  always_comb begin
    addr  = '0;
    wdata = '0;
    rd    = 1'b0;
    wr    = 1'b0;
    for (int i = 0; i < N_MAIN; i++) grant[i] = 1'b0;
    // Scan from lowest to highest priority; the last requester found wins.
    for (int i = N_MAIN - 1; i >= 0; i--) begin
      if (m_rd[i] || m_wr[i]) begin
        addr  = m_addr[i];
        wdata = m_wdata[i];
        rd    = m_rd[i];
        wr    = m_wr[i];
        for (int j = 0; j < N_MAIN; j++) grant[j] = (j == i);
      end
    end
    hit_apu = (addr >= 16'h4000) && (addr <= 16'h4017);
  end

  assign mem_addr  = addr;
  assign mem_wdata = wdata;
  assign mem_we    = wr && !hit_apu;
  assign apu_sel   = hit_apu;
  assign apu_addr  = addr[4:0];
  assign apu_wdata = wdata;
  assign apu_we    = wr && hit_apu;
  assign apu_re    = rd && hit_apu;

  always_ff @(posedge clk) begin
    if (rst) apu_q <= 1'b0;
    else     apu_q <= hit_apu;
  end

  assign m_rdata = apu_q ? apu_rdata : mem_rdata;
endmodule
