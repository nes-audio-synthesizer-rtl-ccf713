// memory_tb: random reads and writes over the whole 16-bit space with
// random bank-register writes, compared with a reference model of the
// physical address map: work RAM at $0000-$7FFF, eight 4 kB windows at
// $8000-$FFFF mapped through the bank registers at $5FF8-$5FFF to a 20-bit
// space cut to the program RAM size, and the vector bytes $FFFA-$FFFF
// fixed to the top of that space. Also checks the bank reset values, that
// read data comes one clock after the address, and that data written
// through one window is seen through another window mapped to the same
// bank.
module memory_tb;
  localparam int PRG_AW = 18;
  logic clk = 0, rst = 1;
  logic [15:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic we = 0;
  logic [7:0] bank_out [8];
  int checks = 0, failures = 0;

  memory #(.PRG_AW(PRG_AW)) dut (.clk, .rst, .addr, .wdata, .we, .rdata, .bank_out);

  always #5 clk = ~clk;
  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] wram [int];
  logic [7:0] prg [int];
  logic [7:0] bank [8];

  function automatic int phys(logic [15:0] a);
    int p;
    if (a >= 16'hFFFA) p = 32'hFF000 | int'(a[11:0]);
    else p = (int'(bank[a[14:12]]) << 12) | int'(a[11:0]);
    return p & ((1 << PRG_AW) - 1);
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic write(logic [15:0] a, logic [7:0] d);
    addr = a; wdata = d; we = 1; @(posedge clk); #1; we = 0;
    if (a[15]) prg[phys(a)] = d;
    else begin
      wram[int'(a)] = d;
      if (a[15:3] == 13'h0BFF) bank[a[2:0]] = d;
    end
  endtask

  int rd_errs = 0;
  task automatic read(logic [15:0] a);
    logic [7:0] e;
    bit known;
    addr = a; @(posedge clk); #1;
    if (a[15]) begin known = prg.exists(phys(a)); e = known ? prg[phys(a)] : 8'h00; end
    else begin known = wram.exists(int'(a)); e = known ? wram[int'(a)] : 8'h00; end
    if (known) begin
      checks++;
      if (rdata != e) begin
        failures++;
        if (rd_errs++ < 5) $display("FAIL read %h: got %h exp %h", a, rdata, e);
      end
    end
  endtask

  initial begin
    logic [15:0] a;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 8; i++) begin bank[i] = 8'(i); chk($sformatf("bank %0d reset", i), bank_out[i], i); end
    // Seed every bank value the test will use
    for (int it = 0; it < 30000; it++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 8) write({13'h0BFF, 3'($urandom)}, 8'($urandom_range(0, 63)));
      else if (r < 45) begin
        a = 16'($urandom);
        if (r < 25) a[15] = 1'b1; else if (r < 30) a = 16'hFFFA + 16'($urandom_range(0, 5));
        write(a, 8'($urandom));
      end else begin
        a = 16'($urandom);
        if (r < 80) a[15] = 1'b1; else if (r < 85) a = 16'hFFFA + 16'($urandom_range(0, 5));
        read(a);
      end
    end
    for (int i = 0; i < 8; i++) chk($sformatf("bank %0d value", i), bank_out[i], bank[i]);
    // alias: windows 1 and 5 mapped to the same bank
    write(16'h5FF9, 8'd40); write(16'h5FFD, 8'd40);
    write(16'h9123, 8'h5E);
    addr = 16'hD123; @(posedge clk); #1;
    chk("alias through other window", rdata, 8'h5E);
    // read latency: data belongs to the previous clock's address
    write(16'h0010, 8'h11); write(16'h0011, 8'h22);
    addr = 16'h0010; @(posedge clk); #1; addr = 16'h0011;
    chk("data for previous address", rdata, 8'h11);
    @(posedge clk); #1;
    chk("next data", rdata, 8'h22);
    // vectors ignore bank 7
    write(16'h5FFF, 8'd3);
    write(16'hFFFC, 8'hA5);
    write(16'h5FFF, 8'd9);
    addr = 16'hFFFC; @(posedge clk); #1;
    chk("vector independent of bank 7", rdata, 8'hA5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
