// frame_counter_tb: counts pulse_e, pulse_l and IRQs in 4-step and 5-step
// modes (with a short QUARTER so the run is quick) and checks the IRQ
// inhibit bit and IRQ clearing.
module frame_counter_tb;
  localparam int Q = 20;
  logic clk = 0, rst = 1;
  logic pulse_cpu = 0;
  logic [7:0] r4017 = 0;
  logic wr_4017 = 0, irq_clear = 0;
  logic pulse_e, pulse_l, irq;
  int checks = 0, failures = 0;
  int ne, nl, nirq;
  logic irq_q;

  frame_counter #(.QUARTER(Q)) dut (.clk, .rst, .pulse_cpu, .r4017, .wr_4017, .irq_clear,
                                    .pulse_e, .pulse_l, .irq);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    irq_q <= irq;
    if (pulse_e) ne++;
    if (pulse_l) nl++;
    if (irq && !irq_q) nirq++;
  end

  task automatic run(int npulses);
    ne = 0; nl = 0; nirq = 0;
    repeat (npulses) begin
      pulse_cpu = 1; @(posedge clk); #1;
      pulse_cpu = 0; @(posedge clk); #1;
      if (irq && r4017[6] == 0 && r4017[7] == 0) begin
        irq_clear = 1; @(posedge clk); #1; irq_clear = 0;
      end
    end
    @(posedge clk); #1;
  endtask

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic write(logic [7:0] v);
    r4017 = v; wr_4017 = 1; @(posedge clk); #1; wr_4017 = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 0;
    write(8'h00);                       // 4-step, IRQ enabled
    run(Q * 4 * 10);
    chk("4-step pulse_e", ne, 40);
    chk("4-step pulse_l", nl, 20);
    chk("4-step irq", nirq, 10);
    write(8'h40);                       // inhibit
    run(Q * 4 * 5);
    chk("inhibit irq", nirq, 0);
    chk("inhibit irq level", int'(irq), 0);
    write(8'h80);                       // 5-step: 4/5 rate, no IRQ
    run(Q * 5 * 10);
    chk("5-step pulse_e", ne, 40);
    chk("5-step pulse_l", nl, 20);
    chk("5-step irq", nirq, 0);
    // IRQ stays set until cleared
    write(8'h00);
    ne = 0;
    repeat (Q * 4) begin pulse_cpu = 1; @(posedge clk); #1; pulse_cpu = 0; @(posedge clk); #1; end
    chk("irq held", int'(irq), 1);
    irq_clear = 1; @(posedge clk); #1; irq_clear = 0;
    chk("irq cleared", int'(irq), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
