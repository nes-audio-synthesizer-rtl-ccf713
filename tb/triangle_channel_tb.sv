// triangle_channel_tb: checks the 32-step triangle sequence (0..15, 15..0),
// a step time of P+1 CPU pulses, the linear counter (reload from r0[6:0]
// on the quarter-frame pulse after a $400B write, then counting down), the
// length counter, and that a silenced channel walks down to level 0 and
// holds there.
module triangle_channel_tb;
  logic clk = 0, rst = 1;
  logic pulse_cpu = 0, pulse_e = 0, pulse_l = 0;
  logic [7:0] r0 = 0, r1 = 0, r2 = 0;
  logic wr_r2 = 0, enable = 1;
  logic [3:0] out;
  logic len_active;
  int checks = 0, failures = 0;

  triangle_channel dut (.clk, .rst, .pulse_cpu, .pulse_e, .pulse_l, .r0, .r1, .r2,
                        .wr_r2, .enable, .out, .len_active);

  always #5 clk = ~clk;
  always @(posedge clk) pulse_cpu <= rst ? 1'b0 : ~pulse_cpu;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic tick_e(); pulse_e = 1; @(posedge clk); #1; pulse_e = 0; endtask
  task automatic tick_l(); pulse_l = 1; @(posedge clk); #1; pulse_l = 0; endtask

  // Wait for the next output change; return the clocks it took.
  task automatic next_change(output int dt, output int val);
    logic [3:0] v0;
    v0 = out; dt = 0;
    do begin @(posedge clk); #1; dt++; end while (out == v0 && dt < 5000);
    val = out;
  endtask

  initial begin
    int dt, v, exp, seen, errs, last;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    // Control set, reload 127, period 10 (11 CPU pulses = 22 clocks/step)
    r0 = 8'hFF; r1 = 8'd10; r2 = {5'd1, 3'd0};
    wr_r2 = 1; @(posedge clk); #1; wr_r2 = 0;
    // No quarter-frame pulse yet: linear counter 0, no stepping
    v = out;
    repeat (200) @(posedge clk); #1;
    chk("silent before linear load", int'(out), v);
    tick_e();
    chk("linear loaded", int'(dut.lin), 127);
    // Walk to the start of the sequence (level 0 -> 1 transition)
    do next_change(dt, v); while (v != 1);
    errs = 0; last = 1;
    for (int i = 0; i < 70; i++) begin
      int st;
      next_change(dt, v);
      // Levels 15 and 0 are held for two steps, all others for one.
      st = (last == 15 || last == 0) ? 44 : 22;
      exp = (v > last) ? last + 1 : last - 1;
      if (dt != st || v != exp) begin
        errs++;
        if (errs < 4) $display("step %0d: dt=%0d v=%0d last=%0d", i, dt, v, last);
      end
      last = v;
    end
    chk("triangle steps", errs, 0);
    // Linear counter: control clear, reload 3. After 1 load + 3 decrements it stops.
    r0 = 8'h03;
    wr_r2 = 1; @(posedge clk); #1; wr_r2 = 0;
    tick_e(); chk("linear reload 3", int'(dut.lin), 3);
    tick_e(); tick_e(); tick_e();
    chk("linear at 0", int'(dut.lin), 0);
    // Walks down to 0, then holds
    repeat (32 * 22 + 50) @(posedge clk); #1;
    chk("muted level", int'(out), 0);
    seen = 0;
    repeat (500) begin @(posedge clk); #1; if (out != 0) seen++; end
    chk("stays muted", seen, 0);
    // Length counter: index 3 -> 2 half-frames; control clear (halt off)
    r0 = 8'h7F;
    r2 = {5'd3, 3'd0};
    wr_r2 = 1; @(posedge clk); #1; wr_r2 = 0;
    tick_e();
    chk("len active", int'(len_active), 1);
    tick_l(); tick_l();
    chk("len expired", int'(len_active), 0);
    // Disabled channel does not run
    enable = 0; @(posedge clk); #1;
    chk("disable clears", int'(len_active), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
