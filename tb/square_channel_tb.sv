// square_channel_tb: drives the square channel's registers directly and
// checks the output period 16*(P+1) clocks (the 895 kHz pulse is every 2
// clocks here), each duty cycle, the constant volume, the period<8 mute,
// the length counter, the envelope decay and both sweep directions
// (channel 1 subtracts shift+1, channel 2 only the shifted period).
module square_channel_tb;
  logic clk = 0, rst = 1;
  logic pulse_apu = 0, pulse_e = 0, pulse_l = 0;
  logic [7:0] r0 = 0, r1 = 0, r2 = 0, r3 = 0;
  logic wr_r1 = 0, wr_r2 = 0, wr_r3 = 0, enable = 1;
  logic [3:0] out1, out2;
  logic len1, len2;
  int checks = 0, failures = 0;

  square_channel #(.SWEEP_ONES_COMPLEMENT(1'b1)) dut1 (.clk, .rst, .pulse_apu, .pulse_e, .pulse_l,
    .r0, .r1, .r2, .r3, .wr_r1, .wr_r2, .wr_r3, .enable, .out(out1), .len_active(len1));
  square_channel #(.SWEEP_ONES_COMPLEMENT(1'b0)) dut2 (.clk, .rst, .pulse_apu, .pulse_e, .pulse_l,
    .r0, .r1, .r2, .r3, .wr_r1, .wr_r2, .wr_r3, .enable, .out(out2), .len_active(len2));

  always #5 clk = ~clk;
  always @(posedge clk) pulse_apu <= rst ? 1'b0 : ~pulse_apu;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic prog(logic [7:0] v0, logic [7:0] v1, logic [10:0] period, logic [4:0] idx);
    r0 = v0; r1 = v1; r2 = period[7:0]; r3 = {idx, period[10:8]};
    wr_r1 = 1; wr_r2 = 1; wr_r3 = 1; @(posedge clk); #1;
    wr_r1 = 0; wr_r2 = 0; wr_r3 = 0;
  endtask

  task automatic tick_e(); pulse_e = 1; @(posedge clk); #1; pulse_e = 0; endtask
  task automatic tick_l(); pulse_l = 1; @(posedge clk); #1; pulse_l = 0; endtask

  // Measure one full period of dut1's output: clocks high and total.
  task automatic measure(output int high, output int total, output int peak);
    int t;
    high = 0; total = 0; peak = 0;
    t = 0;
    while (!(out1 == 0)) begin @(posedge clk); #1; if (++t > 100000) break; end
    while (out1 == 0)    begin @(posedge clk); #1; if (++t > 100000) break; end
    while (out1 != 0)    begin if (out1 > peak) peak = out1; high++; total++; @(posedge clk); #1; end
    while (out1 == 0)    begin total++; @(posedge clk); #1; if (total > 100000) break; end
  endtask

  initial begin
    int h, t, p;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    // 50 % duty, constant volume 9, halted length counter, period 32
    prog(8'b10_1_1_1001, 8'h00, 11'd32, 5'd1);
    measure(h, t, p);
    chk("period 32 total", t, 16 * 33);
    chk("50% high", h, 8 * 33);
    chk("constant volume", p, 9);
    for (int d = 0; d < 4; d++) begin
      int steps[4] = '{1, 2, 4, 6};
      prog({2'(d), 6'b1_1_1001}, 8'h00, 11'd20, 5'd1);
      measure(h, t, p);
      chk($sformatf("duty %0d high", d), h, steps[d] * 2 * 21);
      chk($sformatf("duty %0d total", d), t, 16 * 21);
    end
    // period below 8 mutes
    prog(8'b10_1_1_1001, 8'h00, 11'd7, 5'd1);
    h = 0;
    repeat (2000) begin @(posedge clk); #1; if (out1 != 0) h++; end
    chk("period<8 muted", h, 0);
    // length counter: index 3 loads 2, two pulse_l silence the channel
    prog(8'b10_0_1_1001, 8'h00, 11'd40, 5'd3);
    chk("length active", int'(len1), 1);
    tick_l(); chk("length after 1", int'(len1), 1);
    tick_l(); chk("length after 2", int'(len1), 0);
    h = 0;
    repeat (3000) begin @(posedge clk); #1; if (out1 != 0) h++; end
    chk("length expired muted", h, 0);
    // disable clears the counter
    prog(8'b10_1_1_1001, 8'h00, 11'd40, 5'd1);
    enable = 0; @(posedge clk); #1;
    chk("disabled length", int'(len1), 0);
    enable = 1;
    // envelope decay, Pd = 1: 15 after the start tick, then -1 per 2 ticks
    prog(8'b10_1_0_0001, 8'h00, 11'd40, 5'd1);
    tick_e();
    measure(h, t, p); chk("envelope start", p, 15);
    tick_e(); tick_e();
    measure(h, t, p); chk("envelope after 2 ticks", p, 14);
    tick_e(); tick_e(); tick_e(); tick_e();
    measure(h, t, p); chk("envelope after 6 ticks", p, 12);
    // sweep up: shift 1, sweep divider period 0 (a sweep on every
    // half-frame tick), period 256 -> 384 after one tick
    prog(8'b10_1_1_1001, 8'b1_000_0_001, 11'd256, 5'd1);
    tick_l();
    measure(h, t, p);
    chk("sweep up period", t, 16 * 385);
    // sweep down: channel 1 256-128-1 = 127, channel 2 256-128 = 128
    prog(8'b10_1_1_1001, 8'b1_000_1_001, 11'd256, 5'd1);
    tick_l();
    chk("sweep down ch1", int'(dut1.u_sweep.period), 127);
    chk("sweep down ch2", int'(dut2.u_sweep.period), 128);
    measure(h, t, p);
    chk("sweep down ch1 period", t, 16 * 128);
    // target above 2047 mutes when the sweep is enabled
    prog(8'b10_1_1_1001, 8'b1_000_0_000, 11'd1500, 5'd1);
    h = 0;
    repeat (2000) begin @(posedge clk); #1; if (out1 != 0) h++; end
    chk("sweep overflow mute", h, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
