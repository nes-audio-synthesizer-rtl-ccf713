// noise_channel_tb: compares the 15-bit shift register with a reference
// model in both modes (feedback from bit 1, or bit 6 when $400E bit 7 is
// set), checks the shift interval (table value of 895 kHz pulses) for
// random period indexes, the output (volume when bit 0 is 0, else 0) and
// the length counter mute.
module noise_channel_tb;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  logic pulse_apu = 0, pulse_e = 0, pulse_l = 0;
  logic [7:0] r0 = 0, r1 = 0, r2 = 0;
  logic wr_r2 = 0, enable = 1;
  logic [3:0] out;
  logic len_active;
  logic [14:0] lfsr;
  int checks = 0, failures = 0;

  noise_channel dut (.clk, .rst, .pulse_apu, .pulse_e, .pulse_l, .r0, .r1, .r2,
                     .wr_r2, .enable, .out, .len_active, .lfsr);

  always #5 clk = ~clk;
  always @(posedge clk) pulse_apu <= rst ? 1'b0 : ~pulse_apu;

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic logic [14:0] step(logic [14:0] s, logic mode);
    logic fb;
    fb = s[0] ^ (mode ? s[6] : s[1]);
    return {fb, s[14:1]};
  endfunction

  initial begin
    logic [14:0] model;
    int errs, dt, ov;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    chk("lfsr reset", int'(lfsr), 1);
    r0 = 8'h37;                    // halt, constant volume 7
    r2 = {5'd1, 3'd0};
    wr_r2 = 1; @(posedge clk); #1; wr_r2 = 0;
    for (int m = 0; m < 2; m++) begin
      for (int k = 0; k < 6; k++) begin
        logic [3:0] idx;
        idx = 4'($urandom_range(0, 5));
        r1 = {1'(m), 3'b0, idx};
        // sync to a shift
        model = lfsr;
        while (lfsr == model) begin @(posedge clk); #1; end
        model = lfsr;
        errs = 0; ov = 0;
        for (int n = 0; n < 40; n++) begin
          dt = 0;
          while (lfsr == model && dt < 10000) begin @(posedge clk); #1; dt++; end
          if (lfsr != step(model, m[0])) errs++;
          if (dt != 2 * int'(noise_lut(idx))) errs++;
          if (out != (lfsr[0] ? 4'd0 : 4'd7)) ov++;
          model = lfsr;
        end
        chk($sformatf("mode %0d idx %0d shifts", m, idx), errs, 0);
        chk($sformatf("mode %0d idx %0d output", m, idx), ov, 0);
      end
    end
    // Mode 0 is a 32767-step sequence: check with the model only
    model = 15'd1;
    for (int n = 0; n < 32767; n++) model = step(model, 1'b0);
    chk("model period 32767", int'(model), 1);
    // Length counter mute
    r0 = 8'h17;                    // halt off
    r2 = {5'd3, 3'd0};
    wr_r2 = 1; @(posedge clk); #1; wr_r2 = 0;
    pulse_l = 1; @(posedge clk); #1; @(posedge clk); #1; pulse_l = 0;
    chk("length expired", int'(len_active), 0);
    ov = 0;
    repeat (2000) begin @(posedge clk); #1; if (out != 0) ov++; end
    chk("muted output", ov, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
