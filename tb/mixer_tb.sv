// mixer_tb: compares the mixer against the two mixing formulas evaluated in
// floating point, for every square sum, a sweep of triangle/noise/DMC
// values, and the volume scaling.
module mixer_tb;
  logic clk = 0;
  logic [3:0] sq1, sq2, tri_v, noise;
  logic [6:0] dmc;
  logic [3:0] vol;
  logic [7:0] sample;
  int checks = 0, failures = 0;

  mixer dut (.clk, .sq1, .sq2, .triangle(tri_v), .noise, .dmc, .vol_level(vol), .sample);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sqr_ref(int n);
    if (n == 0) return 0;
    return $rtoi(255.0 * (95.52 / (8128.0 / n + 100.0)) + 0.5);
  endfunction
  function automatic int tnd_ref(int n);
    if (n == 0) return 0;
    return $rtoi(255.0 * (163.67 / (24329.0 / n + 100.0)) + 0.5);
  endfunction

  task automatic try(int a, int b, int t, int n, int d, int v);
    int exp;
    sq1 = 4'(a); sq2 = 4'(b); tri_v = 4'(t); noise = 4'(n); dmc = 7'(d); vol = 4'(v);
    @(posedge clk); #1;
    exp = ((sqr_ref(a + b) + tnd_ref(3 * t + 2 * n + d)) * v) / 8;
    if (exp > 255) exp = 255;
    checks++;
    if (sample != 8'(exp)) begin
      failures++;
      $display("FAIL sq=%0d,%0d t=%0d n=%0d d=%0d v=%0d: got %0d exp %0d", a, b, t, n, d, v, sample, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 16; a++) for (int b = 0; b < 16; b++) try(a, b, 0, 0, 0, 8);
    for (int t = 0; t < 16; t++) for (int n = 0; n < 16; n += 3) for (int d = 0; d < 128; d += 9)
      try(0, 0, t, n, d, 8);
    try(15, 15, 15, 15, 127, 8);
    for (int v = 1; v <= 8; v++) try(7, 9, 5, 3, 60, v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
