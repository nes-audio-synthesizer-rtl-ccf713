// mixer: non-linear NES channel mixer implemented with two lookup tables.
// sqr_tbl[n] = round(255 * 95.52 / (8128/n + 100)), n = sq1 + sq2 (31 entries)
// tnd_tbl[n] = round(255 * 163.67 / (24329/n + 100)), n = 3*triangle + 2*noise
// + dmc (203 entries); entry 0 of both tables is 0. The two entries add to
// 0..255. The tables are computed at elaboration time in exact integer
// arithmetic (the formulas rearranged to n*K/(C + 100n)). The sum is then
// scaled by the user volume: sample = sum * vol_level / 8, vol_level 1..8.
// The output is registered: one clock of latency.
module mixer (
  input  logic       clk,
  input  logic [3:0] sq1, sq2, triangle, noise,
  input  logic [6:0] dmc,
  input  logic [3:0] vol_level,     // 1..8 eighths of full volume
  output logic [7:0] sample
);
  typedef logic [7:0] sqr_tbl_t [31];
  typedef logic [7:0] tnd_tbl_t [203];

  function automatic sqr_tbl_t build_sqr();
    sqr_tbl_t t;
    for (int n = 0; n < 31; n++) begin
      // 255*95.52*n/(8128+100n) = 243576n/(81280+1000n), rounded
      longint num = 64'd243576 * n;
      longint den = 64'd81280 + 64'd1000 * n;
      t[n] = 8'((2 * num + den) / (2 * den));
    end
    return t;
  endfunction

  function automatic tnd_tbl_t build_tnd();
    tnd_tbl_t t;
    for (int n = 0; n < 203; n++) begin
      // 255*163.67*n/(24329+100n) = 4173585n/(2432900+10000n), rounded
      longint num = 64'd4173585 * n;
      longint den = 64'd2432900 + 64'd10000 * n;
      t[n] = 8'((2 * num + den) / (2 * den));
    end
    return t;
  endfunction

  localparam sqr_tbl_t SQR_TBL = build_sqr();
  localparam tnd_tbl_t TND_TBL = build_tnd();

  logic [4:0]  sq_idx;
  logic [7:0]  tnd_idx;
  logic [8:0]  sum;
  logic [11:0] scaled;

  always_comb begin
    sq_idx  = 5'(sq1) + 5'(sq2);
    tnd_idx = 8'(triangle) * 8'd3 + 8'(noise) * 8'd2 + 8'(dmc);
    sum     = 9'(SQR_TBL[sq_idx]) + 9'(TND_TBL[tnd_idx]);
    scaled  = (12'(sum) * 12'(vol_level)) >> 3;
  end

  always_ff @(posedge clk) sample <= (scaled > 12'd255) ? 8'd255 : scaled[7:0];
endmodule
