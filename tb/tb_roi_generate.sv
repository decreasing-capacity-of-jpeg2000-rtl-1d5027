// tb_roi_generate: three-level mask generator on a 32 x 32 tile, two tiles.
// The reference mask of every level is computed here: level 0 is the tile
// mask, level k+1 is the low-low band of level k, and each band of level k
// is an OR over the clipped 2-wide (high) or 6-wide (low) windows of level
// k's mask. The three detail-band channels and the LL channel are drained
// with independent random back-pressure and every bit is compared in raster
// order.
module tb_roi_generate;
  localparam int TW = 32, TH = 32, L = 3, TILES = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         vin, din, rdy;
  logic [L-1:0] bv, br, lh, hl, hh;
  logic         llv, llr, llb;

  roi_generate #(.TILE_W(TW), .TILE_H(TH), .LEVELS(L)) dut (
    .clk(clk), .rst_n(rst_n), .valid_in(vin), .data_in(din), .ready_out(rdy),
    .band_valid(bv), .band_ready(br), .lm_hm_out(lh), .hm_lm_out(hl), .hm_hm_out(hh),
    .ll_valid(llv), .ll_ready(llr), .ll_out(llb));

  // m[t][k][r][c]: mask of level k (k = L is the final LL band)
  bit m [TILES][L+1][TH][TW];

  function automatic bit win_or(int t, int k, int r0, int r1, int c0, int c1);
    bit acc = 0;
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++)
        if (r >= 0 && r < (TH >> k) && c >= 0 && c < (TW >> k)) acc |= m[t][k][r][c];
    return acc;
  endfunction

  // expected detail bits {lm_hm, hm_lm, hm_hm} of level k, position (r, c)
  function automatic bit [2:0] bands(int t, int k, int r, int c);
    return {win_or(t, k, 2*r, 2*r+1, 2*c-2, 2*c+3),
            win_or(t, k, 2*r-2, 2*r+3, 2*c, 2*c+1),
            win_or(t, k, 2*r, 2*r+1, 2*c, 2*c+1)};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < TILES; t++) begin
      automatic int cr = $urandom % TH, cc = $urandom % TW, rad = 3 + $urandom % 8;
      for (int r = 0; r < TH; r++)
        for (int c = 0; c < TW; c++)
          m[t][0][r][c] = ((r - cr) * (r - cr) + (c - cc) * (c - cc) <= rad * rad);
      for (int k = 0; k < L; k++)
        for (int r = 0; r < (TH >> (k + 1)); r++)
          for (int c = 0; c < (TW >> (k + 1)); c++)
            m[t][k+1][r][c] = win_or(t, k, 2*r-2, 2*r+3, 2*c-2, 2*c+3);
    end
  end

  int in_idx = 0;
  int out_idx [L+1];
  int total_in = TILES * TW * TH;

  initial begin
    vin = 0; din = 0; br = '0; llr = 0;
    for (int k = 0; k <= L; k++) out_idx[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      @(negedge clk);
      vin = (in_idx < total_in) && ($urandom % 5 != 0);
      if (in_idx < total_in) din = m[in_idx / (TW * TH)][0][(in_idx / TW) % TH][in_idx % TW];
      for (int k = 0; k < L; k++) br[k] = ($urandom % 3 != 0);
      llr = ($urandom % 3 != 0);
      @(posedge clk);
      if (vin && rdy) in_idx++;
      for (int k = 0; k < L; k++) begin
        if (bv[k] && br[k]) begin
          automatic int wk = TW >> (k + 1), hk = TH >> (k + 1);
          automatic int t = out_idx[k] / (wk * hk);
          automatic int r = (out_idx[k] / wk) % hk, c = out_idx[k] % wk;
          automatic bit [2:0] e = bands(t, k, r, c);
          check(t < TILES && {lh[k], hl[k], hh[k]} == e,
                $sformatf("level %0d tile %0d (%0d,%0d): %b exp %b", k, t, r, c, {lh[k], hl[k], hh[k]}, e));
          out_idx[k]++;
        end
      end
      if (llv && llr) begin
        automatic int wk = TW >> L, hk = TH >> L;
        automatic int t = out_idx[L] / (wk * hk);
        automatic int r = (out_idx[L] / wk) % hk, c = out_idx[L] % wk;
        check(t < TILES && llb == m[t][L][r][c], $sformatf("LL tile %0d (%0d,%0d)", t, r, c));
        out_idx[L]++;
      end
    end
  end

  initial begin
    automatic bit done = 0;
    while (!done) begin
      @(posedge clk);
      done = 1;
      for (int k = 0; k < L; k++) if (out_idx[k] != TILES * (TW >> (k + 1)) * (TH >> (k + 1))) done = 0;
      if (out_idx[L] != TILES * (TW >> L) * (TH >> L)) done = 0;
    end
    repeat (20) @(posedge clk);
    check(!(|bv) && !llv, "no extra output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired: in %0d out %0d %0d %0d %0d", in_idx, out_idx[0], out_idx[1], out_idx[2], out_idx[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
