// tb_roi_top: end-to-end test of the ROI path on 32 x 32 tiles with 3
// wavelet levels, three tiles. Each tile mask holds two regions (a disc
// and a rectangle). A wavelet-transform model sends coefficient positions
// in one of two orders (band by band starting from the deepest LL band, or
// row by row across the whole coefficient array), and a quantizer model
// sends random coefficients on a separate channel with its own gaps. The
// background shift changes from tile to tile. The expected output word of
// every coefficient is worked out here from the mask definition (OR windows
// of the S+P rule, level by level) and from integer division for the shift.
// The test also requires each mechanism to happen: coefficients waiting for
// their mask, mask input stalls, output back-pressure, ROI and background
// words, every subband, both position orders and the tile restart.
module tb_roi_top;
  localparam int TW = 32, TH = 32, L = 3, DW = 32, TILES = 3;
  localparam int NSB = 3 * L + 1;
  localparam int RWD = $clog2(TH), CWD = $clog2(TW);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic           vmask, rmask, dmask;
  logic           vpos, rpos;
  logic [RWD-1:0] row;
  logic [CWD-1:0] col;
  logic [2:0]     lev;
  logic           vcoef, rcoef;
  logic [DW-2:0]  coef;
  logic [4:0]     shift;
  logic           vout, rdy;
  logic [DW-1:0]  dout;
  logic           mwait;

  roi_top #(.TILE_W(TW), .TILE_H(TH), .LEVELS(L)) dut (
    .clk(clk), .rst_n(rst_n),
    .valid_mask_in(vmask), .ready_mask_out(rmask), .data_mask_in(dmask),
    .valid_pos_in(vpos), .ready_pos_out(rpos), .row_in(row), .column_in(col), .level_in(lev),
    .valid_coef_in(vcoef), .ready_coef_out(rcoef), .coef_in(coef),
    .maxshift_config_in(shift),
    .valid_out(vout), .ready_in(rdy), .data_out(dout), .mask_wait(mwait));

  // ------------------------------------------------ reference model
  bit m [TILES][L+1][TH][TW];           // mask of each level, level L = final LL
  int pr [TILES][TW*TH];                // coefficient positions, per tile
  int pc [TILES][TW*TH];
  logic [DW-2:0] cval [TILES][TW*TH];
  int tile_shift [TILES];

  function automatic bit win_or(int t, int k, int r0, int r1, int c0, int c1);
    bit acc = 0;
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++)
        if (r >= 0 && r < (TH >> k) && c >= 0 && c < (TW >> k)) acc |= m[t][k][r][c];
    return acc;
  endfunction

  // subband and mask bit of coefficient (r, c) in the coefficient array
  function automatic int sb_of(int r, int c);
    for (int d = 1; d <= L; d++) begin
      bit rh = r >= (TH >> d), ch = c >= (TW >> d);
      if (rh || ch) return 3 * (L - d) + (rh ? (ch ? 3 : 2) : 1);
    end
    return 0;
  endfunction

  function automatic bit mask_of(int t, int r, int c);
    for (int d = 1; d <= L; d++) begin
      automatic int hh = TH >> d, wh = TW >> d;
      if (r >= hh && c >= wh) return win_or(t, d - 1, 2*(r-hh), 2*(r-hh)+1, 2*(c-wh), 2*(c-wh)+1);
      if (c >= wh) return win_or(t, d - 1, 2*r-2, 2*r+3, 2*(c-wh), 2*(c-wh)+1);
      if (r >= hh) return win_or(t, d - 1, 2*(r-hh), 2*(r-hh)+1, 2*c-2, 2*c+3);
    end
    return m[t][L][r][c];
  endfunction

  function automatic logic [DW-1:0] shifted(logic [DW-2:0] v, bit roi, int sh);
    longint x = longint'($signed(v));
    if (!roi) for (int i = 0; i < sh; i++) x = (x - (x & 1)) / 2;
    return DW'(x);
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
      automatic int cr = $urandom % TH, cc = $urandom % TW, rad = 2 + $urandom % (TW / 4);
      automatic int r0 = $urandom % TH, c0 = $urandom % TW;
      automatic int n = 0;
      tile_shift[t] = (t == 0) ? 31 : 1 + $urandom % 30;
      for (int r = 0; r < TH; r++)
        for (int c = 0; c < TW; c++)
          m[t][0][r][c] = ((r-cr)*(r-cr) + (c-cc)*(c-cc) <= rad*rad) ||
                          (r >= r0 && r < r0 + TH/8 && c >= c0 && c < c0 + TW/4);
      for (int k = 0; k < L; k++)
        for (int r = 0; r < (TH >> (k + 1)); r++)
          for (int c = 0; c < (TW >> (k + 1)); c++)
            m[t][k+1][r][c] = win_or(t, k, 2*r-2, 2*r+3, 2*c-2, 2*c+3);
      if (t % 2 == 0) begin
        // band by band, deepest LL first, raster order inside each band
        for (int s = 0; s < NSB; s++)
          for (int r = 0; r < TH; r++)
            for (int c = 0; c < TW; c++)
              if (sb_of(r, c) == s) begin pr[t][n] = r; pc[t][n] = c; n++; end
      end else begin
        for (int r = 0; r < TH; r++)
          for (int c = 0; c < TW; c++) begin pr[t][n] = r; pc[t][n] = c; n++; end
      end
      for (int i = 0; i < TW * TH; i++) cval[t][i] = (DW-1)'({$urandom, $urandom});
    end
  end

  // ------------------------------------------------------- drivers
  int mask_idx = 0, pos_idx = 0, coef_idx = 0, out_idx = 0;
  int tile_in = 0;          // tile whose coefficients are being sent
  int mask_stalls = 0, waits = 0, backpressure = 0, roi_words = 0, bg_words = 0;
  int sb_seen [NSB];
  bit coef_go = 0;

  // tile mask, raster order, runs ahead freely
  always @(negedge clk) begin
    if (rst_n) begin
      vmask <= (mask_idx < TILES * TW * TH) && ($urandom % 8 != 0);
      if (mask_idx < TILES * TW * TH)
        dmask <= m[mask_idx / (TW*TH)][0][(mask_idx / TW) % TH][mask_idx % TW];
    end
  end
  always @(posedge clk) begin
    if (rst_n && vmask && rmask) mask_idx <= mask_idx + 1;
    if (rst_n && vmask && !rmask) mask_stalls++;
    if (rst_n && mwait) waits++;
    if (rst_n && vout && !rdy) backpressure++;
  end

  // positions and coefficients of the current tile
  always @(negedge clk) begin
    if (rst_n) begin
      automatic int lim = (tile_in + 1) * TW * TH;
      vpos  <= coef_go && (pos_idx < lim) && ($urandom % 4 != 0);
      vcoef <= coef_go && (coef_idx < lim) && ($urandom % 4 != 0);
      if (pos_idx < TILES * TW * TH) begin
        row <= RWD'(pr[pos_idx / (TW*TH)][pos_idx % (TW*TH)]);
        col <= CWD'(pc[pos_idx / (TW*TH)][pos_idx % (TW*TH)]);
      end
      if (coef_idx < TILES * TW * TH) coef <= cval[coef_idx / (TW*TH)][coef_idx % (TW*TH)];
      rdy <= ($urandom % 5 != 0);
    end
  end
  always @(posedge clk) begin
    if (rst_n && vpos && rpos) pos_idx <= pos_idx + 1;
    if (rst_n && vcoef && rcoef) coef_idx <= coef_idx + 1;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && vout && rdy) begin
      if (out_idx >= TILES * TW * TH) check(0, "unexpected output");
      else begin
        automatic int t = out_idx / (TW*TH), i = out_idx % (TW*TH);
        automatic bit roi = mask_of(t, pr[t][i], pc[t][i]);
        automatic logic [DW-1:0] e = shifted(cval[t][i], roi, tile_shift[t]);
        check(dout == e, $sformatf("tile %0d coef %0d (%0d,%0d) roi %0d: %h exp %h",
                                   t, i, pr[t][i], pc[t][i], roi, dout, e));
        if (roi) roi_words++; else bg_words++;
        sb_seen[sb_of(pr[t][i], pc[t][i])]++;
      end
      out_idx <= out_idx + 1;
    end
  end

  initial begin
    vmask = 0; dmask = 0; vpos = 0; vcoef = 0; row = '0; col = '0; coef = '0; rdy = 0;
    lev = 3'(L - 1); shift = '0;
    for (int s = 0; s < NSB; s++) sb_seen[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TILES; t++) begin
      // the shift is a static setting: change it only with the path empty
      wait (out_idx == t * TW * TH);
      @(negedge clk);
      tile_in = t;
      shift = 5'(tile_shift[t]);
      coef_go = 1;
      wait (coef_idx == (t + 1) * TW * TH && pos_idx == (t + 1) * TW * TH);
    end
    wait (out_idx == TILES * TW * TH);
    repeat (20) @(posedge clk);
    check(!vout, "no extra output");
    $display("mask waits %0d, mask stalls %0d, back-pressure %0d, ROI %0d, background %0d",
             waits, mask_stalls, backpressure, roi_words, bg_words);
    check(waits > 0, "coefficient waited for its mask");
    check(mask_stalls > 0, "mask input stalled");
    check(backpressure > 0, "output back-pressure");
    check(roi_words > 0 && bg_words > 0, "ROI and background words");
    for (int s = 0; s < NSB; s++) check(sb_seen[s] > 0, $sformatf("subband %0d used", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired: mask %0d pos %0d coef %0d out %0d", mask_idx, pos_idx, coef_idx, out_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
