// tb_roi_image: the ROI path at its default parameters (128 x 128 tiles,
// 5 levels, 32-bit words) on a whole image, split into tiles the way the
// tiler would send them: tile rows top to bottom, tiles left to right. The
// image is IMG x IMG pixels (2048 by default, the largest image size
// evaluated for this method; 128, 256, 512 and 1024 differ only in the
// number of tiles). The ROI mask holds several discs and rectangles that
// cross tile borders. Positions alternate between the band-by-band and the
// row-by-row order from tile to tile, and the background shift changes per
// tile. Every output word is compared with one worked out from the S+P mask
// definition and integer division; coefficients are a hash of their index.
module tb_roi_image;
  localparam int IMG = 2048;
  localparam int TW = 128, TH = 128, L = 5, DW = 32;
  localparam int TX = IMG / TW, TILES = (IMG / TW) * (IMG / TH);
  localparam int NSB = 3 * L + 1, NT = TW * TH;
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

  roi_top dut (
    .clk(clk), .rst_n(rst_n),
    .valid_mask_in(vmask), .ready_mask_out(rmask), .data_mask_in(dmask),
    .valid_pos_in(vpos), .ready_pos_out(rpos), .row_in(row), .column_in(col), .level_in(lev),
    .valid_coef_in(vcoef), .ready_coef_out(rcoef), .coef_in(coef),
    .maxshift_config_in(shift),
    .valid_out(vout), .ready_in(rdy), .data_out(dout), .mask_wait(mwait));

  // ------------------------------------------------ reference model
  int cy [4], cx [4], rad [4], ry [3], rx [3], rh [3], rw [3];

  function automatic bit image_mask(int y, int x);
    for (int i = 0; i < 4; i++)
      if ((y - cy[i]) * (y - cy[i]) + (x - cx[i]) * (x - cx[i]) <= rad[i] * rad[i]) return 1;
    for (int i = 0; i < 3; i++)
      if (y >= ry[i] && y < ry[i] + rh[i] && x >= rx[i] && x < rx[i] + rw[i]) return 1;
    return 0;
  endfunction

  function automatic bit tile_pixel(int t, int r, int c);
    return image_mask((t / TX) * TH + r, (t % TX) * TW + c);
  endfunction

  function automatic logic [DW-2:0] coef_of(int idx);
    logic [63:0] h = 64'(idx) * 64'h9E3779B97F4A7C15;
    return (DW-1)'(h[63:33] ^ h[40:10]);
  endfunction

  bit m [L+1][TH][TW];      // level masks of the tile being checked
  bit emask [NT];           // expected mask bit per position index
  int pr [2][NT], pc [2][NT];

  function automatic bit win_or(int k, int r0, int r1, int c0, int c1);
    bit acc = 0;
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++)
        if (r >= 0 && r < (TH >> k) && c >= 0 && c < (TW >> k)) acc |= m[k][r][c];
    return acc;
  endfunction

  function automatic int sb_of(int r, int c);
    for (int d = 1; d <= L; d++) begin
      automatic bit h = r >= (TH >> d);
      automatic bit v = c >= (TW >> d);
      if (h || v) return 3 * (L - d) + (h ? (v ? 3 : 2) : 1);
    end
    return 0;
  endfunction

  function automatic bit mask_of(int r, int c);
    for (int d = 1; d <= L; d++) begin
      automatic int hh = TH >> d, wh = TW >> d;
      if (r >= hh && c >= wh) return win_or(d - 1, 2*(r-hh), 2*(r-hh)+1, 2*(c-wh), 2*(c-wh)+1);
      if (c >= wh) return win_or(d - 1, 2*r-2, 2*r+3, 2*(c-wh), 2*(c-wh)+1);
      if (r >= hh) return win_or(d - 1, 2*(r-hh), 2*(r-hh)+1, 2*c-2, 2*c+3);
    end
    return m[L][r][c];
  endfunction

  task automatic prepare_tile(int t);
    for (int r = 0; r < TH; r++)
      for (int c = 0; c < TW; c++) m[0][r][c] = tile_pixel(t, r, c);
    for (int k = 0; k < L; k++)
      for (int r = 0; r < (TH >> (k + 1)); r++)
        for (int c = 0; c < (TW >> (k + 1)); c++)
          m[k+1][r][c] = win_or(k, 2*r-2, 2*r+3, 2*c-2, 2*c+3);
    for (int i = 0; i < NT; i++) emask[i] = mask_of(pr[t % 2][i], pc[t % 2][i]);
  endtask

  function automatic logic [DW-1:0] shifted(logic [DW-2:0] v, bit roi, int sh);
    longint x = longint'($signed(v));
    if (!roi) for (int i = 0; i < sh; i++) x = (x - (x & 1)) / 2;
    return DW'(x);
  endfunction

  function automatic int shift_of(int t);
    return (t * 7 + 3) % 32;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------- drivers
  int mask_idx = 0, pos_idx = 0, coef_idx = 0, out_idx = 0;
  int tile_in = 0;
  int mask_stalls = 0, waits = 0, backpressure = 0, roi_words = 0, bg_words = 0;
  int roi_tiles = 0, tile_roi = 0;
  int sb_seen [NSB];
  bit coef_go = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      vmask <= (mask_idx < TILES * NT) && ($urandom % 8 != 0);
      if (mask_idx < TILES * NT) dmask <= tile_pixel(mask_idx / NT, (mask_idx / TW) % TH, mask_idx % TW);
    end
  end
  always @(posedge clk) begin
    if (rst_n && vmask && rmask) mask_idx <= mask_idx + 1;
    if (rst_n && vmask && !rmask) mask_stalls++;
    if (rst_n && mwait) waits++;
    if (rst_n && vout && !rdy) backpressure++;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      automatic int lim = (tile_in + 1) * NT;
      vpos  <= coef_go && (pos_idx < lim) && ($urandom % 4 != 0);
      vcoef <= coef_go && (coef_idx < lim) && ($urandom % 4 != 0);
      if (pos_idx < TILES * NT) begin
        row <= RWD'(pr[(pos_idx / NT) % 2][pos_idx % NT]);
        col <= CWD'(pc[(pos_idx / NT) % 2][pos_idx % NT]);
      end
      coef <= coef_of(coef_idx);
      rdy <= ($urandom % 5 != 0);
    end
  end
  always @(posedge clk) begin
    if (rst_n && vpos && rpos) pos_idx <= pos_idx + 1;
    if (rst_n && vcoef && rcoef) coef_idx <= coef_idx + 1;
  end

  always @(posedge clk) begin
    if (rst_n && vout && rdy) begin
      if (out_idx >= TILES * NT) check(0, "unexpected output");
      else begin
        automatic int t = out_idx / NT, i = out_idx % NT;
        automatic bit roi = emask[i];
        automatic logic [DW-1:0] e = shifted(coef_of(out_idx), roi, shift_of(t));
        check(dout == e, $sformatf("tile %0d coef %0d roi %0d: %h exp %h", t, i, roi, dout, e));
        if (roi) begin roi_words++; tile_roi = 1; end else bg_words++;
        sb_seen[sb_of(pr[t % 2][i], pc[t % 2][i])]++;
      end
      out_idx <= out_idx + 1;
    end
  end

  initial begin
    automatic int n = 0;
    vmask = 0; dmask = 0; vpos = 0; vcoef = 0; row = '0; col = '0; coef = '0; rdy = 0;
    lev = 3'(L - 1); shift = '0;
    for (int s = 0; s < NSB; s++) sb_seen[s] = 0;
    for (int i = 0; i < 4; i++) begin
      cy[i] = $urandom % IMG; cx[i] = $urandom % IMG; rad[i] = IMG / 32 + $urandom % (IMG / 8);
    end
    for (int i = 0; i < 3; i++) begin
      ry[i] = $urandom % IMG; rx[i] = $urandom % IMG;
      rh[i] = 8 + $urandom % (IMG / 6); rw[i] = 8 + $urandom % (IMG / 4);
    end
    // position orders: band by band (deepest LL first), and row by row
    for (int s = 0; s < NSB; s++)
      for (int r = 0; r < TH; r++)
        for (int c = 0; c < TW; c++)
          if (sb_of(r, c) == s) begin pr[0][n] = r; pc[0][n] = c; n++; end
    for (int r = 0; r < TH; r++)
      for (int c = 0; c < TW; c++) begin pr[1][r * TW + c] = r; pc[1][r * TW + c] = c; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TILES; t++) begin
      wait (out_idx == t * NT);
      if (tile_roi) roi_tiles++;
      tile_roi = 0;
      prepare_tile(t);
      @(negedge clk);
      tile_in = t;
      shift = 5'(shift_of(t));
      coef_go = 1;
      wait (coef_idx == (t + 1) * NT && pos_idx == (t + 1) * NT);
    end
    wait (out_idx == TILES * NT);
    if (tile_roi) roi_tiles++;
    repeat (20) @(posedge clk);
    check(!vout, "no extra output");
    $display("%0d x %0d image, %0d tiles (%0d with ROI): mask waits %0d, mask stalls %0d, back-pressure %0d, ROI %0d, background %0d",
             IMG, IMG, TILES, roi_tiles, waits, mask_stalls, backpressure, roi_words, bg_words);
    check(waits > 0, "coefficient waited for its mask");
    check(mask_stalls > 0, "mask input stalled");
    check(backpressure > 0, "output back-pressure");
    check(roi_words > 0 && bg_words > 0, "ROI and background words");
    check(roi_tiles > 0, "tiles with ROI");
    if (TILES >= 64) check(roi_tiles < TILES, "tiles without ROI");
    for (int s = 0; s < NSB; s++) check(sb_seen[s] > 0, $sformatf("subband %0d used", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TILES * NT * 4 + 100000) @(posedge clk);
    $display("watchdog expired: mask %0d pos %0d coef %0d out %0d", mask_idx, pos_idx, coef_idx, out_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
