// sp_level_harness: drives one sp_mask_level instance with random ROI masks
// for TILES tiles, with random gaps on the input and random back-pressure on
// the output, and compares every output position with the S+P windows
// computed directly from the mask (OR over the clipped 2- or 6-wide windows
// of rows and columns). Reports its check and failure counts and raises
// done when every expected output has been seen.
module sp_level_harness #(
  parameter int unsigned W     = 16,
  parameter int unsigned H     = 8,
  parameter int unsigned PACK  = 32,
  parameter int unsigned TILES = 2,
  parameter int unsigned SEED  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   in_stalls
);

  logic valid_in, data_in, ready_out, valid_out, ready_in;
  logic lm_lm, lm_hm, hm_lm, hm_hm;

  sp_mask_level #(.W(W), .H(H), .PACK(PACK)) dut (
    .clk(clk), .rst_n(rst_n),
    .valid_in(valid_in), .data_in(data_in), .ready_out(ready_out),
    .valid_out(valid_out), .ready_in(ready_in),
    .lm_lm_out(lm_lm), .lm_hm_out(lm_hm), .hm_lm_out(hm_lm), .hm_hm_out(hm_hm)
  );

  bit mask [TILES][H][W];

  // OR of mask over rows r0..r1 and columns c0..c1, clipped to the tile
  function automatic bit win_or(int t, int r0, int r1, int c0, int c1);
    bit acc = 0;
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++)
        if (r >= 0 && r < int'(H) && c >= 0 && c < int'(W)) acc |= mask[t][r][c];
    return acc;
  endfunction

  int in_idx, out_idx;
  int unsigned rnd;

  initial begin
    rnd = SEED;
    // random mask: a rectangle plus sparse random pixels
    for (int t = 0; t < int'(TILES); t++) begin
      int r0, c0, rh, cw;
      r0 = $urandom(SEED + t) % H; c0 = $urandom % W;
      rh = $urandom % (H / 2 + 1); cw = $urandom % (W / 2 + 1);
      for (int r = 0; r < int'(H); r++)
        for (int c = 0; c < int'(W); c++)
          mask[t][r][c] = (r >= r0 && r < r0 + rh && c >= c0 && c < c0 + cw)
                          || ($urandom % 23 == 0);
    end
  end

  // input driver
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_idx   <= 0;
      valid_in <= 1'b0;
      data_in  <= 1'b0;
      in_stalls <= 0;
    end else begin
      if (valid_in && ready_out) in_idx <= in_idx + 1;
      if (valid_in && !ready_out) in_stalls <= in_stalls + 1;
      if (!valid_in || ready_out) begin
        automatic int nxt = (valid_in && ready_out) ? in_idx + 1 : in_idx;
        if (nxt < int'(TILES * W * H) && ($urandom % 4 != 0)) begin
          valid_in <= 1'b1;
          data_in  <= mask[nxt / (W * H)][(nxt / W) % H][nxt % W];
        end else begin
          valid_in <= 1'b0;
        end
      end
    end
  end

  // output checker
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_idx  <= 0;
      ready_in <= 1'b0;
      checks   <= 0;
      failures <= 0;
    end else begin
      ready_in <= ($urandom % 3 != 0);
      if (valid_out && ready_in) begin
        automatic int t = out_idx / (W * H / 4);
        automatic int m = (out_idx / (W / 2)) % (H / 2);
        automatic int n = out_idx % (W / 2);
        automatic bit e_hh = win_or(t, 2*m, 2*m+1, 2*n, 2*n+1);
        automatic bit e_hl = win_or(t, 2*m-2, 2*m+3, 2*n, 2*n+1);
        automatic bit e_lh = win_or(t, 2*m, 2*m+1, 2*n-2, 2*n+3);
        automatic bit e_ll = win_or(t, 2*m-2, 2*m+3, 2*n-2, 2*n+3);
        checks <= checks + 1;
        if (out_idx >= int'(TILES * W * H / 4) ||
            {lm_lm, lm_hm, hm_lm, hm_hm} != {e_ll, e_lh, e_hl, e_hh}) begin
          failures <= failures + 1;
          if (failures < 5)
            $display("W=%0d mismatch at tile %0d (%0d,%0d): got %b exp %b", W, t, m, n,
                     {lm_lm, lm_hm, hm_lm, hm_hm}, {e_ll, e_lh, e_hl, e_hh});
        end
        out_idx <= out_idx + 1;
      end
    end
  end

  assign done = (out_idx == int'(TILES * W * H / 4));

endmodule
