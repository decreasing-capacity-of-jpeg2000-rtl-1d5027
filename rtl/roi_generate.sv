// roi_generate: multi-level S+P ROI mask generator.
//
// A cascade of LEVELS sp_mask_level stages. Stage 0 takes the tile mask,
// TILE_W x TILE_H, in raster order; stage k works on a (TILE_W>>k) x
// (TILE_H>>k) mask, which is the low-low (lm_lm) output of stage k-1, just as
// the wavelet transform re-splits its LL band at each level. Every stage
// delivers its three detail band masks (lm_hm, hm_lm, hm_hm) on its own
// valid/ready channel; the last stage also delivers the final LL band mask.
//
// A stage's four outputs leave in one transfer, so a stage advances only when
// both of its consumers (its detail-band sink and the next stage or the LL
// sink) are ready; each consumer sees valid only while the other is ready.
//
// The cascade of levels feeding the LL mask onward and the per-level output
// names follow the document; the document supports 5 levels, which is the
// default. Tile size and the handshake gating are this design's own choice.
module roi_generate
  import roi_pkg::*;
#(
  parameter int unsigned TILE_W = roi_pkg::TILE_WIDTH,
  parameter int unsigned TILE_H = roi_pkg::TILE_HEIGHT,
  parameter int unsigned LEVELS = roi_pkg::MAX_LEVELS,
  parameter int unsigned PACK   = roi_pkg::PACK_WIDTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // tile mask input
  input  logic              valid_in,
  input  logic              data_in,
  output logic              ready_out,
  // detail band masks, one channel per level (index 0 = finest level)
  output logic [LEVELS-1:0] band_valid,
  input  logic [LEVELS-1:0] band_ready,
  output logic [LEVELS-1:0] lm_hm_out,
  output logic [LEVELS-1:0] hm_lm_out,
  output logic [LEVELS-1:0] hm_hm_out,
  // final low-low band mask
  output logic              ll_valid,
  input  logic              ll_ready,
  output logic              ll_out
);

  logic [LEVELS:0] chain_valid, chain_ready, chain_data;

  assign chain_valid[0] = valid_in;
  assign chain_data[0]  = data_in;
  assign ready_out      = chain_ready[0];

  for (genvar k = 0; k < int'(LEVELS); k++) begin : g_level
    logic vout, rin, ll_k;
    sp_mask_level #(.W(TILE_W >> k), .H(TILE_H >> k), .PACK(PACK)) u_level (
      .clk      (clk),
      .rst_n    (rst_n),
      .valid_in (chain_valid[k]),
      .data_in  (chain_data[k]),
      .ready_out(chain_ready[k]),
      .valid_out(vout),
      .ready_in (rin),
      .lm_lm_out(ll_k),
      .lm_hm_out(lm_hm_out[k]),
      .hm_lm_out(hm_lm_out[k]),
      .hm_hm_out(hm_hm_out[k])
    );
    assign rin                = band_ready[k] && chain_ready[k+1];
    assign band_valid[k]      = vout && chain_ready[k+1];
    assign chain_valid[k + 1] = vout && band_ready[k];
    assign chain_data[k + 1]  = ll_k;
  end

  assign ll_valid               = chain_valid[LEVELS];
  assign ll_out                 = chain_data[LEVELS];
  assign chain_ready[LEVELS]    = ll_ready;

  initial begin
    assert (LEVELS >= 1 && LEVELS <= MAX_LEVELS && (TILE_W >> LEVELS) >= 1 && (TILE_H >> LEVELS) >= 1)
      else $error("roi_generate: tile too small for the number of levels");
  end

endmodule
