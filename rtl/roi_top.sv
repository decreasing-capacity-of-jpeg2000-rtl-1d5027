// roi_top: region-of-interest path of a JPEG2000 encoder with the
// shift-up-background method.
//
// The encoder around it (colour transform, tiling, forward wavelet transform,
// quantizer, rate control, tier-1 and tier-2 coding) is outside this module;
// its ports connect to them:
//   * the tiler's 1-bit ROI mask of each TILE_W x TILE_H tile, raster order
//     -> mask buffer (sync_fifo) -> roi_generate, which splits the mask into
//     the masks of all 3*LEVELS+1 wavelet subbands with the S+P rule;
//   * the wavelet transform's (row, column, LEVEL) of every coefficient
//     -> roi_subband, which turns it into a subband number;
//   * the quantizer's coefficients -> coefficient buffer (sync_fifo)
//     -> roi_decode, which stores the subband masks in per-subband FIFOs and
//     tags each coefficient with its mask bit, {mask, coefficient};
//   * -> shift_up_background, which shifts background coefficients down by
//     maxshift_config_in and passes ROI coefficients unchanged, DATA_WIDTH
//     bits in and out, towards rate control.
// All channels are valid/ready. The coefficient and position channels must
// carry the same coefficients in the same order; the mask of a tile may be
// sent before, with or after its coefficients (up to one tile ahead).
// mask_wait is high while a coefficient waits for its mask.
//
// The block split and the data flow follow the document's architecture
// figure; buffer depths, tile size and the handshakes are this design's own.
module roi_top
  import roi_pkg::*;
#(
  parameter int unsigned TILE_W      = roi_pkg::TILE_WIDTH,
  parameter int unsigned TILE_H      = roi_pkg::TILE_HEIGHT,
  parameter int unsigned LEVELS      = roi_pkg::MAX_LEVELS,
  parameter int unsigned DW          = roi_pkg::DATA_WIDTH,
  parameter int unsigned MBUF_DEPTH  = 32,
  parameter int unsigned QBUF_DEPTH  = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // ROI mask from the tiler
  input  logic                        valid_mask_in,
  output logic                        ready_mask_out,
  input  logic                        data_mask_in,
  // coefficient position from the wavelet transform
  input  logic                        valid_pos_in,
  output logic                        ready_pos_out,
  input  logic [$clog2(TILE_H)-1:0]   row_in,
  input  logic [$clog2(TILE_W)-1:0]   column_in,
  input  logic [2:0]                  level_in,
  // quantized coefficient
  input  logic                        valid_coef_in,
  output logic                        ready_coef_out,
  input  logic [DW-2:0]               coef_in,
  // background shift chosen by the user
  input  logic [$clog2(DW)-1:0]       maxshift_config_in,
  // output towards rate control
  output logic                        valid_out,
  input  logic                        ready_in,
  output logic [DW-1:0]               data_out,
  // status
  output logic                        mask_wait
);

  // ------------------------------------------------------- mask buffer
  logic mb_valid, mb_ready, mb_data;
  logic [$clog2(MBUF_DEPTH+1)-1:0] mb_level;   // fill level, for debug

  sync_fifo #(.WIDTH(1), .DEPTH(MBUF_DEPTH)) u_roi_buff (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_valid(valid_mask_in),
    .wr_ready(ready_mask_out),
    .wr_data (data_mask_in),
    .rd_valid(mb_valid),
    .rd_ready(mb_ready),
    .rd_data (mb_data),
    .level   (mb_level)
  );

  // --------------------------------------------------- mask generator
  logic [LEVELS-1:0] band_valid, band_ready, lm_hm, hm_lm, hm_hm;
  logic              ll_valid, ll_ready, ll_bit;

  roi_generate #(.TILE_W(TILE_W), .TILE_H(TILE_H), .LEVELS(LEVELS)) u_generate (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (mb_valid),
    .data_in   (mb_data),
    .ready_out (mb_ready),
    .band_valid(band_valid),
    .band_ready(band_ready),
    .lm_hm_out (lm_hm),
    .hm_lm_out (hm_lm),
    .hm_hm_out (hm_hm),
    .ll_valid  (ll_valid),
    .ll_ready  (ll_ready),
    .ll_out    (ll_bit)
  );

  // -------------------------------------------------- subband decoder
  logic     sb_valid, sb_ready;
  subband_t sb;

  roi_subband #(.TILE_W(TILE_W), .TILE_H(TILE_H)) u_subband (
    .clk        (clk),
    .rst_n      (rst_n),
    .valid_in   (valid_pos_in),
    .ready_out  (ready_pos_out),
    .row_in     (row_in),
    .column_in  (column_in),
    .level_in   (level_in),
    .valid_out  (sb_valid),
    .ready_in   (sb_ready),
    .subband_out(sb)
  );

  // ----------------------------------------------- coefficient buffer
  logic          qb_valid, qb_ready;
  logic [DW-2:0] qb_data;
  logic [$clog2(QBUF_DEPTH+1)-1:0] qb_level;   // fill level, for debug

  sync_fifo #(.WIDTH(DW - 1), .DEPTH(QBUF_DEPTH)) u_quant_buff (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_valid(valid_coef_in),
    .wr_ready(ready_coef_out),
    .wr_data (coef_in),
    .rd_valid(qb_valid),
    .rd_ready(qb_ready),
    .rd_data (qb_data),
    .level   (qb_level)
  );

  // ----------------------------------------------------- mask decoder
  logic          tag_valid, tag_ready;
  logic [DW-1:0] tag_data;

  roi_decode #(.TILE_W(TILE_W), .TILE_H(TILE_H), .LEVELS(LEVELS), .DW(DW)) u_decode (
    .clk              (clk),
    .rst_n            (rst_n),
    .band_valid       (band_valid),
    .band_ready       (band_ready),
    .lm_hm_in         (lm_hm),
    .hm_lm_in         (hm_lm),
    .hm_hm_in         (hm_hm),
    .ll_valid         (ll_valid),
    .ll_ready         (ll_ready),
    .ll_in            (ll_bit),
    .valid_subband_in (sb_valid),
    .ready_subband_out(sb_ready),
    .subband_in       (sb),
    .valid_coef_in    (qb_valid),
    .ready_coef_out   (qb_ready),
    .coef_in          (qb_data),
    .valid_out        (tag_valid),
    .ready_in         (tag_ready),
    .data_out         (tag_data),
    .mask_wait        (mask_wait)
  );

  // ------------------------------------------ shift-up background
  shift_up_background #(.DW(DW)) u_shift (
    .clk               (clk),
    .rst_n             (rst_n),
    .maxshift_config_in(maxshift_config_in),
    .valid_in          (tag_valid),
    .ready_out         (tag_ready),
    .data_in           (tag_data),
    .valid_out         (valid_out),
    .ready_in          (ready_in),
    .data_out          (data_out)
  );

  // the wavelet transform must run with the same depth as the mask generator
  a_level_match: assert property (@(posedge clk) disable iff (!rst_n)
                                  valid_pos_in |-> (32'(level_in) == LEVELS - 1))
    else $error("roi_top: LEVEL %0d does not match %0d levels", level_in, LEVELS);

endmodule
