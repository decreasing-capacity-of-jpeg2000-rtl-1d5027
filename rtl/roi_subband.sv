// roi_subband: subband decoder for the wavelet coefficient stream.
//
// The forward wavelet transform reports, with every coefficient, its row and
// column in the tile's coefficient array (the usual layout: the LL band of
// the deepest level in the top-left corner, then for each level, from the
// deepest to the finest, the band to its right, the band below it and the
// diagonal band) and the decomposition depth as LEVEL = levels - 1 (0..4).
// This block turns (row, column, LEVEL) into a subband number:
//   0             deepest LL band
//   3(L-d)+1      level d, horizontal-high band (right of LL)
//   3(L-d)+2      level d, vertical-high band   (below LL)
//   3(L-d)+3      level d, diagonal band
// where L = LEVEL+1 and d = 1 is the finest level. Numbering subbands from
// the top-left corner this way follows the document's subband map; the
// subband numbers index the per-subband mask FIFOs of roi_decode.
// Interface: valid/ready in and out; the result is registered, one cycle of
// latency, full throughput. The register stage is this design's choice.
module roi_subband
  import roi_pkg::*;
#(
  parameter int unsigned TILE_W = roi_pkg::TILE_WIDTH,
  parameter int unsigned TILE_H = roi_pkg::TILE_HEIGHT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        valid_in,
  output logic                        ready_out,
  input  logic [$clog2(TILE_H)-1:0]   row_in,
  input  logic [$clog2(TILE_W)-1:0]   column_in,
  input  logic [2:0]                  level_in,
  output logic                        valid_out,
  input  logic                        ready_in,
  output subband_t                    subband_out
);

  subband_t code;

  always_comb begin
    int unsigned nlev;
    logic        found;
    logic        rh, ch;
    rh    = 1'b0;
    ch    = 1'b0;
    nlev  = int'(level_in) + 1;
    if (nlev > MAX_LEVELS) nlev = MAX_LEVELS;
    code  = '0;
    found = 1'b0;
    for (int unsigned d = 1; d <= MAX_LEVELS; d++) begin
      if (!found && d <= nlev) begin
        rh = (32'(row_in)    >= (TILE_H >> d));
        ch = (32'(column_in) >= (TILE_W >> d));
        if (rh || ch) begin
          found = 1'b1;
          code  = subband_t'(3 * (nlev - d) + (ch && !rh ? 1 : (!ch ? 2 : 3)));
        end
      end
    end
  end

  assign ready_out = !valid_out || ready_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out   <= 1'b0;
      subband_out <= '0;
    end else if (ready_out) begin
      valid_out <= valid_in;
      if (valid_in) subband_out <= code;
    end
  end

endmodule
