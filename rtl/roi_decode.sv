// roi_decode: per-subband ROI mask store and coefficient tagger.
//
// The mask generator produces the mask of every subband in the subband's own
// raster order, but much earlier than, and in a different interleaving from,
// the quantized coefficients coming out of the wavelet transform. This block
// keeps one FIFO per subband, N+1 = 3*LEVELS+1 of them, and pairs each
// coefficient with the next mask bit of its subband.
//
// Write side: each mask bit goes through a shifter that packs up to 32 bits
// into one word (fewer when the whole subband is smaller) and the words go
// into that subband's FIFO, deep enough for a whole subband plus one word.
// A generator channel is ready while each of its FIFOs has two free words.
// Read side: for every subband a holding register keeps the word being used
// and the number of bits left in it; it is refilled from the FIFO when empty.
// A coefficient is tagged when the subband number (from roi_subband), the
// coefficient (from the quantizer buffer) and a mask bit of that subband are
// all present and the output register is free: data_out =
// {mask bit, coefficient}, DATA_WIDTH bits, registered. When the mask bit is
// not there yet, mask_wait is high and both inputs are held (stall).
//
// Structure from the document: shifter and FIFO per subband, a multiplexer
// selected by the subband number, N = 3*(LEVEL+1), a DATA_WIDTH output.
// This design's own: the FIFO depths, the holding registers, the placement of
// the mask bit in the word's top bit and the handshakes.
module roi_decode
  import roi_pkg::*;
#(
  parameter int unsigned TILE_W = roi_pkg::TILE_WIDTH,
  parameter int unsigned TILE_H = roi_pkg::TILE_HEIGHT,
  parameter int unsigned LEVELS = roi_pkg::MAX_LEVELS,
  parameter int unsigned DW     = roi_pkg::DATA_WIDTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // detail band masks from the generator (index 0 = finest level)
  input  logic [LEVELS-1:0] band_valid,
  output logic [LEVELS-1:0] band_ready,
  input  logic [LEVELS-1:0] lm_hm_in,
  input  logic [LEVELS-1:0] hm_lm_in,
  input  logic [LEVELS-1:0] hm_hm_in,
  // final LL band mask from the generator
  input  logic              ll_valid,
  output logic              ll_ready,
  input  logic              ll_in,
  // subband number of the next coefficient
  input  logic              valid_subband_in,
  output logic              ready_subband_out,
  input  subband_t          subband_in,
  // quantized coefficient
  input  logic              valid_coef_in,
  output logic              ready_coef_out,
  input  logic [DW-2:0]     coef_in,
  // tagged coefficient {mask, coefficient}
  output logic              valid_out,
  input  logic              ready_in,
  output logic [DW-1:0]     data_out,
  // a coefficient is waiting for its subband's mask
  output logic              mask_wait
);

  localparam int unsigned NSB = 3 * LEVELS + 1;

  logic [NSB-1:0] wr_take;    // bit for stream i accepted
  logic [NSB-1:0] wr_bit;
  logic [NSB-1:0] room;       // stream i can take a bit
  logic [NSB-1:0] have_bit;   // stream i has a mask bit ready
  logic [NSB-1:0] head_bit;
  logic [NSB-1:0] take;       // consume stream i's head bit

  // ---------------------------------------------------- stream mapping
  always_comb begin
    wr_take  = '0;
    wr_bit   = '0;
    wr_bit[0]   = ll_in;
    ll_ready    = room[0];
    wr_take[0]  = ll_valid && room[0];
    for (int k = 0; k < int'(LEVELS); k++) begin
      int unsigned base;
      base = 3 * (LEVELS - 1 - k) + 1;
      wr_bit[base]       = hm_lm_in[k];   // horizontal-high band
      wr_bit[base + 1]   = lm_hm_in[k];   // vertical-high band
      wr_bit[base + 2]   = hm_hm_in[k];   // diagonal band
      band_ready[k]      = room[base] && room[base + 1] && room[base + 2];
      wr_take[base]      = band_valid[k] && band_ready[k];
      wr_take[base + 1]  = band_valid[k] && band_ready[k];
      wr_take[base + 2]  = band_valid[k] && band_ready[k];
    end
  end

  // ------------------------------------------- per-subband mask storage
  for (genvar i = 0; i < int'(NSB); i++) begin : g_sb
    localparam int unsigned BITS  = subband_bits(TILE_W, TILE_H, LEVELS, i);
    localparam int unsigned P     = pack_of(BITS);
    localparam int unsigned DEPTH = BITS / P + 1;
    localparam int unsigned LW    = $clog2(DEPTH + 1);

    logic          sh_valid;
    logic [P-1:0]  sh_word;
    logic          f_valid, f_ready, f_wready;
    logic [P-1:0]  f_data;
    logic [LW-1:0] f_level;
    logic [P-1:0]  hold;
    logic [$clog2(P+1)-1:0] left;

    mask_shifter #(.PACK(P)) u_shifter (
      .clk      (clk),
      .rst_n    (rst_n),
      .valid_in (wr_take[i]),
      .data_in  (wr_bit[i]),
      .valid_out(sh_valid),
      .data_out (sh_word)
    );

    sync_fifo #(.WIDTH(P), .DEPTH(DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_valid(sh_valid),
      .wr_ready(f_wready),
      .wr_data (sh_word),
      .rd_valid(f_valid),
      .rd_ready(f_ready),
      .rd_data (f_data),
      .level   (f_level)
    );

    assign room[i]     = (32'(DEPTH) - 32'(f_level)) >= 2;
    assign f_ready     = (left == '0);
    assign have_bit[i] = (left != '0);
    assign head_bit[i] = hold[P-1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hold <= '0;
        left <= '0;
      end else if (left == '0) begin
        if (f_valid) begin
          hold <= f_data;
          left <= ($clog2(P+1))'(P);
        end
      end else if (take[i]) begin
        hold <= hold << 1;
        left <= left - 1'b1;
      end
    end

    // a completed word always finds room (room[] keeps two words free)
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) sh_valid |-> f_wready)
      else $error("roi_decode: mask FIFO %0d overflow", i);
  end

  // ----------------------------------------------------- read and tag
  logic fire;
  logic out_free;
  logic sel_have;

  assign sel_have  = (32'(subband_in) < NSB) && have_bit[subband_in];
  assign out_free  = !valid_out || ready_in;
  assign fire      = valid_subband_in && valid_coef_in && sel_have && out_free;
  assign mask_wait = valid_subband_in && valid_coef_in && !sel_have;

  assign ready_subband_out = fire;
  assign ready_coef_out    = fire;

  always_comb begin
    take = '0;
    if (fire) take[subband_in] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      data_out  <= '0;
    end else begin
      if (out_free) valid_out <= fire;
      if (fire) data_out <= {head_bit[subband_in], coef_in};
    end
  end

endmodule
