// sp_mask_level: one level of the lossless S+P ROI mask decomposition.
//
// The input is the 1-bit ROI mask of a W x H tile (or of the LL mask band of
// the previous level) in raster order, one pixel per accepted transfer. The
// output is the mask of the four subbands of one wavelet level, W/2 x H/2
// each, in raster order; the four bits of one position leave together.
//
// S+P rule, applied first along each row and then along each column: for
// pair n, P(n) = X(2n) | X(2n+1); the high band is H(n) = P(n) and the low
// band is L(n) = P(n-1) | P(n) | P(n+1). Taken over both dimensions:
//   hm_hm(m,n) = OR of rows 2m..2m+1   and columns 2n..2n+1
//   hm_lm(m,n) = OR of rows 2m-2..2m+3 and columns 2n..2n+1
//   lm_hm(m,n) = OR of rows 2m..2m+1   and columns 2n-2..2n+3
//   lm_lm(m,n) = OR of rows 2m-2..2m+3 and columns 2n-2..2n+3
// (first half of the name: horizontal band, second half: vertical band).
// Rows and columns outside the tile count as 0.
//
// How it works: incoming bits are packed WORD at a time (mask_shifter) and
// written to a RAM holding 6 rows of W/WORD words, the six rows that one
// output row needs. An output engine, once rows up to 2m+3 have arrived,
// reads the six rows word by word into a three-word window per row and emits
// the WORD/2 output positions of each word, one per cycle. A new row may
// overwrite a RAM word only when the last output row needing the old content
// has already read it; until then ready_out is low (input stall). After the
// last row of a tile the input also waits until the last output row is out.
//
// Timing: outputs of row m start once input row 2m+3 (or the last row) is
// in RAM. Reading one word column takes 8 cycles, then WORD/2 outputs follow
// at one per cycle while ready_in is high.
//
// From the document: the S+P equations, the row-then-column order, the
// 6-row RAM of tiling_width/32 words of 32 packed pixels, and the
// shifter-then-RAM structure of a level. This design's own: the window
// engine, the overwrite rule, clipping at the tile edge and the handshakes.
module sp_mask_level #(
  parameter int unsigned W    = 128,
  parameter int unsigned H    = 128,
  parameter int unsigned PACK = 32
) (
  input  logic clk,
  input  logic rst_n,
  // mask input
  input  logic valid_in,
  input  logic data_in,
  output logic ready_out,
  // subband mask output
  output logic valid_out,
  input  logic ready_in,
  output logic lm_lm_out,
  output logic lm_hm_out,
  output logic hm_lm_out,
  output logic hm_hm_out
);

  localparam int unsigned WORD  = (W < PACK) ? W : PACK;
  localparam int unsigned NW    = W / WORD;
  localparam int unsigned ROWS  = 6;
  localparam int unsigned DEPTH = ROWS * NW;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned RW    = $clog2(H + 6);
  localparam int unsigned CW    = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned JW    = $clog2(NW + 1);
  localparam int unsigned KW    = (WORD > 2) ? $clog2(WORD / 2) : 1;

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_OUT} state_t;

  // ---------------------------------------------------------------- RAM
  logic [WORD-1:0] ram [DEPTH];
  logic            ram_we;
  logic [AW-1:0]   ram_waddr, ram_raddr;
  logic [WORD-1:0] ram_wdata, ram_rdata;

  always_ff @(posedge clk) begin
    if (ram_we) ram[ram_waddr] <= ram_wdata;
    ram_rdata <= ram[ram_raddr];
  end

  // ------------------------------------------------------- input side
  logic [RW-1:0] in_row;      // row of the next input bit
  logic [CW-1:0] in_col;      // column of the next input bit
  logic [2:0]    in_slot;     // RAM row slot of in_row (in_row mod 6)
  logic [RW-1:0] rows_done;   // rows completely written to RAM
  logic          in_fire;
  logic          word_ok;
  logic          tile_wait;
  logic [JW-1:0] in_word;

  // output engine state, declared here because the input side reads it
  state_t        state;
  logic [RW-1:0] cur_pair;    // output row being produced / next to produce
  logic [JW-1:0] fetch_cnt;   // word columns of cur_pair already in registers

  assign in_word   = JW'(in_col / CW'(WORD));
  assign tile_wait = (in_row == RW'(H));

  // The old content of the slot (row in_row-6) is last needed by output row
  // (in_row-4)/2. It may be overwritten once that row has read the word.
  always_comb begin
    logic [RW-1:0] m_last;
    m_last = RW'((in_row - RW'(4)) >> 1);
    if (in_row < RW'(6))
      word_ok = 1'b1;
    else if (cur_pair > m_last)
      word_ok = 1'b1;
    else
      word_ok = (cur_pair == m_last) && (state != S_IDLE) && (fetch_cnt > in_word);
  end

  assign ready_out = !tile_wait && word_ok;
  assign in_fire   = valid_in && ready_out;

  logic          sh_valid;
  logic [WORD-1:0] sh_word;
  logic [AW-1:0] wr_addr_q;
  logic          wr_last_q;

  mask_shifter #(.PACK(WORD)) u_shifter (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (in_fire),
    .data_in  (data_in),
    .valid_out(sh_valid),
    .data_out (sh_word)
  );

  assign ram_we    = sh_valid;
  assign ram_waddr = wr_addr_q;
  assign ram_wdata = sh_word;

  logic tile_restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_row    <= '0;
      in_col    <= '0;
      in_slot   <= '0;
      rows_done <= '0;
      wr_addr_q <= '0;
      wr_last_q <= 1'b0;
    end else begin
      if (in_fire) begin
        // address of the word this bit belongs to, used when it completes
        wr_addr_q <= AW'(in_slot * NW + in_word);
        wr_last_q <= (in_col == CW'(W - 1));
        if (in_col == CW'(W - 1)) begin
          in_col  <= '0;
          in_row  <= in_row + 1'b1;
          in_slot <= (in_slot == 3'd5) ? 3'd0 : in_slot + 3'd1;
        end else begin
          in_col <= in_col + 1'b1;
        end
      end
      if (sh_valid && wr_last_q) rows_done <= rows_done + 1'b1;
      if (tile_restart) begin
        in_row    <= '0;
        in_col    <= '0;
        in_slot   <= '0;
        rows_done <= '0;
      end
    end
  end

  // ------------------------------------------------------ output engine
  logic [WORD-1:0] win_prev [ROWS];
  logic [WORD-1:0] win_cur  [ROWS];
  logic [WORD-1:0] win_next [ROWS];
  logic [2:0]      pair_slot;   // RAM slot of row 2*cur_pair-2
  logic [JW-1:0]   out_word;    // word column being output
  logic [KW-1:0]   k;           // output position inside the word
  logic [3:0]      rc;          // fetch cycle counter 0..7
  logic            primed;
  logic [RW:0]     need_rows;
  logic            out_fire;

  assign need_rows    = ((2 * cur_pair + 4) < (RW + 1)'(H)) ? (RW + 1)'(2 * cur_pair + 4) : (RW + 1)'(H);
  assign tile_restart = (state == S_IDLE) && (cur_pair == RW'(H / 2)) && tile_wait && (rows_done == RW'(H));

  // Read address: slot of window row rc, word column fetch_cnt.
  always_comb begin
    logic [3:0] s;
    s = 4'(pair_slot) + rc;
    if (s >= 4'd6) s = s - 4'd6;
    if (s >= 4'd6) s = s - 4'd6;
    ram_raddr = AW'(32'(s[2:0]) * NW + 32'(fetch_cnt));
  end

  // window row i holds tile row 2*cur_pair-2+i
  function automatic logic row_valid(input logic [RW-1:0] pair, input int i);
    int signed r;
    r = 2 * int'(pair) - 2 + int'(i);
    return (r >= 0) && (r < int'(H));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_pair  <= '0;
      fetch_cnt <= '0;
      pair_slot <= 3'd4;
      out_word  <= '0;
      k         <= '0;
      rc        <= '0;
      primed    <= 1'b0;
      for (int i = 0; i < int'(ROWS); i++) begin
        win_prev[i] <= '0;
        win_cur[i]  <= '0;
        win_next[i] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: begin
          if (tile_restart) begin
            cur_pair  <= '0;
            pair_slot <= 3'd4;
          end else if (cur_pair < RW'(H / 2) && (RW + 1)'(rows_done) >= need_rows) begin
            state     <= S_FETCH;
            fetch_cnt <= '0;
            out_word  <= '0;
            k         <= '0;
            rc        <= '0;
            primed    <= 1'b0;
            for (int i = 0; i < int'(ROWS); i++) begin
              win_prev[i] <= '0;
              win_cur[i]  <= '0;
              win_next[i] <= '0;
            end
          end
        end
        S_FETCH: begin
          rc <= rc + 4'd1;
          if (rc >= 4'd1 && rc <= 4'd6) begin
            win_next[3'(rc - 4'd1)] <= row_valid(cur_pair, int'(rc) - 1) ? ram_rdata : '0;
          end
          if (rc == 4'd7) begin
            rc        <= '0;
            fetch_cnt <= fetch_cnt + 1'b1;
            if (!primed) begin
              primed <= 1'b1;
              for (int i = 0; i < int'(ROWS); i++) begin
                win_prev[i] <= '0;
                win_cur[i]  <= win_next[i];
                win_next[i] <= '0;
              end
              if (NW == 1) state <= S_OUT;
            end else begin
              state <= S_OUT;
            end
          end
        end
        S_OUT: begin
          if (out_fire) begin
            if (k == KW'(WORD / 2 - 1)) begin
              k <= '0;
              if (out_word == JW'(NW - 1)) begin
                state     <= S_IDLE;
                cur_pair  <= cur_pair + 1'b1;
                fetch_cnt <= '0;
                pair_slot <= (pair_slot >= 3'd4) ? pair_slot - 3'd4 : pair_slot + 3'd2;
              end else begin
                out_word <= out_word + 1'b1;
                for (int i = 0; i < int'(ROWS); i++) begin
                  win_prev[i] <= win_cur[i];
                  win_cur[i]  <= win_next[i];
                  win_next[i] <= '0;
                end
                if (fetch_cnt < JW'(NW)) state <= S_FETCH;
              end
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------- output combination
  logic [ROWS-1:0] hrow, lrow;

  always_comb begin
    for (int i = 0; i < int'(ROWS); i++) begin
      logic [WORD+3:0] colvec;
      // column c (-2 .. WORD+1 relative to the word) sits at bit WORD+1-c
      colvec  = {win_prev[i][1:0], win_cur[i], win_next[i][WORD-1 -: 2]} << (2 * k);
      hrow[i] = |colvec[WORD+1 -: 2];
      lrow[i] = |colvec[WORD+3 -: 6];
    end
  end

  assign valid_out = (state == S_OUT);
  assign out_fire  = valid_out && ready_in;
  assign hm_hm_out = |hrow[3:2];
  assign hm_lm_out = |hrow;
  assign lm_hm_out = |lrow[3:2];
  assign lm_lm_out = |lrow;

  initial begin
    assert (W % WORD == 0 && W >= 2 && H >= 2 && W % 2 == 0 && H % 2 == 0)
      else $error("sp_mask_level: W and H must be even and W a multiple of the word");
  end

endmodule
