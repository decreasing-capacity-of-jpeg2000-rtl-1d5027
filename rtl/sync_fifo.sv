// sync_fifo: single-clock first-in first-out buffer with valid/ready
// handshakes on both sides.
//
// The design uses it as the mask input buffer, as the buffer between the
// quantizer and the mask decoder, and as the per-subband mask FIFOs of the
// decoder. Storage is an array of DEPTH words addressed by a write and a
// read pointer that wrap at DEPTH (DEPTH need not be a power of two).
// Interface: a word is written when wr_valid && wr_ready and read when
// rd_valid && rd_ready. The head word is presented on rd_data while
// rd_valid is high (first-word fall-through), so a word written in one cycle
// can be read from the next. wr_ready is low only when the FIFO is full;
// writing and reading in the same cycle is allowed when it is full.
// The document names these buffers but does not describe them; this
// structure is this design's own choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_valid,
  output logic                       wr_ready,
  input  logic [WIDTH-1:0]           wr_data,
  output logic                       rd_valid,
  input  logic                       rd_ready,
  output logic [WIDTH-1:0]           rd_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign rd_valid = (level != '0);
  assign wr_ready = (level != LW'(DEPTH)) || rd_ready;
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign rd_data  = mem[rptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

endmodule
