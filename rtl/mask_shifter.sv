// mask_shifter: packs a serial stream of 1-bit mask pixels into PACK-bit
// words so that the mask can be stored in word-wide RAMs and FIFOs.
//
// Each accepted bit (valid_in high) is shifted in at the least significant
// end, so the first bit of a word ends up in its most significant bit: the
// sequence 1110 1110 1111 0111 gives 16'hEEF7, as in the document's timing
// example. When the PACK-th bit has been taken, data_out holds the word and
// valid_out is high for exactly one cycle, on the clock edge after that bit
// (one cycle of latency). The word is always accepted by the consumer, so
// there is no ready input: the instantiating block guarantees room.
// Packing 32 pixels per word follows the document; the bit order follows
// its timing diagram; the reset behaviour is this design's own choice.
module mask_shifter #(
  parameter int unsigned PACK = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_in,
  input  logic            data_in,
  output logic            valid_out,
  output logic [PACK-1:0] data_out
);

  localparam int unsigned CW = (PACK > 1) ? $clog2(PACK) : 1;

  logic [PACK-1:0] sreg;
  logic [CW-1:0]   count;
  logic [PACK-1:0] next_word;

  assign next_word = {sreg[PACK-2:0], data_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg      <= '0;
      count     <= '0;
      valid_out <= 1'b0;
      data_out  <= '0;
    end else begin
      valid_out <= 1'b0;
      if (valid_in) begin
        sreg <= next_word;
        if (count == CW'(PACK - 1)) begin
          count     <= '0;
          data_out  <= next_word;
          valid_out <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (PACK >= 2) else $error("mask_shifter: PACK must be at least 2");
  end

endmodule
