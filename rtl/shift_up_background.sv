// shift_up_background: ROI emphasis by scaling the background down.
//
// Instead of shifting ROI coefficients up above the background (Maxshift,
// which roughly doubles the word width, or generic scaling, which adds S
// bits), this stage leaves ROI coefficients as they are and shifts every
// background coefficient down by a user-chosen amount, maxshift_config_in.
// The word width does not grow: DATA_WIDTH bits in, DATA_WIDTH bits out.
//
// Input word: bit DATA_WIDTH-1 is the ROI mask bit, bits DATA_WIDTH-2:0 the
// quantized coefficient in two's complement (bit DATA_WIDTH-2 is its sign).
// Output word: the coefficient sign-extended to DATA_WIDTH bits,
//   ROI (mask = 1):        {s, c}                  (unchanged)
//   background (mask = 0): {s, c} >>> maxshift_config_in   (arithmetic)
// so for DATA_WIDTH = 32 the shift amount selects among 32 choices, from
// {s, c} (0) to all sign bits (31). The sign is always kept.
// Timing: one register stage with valid/ready; a word is taken when
// valid_in && ready_out, and ready_out = !valid_out || ready_in.
// The selection network and its 32 shift choices follow the document; the
// output valid/ready register is this design's own choice.
module shift_up_background
  import roi_pkg::*;
#(
  parameter int unsigned DW = roi_pkg::DATA_WIDTH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [$clog2(DW)-1:0] maxshift_config_in,
  input  logic                  valid_in,
  output logic                  ready_out,
  input  logic [DW-1:0]         data_in,
  output logic                  valid_out,
  input  logic                  ready_in,
  output logic [DW-1:0]         data_out
);

  logic                 roi;
  logic signed [DW-1:0] ext;
  logic [DW-1:0]        shifted;

  assign roi     = data_in[DW-1];
  assign ext     = {data_in[DW-2], data_in[DW-2:0]};
  assign shifted = ext >>> maxshift_config_in;

  assign ready_out = !valid_out || ready_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      data_out  <= '0;
    end else if (ready_out) begin
      valid_out <= valid_in;
      if (valid_in) data_out <= roi ? ext : shifted;
    end
  end

endmodule
