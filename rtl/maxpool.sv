// maxpool: max pooling of packed binary activations.
//
// Takes the WINDOW words (e.g. the four pixels of a 2x2 window) holding the
// same 32 channels and returns, per channel, the largest value. With values
// +1 (bit 1) and -1 (bit 0) the maximum is +1 as soon as one pixel is +1, so
// each output bit is the OR of its column: all channels of a word are pooled
// in parallel in one combinational step.
module maxpool
  import bnn_pkg::*;
#(
  parameter int unsigned WINDOW = 4,
  parameter int unsigned WIDTH  = 32
) (
  input  logic [WINDOW-1:0][WIDTH-1:0] window,
  output logic [WIDTH-1:0]             pooled
);
  always_comb begin
    pooled = '0;
    for (int i = 0; i < int'(WINDOW); i++) pooled |= window[i];
  end
endmodule
