// batchnorm: inference-time batch normalisation of one output channel value.
//
// y = ((x * scale) >>> BN_FRAC) + shift, with scale a signed fixed-point
// number with BN_FRAC fraction bits and shift a signed integer, both per
// output channel: the trained mean, variance, gain and bias folded into one
// multiply and one add. The result is registered (one cycle latency,
// out_valid follows in_valid). The folded fixed-point form is this design's
// choice; only the existence of a batch-normalisation kernel is given.
module batchnorm
  import bnn_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  dot_t      in_x,
  input  bn_param_t param,
  output logic      out_valid,
  output dot_t      out_y
);
  logic signed [DOT_W+BN_SCALE_W-1:0] prod;
  dot_t y;

  always_comb begin
    prod = in_x * param.scale;
    y    = DOT_W'(prod >>> BN_FRAC) + DOT_W'(param.shift);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_y <= y;
    end
  end
endmodule
