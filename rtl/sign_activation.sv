// sign_activation: binarizing activation and channel packer.
//
// For every valid normalised output y of output channel `chan` it produces
// the binary activation with the sign rule (y <= 0 -> -1 = bit 0, y > 0 ->
// +1 = bit 1); the sign of tanh(y) equals the sign of y, so this is also the
// binarized tanh activation. The bits of consecutive channels are gathered
// in a 32-bit word, bit (chan mod 32); the word is emitted (word_valid) when
// bit 31 is filled or when the input is flagged as the last channel of the
// pixel, in which case the unused upper bits are 0 (-1). The word is
// emitted one cycle after the closing input. Synchronous active-low reset.
module sign_activation
  import bnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  dot_t        in_y,
  input  logic [4:0]  in_bit,      // channel index modulo 32
  input  logic        in_last,     // last channel of this pixel
  output logic        word_valid,
  output word_t       word
);
  word_t acc_q;
  word_t acc_next;

  always_comb begin
    acc_next = acc_q;
    if (in_bit == '0) acc_next = '0;
    acc_next[in_bit] = (in_y > 0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q      <= '0;
      word_valid <= 1'b0;
      word       <= '0;
    end else begin
      word_valid <= 1'b0;
      if (in_valid) begin
        acc_q <= acc_next;
        if (in_bit == 5'd31 || in_last) begin
          word_valid <= 1'b1;
          word       <= acc_next;
        end
      end
    end
  end
endmodule
