// weight_binarize_pack: binarizes 32 single-precision values and packs them.
//
// Each input is an IEEE-754 binary32 number. It becomes +1 (bit 1) when it is
// greater than zero and -1 (bit 0) otherwise, the deterministic sign rule
// w_b = -1 if w <= 0, +1 otherwise. Value i lands in bit i of the output word,
// giving the 32-binary-values-per-register layout that the XNOR kernel
// consumes. "Greater than zero" means sign bit clear and a non-zero
// magnitude; +0 and -0 both give -1. NaN inputs follow their sign bit, which
// is this design's choice. Purely combinational.
module weight_binarize_pack
  import bnn_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0][31:0] values,
  output logic [N-1:0]       packed_word
);
  always_comb begin
    for (int i = 0; i < int'(N); i++)
      packed_word[i] = !values[i][31] && (values[i][30:0] != '0);
  end
endmodule
