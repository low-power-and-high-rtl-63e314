// bnn_pkg: types and constants shared by the binarized inference engine.
//
// Activations and weights are binary (+1/-1) and travel packed, 32 per
// 32-bit word (SIMD within a register): bit value 1 stands for +1 and bit
// value 0 for -1, following the sign rule w <= 0 -> -1, w > 0 -> +1.
// A feature map is stored pixel by pixel, row-major, with the channel words
// of one pixel consecutive: address = (y * width + x) * channel_words + cw.
// The 9 output classes are the eight weed species and the negative class
// (class 8), as in the DeepWeedsX label set.
package bnn_pkg;

  localparam int unsigned WORD_W        = 32;  // binary values per packed word
  localparam int unsigned PC_W          = $clog2(WORD_W + 1); // popcount width
  localparam int unsigned XNOR_LATENCY  = 4;   // clock cycles of the XNOR/popcount unit
  localparam int unsigned NUM_CLASSES   = 9;   // 8 weed species + negatives
  localparam int unsigned NEG_CLASS     = 8;   // index of the "negatives" class
  localparam int unsigned DOT_W         = 32;  // signed dot product / score width
  localparam int unsigned BN_SCALE_W    = 16;  // batch-norm scale, signed fixed point
  localparam int unsigned BN_FRAC       = 8;   // fractional bits of the scale
  localparam int unsigned BN_SHIFT_W    = 24;  // batch-norm shift, signed integer

  typedef logic [WORD_W-1:0] word_t;
  typedef logic signed [DOT_W-1:0] dot_t;

  // Operation performed by one layer command.
  typedef enum logic [1:0] {
    OP_CONV  = 2'd0,  // binary convolution (a fully connected layer is a 1x1 map, k = 1)
    OP_POOL  = 2'd1,  // 2x2 max pooling, stride 2
    OP_FINAL = 2'd2   // last layer: scores kept as integers, argmax taken
  } layer_op_e;

  // Where a host load lands.
  typedef enum logic [1:0] {
    LD_WEIGHT = 2'd0,
    LD_ACT0   = 2'd1,
    LD_ACT1   = 2'd2
  } load_target_e;

  // One layer command. Feature maps are in_h x in_w pixels of cin_words words.
// A map may be a slice of a wider one: the source is read with in_stride
// words per pixel (its first cin_words are used) and the result is written at
// words out_offset.. of pixels out_stride words apart. With in_place the
// result goes into the source bank, so a layer can append its channels to the
// map it reads (dense-block concatenation).
  // For OP_CONV / OP_FINAL the output is (in_h-k+1) x (in_w-k+1) pixels of cout
  // channels; for OP_POOL it is (in_h/2) x (in_w/2) pixels of cin_words words.
  typedef struct packed {
    layer_op_e   op;
    logic        src_bank;   // activation bank read; the result goes to the other one
    logic [7:0]  in_h;
    logic [7:0]  in_w;
    logic [11:0] cin_words;
    logic [15:0] cout;
    logic [2:0]  k;          // square kernel size, 1..7
    logic [1:0]  pad;        // zero border added on each side (OP_CONV / OP_FINAL)
    logic [20:0] w_base;     // first weight word of the layer
    logic [15:0] bn_base;    // first batch-norm entry of the layer
    logic [11:0] in_stride;  // words per pixel of the source map (0: cin_words)
    logic [11:0] out_stride; // words per pixel of the destination map (0: the layer's own)
    logic [11:0] out_offset; // first destination word within a pixel
    logic        in_place;   // write into the source bank (channel concatenation)
  } layer_cfg_t;

  typedef struct packed {
    logic signed [BN_SCALE_W-1:0] scale;
    logic signed [BN_SHIFT_W-1:0] shift;
  } bn_param_t;

endpackage
