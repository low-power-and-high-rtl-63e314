// bnn_engine: binarized neural network inference engine (top level).
//
// The engine executes a binarized network one layer command at a time, the
// way a host processor launches one accelerator kernel after another. All
// weights and hidden activations are +/-1 values packed 32 to a word, so a
// multiply-accumulate over 32 connections becomes one XNOR and one popcount
// (a += popcount(xnor(a_words, w_words))).
//
// Datapath of a convolution / fully connected command (one word per cycle):
//   conv_addr_gen -> activation bank + weight memory (1-cycle read)
//   -> xnor_accumulator (4-stage XNOR/popcount + accumulate, dot = 2m - 32n)
//   -> batchnorm (per-channel scale/shift) -> sign_activation (binarize,
//   pack 32 channels) -> other activation bank.
// OP_POOL reads the four words of every 2x2 window and writes their maxpool
// (bitwise OR). OP_FINAL runs like OP_CONV but keeps the normalised scores
// as integers: they are written to the score memory and fed to
// argmax_classifier, which reports the class and raises spray for every
// class other than the negative one.
//
// Two activation banks alternate: a command reads cmd.src_bank and writes the
// other one, or, with cmd.in_place, the same one. Source and destination
// maps can be slices of wider maps (in_stride, out_stride, out_offset): a
// dense-block layer reads all channels gathered so far and appends its own
// 32 after them in the same bank, which is the DenseNet concatenation. The
// bank has separate read and write ports and the appended words are never
// read by the layer that writes them. A fully connected layer is issued as OP_CONV/OP_FINAL on a 1x1
// map whose channel words are the whole flattened input (k = 1): with the
// pixel-major layout the flattening is free. Memory layouts are described in
// bnn_pkg.
//
// Host side (only while busy is low):
//   load_*   writes 32 single-precision values, binarized and packed by
//            weight_binarize_pack, to the weight memory or an activation bank;
//   bn_wr_*  writes batch-norm parameters;
//   act_rd_* reads an activation bank word (data one cycle later);
//   score_rd_* reads a score (data one cycle later).
// cmd_valid with busy low starts a command; done pulses one cycle after its
// last result is written, and busy falls with it. A command of S address
// steps (see conv_addr_gen) takes S + 10 cycles from cmd_valid to done for
// OP_CONV/OP_FINAL and S + 3 for OP_POOL: the pipeline never stalls.
//
// The XNOR kernel, the sign binarization, the packed-word layout and the
// kernel list (convolution as matrix product, inner product, activation,
// pooling, batch normalisation, softmax output) follow the published engine;
// the command interface, the on-chip memory organisation and sizes, zero
// padding, the fixed-point batch normalisation and the argmax output are
// this design's own, as are the map slicing and in-place writes used for
// dense-block concatenation. Memory sizes default to what holds the evaluated
// binarized networks at 32x32 input: the weight memory takes the weights of
// VGG-16 or WRN-28-10, an activation bank the widest DenseNet map estimated
// for 128 layers of growth 32.
module bnn_engine
  import bnn_pkg::*;
#(
  parameter int unsigned ACT_WORDS = 65536,    // words per activation bank
  parameter int unsigned W_WORDS   = 2097152,  // packed weight words
  parameter int unsigned BN_DEPTH  = 65536,    // batch-norm entries
  localparam int unsigned ACT_AW   = $clog2(ACT_WORDS),
  localparam int unsigned W_AW     = $clog2(W_WORDS),
  localparam int unsigned BN_AW    = $clog2(BN_DEPTH),
  localparam int unsigned CLS_W    = $clog2(NUM_CLASSES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // layer commands
  input  logic                  cmd_valid,
  input  layer_cfg_t            cmd,
  output logic                  busy,
  output logic                  done,
  // host loads (32 float values -> one packed word)
  input  logic                  load_valid,
  input  load_target_e          load_target,
  input  logic [W_AW-1:0]       load_addr,
  input  logic [31:0][31:0]     load_values,
  // batch-norm parameters
  input  logic                  bn_wr_en,
  input  logic [BN_AW-1:0]      bn_wr_addr,
  input  bn_param_t             bn_wr_data,
  // activation read-back
  input  logic                  act_rd_bank,
  input  logic [ACT_AW-1:0]     act_rd_addr,
  output word_t                 act_rd_data,
  // scores of the last OP_FINAL command
  input  logic [CLS_W-1:0]      score_rd_addr,
  output dot_t                  score_rd_data,
  // classification
  output logic                  result_valid,
  output logic [CLS_W-1:0]      result_class,
  output dot_t                  result_score,
  output logic                  spray
);
  // ---------------------------------------------------------------- command
  layer_cfg_t  cfg_q;
  logic        busy_q;
  logic [31:0] results_total, results_seen;
  logic [7:0]  cmd_oh, cmd_ow;

  assign cmd_oh = cmd.in_h + 8'({cmd.pad, 1'b0}) - 8'(cmd.k) + 8'd1;
  assign cmd_ow = cmd.in_w + 8'({cmd.pad, 1'b0}) - 8'(cmd.k) + 8'd1;

  // ------------------------------------------------------- address sequencer
  logic              g_valid, g_first, g_last, g_skip, g_layer_last;
  logic [ACT_AW-1:0] g_act_addr;
  logic [W_AW-1:0]   g_w_addr;
  logic              gen_busy;

  conv_addr_gen #(.ACT_AW(ACT_AW), .W_AW(W_AW)) u_gen (
    .clk, .rst_n,
    .start(cmd_valid && !busy_q), .cfg(cmd), .busy(gen_busy),
    .step_valid(g_valid), .act_addr(g_act_addr), .w_addr(g_w_addr),
    .first(g_first), .last(g_last), .skip(g_skip), .layer_last(g_layer_last)
  );

  // --------------------------------------------------------------- memories
  word_t             packed_load;
  word_t             act_rdata [2];
  word_t             w_rdata;
  logic              act_we [2];
  logic [ACT_AW-1:0] act_waddr [2];
  logic [ACT_AW-1:0] act_raddr;
  word_t             act_wdata [2];
  logic              eng_we;
  logic [ACT_AW-1:0] eng_waddr;
  word_t             eng_wdata;
  logic              rd_bank_q;
  logic              dst_bank;

  weight_binarize_pack #(.N(32)) u_pack (.values(load_values), .packed_word(packed_load));

  assign act_raddr = busy_q ? g_act_addr : act_rd_addr;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    always_comb begin
      if (busy_q) begin
        act_we[b]    = eng_we && (b == int'(dst_bank));
        act_waddr[b] = eng_waddr;
        act_wdata[b] = eng_wdata;
      end else begin
        act_we[b]    = load_valid && (load_target == (b == 0 ? LD_ACT0 : LD_ACT1));
        act_waddr[b] = ACT_AW'(load_addr);
        act_wdata[b] = packed_load;
      end
    end
    local_ram #(.DEPTH(ACT_WORDS), .WIDTH(WORD_W)) u_act (
      .clk, .wr_en(act_we[b]), .wr_addr(act_waddr[b]), .wr_data(act_wdata[b]),
      .rd_addr(act_raddr), .rd_data(act_rdata[b])
    );
  end

  local_ram #(.DEPTH(W_WORDS), .WIDTH(WORD_W)) u_wmem (
    .clk, .wr_en(load_valid && !busy_q && load_target == LD_WEIGHT),
    .wr_addr(load_addr), .wr_data(packed_load),
    .rd_addr(g_w_addr), .rd_data(w_rdata)
  );

  always_ff @(posedge clk) rd_bank_q <= busy_q ? cfg_q.src_bank : act_rd_bank;
  assign act_rd_data = act_rdata[rd_bank_q];

  // ------------------------------------------------ read stage (1 cycle)
  logic  s_valid, s_first, s_last, s_skip, s_layer_last;
  word_t s_act;

  always_ff @(posedge clk) begin
    if (!rst_n) {s_valid, s_first, s_last, s_skip, s_layer_last} <= '0;
    else begin
      s_valid      <= g_valid;
      s_first      <= g_first;
      s_last       <= g_last;
      s_skip       <= g_skip;
      s_layer_last <= g_layer_last;
    end
  end
  assign s_act = act_rdata[cfg_q.src_bank];

  // ------------------------------------------------ convolution datapath
  logic      acc_valid;
  dot_t      acc_dot;
  logic [15:0] acc_oc, acc_oc_next;
  bn_param_t bn_rdata;
  logic      bn_valid;
  dot_t      bn_y;
  logic [15:0] bn_oc;
  logic      act_word_valid;
  word_t     act_word;
  logic      is_pool;

  assign is_pool = (cfg_q.op == OP_POOL);

  xnor_accumulator u_acc (
    .clk, .rst_n,
    .in_valid(s_valid && !is_pool), .in_first(s_first), .in_last(s_last), .in_skip(s_skip),
    .a(s_act), .w(w_rdata),
    .out_valid(acc_valid), .out_dot(acc_dot)
  );

  // Output channel of the next accumulator result; its batch-norm entry is
  // read one cycle ahead so that it is ready with the result.
  always_comb begin
    acc_oc_next = acc_oc;
    if (acc_valid) acc_oc_next = (acc_oc == cfg_q.cout - 16'd1) ? '0 : acc_oc + 16'd1;
  end

  local_ram #(.DEPTH(BN_DEPTH), .WIDTH(BN_SCALE_W + BN_SHIFT_W)) u_bn (
    .clk, .wr_en(bn_wr_en && !busy_q), .wr_addr(bn_wr_addr), .wr_data(bn_wr_data),
    .rd_addr(BN_AW'(cfg_q.bn_base) + BN_AW'(acc_oc_next)), .rd_data(bn_rdata)
  );

  batchnorm u_bnorm (
    .clk, .rst_n, .in_valid(acc_valid), .in_x(acc_dot), .param(bn_rdata),
    .out_valid(bn_valid), .out_y(bn_y)
  );

  sign_activation u_sign (
    .clk, .rst_n,
    .in_valid(bn_valid && cfg_q.op == OP_CONV), .in_y(bn_y), .in_bit(bn_oc[4:0]),
    .in_last(bn_oc == cfg_q.cout - 16'd1),
    .word_valid(act_word_valid), .word(act_word)
  );

  local_ram #(.DEPTH(16), .WIDTH(DOT_W)) u_score (
    .clk, .wr_en(bn_valid && cfg_q.op == OP_FINAL), .wr_addr(bn_oc[3:0]), .wr_data(bn_y),
    .rd_addr(4'(score_rd_addr)), .rd_data(score_rd_data)
  );

  argmax_classifier u_argmax (
    .clk, .rst_n, .clear(cmd_valid && !busy_q && cmd.op == OP_FINAL),
    .score_valid(bn_valid && cfg_q.op == OP_FINAL && bn_oc < 16'(NUM_CLASSES)),
    .score_idx(CLS_W'(bn_oc)), .score(bn_y),
    .result_valid, .result_class, .result_score, .spray
  );

  // ------------------------------------------------ pooling datapath
  logic [2:0][WORD_W-1:0] win_q;
  word_t                  pooled;

  maxpool #(.WINDOW(4), .WIDTH(WORD_W)) u_pool (
    .window({s_act, win_q}), .pooled(pooled)
  );

  always_ff @(posedge clk) begin
    if (s_valid && is_pool) begin
      win_q[0] <= s_act;
      win_q[1] <= win_q[0];
      win_q[2] <= win_q[1];
    end
  end

  // ------------------------------------------------ write-back
  // Output word `out_wi` of output pixel `out_pix` goes to
  // out_pix * out_stride + out_offset + out_wi.
  logic [31:0] out_pix;
  logic [11:0] out_wi, pix_words_q, out_stride_q;
  logic [11:0] cmd_pix_words;

  assign cmd_pix_words = (cmd.op == OP_POOL) ? cmd.cin_words : 12'((cmd.cout + 16'd31) >> 5);
  assign dst_bank  = cfg_q.in_place ? cfg_q.src_bank : !cfg_q.src_bank;
  assign eng_we    = is_pool ? (s_valid && s_last) : act_word_valid;
  assign eng_wdata = is_pool ? pooled : act_word;
  assign eng_waddr = ACT_AW'(out_pix * 32'(out_stride_q) + 32'(cfg_q.out_offset) + 32'(out_wi));

  // ------------------------------------------------ control
  // The last result of a convolution is written (packed word, score) in the
  // cycle after its batch-norm output; the command finishes there.
  logic finished, last_bn_q;
  assign finished = busy_q && (is_pool ? (s_valid && s_layer_last) : last_bn_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q       <= 1'b0;
      done         <= 1'b0;
      cfg_q        <= '0;
      acc_oc       <= '0;
      bn_oc        <= '0;
      out_pix      <= '0;
      out_wi       <= '0;
      pix_words_q  <= '0;
      out_stride_q <= '0;
      results_seen <= '0;
      results_total <= '0;
      last_bn_q    <= 1'b0;
    end else begin
      last_bn_q <= busy_q && !is_pool && bn_valid && results_seen == results_total - 32'd1;
      done <= 1'b0;
      if (cmd_valid && !busy_q) begin
        busy_q        <= 1'b1;
        cfg_q         <= cmd;
        acc_oc        <= '0;
        bn_oc         <= '0;
        out_pix       <= '0;
        out_wi        <= '0;
        pix_words_q   <= cmd_pix_words;
        out_stride_q  <= (cmd.out_stride != '0) ? cmd.out_stride : cmd_pix_words;
        results_seen  <= '0;
        results_total <= 32'(cmd_oh) * 32'(cmd_ow) * 32'(cmd.cout);
      end else if (busy_q) begin
        acc_oc <= acc_oc_next;
        if (acc_valid) bn_oc <= acc_oc;
        if (bn_valid) results_seen <= results_seen + 32'd1;
        if (eng_we) begin
          if (out_wi == pix_words_q - 12'd1) begin
            out_wi  <= '0;
            out_pix <= out_pix + 32'd1;
          end else begin
            out_wi  <= out_wi + 12'd1;
          end
        end
        if (finished) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  assign busy       = busy_q;

  // A command is only accepted while idle; host accesses wait for idle too.
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy_q |-> !(load_valid || bn_wr_en));
  a_gen_within_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    gen_busy |-> busy_q);
  a_done_ends_busy: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !busy_q);
endmodule
