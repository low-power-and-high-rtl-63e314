// tb_bnn_engine: end-to-end test of the binarized inference engine at its
// default sizes.
//
// The testbench plays the host: it loads weights (as single-precision values
// whose signs give the binary weights), batch-norm parameters and the input
// image, issues one layer command after another, and after every command
// reads back the produced feature map (or the class scores) and compares it
// with a reference model written here with plain loops over +/-1 values. It
// also checks the cycle count of every command against the step count
// (S + 10 cycles for a convolution / final layer, S + 3 for pooling).
//
// Part 1 runs a small network on three images and a small dense block
// (layers that read every channel gathered so far and append their own in
// place, then a transition), and counts the mechanisms of the engine (padded
// and unpadded convolution, pooling, fully connected layers, one-word dot
// products issued back to back, partially filled output words, both bank
// directions, in-place concatenation, strided reads, the final argmax with
// and without the sprayer trigger); a mechanism that never happened counts
// as a failure. After every command the whole destination map is compared,
// so words a command must leave alone are checked too.
// Part 1c repeats the dense block at full resolution: a 3x32x32 image, a
// 64-channel stem and four growth-32 layers appended in place to a 6-word
// map, then a 1x1 transition and a pool. The map layout is a typical
// DenseNet block, chosen for this test.
// Part 2 classifies one 3x32x32 image with a binarized VGG-16 (13 padded 3x3
// convolutions in five blocks of 64-128-256-512-512 channels, five 2x2 max
// pools, fully connected 512-4096-4096-9), weights and batch-norm parameters
// random.
module tb_bnn_engine;
  import bnn_pkg::*;

  localparam int ACT_WORDS = 65536;
  localparam int W_WORDS   = 2097152;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  layer_cfg_t cmd = '0;
  logic busy, done;
  logic load_valid = 0;
  load_target_e load_target = LD_WEIGHT;
  logic [20:0] load_addr = '0;
  logic [31:0][31:0] load_values = '0;
  logic bn_wr_en = 0;
  logic [15:0] bn_wr_addr = '0;
  bn_param_t bn_wr_data = '0;
  logic act_rd_bank = 0;
  logic [15:0] act_rd_addr = '0;
  word_t act_rd_data;
  logic [3:0] score_rd_addr = '0;
  dot_t score_rd_data;
  logic result_valid;
  logic [3:0] result_class;
  dot_t result_score;
  logic spray;

  bnn_engine dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ reference
  word_t ref_w [W_WORDS];
  word_t ref_act [2][ACT_WORDS];
  int    ref_scale [65536];
  int    ref_shift [65536];
  int    ref_score [16];

  // mechanism counters
  int n_conv_pad, n_conv_nopad, n_pool, n_fc, n_final, n_spray_on, n_spray_off;
  int n_partial_word, n_one_word_runs, n_bank01, n_bank10, n_concat, n_strided_read;

  // Single-precision bit pattern whose sign rule gives bit b.
  function automatic logic [31:0] float_for(input bit b);
    int k;
    k = $urandom_range(0, 7);
    if (b) return {1'b0, 8'($urandom_range(100, 140)), 23'($urandom)};
    if (k == 0) return 32'h0000_0000;
    if (k == 1) return 32'h8000_0000;
    return {1'b1, 8'($urandom_range(100, 140)), 23'($urandom)};
  endfunction

  task automatic host_load(input load_target_e t, input int addr, input word_t bits);
    @(negedge clk);
    load_valid = 1; load_target = t; load_addr = 21'(addr);
    for (int i = 0; i < 32; i++) load_values[i] = float_for(bits[i]);
    @(negedge clk);
    load_valid = 0;
  endtask

  task automatic host_bn(input int addr, input int scale, input int shift);
    @(negedge clk);
    bn_wr_en = 1; bn_wr_addr = 16'(addr);
    bn_wr_data.scale = 16'(scale); bn_wr_data.shift = 24'(shift);
    ref_scale[addr] = scale; ref_shift[addr] = shift;
    @(negedge clk);
    bn_wr_en = 0;
  endtask

  // Random weights for a layer; channels >= valid_ch of each pixel word stay -1.
  task automatic make_weights(input int base, input int cout, input int k, input int cinw,
                              input int valid_ch);
    for (int co = 0; co < cout; co++)
      for (int kk = 0; kk < k * k; kk++)
        for (int cw = 0; cw < cinw; cw++) begin
          word_t wd;
          int a;
          wd = $urandom;
          for (int b = 0; b < 32; b++) if (cw * 32 + b >= valid_ch) wd[b] = 1'b0;
          a = base + (co * k * k + kk) * cinw + cw;
          ref_w[a] = wd;
          host_load(LD_WEIGHT, a, wd);
        end
  endtask

  // Random batch-norm parameters around the dot-product range n.
  task automatic make_bn(input int base, input int cout, input int n);
    for (int co = 0; co < cout; co++)
      host_bn(base + co, $urandom_range(64, 512) * (($urandom_range(0, 5) == 0) ? -1 : 1),
              $signed($urandom_range(0, 2 * (n / 8) + 2)) - (n / 8) - 1);
  endtask

  function automatic int floor_div256(input longint p);
    longint q;
    q = p / 256;
    if (p < 0 && q * 256 != p) q = q - 1;
    return int'(q);
  endfunction

  // Reference of one command, written with the layer's own loops.
  function automatic int in_stride_of(input layer_cfg_t c);
    return (c.in_stride != 0) ? int'(c.in_stride) : int'(c.cin_words);
  endfunction

  function automatic int pix_words_of(input layer_cfg_t c);
    return (c.op == OP_POOL) ? int'(c.cin_words) : (int'(c.cout) + 31) / 32;
  endfunction

  function automatic int out_stride_of(input layer_cfg_t c);
    return (c.out_stride != 0) ? int'(c.out_stride) : pix_words_of(c);
  endfunction

  function automatic void ref_layer(input layer_cfg_t c);
    int src, dst, oh, ow, ins, outs;
    src = c.src_bank; dst = c.in_place ? src : 1 - src;
    ins = in_stride_of(c); outs = out_stride_of(c);
    if (c.op == OP_POOL) begin
      oh = c.in_h / 2; ow = c.in_w / 2;
      for (int y = 0; y < oh; y++)
        for (int x = 0; x < ow; x++)
          for (int cw = 0; cw < c.cin_words; cw++) begin
            word_t m;
            for (int b = 0; b < 32; b++) begin
              int best;
              best = -1;
              for (int dy = 0; dy < 2; dy++)
                for (int dx = 0; dx < 2; dx++)
                  if (ref_act[src][((2*y+dy) * c.in_w + 2*x+dx) * ins + cw][b]) best = 1;
              m[b] = (best > 0);
            end
            ref_act[dst][(y * ow + x) * outs + c.out_offset + cw] = m;
          end
      return;
    end
    oh = c.in_h + 2 * c.pad - c.k + 1;
    ow = c.in_w + 2 * c.pad - c.k + 1;
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++)
        for (int co = 0; co < c.cout; co++) begin
          int dot, yv;
          dot = 0;
          for (int ky = 0; ky < c.k; ky++)
            for (int kx = 0; kx < c.k; kx++) begin
              int iy, ix;
              iy = y + ky - c.pad; ix = x + kx - c.pad;
              if (iy >= 0 && ix >= 0 && iy < c.in_h && ix < c.in_w)
                for (int cw = 0; cw < c.cin_words; cw++) begin
                  word_t av, wv;
                  av = ref_act[src][(iy * c.in_w + ix) * ins + cw];
                  wv = ref_w[c.w_base + (co * c.k * c.k + ky * c.k + kx) * c.cin_words + cw];
                  dot += 2 * $countones(~(av ^ wv)) - 32;
                end
            end
          yv = floor_div256(longint'(dot) * ref_scale[c.bn_base + co]) + ref_shift[c.bn_base + co];
          if (c.op == OP_FINAL) ref_score[co] = yv;
          else begin
            int a;
            a = (y * ow + x) * outs + c.out_offset + co / 32;
            if (co % 32 == 0) ref_act[dst][a] = '0;
            ref_act[dst][a][co % 32] = (yv > 0);
          end
        end
  endfunction

  function automatic longint steps_of(input layer_cfg_t c);
    if (c.op == OP_POOL) return longint'(c.in_h / 2) * (c.in_w / 2) * c.cin_words * 4;
    return longint'(c.in_h + 2 * c.pad - c.k + 1) * (c.in_w + 2 * c.pad - c.k + 1) * c.cout
           * c.k * c.k * c.cin_words;
  endfunction

  // Issue one command, wait for done, check timing and the produced data.
  task automatic run_layer(input layer_cfg_t c);
    longint t0, dt, expect_dt;
    int outw, dst;
    bit mism;
    ref_layer(c);
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    t0 = cycle;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
    dt = cycle - t0;
    expect_dt = steps_of(c) + ((c.op == OP_POOL) ? 3 : 10);
    checks++;
    if (dt != expect_dt) begin
      failures++;
      $display("layer op %0d: %0d cycles, expected %0d", c.op, dt, expect_dt);
    end
    // Mechanisms.
    if (c.op == OP_POOL) n_pool++;
    else if (c.in_h == 1 && c.in_w == 1 && c.k == 1) n_fc++;
    else if (c.pad != 0) n_conv_pad++;
    else n_conv_nopad++;
    if (c.op == OP_FINAL) n_final++;
    if (c.op != OP_POOL && c.k * c.k * c.cin_words == 1) n_one_word_runs++;
    if (c.op == OP_CONV && c.cout % 32 != 0) n_partial_word++;
    if (c.src_bank == 0) n_bank01++; else n_bank10++;
    if (c.in_place) n_concat++;
    if (c.op != OP_POOL && in_stride_of(c) != c.cin_words) n_strided_read++;
    // Data.
    dst = c.in_place ? c.src_bank : 1 - c.src_bank;
    mism = 0;
    if (c.op == OP_FINAL) begin
      for (int i = 0; i < int'(c.cout) && i < 16; i++) begin
        @(negedge clk); score_rd_addr = 4'(i);
        @(negedge clk);
        checks++;
        if (score_rd_data != ref_score[i]) begin
          failures++; mism = 1;
          $display("score %0d: %0d expected %0d", i, score_rd_data, ref_score[i]);
        end
      end
    end else begin
      // The whole destination map, including words the layer must not touch.
      outw = ((c.op == OP_POOL) ? (c.in_h / 2) * (c.in_w / 2)
              : (c.in_h + 2 * c.pad - c.k + 1) * (c.in_w + 2 * c.pad - c.k + 1)) * out_stride_of(c);
      for (int i = 0; i < outw; i++) begin
        @(negedge clk); act_rd_bank = dst[0]; act_rd_addr = 16'(i);
        @(negedge clk);
        checks++;
        if (act_rd_data != ref_act[dst][i]) begin
          failures++;
          if (!mism) $display("op %0d word %0d: %h expected %h", c.op, i, act_rd_data, ref_act[dst][i]);
          mism = 1;
        end
      end
    end
  endtask

  // Class decision of the last OP_FINAL command.
  logic       res_seen;
  logic [3:0] res_class;
  logic       res_spray;
  always @(posedge clk) if (result_valid) begin
    res_seen <= 1; res_class <= result_class; res_spray <= spray;
  end

  task automatic check_class(input int ncls);
    int best, bi;
    best = ref_score[0]; bi = 0;
    for (int i = 1; i < ncls; i++) if (ref_score[i] > best) begin best = ref_score[i]; bi = i; end
    checks++;
    if (!res_seen || res_class != 4'(bi) || res_spray != (bi != NEG_CLASS)) begin
      failures++;
      $display("class %0d spray %b, expected %0d", res_class, res_spray, bi);
    end
    if (res_spray) n_spray_on++; else n_spray_off++;
    $display("image classified as class %0d (score %0d), spray %b", bi, best, res_spray);
  endtask

  task automatic load_image(input int bank, input int h, input int w, input int ch);
    for (int p = 0; p < h * w; p++) begin
      word_t px;
      px = $urandom;
      for (int b = ch; b < 32; b++) px[b] = 1'b0;
      ref_act[bank][p] = px;
      host_load(bank == 0 ? LD_ACT0 : LD_ACT1, p, px);
    end
  endtask

  function automatic layer_cfg_t mk(input layer_op_e op, input int src, input int h, input int w,
                                    input int cinw, input int cout, input int k, input int pad,
                                    input int wb, input int bb);
    layer_cfg_t c;
    c = '0;
    c.op = op; c.src_bank = src[0]; c.in_h = 8'(h); c.in_w = 8'(w); c.cin_words = 12'(cinw);
    c.cout = 16'(cout); c.k = 3'(k); c.pad = 2'(pad); c.w_base = 21'(wb); c.bn_base = 16'(bb);
    return c;
  endfunction

  function automatic layer_cfg_t slice(input layer_cfg_t c0, input int in_stride,
                                       input int out_stride, input int out_offset, input bit in_place);
    layer_cfg_t c;
    c = c0;
    c.in_stride = 12'(in_stride); c.out_stride = 12'(out_stride);
    c.out_offset = 12'(out_offset); c.in_place = in_place;
    return c;
  endfunction

  // ------------------------------------------------------------ part 1b
  // A dense block: a stem convolution writes word 0 of a 3-word-per-pixel
  // map; two layers each read every word gathered so far and append 32
  // channels in place; a 1x1 transition convolution and a pool follow, then
  // the final layer.
  task automatic dense_block();
    layer_cfg_t l [6];
    l[0] = slice(mk(OP_CONV,  1, 8, 8, 1, 32, 3, 1, 2000, 300), 0, 3, 0, 0);
    l[1] = slice(mk(OP_CONV,  0, 8, 8, 1, 32, 3, 1, 2288, 332), 3, 3, 1, 1);
    l[2] = slice(mk(OP_CONV,  0, 8, 8, 2, 32, 3, 1, 2576, 364), 3, 3, 2, 1);
    l[3] = slice(mk(OP_CONV,  0, 8, 8, 3, 32, 1, 0, 3152, 396), 3, 0, 0, 0);
    l[4] = mk(OP_POOL,  1, 8, 8, 1,  0, 0, 0,    0,   0);
    l[5] = mk(OP_FINAL, 0, 1, 1, 16, 9, 1, 0, 3248, 428);
    make_weights(2000, 32, 3, 1, 3);   make_bn(300, 32, 9 * 32);
    make_weights(2288, 32, 3, 1, 32);  make_bn(332, 32, 9 * 32);
    make_weights(2576, 32, 3, 2, 64);  make_bn(364, 32, 18 * 32);
    make_weights(3152, 32, 1, 3, 96);  make_bn(396, 32, 96);
    make_weights(3248, 9, 1, 16, 512); make_bn(428, 9, 512);
    load_image(1, 8, 8, 3);
    // Fill the concatenated map with known words first, so the check can
    // see that each layer leaves the other slices alone.
    for (int p = 0; p < 8 * 8 * 3; p++) begin
      word_t fill;
      fill = $urandom;
      ref_act[0][p] = fill;
      host_load(LD_ACT0, p, fill);
    end
    res_seen = 0;
    for (int i = 0; i < 6; i++) run_layer(l[i]);
    @(negedge clk);
    check_class(NUM_CLASSES);
  endtask

  // ------------------------------------------------------------ part 1c
  // One dense block at full resolution: a 3x32x32 image, a 64-channel stem,
  // four layers of growth 32 appended in place to a 192-channel (6-word)
  // map, a 1x1 transition to 96 channels and a 2x2 pool.
  task automatic dense_block_full();
    localparam int WB = 1200000, BB = 20000, PW = 6;
    int wb, bb, cinw;
    wb = WB; bb = BB;
    load_image(0, 32, 32, 3);
    for (int p = 0; p < 32 * 32 * PW; p++) begin
      word_t fill;
      fill = $urandom;
      ref_act[1][p] = fill;
      host_load(LD_ACT1, p, fill);
    end
    make_weights(wb, 64, 3, 1, 3); make_bn(bb, 64, 9 * 32);
    run_layer(slice(mk(OP_CONV, 0, 32, 32, 1, 64, 3, 1, wb, bb), 0, PW, 0, 0));
    wb += 64 * 9; bb += 64;
    for (int i = 0; i < 4; i++) begin
      cinw = 2 + i;
      make_weights(wb, 32, 3, cinw, 32 * cinw); make_bn(bb, 32, 9 * 32 * cinw);
      run_layer(slice(mk(OP_CONV, 1, 32, 32, cinw, 32, 3, 1, wb, bb), PW, PW, cinw, 1));
      wb += 32 * 9 * cinw; bb += 32;
    end
    make_weights(wb, 96, 1, PW, 32 * PW); make_bn(bb, 96, 32 * PW);
    run_layer(mk(OP_CONV, 1, 32, 32, PW, 96, 1, 0, wb, bb));
    run_layer(mk(OP_POOL, 0, 32, 32, 3, 0, 0, 0, 0, 0));
    $display("full-size dense block done, cycle %0d", cycle);
  endtask

  // ------------------------------------------------------------ part 1
  task automatic small_network();
    layer_cfg_t l [6];
    // 8x8x3 -> conv3x3 pad1 (40 ch) -> pool -> conv3x3 (32 ch) -> fc 128->32
    // -> fc 32->64 (one-word runs) -> final fc 64->9
    l[0] = mk(OP_CONV,  0, 8, 8, 1, 40, 3, 1,    0,   0);
    l[1] = mk(OP_POOL,  1, 8, 8, 2,  0, 0, 0,    0,   0);
    l[2] = mk(OP_CONV,  0, 4, 4, 2, 32, 3, 0,  360,  40);
    l[3] = mk(OP_CONV,  1, 1, 1, 4, 32, 1, 0,  936,  72);
    l[4] = mk(OP_CONV,  0, 1, 1, 1, 64, 1, 0, 1064, 104);
    l[5] = mk(OP_FINAL, 1, 1, 1, 2,  9, 1, 0, 1128, 168);
    make_weights(0, 40, 3, 1, 3);      make_bn(0, 40, 9 * 32);
    make_weights(360, 32, 3, 2, 64);   make_bn(40, 32, 18 * 32);
    make_weights(936, 32, 1, 4, 128);  make_bn(72, 32, 128);
    make_weights(1064, 64, 1, 1, 32);  make_bn(104, 64, 32);
    make_weights(1128, 9, 1, 2, 64);   make_bn(168, 9, 64);
    for (int img = 0; img < 3; img++) begin
      // Image 1 forces the negative class, image 2 a weed class.
      if (img == 1) host_bn(168 + NEG_CLASS, 1, 1000000);
      if (img == 2) begin host_bn(168 + NEG_CLASS, 1, -1000000); host_bn(168 + 2, 1, 1000000); end
      load_image(0, 8, 8, 3);
      res_seen = 0;
      for (int i = 0; i < 6; i++) run_layer(l[i]);
      @(negedge clk);
      check_class(NUM_CLASSES);
    end
  endtask

  // ------------------------------------------------------------ part 2
  task automatic vgg16();
    int wb, bb, src, h, cinw, cin;
    int chans [13] = '{64, 64, 128, 128, 256, 256, 256, 512, 512, 512, 512, 512, 512};
    bit pool_after [13] = '{0, 1, 0, 1, 0, 0, 1, 0, 0, 1, 0, 0, 1};
    layer_cfg_t c;
    wb = 0; bb = 0; src = 0; h = 32; cin = 3; cinw = 1;
    load_image(0, 32, 32, 3);
    res_seen = 0;
    for (int i = 0; i < 13; i++) begin
      make_weights(wb, chans[i], 3, cinw, cin);
      make_bn(bb, chans[i], 9 * 32 * cinw);
      c = mk(OP_CONV, src, h, h, cinw, chans[i], 3, 1, wb, bb);
      run_layer(c);
      wb += chans[i] * 9 * cinw; bb += chans[i];
      src = 1 - src; cin = chans[i]; cinw = chans[i] / 32;
      if (pool_after[i]) begin
        run_layer(mk(OP_POOL, src, h, h, cinw, 0, 0, 0, 0, 0));
        src = 1 - src; h = h / 2;
      end
      $display("VGG-16 conv %0d done, cycle %0d", i + 1, cycle);
    end
    // Fully connected layers on the 1x1x512 map.
    make_weights(wb, 4096, 1, 16, 512);  make_bn(bb, 4096, 512);
    run_layer(mk(OP_CONV, src, 1, 1, 16, 4096, 1, 0, wb, bb));
    wb += 4096 * 16; bb += 4096; src = 1 - src;
    make_weights(wb, 4096, 1, 128, 4096); make_bn(bb, 4096, 4096);
    run_layer(mk(OP_CONV, src, 1, 1, 128, 4096, 1, 0, wb, bb));
    wb += 4096 * 128; bb += 4096; src = 1 - src;
    make_weights(wb, 9, 1, 128, 4096);   make_bn(bb, 9, 4096);
    run_layer(mk(OP_FINAL, src, 1, 1, 128, 9, 1, 0, wb, bb));
    wb += 9 * 128; bb += 9;
    @(negedge clk);
    check_class(NUM_CLASSES);
    $display("VGG-16: %0d weight words, %0d batch-norm entries", wb, bb);
  endtask

  initial begin

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    small_network();
    dense_block();
    dense_block_full();
    checks++;
    if (n_concat == 0 || n_strided_read == 0 || n_conv_pad == 0 || n_conv_nopad == 0 || n_pool == 0 || n_fc == 0 || n_final == 0 ||
        n_spray_on == 0 || n_spray_off == 0 || n_partial_word == 0 || n_one_word_runs == 0 ||
        n_bank01 == 0 || n_bank10 == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("mechanisms: concat=%0d strided_read=%0d", n_concat, n_strided_read);
    $display("mechanisms: conv_pad=%0d conv_nopad=%0d pool=%0d fc=%0d final=%0d spray_on=%0d spray_off=%0d partial_word=%0d one_word_runs=%0d bank0to1=%0d bank1to0=%0d",
             n_conv_pad, n_conv_nopad, n_pool, n_fc, n_final, n_spray_on, n_spray_off,
             n_partial_word, n_one_word_runs, n_bank01, n_bank10);
    vgg16();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
