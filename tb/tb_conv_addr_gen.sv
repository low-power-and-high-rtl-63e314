// tb_conv_addr_gen: runs random convolution (with and without zero border,
// with and without a source pixel stride wider than the channels read) and
// pooling commands and compares every generated step (activation address,
// weight address, first/last/skip/layer_last flags) with a loop nest written
// here; also checks that a layer of S steps produces exactly S consecutive
// valid cycles starting two cycles after the start cycle.
module tb_conv_addr_gen;
  import bnn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  layer_cfg_t cfg = '0;
  logic busy, step_valid, first, last, skip, layer_last;
  logic [13:0] act_addr;
  logic [19:0] w_addr;
  int checks = 0, failures = 0;

  typedef struct { int act; int wa; bit f, l, s, ll; } step_t;
  step_t exp_q[$];

  conv_addr_gen #(.ACT_AW(14), .W_AW(20)) dut (.*);
  always #5 clk = ~clk;

  task automatic build(input layer_cfg_t c);
    bit pool;
    int oh, ow, kk, ocn, cn, wp, s, ins;
    pool = (c.op == OP_POOL);
    kk = pool ? 2 : int'(c.k);
    s = pool ? 2 : 1;
    oh = pool ? c.in_h / 2 : c.in_h + 2 * c.pad - c.k + 1;
    ow = pool ? c.in_w / 2 : c.in_w + 2 * c.pad - c.k + 1;
    ocn = pool ? c.cin_words : c.cout;
    cn = pool ? 1 : c.cin_words;
    ins = (c.in_stride != 0) ? int'(c.in_stride) : int'(c.cin_words);
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++)
        for (int oc = 0; oc < ocn; oc++)
          for (int ky = 0; ky < kk; ky++)
            for (int kx = 0; kx < kk; kx++)
              for (int ci = 0; ci < cn; ci++) begin
                step_t st;
                int iy, ix;
                iy = oy * s + ky - (pool ? 0 : c.pad);
                ix = ox * s + kx - (pool ? 0 : c.pad);
                st.s = (iy < 0 || ix < 0 || iy >= c.in_h || ix >= c.in_w);
                st.act = st.s ? 0 : (iy * c.in_w + ix) * ins + (pool ? oc : ci);
                st.wa = c.w_base + oc * kk * kk * cn + (ky * kk + kx) * cn + ci;
                st.f = (ky == 0 && kx == 0 && ci == 0);
                st.l = (ky == kk - 1 && kx == kk - 1 && ci == cn - 1);
                st.ll = st.l && oc == ocn - 1 && ox == ow - 1 && oy == oh - 1;
                exp_q.push_back(st);
              end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      layer_cfg_t c;
      int n, seen;
      c = '0;
      c.op = (r % 3 == 2) ? OP_POOL : ((r % 3 == 1) ? OP_FINAL : OP_CONV);
      c.in_h = 8'($urandom_range(2, 7));
      c.in_w = 8'($urandom_range(2, 7));
      c.cin_words = 12'($urandom_range(1, 3));
      c.cout = 16'($urandom_range(1, 5));
      c.k = 3'($urandom_range(1, 3));
      c.pad = 2'($urandom_range(0, 1));
      if (c.k > c.in_h + 2 * c.pad || c.k > c.in_w + 2 * c.pad) c.k = 3'd1;
      c.w_base = 21'($urandom_range(0, 1000));
      if (r % 4 == 3) c.in_stride = c.cin_words + 12'($urandom_range(1, 3));
      build(c);
      n = exp_q.size();
      @(negedge clk);
      start = 1; cfg = c;
      @(negedge clk);
      start = 0;
      checks++;
      if (step_valid) begin failures++; $display("step too early"); end
      @(negedge clk);
      seen = 0;
      // Steps must be valid on n consecutive cycles, starting now.
      while (exp_q.size() != 0) begin
        step_t e;
        checks++;
        if (!step_valid) begin
          failures++; $display("gap at step %0d of %0d", seen, n);
          exp_q.delete(); break;
        end
        e = exp_q.pop_front();
        if (act_addr != 14'(e.act) || w_addr != 20'(e.wa) || first != e.f || last != e.l ||
            layer_last != e.ll || skip != e.s) begin
          failures++;
          $display("step %0d: act %0d/%0d w %0d/%0d f%b/%b l%b/%b ll%b/%b s%b/%b", seen,
                   act_addr, e.act, w_addr, e.wa, first, e.f, last, e.l, layer_last, e.ll, skip, e.s);
        end
        seen++;
        @(negedge clk);
      end
      checks++;
      if (step_valid || busy) begin failures++; $display("still running after %0d steps", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
