// conv_addr_gen: address sequencer that turns a layer into a matrix product.
//
// A 3-D convolution is computed as a matrix multiplication by flattening the
// input patch of every output pixel (im2col). This unit produces that
// flattened order directly as memory addresses, one step per cycle, instead of
// copying the patch: for each output pixel (oy, ox) and each output channel
// oc it walks the kernel window (ky, kx) and the packed input channel words
// c, giving the activation word address and the weight word address of each
// step. first/last mark the first and the last step of one output value.
//
//   OP_CONV, OP_FINAL: stride 1, zero border of pad pixels, window k x k,
//     all cin_words words per pixel; output
//     (in_h+2*pad-k+1) x (in_w+2*pad-k+1) x cout. With iy = oy+ky-pad and
//     ix = ox+kx-pad:
//     act  = (iy*in_w + ix)*in_stride + c
//     A step whose (iy, ix) falls in the border is flagged skip: it stands
//     for zero inputs and must contribute nothing to the dot product.
//     wgt  = w_base + oc*k*k*cin_words + (ky*k+kx)*cin_words + c
//     A fully connected layer is a 1 x 1 map with k = 1.
//   OP_POOL: stride 2, window 2 x 2, one channel word per output value
//     (oc runs over the cin_words words); output (in_h/2) x (in_w/2).
//     act  = ((2*oy+ky)*in_w + 2*ox+kx)*in_stride + oc
// in_stride is cfg.in_stride, or cin_words when that field is 0.
//
// Output order is oy, ox, oc, ky, kx, c (last fastest), so the results of a
// pixel come out channel by channel and the writer only needs a pixel counter
// and a word counter. Outputs are registered; the first step_valid comes
// two cycles after the start cycle and the steps then follow on
// consecutive cycles, exactly (number of steps) of them, with
// layer_last on the final step. start is only taken when busy is low.
module conv_addr_gen
  import bnn_pkg::*;
#(
  parameter int unsigned ACT_AW = 14,
  parameter int unsigned W_AW   = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_cfg_t        cfg,
  output logic              busy,
  output logic              step_valid,
  output logic [ACT_AW-1:0] act_addr,
  output logic [W_AW-1:0]   w_addr,
  output logic              first,
  output logic              last,
  output logic              skip,
  output logic              layer_last
);
  layer_cfg_t  cfg_q;
  logic        pool;
  logic [7:0]  oh, ow, oy, ox, ky, kx, kk;
  logic [15:0] oc, oc_n;
  logic [11:0] c, c_n;
  logic [31:0] w_ptr;
  logic        run;
  logic        c_end, kx_end, ky_end, oc_end, ox_end, oy_end;
  logic signed [10:0] iy, ix;
  logic        border;
  logic [11:0] in_stride;

  assign pool = (cfg_q.op == OP_POOL);
  assign kk   = pool ? 8'd2 : 8'(cfg_q.k);
  assign oh   = pool ? (cfg_q.in_h >> 1)
                     : cfg_q.in_h + 8'({cfg_q.pad, 1'b0}) - 8'(cfg_q.k) + 8'd1;
  assign ow   = pool ? (cfg_q.in_w >> 1)
                     : cfg_q.in_w + 8'({cfg_q.pad, 1'b0}) - 8'(cfg_q.k) + 8'd1;

  // Input pixel of the current step.
  always_comb begin
    if (pool) begin
      iy = 11'(signed'({1'b0, oy, 1'b0})) + 11'(signed'({1'b0, ky}));
      ix = 11'(signed'({1'b0, ox, 1'b0})) + 11'(signed'({1'b0, kx}));
    end else begin
      iy = 11'(signed'({1'b0, oy})) + 11'(signed'({1'b0, ky})) - 11'(signed'({1'b0, cfg_q.pad}));
      ix = 11'(signed'({1'b0, ox})) + 11'(signed'({1'b0, kx})) - 11'(signed'({1'b0, cfg_q.pad}));
    end
    border = (iy < 0) || (ix < 0) ||
             (iy >= 11'(signed'({1'b0, cfg_q.in_h}))) || (ix >= 11'(signed'({1'b0, cfg_q.in_w})));
  end
  assign oc_n = pool ? 16'(cfg_q.cin_words) : cfg_q.cout;
  assign c_n  = pool ? 12'd1 : cfg_q.cin_words;
  assign in_stride = (cfg_q.in_stride != '0) ? cfg_q.in_stride : cfg_q.cin_words;

  assign c_end  = (c  == c_n - 12'd1);
  assign kx_end = (kx == kk - 8'd1);
  assign ky_end = (ky == kk - 8'd1);
  assign oc_end = (oc == oc_n - 16'd1);
  assign ox_end = (ox == ow - 8'd1);
  assign oy_end = (oy == oh - 8'd1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run        <= 1'b0;
      step_valid <= 1'b0;
      first      <= 1'b0;
      last       <= 1'b0;
      skip       <= 1'b0;
      layer_last <= 1'b0;
      act_addr   <= '0;
      w_addr     <= '0;
      cfg_q      <= '0;
      {oy, ox, ky, kx} <= '0;
      oc         <= '0;
      c          <= '0;
      w_ptr      <= '0;
    end else begin
      step_valid <= run;
      if (start && !run) begin
        cfg_q <= cfg;
        run   <= 1'b1;
        {oy, ox, ky, kx} <= '0;
        oc    <= '0;
        c     <= '0;
        w_ptr <= 32'(cfg.w_base);
      end else if (run) begin
        // Addresses of the current step.
        act_addr <= border ? '0
                  : ACT_AW'((32'(iy[9:0]) * 32'(cfg_q.in_w) + 32'(ix[9:0])) * 32'(in_stride)
                            + (pool ? 32'(oc) : 32'(c)));
        skip       <= border;
        w_addr     <= W_AW'(w_ptr);
        first      <= (c == '0) && (kx == '0) && (ky == '0);
        last       <= c_end && kx_end && ky_end;
        layer_last <= c_end && kx_end && ky_end && oc_end && ox_end && oy_end;
        // Advance the loop nest, innermost first.
        w_ptr <= w_ptr + 32'd1;
        c     <= c_end ? '0 : c + 12'd1;
        if (c_end) begin
          kx <= kx_end ? '0 : kx + 8'd1;
          if (kx_end) begin
            ky <= ky_end ? '0 : ky + 8'd1;
            if (ky_end) begin
              oc <= oc_end ? '0 : oc + 16'd1;
              if (oc_end) begin
                w_ptr <= 32'(cfg_q.w_base);
                ox <= ox_end ? '0 : ox + 8'd1;
                if (ox_end) begin
                  oy <= oy_end ? '0 : oy + 8'd1;
                  if (oy_end) run <= 1'b0;
                end
              end
            end
          end
        end
      end
    end
  end

  assign busy = run;

  // A command must describe a non-empty layer.
  a_cfg_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !run) |-> (cfg.in_h != 0 && cfg.in_w != 0 && cfg.cin_words != 0 &&
                         (cfg.op == OP_POOL ? cfg.in_h >= 2 && cfg.in_w >= 2
                                            : cfg.k != 0 && cfg.cout != 0 &&
                                              8'(cfg.k) <= cfg.in_h + 8'({cfg.pad, 1'b0}) &&
                                              8'(cfg.k) <= cfg.in_w + 8'({cfg.pad, 1'b0}))));
endmodule
