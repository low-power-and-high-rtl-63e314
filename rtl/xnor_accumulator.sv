// xnor_accumulator: binary dot product built on the XNOR kernel.
//
// A dot product arrives as a run of word pairs (activation word, weight
// word), one per cycle, the first flagged in_first and the last in_last (a
// one-word run has both). Each pair goes through xnor_popcount and the counts
// are accumulated, a += popcount(xnor(a_words, w_words)). A word flagged
// in_skip stands for zero-valued inputs (the zero border of a padded
// convolution) and adds nothing. When the last count arrives the unit outputs
// the +/-1 dot product
//     dot = 2 * matches - 32 * counted_words
// (matches minus mismatches), registered: out_valid rises XNOR latency + 1
// = 5 cycles after the in_last word. Runs may follow each other without a
// gap, so the unit sustains one word per cycle. Synchronous active-low reset.
module xnor_accumulator
  import bnn_pkg::*;
#(
  parameter int unsigned CNT_W = 24  // width of the match counter
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  logic  in_skip,
  input  word_t a,
  input  word_t w,
  output logic  out_valid,
  output dot_t  out_dot
);
  logic [XNOR_LATENCY-1:0] first_d, last_d, skip_d;
  logic                    pc_valid;
  logic [PC_W-1:0]         pc;
  logic [CNT_W-1:0]        match_q, words_q;
  logic [CNT_W-1:0]        match_sum, words_sum;

  xnor_popcount #(.WIDTH(WORD_W)) u_xnor (
    .clk, .rst_n, .in_valid, .a, .w,
    .out_valid(pc_valid), .out_count(pc)
  );

  // The flags travel beside the word through the four XNOR stages.
  always_ff @(posedge clk) begin
    first_d <= {first_d[XNOR_LATENCY-2:0], in_first};
    last_d  <= {last_d[XNOR_LATENCY-2:0],  in_last};
    skip_d  <= {skip_d[XNOR_LATENCY-2:0],  in_skip};
  end

  always_comb begin
    match_sum = (first_d[XNOR_LATENCY-1] ? '0 : match_q)
              + (skip_d[XNOR_LATENCY-1] ? '0 : CNT_W'(pc));
    words_sum = (first_d[XNOR_LATENCY-1] ? '0 : words_q)
              + (skip_d[XNOR_LATENCY-1] ? '0 : CNT_W'(1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      match_q   <= '0;
      words_q   <= '0;
      out_valid <= 1'b0;
      out_dot   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (pc_valid) begin
        match_q <= match_sum;
        words_q <= words_sum;
        if (last_d[XNOR_LATENCY-1]) begin
          out_valid <= 1'b1;
          out_dot   <= DOT_W'(signed'({1'b0, match_sum, 1'b0}))
                     - DOT_W'(signed'({1'b0, words_sum, 5'b0}));
        end
      end
    end
  end
endmodule
