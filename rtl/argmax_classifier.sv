// argmax_classifier: class decision of the engine.
//
// The final layer delivers one integer score per class, in class order,
// each with score_valid. The unit keeps the largest score seen and its class
// index (ties keep the lower index). The class ranked first by a softmax over
// the scores is the one with the largest score, so no exponentials are
// needed for the decision; probabilities are not produced. When the score of
// the last class (index NUM_CLASSES-1) has been taken, result_valid pulses
// for one cycle with the class and with spray, which is raised for every
// class other than the negative class. `clear` starts a new image.
module argmax_classifier
  import bnn_pkg::*;
#(
  parameter int unsigned CLASSES = NUM_CLASSES,
  parameter int unsigned NEG     = NEG_CLASS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       score_valid,
  input  logic [$clog2(CLASSES)-1:0] score_idx,
  input  dot_t                       score,
  output logic                       result_valid,
  output logic [$clog2(CLASSES)-1:0] result_class,
  output dot_t                       result_score,
  output logic                       spray
);
  localparam int unsigned IW = $clog2(CLASSES);

  dot_t          best_q;
  logic [IW-1:0] best_idx_q;
  logic          take;

  assign take = score_valid && (score_idx == '0 || score > best_q);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      best_q       <= '0;
      best_idx_q   <= '0;
      result_valid <= 1'b0;
      result_class <= '0;
      result_score <= '0;
      spray        <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      if (take) begin
        best_q     <= score;
        best_idx_q <= score_idx;
      end
      if (score_valid && score_idx == IW'(CLASSES - 1)) begin
        result_valid <= 1'b1;
        result_class <= take ? score_idx : best_idx_q;
        result_score <= take ? score : best_q;
        spray        <= (take ? score_idx : best_idx_q) != IW'(NEG);
      end
    end
  end
endmodule
