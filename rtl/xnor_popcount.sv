// xnor_popcount: the XNOR kernel of the binarized engine.
//
// Takes one packed word of binary activations a and one packed word of binary
// weights w (bit 1 = +1, bit 0 = -1) and returns how many of the WIDTH bit
// positions agree, popcount(xnor(a, w)): the number of +1 products among the
// WIDTH binary multiplications. The unit is a four-stage pipeline, so a new
// word pair can enter every cycle and its count leaves four cycles later,
// matching the four clock cycles given for the XNOR kernel on the FPGA.
//
// Stages (one register bank each):
//   1  per bit, the both-one term (a & w) and the both-zero term ~(a | w)
//   2  per bit, xnor = both-one | both-zero
//   3  popcount of each 8-bit group
//   4  sum of the group counts
// The split of the per-bit logic over the first stages, ahead of the final
// summation, follows the clocked XNOR schematic; the exact gates per stage and
// the two-level adder are this design's choice.
//
// Interface: in_valid qualifies a/w; out_valid qualifies out_count exactly
// XNOR latency (4) cycles later. Synchronous active-low reset clears the
// valid pipeline only.
module xnor_popcount
  import bnn_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [WIDTH-1:0]           a,
  input  logic [WIDTH-1:0]           w,
  output logic                       out_valid,
  output logic [$clog2(WIDTH+1)-1:0] out_count
);
  localparam int unsigned GROUP  = 8;
  localparam int unsigned GROUPS = (WIDTH + GROUP - 1) / GROUP;
  localparam int unsigned CNT_W  = $clog2(WIDTH + 1);

  logic [3:0]       vld;
  logic [WIDTH-1:0] both_one_q, both_zero_q, xnor_q;
  logic [3:0]       grp_q [GROUPS];
  logic [CNT_W-1:0] sum_q;

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end

  // Stage 1 and 2: bitwise XNOR.
  always_ff @(posedge clk) begin
    both_one_q  <= a & w;
    both_zero_q <= ~(a | w);
    xnor_q      <= both_one_q | both_zero_q;
  end

  // Stage 3: 8-bit group counts.
  always_ff @(posedge clk) begin
    for (int g = 0; g < int'(GROUPS); g++) begin
      logic [3:0] c;
      c = '0;
      for (int b = 0; b < int'(GROUP); b++)
        if (g * int'(GROUP) + b < int'(WIDTH)) c += 4'(xnor_q[g*GROUP+b]);
      grp_q[g] <= c;
    end
  end

  // Stage 4: final sum.
  always_ff @(posedge clk) begin
    logic [CNT_W-1:0] s;
    s = '0;
    for (int g = 0; g < int'(GROUPS); g++) s += CNT_W'(grp_q[g]);
    sum_q <= s;
  end

  assign out_valid = vld[3];
  assign out_count = sum_q;

endmodule
