// tb_argmax_classifier: sends random score vectors of the nine classes
// (with forced ties and forced negative-class winners) and checks the
// reported class, its score and the sprayer trigger.
module tb_argmax_classifier;
  import bnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, score_valid = 0;
  logic [3:0] score_idx = '0;
  dot_t score = '0;
  logic result_valid;
  logic [3:0] result_class;
  dot_t result_score;
  logic spray;
  int checks = 0, failures = 0;

  argmax_classifier dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      int s[9];
      int best, bi;
      for (int c = 0; c < 9; c++) s[c] = $signed($urandom_range(0, 400)) - 200;
      if (r % 4 == 0) s[8] = 500;
      if (r % 5 == 0) begin s[3] = 600; s[6] = 600; end
      best = s[0]; bi = 0;
      for (int c = 1; c < 9; c++) if (s[c] > best) begin best = s[c]; bi = c; end
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int c = 0; c < 9; c++) begin
        score_valid = 1; score_idx = 4'(c); score = s[c];
        @(negedge clk);
        if ($urandom_range(0, 2) == 0) begin score_valid = 0; @(negedge clk); end
      end
      score_valid = 0;
      @(posedge clk); #1;
      checks++;
      if (result_class != 4'(bi) || result_score != best || spray != (bi != 8)) begin
        failures++;
        $display("got %0d/%0d/%b exp %0d/%0d", result_class, result_score, spray, bi, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
