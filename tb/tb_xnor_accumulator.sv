// tb_xnor_accumulator: self-checking test of the binary dot-product unit.
// Sends back-to-back runs of random length (1..12 words) with random gaps and
// random skipped (zero-border) words, computes each +/-1 dot product here
// bit by bit, and checks the value and that it appears exactly five cycles
// after the last word of its run.
module tb_xnor_accumulator;
  import bnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, in_skip = 0;
  word_t a = '0, w = '0;
  logic out_valid;
  dot_t out_dot;
  int checks = 0, failures = 0, cycle = 0;
  int exp_q[$], t_q[$];

  xnor_accumulator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int e, t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      if (out_dot != e || cycle - t != 5) begin
        failures++;
        $display("mismatch: got %0d exp %0d latency %0d", out_dot, e, cycle - t);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 150; r++) begin
      int len, dot;
      len = $urandom_range(1, 12);
      dot = 0;
      for (int i = 0; i < len; i++) begin
        while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_first = (i == 0); in_last = (i == len - 1);
        in_skip = ($urandom_range(0, 5) == 0);
        a = $urandom; w = (r % 7 == 0) ? a : $urandom;
        if (!in_skip)
          for (int b = 0; b < 32; b++) dot += (a[b] == w[b]) ? 1 : -1;
        if (in_last) begin exp_q.push_back(dot); t_q.push_back(cycle); end
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
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
