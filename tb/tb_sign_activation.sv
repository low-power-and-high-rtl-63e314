// tb_sign_activation: feeds normalised values for pixels of random channel
// count (1..80 channels) and checks the packed words: sign rule per bit,
// zero upper bits in a partial last word, emission one cycle after the
// closing value.
module tb_sign_activation;
  import bnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  dot_t in_y = '0;
  logic [4:0] in_bit = '0;
  logic word_valid;
  word_t word;
  int checks = 0, failures = 0;
  word_t exp_q[$];

  sign_activation dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && word_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected word"); end
    else begin
      word_t e;
      e = exp_q.pop_front();
      if (word !== e) begin failures++; $display("got %h exp %h", word, e); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      int n;
      word_t e;
      n = $urandom_range(1, 80);
      e = '0;
      for (int c = 0; c < n; c++) begin
        @(negedge clk);
        in_valid = 1;
        in_bit = 5'(c);
        in_last = (c == n - 1);
        in_y = (c % 9 == 0) ? 0 : $signed($urandom_range(0, 200)) - 100;
        if (c % 32 == 0) e = '0;
        e[c % 32] = (in_y > 0);
        if (c % 32 == 31 || c == n - 1) exp_q.push_back(e);
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (3) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing words"); end
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
