// tb_batchnorm: checks the folded batch normalisation
// y = floor(x * scale / 2^8) + shift against integer arithmetic done here, and
// its one-cycle latency.
module tb_batchnorm;
  import bnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  dot_t in_x = '0;
  bn_param_t param = '0;
  logic out_valid;
  dot_t out_y;
  int checks = 0, failures = 0;

  batchnorm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      longint p, e;
      @(negedge clk);
      in_valid = 1;
      in_x = $signed($urandom_range(0, 20000)) - 10000;
      param.scale = 16'($signed($urandom_range(0, 4000)) - 2000);
      param.shift = 24'($signed($urandom_range(0, 200000)) - 100000);
      p = longint'(in_x) * longint'(param.scale);
      e = ((p - ((p % 256 + 256) % 256)) / 256) + longint'(param.shift);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(out_y) != e) begin
        failures++;
        $display("x=%0d s=%0d b=%0d got %0d exp %0d v=%b", in_x, param.scale, param.shift, out_y, e, out_valid);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
