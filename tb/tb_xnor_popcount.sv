// tb_xnor_popcount: self-checking test of the four-stage XNOR/popcount unit.
// Streams random word pairs (with random gaps, plus all-agree and
// all-disagree corner cases), compares every count with $countones of the
// XNOR computed here, and checks that each result leaves exactly four cycles
// after its inputs.
module tb_xnor_popcount;
  import bnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] a = '0, w = '0;
  logic out_valid;
  logic [5:0] out_count;
  int checks = 0, failures = 0, cycle = 0;
  int exp_q[$], t_q[$];

  xnor_popcount #(.WIDTH(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int e, t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      if (out_count != 6'(e) || cycle - t != 4) begin
        failures++;
        $display("mismatch: got %0d exp %0d latency %0d", out_count, e, cycle - t);
      end
    end
  end

  task automatic send(input logic [31:0] aa, input logic [31:0] ww);
    @(negedge clk);
    in_valid = 1; a = aa; w = ww;
    exp_q.push_back($countones(~(aa ^ ww)));
    t_q.push_back(cycle);
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Back-to-back stream.
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      logic [31:0] aa, ww;
      aa = $urandom; ww = (i % 3 == 0) ? aa : $urandom;
      in_valid = ($urandom_range(0, 3) != 0);
      a = aa; w = ww;
      if (in_valid) begin exp_q.push_back($countones(~(aa ^ ww))); t_q.push_back(cycle); end
      @(negedge clk);
    end
    in_valid = 0;
    send(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    send(32'h0000_0000, 32'hFFFF_FFFF);
    send(32'h0000_0000, 32'h0000_0000);
    send(32'hAAAA_AAAA, 32'h5555_5555);
    repeat (8) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
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
