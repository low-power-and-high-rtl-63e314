// tb_local_ram: writes random words to random addresses of a 256-word memory,
// mirrors them in an array here, and checks synchronous reads (one cycle) and
// read-old-data on a same-address write.
module tb_local_ram;
  logic clk = 0;
  logic wr_en = 0;
  logic [7:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  local_ram #(.DEPTH(256), .WIDTH(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 8'(i); wr_data = $urandom; model[i] = wr_data;
    end
    for (int r = 0; r < 1000; r++) begin
      logic [31:0] e;
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_addr = 8'($urandom);
      wr_data = $urandom;
      rd_addr = (r % 10 == 0) ? wr_addr : 8'($urandom);
      e = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== e) begin failures++; $display("addr %0d got %h exp %h", rd_addr, rd_data, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
