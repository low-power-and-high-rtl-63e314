// tb_maxpool: checks 2x2 max pooling of packed binary words against a
// per-channel maximum of +/-1 values computed here.
module tb_maxpool;
  logic [3:0][31:0] window;
  logic [31:0] pooled;
  int checks = 0, failures = 0;

  maxpool #(.WINDOW(4), .WIDTH(32)) dut (.*);

  initial begin
    for (int r = 0; r < 300; r++) begin
      logic [31:0] exp;
      for (int i = 0; i < 4; i++)
        window[i] = (r % 5 == 0) ? 32'h0 : ($urandom & $urandom);
      if (r % 11 == 0) window = '0;
      for (int c = 0; c < 32; c++) begin
        int m;
        m = -1;
        for (int i = 0; i < 4; i++) if ((window[i][c] ? 1 : -1) > m) m = 1;
        exp[c] = (m == 1);
      end
      #1;
      checks++;
      if (pooled !== exp) begin failures++; $display("mismatch %h exp %h", pooled, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
