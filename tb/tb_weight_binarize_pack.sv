// tb_weight_binarize_pack: checks the sign binarization and packing of 32
// single-precision values, using real numbers converted to binary32 bit patterns
// and the corner cases +0, -0, the smallest denormals, infinities.
module tb_weight_binarize_pack;
  logic [31:0][31:0] values;
  logic [31:0] packed_word;
  int checks = 0, failures = 0;

  // IEEE-754 double -> single bit pattern (truncating), for normal values
  // and zero.
  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d;
    d = $realtobits(r);
    if (d[62:0] == '0) return {d[63], 31'b0};
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  weight_binarize_pack #(.N(32)) dut (.*);

  initial begin
    for (int r = 0; r < 200; r++) begin
      logic [31:0] exp;
      for (int i = 0; i < 32; i++) begin
        real v;
        int k;
        k = $urandom_range(0, 9);
        case (k)
          0: begin values[i] = 32'h0000_0000; exp[i] = 1'b0; end  // +0
          1: begin values[i] = 32'h8000_0000; exp[i] = 1'b0; end  // -0
          2: begin values[i] = 32'h0000_0001; exp[i] = 1'b1; end  // +denormal
          3: begin values[i] = 32'h8000_0001; exp[i] = 1'b0; end  // -denormal
          4: begin values[i] = 32'h7F80_0000; exp[i] = 1'b1; end  // +inf
          default: begin
            v = real'($urandom_range(0, 2000)) / 100.0 - 10.0;
            values[i] = to_single(v);
            exp[i] = (v > 0.0);
          end
        endcase
      end
      #1;
      checks++;
      if (packed_word !== exp) begin
        failures++;
        $display("mismatch %h exp %h", packed_word, exp);
      end
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
