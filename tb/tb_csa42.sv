// tb_csa42 - checks the 4-2 compressor: sum row + carry row must equal
// a + b + d + e (mod 2^YW) for random and all-ones rows.
module tb_csa42;
  localparam int YW = 32;
  logic [YW-1:0] a, b, d, e, s, c;
  int checks = 0, failures = 0;

  csa42 #(.YW(YW)) dut (.a, .b, .d, .e, .s, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      a = $urandom; b = $urandom; d = $urandom; e = $urandom;
      if (n == 0) begin a = '1; b = '1; d = '1; e = '1; end
      #1;
      checks++;
      if (YW'(s + c) !== YW'(a + b + d + e)) begin
        failures++;
        $display("csa42 mismatch a=%h b=%h d=%h e=%h s=%h c=%h", a, b, d, e, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
