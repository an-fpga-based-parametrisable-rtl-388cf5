// tb_csa32 - checks the 3-2 carry-save adder: for random and corner rows the
// sum and carry rows must add up to a + b + d (mod 2^YW), the sum row must be
// the bitwise XOR and the carry row must have a zero LSB.
module tb_csa32;
  localparam int YW = 32;
  logic [YW-1:0] a, b, d, s, c;
  int checks = 0, failures = 0;

  csa32 #(.YW(YW)) dut (.a, .b, .d, .s, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      a = $urandom; b = $urandom; d = $urandom;
      if (n == 0) begin a = '1; b = '1; d = '1; end
      #1;
      checks++;
      if (YW'(s + c) !== YW'(a + b + d) || s !== (a ^ b ^ d) || c[0] !== 1'b0) begin
        failures++;
        $display("csa32 mismatch a=%h b=%h d=%h s=%h c=%h", a, b, d, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
