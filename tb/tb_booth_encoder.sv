// tb_booth_encoder - checks all eight bit triples against the modified Booth
// table: 000->0, 001->1, 010->1, 011->2, 100->-2, 101->-1, 110->-1, 111->0,
// and that the magnitude is one-hot or zero.
module tb_booth_encoder;
  import dot_pkg::*;
  logic [2:0]   triple;
  booth_digit_t digit;
  int checks = 0, failures = 0;
  int expect_d [8] = '{0, 1, 1, 2, -2, -1, -1, 0};
  int got;

  booth_encoder dut (.triple, .digit);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      triple = 3'(t);
      #1;
      got = (digit.two ? 2 : 0) + (digit.one ? 1 : 0);
      if (digit.neg) got = -got;
      checks++;
      if (got != expect_d[t] || (digit.one && digit.two)) begin
        failures++;
        $display("triple %b: digit %0d expected %0d", triple, got, expect_d[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
