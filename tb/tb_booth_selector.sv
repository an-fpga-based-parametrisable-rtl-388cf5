// tb_booth_selector - checks PP = A * D exhaustively for every 8-bit signed
// A and every Booth digit D in {-2,-1,0,+1,+2} (plus the negative zero).
module tb_booth_selector;
  import dot_pkg::*;
  localparam int L = 8;
  logic signed [L-1:0] a;
  booth_digit_t        digit;
  logic signed [L+1:0] pp;
  int checks = 0, failures = 0;
  int dval;

  booth_selector #(.L(L)) dut (.a, .digit, .pp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = -(1 << (L - 1)); av < (1 << (L - 1)); av++) begin
      for (int dd = 0; dd < 6; dd++) begin
        case (dd)
          0: begin digit = '{neg: 1'b0, two: 1'b0, one: 1'b0}; dval = 0;  end
          1: begin digit = '{neg: 1'b0, two: 1'b0, one: 1'b1}; dval = 1;  end
          2: begin digit = '{neg: 1'b0, two: 1'b1, one: 1'b0}; dval = 2;  end
          3: begin digit = '{neg: 1'b1, two: 1'b1, one: 1'b0}; dval = -2; end
          4: begin digit = '{neg: 1'b1, two: 1'b0, one: 1'b1}; dval = -1; end
          default: begin digit = '{neg: 1'b1, two: 1'b0, one: 1'b0}; dval = 0; end
        endcase
        a = L'(av);
        #1;
        checks++;
        if (int'(pp) != av * dval) begin
          failures++;
          $display("A=%0d D=%0d: pp=%0d", av, dval, pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
