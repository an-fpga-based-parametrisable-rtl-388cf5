// tb_obc_rom - checks every word of the four OBC ROMs of the default N = 4
// DCT engine, and of a 3-point Hadamard engine, against the table rule:
// word(a) = -A_i0 + sum_{k>=1} (+A_ik if address bit N-1-k is 1, else -A_ik),
// with the kernel taken from the reference model.
module tb_obc_rom;
  import dot_pkg::*;
  import dot_ref_pkg::*;
  localparam int L = 8;
  localparam int RW4 = L + 2 + 1;
  localparam int RW3 = L + 2 + 1;

  logic [2:0]            addr4;
  logic signed [RW4-1:0] w4 [4];
  logic [1:0]            addr3;
  logic signed [RW3-1:0] w3 [3];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 4; i++) begin : g4
    obc_rom #(.N(4), .L(L), .ROW(i), .TRANSFORM(DOT_DCT)) u (.addr(addr4), .word(w4[i]));
  end
  for (genvar i = 0; i < 3; i++) begin : g3
    obc_rom #(.N(3), .L(L), .ROW(i), .TRANSFORM(DOT_FHT)) u (.addr(addr3), .word(w3[i]));
  end

  function automatic longint expect_word(int t, int n, int i, int a);
    longint e;
    e = -ref_coef(t, n, L, i, 0);
    for (int k = 1; k < n; k++)
      e += (((a >> (n - 1 - k)) & 1) == 1) ? ref_coef(t, n, L, i, k) : -ref_coef(t, n, L, i, k);
    return e;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      addr4 = 3'(a);
      addr3 = 2'(a);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (longint'(w4[i]) != expect_word(0, 4, i, a)) begin
          failures++;
          $display("DCT N=4 row %0d addr %0d: %0d expected %0d", i, a, w4[i], expect_word(0, 4, i, a));
        end
      end
      if (a < 4) begin
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (longint'(w3[i]) != expect_word(2, 3, i, a)) begin
            failures++;
            $display("FHT N=3 row %0d addr %0d: %0d expected %0d", i, a, w3[i], expect_word(2, 3, i, a));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
