// tb_da_shift_acc - feeds W = 8 random ROM words with random negate flags into
// the shift-accumulator, S2 on the first, and checks the result against
// floor((sum_m 2^m (+/-word_m) + EXTRA) / 2).  Runs with two EXTRA constants,
// back to back, with occasional stall cycles (en = 0) that must hold the sum.
module tb_da_shift_acc;
  localparam int N = 4, W = 8, L = 8;
  localparam int RW = L + 2 + 1;
  localparam int AW = RW + W + 1;
  localparam int EXA = -217, EXB = 301;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic                 en = 1'b0, s2 = 1'b0, neg = 1'b0;
  logic signed [RW-1:0] word = '0;
  logic signed [AW-1:0] ya, yb;
  int checks = 0, failures = 0;

  da_shift_acc #(.N(N), .W(W), .L(L), .EXTRA(EXA)) dut_a (.clk, .en, .s2, .neg, .word, .y(ya));
  da_shift_acc #(.N(N), .W(W), .L(L), .EXTRA(EXB)) dut_b (.clk, .en, .s2, .neg, .word, .y(yb));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint tot;
    longint wv;
    for (int v = 0; v < 300; v++) begin
      tot = 0;
      for (int m = 0; m < W; m++) begin
        @(negedge clk);
        if (v % 7 == 3 && m == 4) begin
          en = 1'b0;
          @(negedge clk);
        end
        en   = 1'b1;
        s2   = (m == 0);
        neg  = 1'($urandom);
        wv   = longint'($urandom % 1024) - 512;
        word = RW'(wv);
        tot += (neg ? -wv : wv) <<< m;
      end
      @(negedge clk);
      en = 1'b0;
      checks += 2;
      if (longint'(ya) != ((tot + EXA) >>> 1)) begin
        failures++;
        $display("EXTRA=%0d: %0d expected %0d", EXA, ya, (tot + EXA) >>> 1);
      end
      if (longint'(yb) != ((tot + EXB) >>> 1)) begin
        failures++;
        $display("EXTRA=%0d: %0d expected %0d", EXB, yb, (tot + EXB) >>> 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
