// tb_wallace_tree - drives a new set of random rows every cycle into a
// nine-row tree (three levels: 4-2/4-2/FF, 4-2/FF, 3-2) and a four-row tree
// (one 4-2 level), and checks that the two output rows add up to the sum of
// the rows that entered exactly 3 and 1 cycles earlier respectively.
module tb_wallace_tree;
  localparam int YW = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [YW-1:0] rows9 [9];
  logic [YW-1:0] rows4 [4];
  logic [YW-1:0] s9, c9, s4, c4;
  logic [YW-1:0] hist9 [$];
  logic [YW-1:0] hist4 [$];
  int checks = 0, failures = 0;

  wallace_tree #(.NPP(9), .YW(YW)) dut9 (.clk, .rows(rows9), .s(s9), .c(c9));
  wallace_tree #(.NPP(4), .YW(YW)) dut4 (.clk, .rows(rows4), .s(s4), .c(c4));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [YW-1:0] t9, t4;
    for (int cyc = 0; cyc < 300; cyc++) begin
      t9 = '0;
      t4 = '0;
      for (int j = 0; j < 9; j++) begin
        rows9[j] = (cyc % 7 == 0) ? '1 : YW'($urandom);
        t9 += rows9[j];
      end
      for (int j = 0; j < 4; j++) begin
        rows4[j] = YW'($urandom);
        t4 += rows4[j];
      end
      hist9.push_back(t9);
      hist4.push_back(t4);
      @(posedge clk);
      #1;
      // after this edge, outputs hold the rows of (3 - 1) and (1 - 1) cycles back
      if (hist9.size() >= 3) begin
        checks++;
        if (YW'(s9 + c9) !== hist9[hist9.size() - 3]) begin
          failures++;
          $display("9-row tree cycle %0d: got %h expected %h", cyc, YW'(s9 + c9), hist9[hist9.size() - 3]);
        end
      end
      checks++;
      if (YW'(s4 + c4) !== hist4[hist4.size() - 1]) begin
        failures++;
        $display("4-row tree cycle %0d: got %h expected %h", cyc, YW'(s4 + c4), hist4[hist4.size() - 1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
