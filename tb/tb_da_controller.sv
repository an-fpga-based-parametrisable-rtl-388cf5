// tb_da_controller - checks the sequencing for W = 8: after an accepted start
// the controller is busy for exactly W cycles, S2 is high in the first and S1
// in the last of them, the bit index counts 0..W-1, done follows the last
// cycle, and a start in the last cycle is accepted (back-to-back transforms,
// one every W cycles) while a start in any other busy cycle is not.
module tb_da_controller;
  localparam int W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n = 1'b0, start = 1'b0;
  logic       ready, load, busy, s1, s2, done;
  logic [2:0] m;
  int checks = 0, failures = 0;

  da_controller #(.W(W)) dut (.*);

  task automatic expect_sig(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%t %s = %b expected %b", $time, what, got, want);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit bb, bb_prev;
    bb_prev = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_sig("ready idle", ready, 1'b1);
    expect_sig("busy idle", busy, 1'b0);
    for (int v = 0; v < 20; v++) begin
      bb = (v % 3 != 0);  // back-to-back with the next one
      if (!bb_prev) begin
        start = 1'b1;
        #1;
        expect_sig("load", load, 1'b1);
        @(negedge clk);
      end
      start = 1'b0;
      for (int j = 0; j < W; j++) begin
        expect_sig("busy", busy, 1'b1);
        checks++;
        if (m != 3'(j)) begin failures++; $display("m=%0d expected %0d", m, j); end
        expect_sig("s2", s2, j == 0);
        expect_sig("s1", s1, j == W - 1);
        expect_sig("ready", ready, j == W - 1);
        if (j == 3) begin
          start = 1'b1;
          #1;
          expect_sig("load while busy", load, 1'b0);
          start = 1'b0;
        end
        if (j == W - 1 && bb && v < 19) begin
          start = 1'b1;
          #1;
          expect_sig("back-to-back load", load, 1'b1);
        end
        @(negedge clk);
        start = 1'b0;
      end
      expect_sig("done", done, 1'b1);
      if (!bb || v == 19) begin
        expect_sig("busy after", busy, 1'b0);
        @(negedge clk);
        expect_sig("done pulse", done, 1'b0);
      end
      bb_prev = bb && v < 19;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
