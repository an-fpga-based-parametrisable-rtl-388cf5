// tb_psc - loads random words into the parallel-to-serial converter and
// checks that bit m of the word appears on bit_out in the m-th cycle after
// the load (LSB first), including a reload while a word is still shifting.
module tb_psc;
  localparam int W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic         load = 1'b0, shift = 1'b0;
  logic [W-1:0] din = '0;
  logic         bit_out;
  int checks = 0, failures = 0;

  psc #(.W(W)) dut (.clk, .load, .shift, .din, .bit_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word;
    int           nb;
    for (int v = 0; v < 100; v++) begin
      word = W'($urandom);
      nb   = (v % 5 == 4) ? 3 : W;  // sometimes reload early
      @(negedge clk);
      din  = word;
      load = 1'b1;
      shift = 1'b1;
      for (int m = 0; m < nb; m++) begin
        @(negedge clk);
        load = 1'b0;
        if (m == 2 && v % 3 == 0) begin
          // hold for one cycle: the bit must not move
          shift = 1'b0;
          checks++;
          if (bit_out !== word[m]) failures++;
          @(negedge clk);
          shift = 1'b1;
        end
        checks++;
        if (bit_out !== word[m]) begin
          failures++;
          $display("word %h bit %0d: got %b", word, m, bit_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
