// tb_mbwm_mac - streams random (A, X) pairs into the Booth/Wallace MAC in
// vectors of 1 to 6 pairs, with and without idle cycles between them, and
// checks every accumulated sum against a 64-bit dot product, plus the
// latency: out_valid must come 3 cycles after the last pair (input register,
// one Wallace level, accumulator) for W = 8.
module tb_mbwm_mac;
  import dot_ref_pkg::*;
  localparam int W = 8, L = 8, YW = 32;
  localparam int LAT = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic                 in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic signed [L-1:0]  a = '0;
  logic signed [W-1:0]  x = '0;
  logic                 out_valid;
  logic signed [YW-1:0] y;

  int checks = 0, failures = 0;
  longint exp_q [$];
  int     last_cyc [$];
  int     cyc = 0;
  int     nvec = 0;

  mbwm_mac #(.W(W), .L(L), .YW(YW)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("unexpected out_valid");
      end else begin
        if (longint'(y) != exp_q[0]) begin
          failures++;
          $display("sum %0d expected %0d", y, exp_q[0]);
        end
        if (cyc - last_cyc[0] != LAT) begin
          failures++;
          $display("latency %0d expected %0d", cyc - last_cyc[0], LAT);
        end
        void'(exp_q.pop_front());
        void'(last_cyc.pop_front());
        nvec++;
      end
    end
  end

  initial begin
    longint acc;
    int     len;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int v = 0; v < 200; v++) begin
      len = 1 + ($urandom % 6);
      acc = 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        a        = L'(rand_word(L));
        x        = W'(rand_word(W));
        in_valid = 1'b1;
        in_first = (k == 0);
        in_last  = (k == len - 1);
        acc += longint'(a) * longint'(x);
        if (k == len - 1) begin
          exp_q.push_back(acc);
          last_cyc.push_back(cyc);
        end
        if ($urandom % 4 == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (nvec != 200 || exp_q.size() != 0) begin
      failures++;
      $display("results seen %0d of 200", nvec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
