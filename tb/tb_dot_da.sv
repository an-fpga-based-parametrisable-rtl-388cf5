// tb_dot_da - end-to-end check of the distributed-arithmetic engine at the
// evaluated size N = 4, W = 8: a DCT instance and a DHT instance receive the
// same random vectors (extremes included), sometimes back to back, sometimes
// with idle gaps.  Every result vector is compared with a 64-bit matrix-vector
// product from the reference model; the latency from acceptance to y_valid
// must be W + 1 cycles (parallel load, then W bit-cycles) and back-to-back
// vectors must be accepted exactly W cycles apart.
module tb_dot_da;
  import dot_pkg::*;
  import dot_ref_pkg::*;
  localparam int N = 4, W = 8, L = 8, YW = 32;
  localparam int NV = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic                        in_valid = 1'b0;
  logic                        rdy_c, rdy_h;
  logic signed [N-1:0][W-1:0]  x = '0;
  logic                        yv_c, yv_h;
  logic signed [N-1:0][YW-1:0] y_c, y_h;

  dot_da #(.N(N), .W(W), .L(L), .YW(YW), .TRANSFORM(DOT_DCT)) dut_c (
    .clk, .rst_n, .in_valid, .in_ready(rdy_c), .x, .y_valid(yv_c), .y(y_c));
  dot_da #(.N(N), .W(W), .L(L), .YW(YW), .TRANSFORM(DOT_DHT)) dut_h (
    .clk, .rst_n, .in_valid, .in_ready(rdy_h), .x, .y_valid(yv_h), .y(y_h));

  int checks = 0, failures = 0;
  int cyc = 0, nres = 0, n_b2b = 0;
  longint xq [$][N];
  int     acc_cyc [$];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NV * (W + 4) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && yv_c) begin
      longint xs [];
      xs = new[N];
      checks++;
      if (!yv_h || xq.size() == 0) begin
        failures++;
        $display("unexpected or unaligned result");
      end else begin
        for (int k = 0; k < N; k++) xs[k] = xq[0][k];
        for (int i = 0; i < N; i++) begin
          checks += 2;
          if (longint'($signed(y_c[i])) != ref_y(0, N, L, i, xs)) begin
            failures++;
            $display("DCT y[%0d]=%0d expected %0d", i, y_c[i], ref_y(0, N, L, i, xs));
          end
          if (longint'($signed(y_h[i])) != ref_y(1, N, L, i, xs)) begin
            failures++;
            $display("DHT y[%0d]=%0d expected %0d", i, y_h[i], ref_y(1, N, L, i, xs));
          end
        end
        checks++;
        if (cyc - acc_cyc[0] != W + 1) begin
          failures++;
          $display("latency %0d expected %0d", cyc - acc_cyc[0], W + 1);
        end
        void'(xq.pop_front());
        void'(acc_cyc.pop_front());
        nres++;
      end
    end
  end

  initial begin
    longint xv [N];
    int     prev_acc;
    bit     waited;
    prev_acc = -100;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NV; v++) begin
      if ($urandom % 3 == 0) repeat (1 + $urandom % (W + 2)) @(negedge clk);
      for (int k = 0; k < N; k++) begin
        xv[k] = rand_word(W);
        x[k]  = W'(xv[k]);
      end
      in_valid = 1'b1;
      #1;
      waited = 1'b0;
      while (!rdy_c) begin
        waited = 1'b1;
        @(negedge clk);
        #1;
      end
      xq.push_back(xv);
      acc_cyc.push_back(cyc);
      if (waited) begin
        checks++;
        if (cyc - prev_acc != W) begin
          failures++;
          $display("back-to-back spacing %0d expected %0d", cyc - prev_acc, W);
        end
        n_b2b++;
      end
      prev_acc = cyc;
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (W + 4) @(negedge clk);
    checks++;
    if (nres != NV || n_b2b == 0) begin
      failures++;
      $display("results %0d of %0d, back-to-back %0d", nres, NV, n_b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
