// tb_dot_sa - end-to-end check of the systolic Booth/Wallace engine at N = 4,
// W = 8: a DCT instance and a Hadamard (FHT) instance receive the same stream
// of random vector elements, with vectors back to back or separated by idle
// cycles and, sometimes, idle cycles inside a vector.  Each result vector is
// compared with a 64-bit matrix-vector product from the reference model.
// For vectors streamed without internal gaps the time from X_0 to y_valid
// must be N + 2 = 6 cycles (within the 2N of the method) and, for all
// vectors, 3 cycles from the last element.
module tb_dot_sa;
  import dot_pkg::*;
  import dot_ref_pkg::*;
  localparam int N = 4, W = 8, L = 8, YW = 32;
  localparam int NV = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic                        x_valid = 1'b0;
  logic signed [W-1:0]         x = '0;
  logic                        yv_c, yv_f;
  logic signed [N-1:0][YW-1:0] y_c, y_f;

  dot_sa #(.N(N), .W(W), .L(L), .YW(YW), .TRANSFORM(DOT_DCT)) dut_c (
    .clk, .rst_n, .x_valid, .x, .y_valid(yv_c), .y(y_c));
  dot_sa #(.N(N), .W(W), .L(L), .YW(YW), .TRANSFORM(DOT_FHT)) dut_f (
    .clk, .rst_n, .x_valid, .x, .y_valid(yv_f), .y(y_f));

  int checks = 0, failures = 0;
  int cyc = 0, nres = 0, n_full = 0;
  longint xq [$][N];
  int     first_cyc [$];
  int     last_cyc [$];
  bit     gapless [$];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NV * (3 * N + 8) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && yv_c) begin
      longint xs [];
      xs = new[N];
      checks++;
      if (!yv_f || xq.size() == 0) begin
        failures++;
        $display("unexpected or unaligned result");
      end else begin
        for (int k = 0; k < N; k++) xs[k] = xq[0][k];
        for (int i = 0; i < N; i++) begin
          checks += 2;
          if (longint'($signed(y_c[i])) != ref_y(0, N, L, i, xs)) begin
            failures++;
            $display("DCT y[%0d]=%0d expected %0d", i, $signed(y_c[i]), ref_y(0, N, L, i, xs));
          end
          if (longint'($signed(y_f[i])) != ref_y(2, N, L, i, xs)) begin
            failures++;
            $display("FHT y[%0d]=%0d expected %0d", i, $signed(y_f[i]), ref_y(2, N, L, i, xs));
          end
        end
        checks++;
        if (cyc - last_cyc[0] != 3) begin
          failures++;
          $display("latency from last element %0d expected 3", cyc - last_cyc[0]);
        end
        if (gapless[0]) begin
          checks++;
          n_full++;
          if (cyc - first_cyc[0] != N + 2 || cyc - first_cyc[0] > 2 * N) begin
            failures++;
            $display("latency from first element %0d expected %0d", cyc - first_cyc[0], N + 2);
          end
        end
        void'(xq.pop_front());
        void'(first_cyc.pop_front());
        void'(last_cyc.pop_front());
        void'(gapless.pop_front());
        nres++;
      end
    end
  end

  initial begin
    longint xv [N];
    bit     gl;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NV; v++) begin
      if ($urandom % 3 == 0) begin
        x_valid = 1'b0;
        repeat (1 + $urandom % 5) @(negedge clk);
      end
      gl = ($urandom % 4 != 0);
      for (int k = 0; k < N; k++) begin
        if (!gl && k > 0 && $urandom % 2 == 0) begin
          x_valid = 1'b0;
          @(negedge clk);
        end
        xv[k]   = rand_word(W);
        x       = W'(xv[k]);
        x_valid = 1'b1;
        if (k == 0) first_cyc.push_back(cyc);
        if (k == N - 1) last_cyc.push_back(cyc);
        @(negedge clk);
      end
      xq.push_back(xv);
      gapless.push_back(gl);
    end
    x_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (nres != NV || n_full == 0) begin
      failures++;
      $display("results %0d of %0d, gapless %0d", nres, NV, n_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
