// tb_dot_top - end-to-end test of the transform core with every parameter at
// its default (N = 4, W = 8, L = 8, DCT kernel).  The same random vectors go
// to both engines: whole vectors to the distributed-arithmetic engine,
// element by element to the systolic engine.  Each engine's results are
// compared with a 64-bit reference product, and the two engines must agree.
// Latencies are checked (W + 1 cycles for the distributed-arithmetic engine,
// N + 2 for a gapless vector on the systolic engine).  The test also counts
// the mechanisms of the design and fails if one never happened:
//   DA: D_extra preload (S2), ROM-output inversion from the OBC symmetry,
//       the extra inversion on the sign-bit cycle (S1), back-to-back vectors;
//   SA: each Booth digit -2, -1, 0, +1, +2, accumulation over N elements,
//       back-to-back vectors and vectors with idle cycles inside.
module tb_dot_top;
  import dot_pkg::*;
  import dot_ref_pkg::*;
  localparam int N = 4, W = 8, L = 8, YW = 32;
  localparam int NV = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic                        da_in_valid = 1'b0, da_in_ready, da_y_valid;
  logic signed [N-1:0][W-1:0]  da_x = '0;
  logic signed [N-1:0][YW-1:0] da_y;
  logic                        sa_x_valid = 1'b0, sa_y_valid;
  logic signed [W-1:0]         sa_x = '0;
  logic signed [N-1:0][YW-1:0] sa_y;

  dot_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  longint da_q [$][N];
  int     da_acc [$];
  longint sa_q [$][N];
  int     sa_first [$];
  bit     sa_gl [$];
  longint da_res [$][N];
  longint sa_res [$][N];
  int n_s2 = 0, n_rom_inv = 0, n_sign_inv = 0, n_da_b2b = 0;
  int n_digit [5];
  int n_sa_acc = 0, n_sa_b2b = 0, n_sa_gap = 0;
  int da_done = 0, sa_done = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NV * 40 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters on the distributed-arithmetic datapath.
  always @(posedge clk) begin
    if (rst_n && dut.u_da.busy) begin
      if (dut.u_da.s2) n_s2++;
      if (dut.u_da.xbits[0] && !dut.u_da.s1) n_rom_inv++;
      if (dut.u_da.s1) n_sign_inv++;
    end
  end

  function automatic bit check_vec(string tag, logic signed [N-1:0][YW-1:0] y, longint xs[N],
                                   ref longint res [$][N]);
    longint xa [];
    longint r [N];
    bit     ok;
    xa = new[N];
    ok = 1'b1;
    for (int k = 0; k < N; k++) xa[k] = xs[k];
    for (int i = 0; i < N; i++) begin
      r[i] = longint'($signed(y[i]));
      if (r[i] != ref_y(0, N, L, i, xa)) begin
        ok = 1'b0;
        $display("%s y[%0d]=%0d expected %0d", tag, i, r[i], ref_y(0, N, L, i, xa));
      end
    end
    res.push_back(r);
    return ok;
  endfunction

  always @(posedge clk) begin
    if (rst_n && da_y_valid) begin
      checks += 2;
      if (da_q.size() == 0) failures += 2;
      else begin
        if (!check_vec("DA", da_y, da_q[0], da_res)) failures++;
        if (cyc - da_acc[0] != W + 1) begin
          failures++;
          $display("DA latency %0d", cyc - da_acc[0]);
        end
        void'(da_q.pop_front());
        void'(da_acc.pop_front());
        da_done++;
      end
    end
    if (rst_n && sa_y_valid) begin
      checks++;
      if (sa_q.size() == 0) failures++;
      else begin
        if (!check_vec("SA", sa_y, sa_q[0], sa_res)) failures++;
        n_sa_acc++;
        if (sa_gl[0]) begin
          checks++;
          if (cyc - sa_first[0] != N + 2) begin
            failures++;
            $display("SA latency %0d", cyc - sa_first[0]);
          end
        end
        void'(sa_q.pop_front());
        void'(sa_first.pop_front());
        void'(sa_gl.pop_front());
        sa_done++;
      end
    end
  end

  longint vecs [NV][N];

  // Count the Booth digits of an input word.
  function automatic void count_digits(longint xv);
    logic [W:0] xe;
    int         dg;
    xe = {W'(xv), 1'b0};
    for (int m = 0; m < W / 2; m++) begin
      dg = int'(xe[2*m]) + int'(xe[2*m+1]) - 2 * int'(xe[2*m+2]);
      n_digit[dg + 2]++;
    end
  endfunction

  // Distributed-arithmetic driver.
  initial begin
    bit waited;
    for (int v = 0; v < NV; v++)
      for (int k = 0; k < N; k++) vecs[v][k] = rand_word(W);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NV; v++) begin
      if (v % 4 == 3) repeat (1 + 3 * (v % 5)) @(negedge clk);
      for (int k = 0; k < N; k++) da_x[k] = W'(vecs[v][k]);
      da_in_valid = 1'b1;
      #1;
      waited = 1'b0;
      while (!da_in_ready) begin
        waited = 1'b1;
        @(negedge clk);
        #1;
      end
      if (waited) n_da_b2b++;
      da_q.push_back(vecs[v]);
      da_acc.push_back(cyc);
      @(negedge clk);
      da_in_valid = 1'b0;
    end
  end

  // Systolic driver.
  initial begin
    bit gl;
    bit prev_full;
    prev_full = 1'b0;
    repeat (3) @(negedge clk);
    for (int v = 0; v < NV; v++) begin
      if (v % 5 == 4) begin
        sa_x_valid = 1'b0;
        prev_full  = 1'b0;
        repeat (1 + v % 3) @(negedge clk);
      end
      gl = (v % 7 != 6);
      if (!gl) n_sa_gap++;
      if (prev_full) n_sa_b2b++;
      for (int k = 0; k < N; k++) begin
        if (!gl && k == 2) begin
          sa_x_valid = 1'b0;
          @(negedge clk);
        end
        sa_x       = W'(vecs[v][k]);
        sa_x_valid = 1'b1;
        count_digits(vecs[v][k]);
        if (k == 0) sa_first.push_back(cyc);
        @(negedge clk);
      end
      prev_full = 1'b1;
      sa_q.push_back(vecs[v]);
      sa_gl.push_back(gl);
    end
    sa_x_valid = 1'b0;
  end

  initial begin
    wait (da_done == NV && sa_done == NV);
    repeat (2) @(negedge clk);
    for (int v = 0; v < NV; v++) begin
      checks++;
      if (da_res[v] != sa_res[v]) begin
        failures++;
        $display("engines disagree on vector %0d", v);
      end
    end
    $display("DA: S2 preloads %0d, ROM inversions %0d, sign-bit cycles %0d, back-to-back %0d",
             n_s2, n_rom_inv, n_sign_inv, n_da_b2b);
    $display("SA: digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d, accumulations %0d, back-to-back %0d, gapped %0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_sa_acc, n_sa_b2b, n_sa_gap);
    checks += 11;
    if (n_s2 != NV) failures++;
    if (n_rom_inv == 0) failures++;
    if (n_sign_inv != NV) failures++;
    if (n_da_b2b == 0) failures++;
    for (int d = 0; d < 5; d++) if (n_digit[d] == 0) failures++;
    if (n_sa_b2b == 0) failures++;
    if (n_sa_gap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
