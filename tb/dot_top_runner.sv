// dot_top_runner - testbench helper: one dot_top instance at the given size
// and kernel, driven with NV random vectors on both engines and checked
// against the reference model.  Reports its check and failure counts and
// raises `finished` when all results have been seen.
module dot_top_runner
  import dot_pkg::*;
  import dot_ref_pkg::*;
#(
  parameter int         N         = 4,
  parameter int         W         = 8,
  parameter int         L         = 8,
  parameter transform_e TRANSFORM = DOT_DCT,
  parameter int         TCODE     = 0,    // reference-model transform code
  parameter int         NV        = 50
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int YW = 32;

  logic                        rst_n = 1'b0;
  logic                        da_in_valid = 1'b0, da_in_ready, da_y_valid;
  logic signed [N-1:0][W-1:0]  da_x = '0;
  logic signed [N-1:0][YW-1:0] da_y;
  logic                        sa_x_valid = 1'b0, sa_y_valid;
  logic signed [W-1:0]         sa_x = '0;
  logic signed [N-1:0][YW-1:0] sa_y;

  dot_top #(.N(N), .W(W), .L(L), .YW(YW), .TRANSFORM(TRANSFORM)) dut (.*);

  longint da_q [$][N];
  longint sa_q [$][N];
  int     da_n = 0, sa_n = 0;

  initial begin
    checks   = 0;
    failures = 0;
    finished = 1'b0;
  end

  function automatic int vec_errors(logic signed [N-1:0][YW-1:0] y, longint xs[N]);
    longint xa [];
    int     e;
    xa = new[N];
    e  = 0;
    for (int k = 0; k < N; k++) xa[k] = xs[k];
    for (int i = 0; i < N; i++)
      if (longint'($signed(y[i])) != ref_y(TCODE, N, L, i, xa)) begin
        e++;
        $display("N=%0d W=%0d T=%0d y[%0d]=%0d expected %0d", N, W, TCODE, i,
                 $signed(y[i]), ref_y(TCODE, N, L, i, xa));
      end
    return e;
  endfunction

  always @(posedge clk) begin
    if (rst_n && da_y_valid) begin
      checks++;
      if (da_q.size() == 0) failures++;
      else begin
        if (vec_errors(da_y, da_q[0]) != 0) failures++;
        void'(da_q.pop_front());
        da_n++;
      end
    end
    if (rst_n && sa_y_valid) begin
      checks++;
      if (sa_q.size() == 0) failures++;
      else begin
        if (vec_errors(sa_y, sa_q[0]) != 0) failures++;
        void'(sa_q.pop_front());
        sa_n++;
      end
    end
    if (da_n == NV && sa_n == NV) finished <= 1'b1;
  end

  longint vecs [NV][N];

  initial begin
    for (int v = 0; v < NV; v++)
      for (int k = 0; k < N; k++) vecs[v][k] = rand_word(W);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NV; v++) begin
      for (int k = 0; k < N; k++) da_x[k] = W'(vecs[v][k]);
      da_in_valid = 1'b1;
      #1;
      while (!da_in_ready) begin
        @(negedge clk);
        #1;
      end
      da_q.push_back(vecs[v]);
      @(negedge clk);
      da_in_valid = 1'b0;
    end
  end

  initial begin
    repeat (4) @(negedge clk);
    for (int v = 0; v < NV; v++) begin
      for (int k = 0; k < N; k++) begin
        sa_x       = W'(vecs[v][k]);
        sa_x_valid = 1'b1;
        @(negedge clk);
      end
      sa_q.push_back(vecs[v]);
    end
    sa_x_valid = 1'b0;
  end
endmodule
