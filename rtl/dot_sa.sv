// dot_sa - N-point discrete orthogonal transform on a systolic array of N
// multiply-accumulate units (one per output row).
//
// The input vector is streamed in one element per cycle, X_0 first.  The
// element X_k is broadcast to all N MACs while MAC i receives the kernel
// coefficient A_ik from a constant coefficient store indexed by k, so after
// the N-th element every MAC holds Y_i = sum_k A_ik X_k.  The MACs use the
// modified Booth / Wallace tree scheme (mbwm_mac).  Vectors may follow each
// other back to back.
//
// Interface: `x_valid` with `x`; the element counter inside marks the first
// and last element of each vector.  `y_valid` pulses once per vector with all
// N results on `y`, N + LEVELS + 1 cycles after the cycle in which X_0 was
// presented (6 cycles for N = 4, W = 8), i.e. within about 2N cycles.
// N MACs and the serial feed follow the original design; the coefficient store,
// element counter and handshake are this design's choices.
module dot_sa
  import dot_pkg::*;
#(
  parameter int         N         = 4,
  parameter int         W         = 8,
  parameter int         L         = 8,
  parameter int         YW        = 32,
  parameter transform_e TRANSFORM = DOT_DCT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        x_valid,
  input  logic signed [W-1:0]         x,
  output logic                        y_valid,
  output logic signed [N-1:0][YW-1:0] y
);
  localparam int KW = (N > 1) ? $clog2(N) : 1;

  // Kernel coefficient store: ktab[i][k] = A_ik.
  logic signed [L-1:0] ktab [N][N];
  for (genvar i = 0; i < N; i++) begin : g_ki
    for (genvar k = 0; k < N; k++) begin : g_kk
      assign ktab[i][k] = L'(kernel_coef(TRANSFORM, N, L, i, k));
    end
  end

  // Element counter.
  logic [KW-1:0] k;
  logic          first, last;

  always_comb begin
    first = (k == '0);
    last  = (k == KW'(N - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       k <= '0;
    else if (x_valid) k <= last ? '0 : k + 1'b1;
  end

  logic [N-1:0] mac_valid;

  for (genvar i = 0; i < N; i++) begin : g_mac
    mbwm_mac #(.W(W), .L(L), .YW(YW)) u_mac (
      .clk, .rst_n, .in_valid(x_valid), .in_first(first), .in_last(last),
      .a(ktab[i][k]), .x, .out_valid(mac_valid[i]), .y(y[i])
    );
  end

  assign y_valid = mac_valid[0];

  // All MACs run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) mac_valid == '0 || &mac_valid);
endmodule
