// mbwm_mac - multiply-accumulate unit built on the Modified Booth encoder /
// Wallace tree Multiplication (MBWM) scheme.
//
// It accumulates Y = sum_k A_k X_k over a stream of (A_k, X_k) pairs, one pair
// per cycle.  Pipeline:
//   1. input register for A (L-bit signed coefficient) and X (W-bit signed);
//   2. W/2 Booth encoders turn X into radix-4 digits D_m, and W/2 selectors
//      form the partial products A*D_m, each sign-extended and weighted 4^m;
//   3. the pipelined Wallace tree (wallace_tree) reduces them to two rows;
//   4. a 4-2 unit adder folds these two rows into the carry-save running sum
//      held in two feedback registers (cleared by `in_first`);
//   5. a non-pipelined final adder resolves the carry-save sum into `y`.
// `out_valid` pulses for one cycle, with the complete sum on `y`,
// LEVELS + 2 cycles after the pair flagged `in_last` was accepted, where
// LEVELS is the tree depth (1 for W = 8).  Arithmetic is modulo 2^YW.
// The structure follows the original MAC design (Booth encoders, selectors, tree
// levels, compressor with feedback, 32-bit final adder).  Encoding X rather
// than A follows the equations of the method; W is taken even.
module mbwm_mac
  import dot_pkg::*;
#(
  parameter int W  = 8,
  parameter int L  = 8,
  parameter int YW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic signed [L-1:0]  a,
  input  logic signed [W-1:0]  x,
  output logic                 out_valid,
  output logic signed [YW-1:0] y
);
  localparam int NPP    = (W + 1) / 2;
  localparam int LEVELS = wallace_levels(NPP);

  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } tag_t;

  // Stage 1: operand registers.
  logic signed [L-1:0] a_r;
  logic signed [W-1:0] x_r;
  tag_t                tag_in;

  always_ff @(posedge clk) begin
    a_r <= a;
    x_r <= x;
    if (!rst_n) tag_in <= '0;
    else        tag_in <= '{valid: in_valid, first: in_first, last: in_last};
  end

  // Stage 2: Booth encoders and partial-product selectors.
  logic [W:0]    xe;
  logic [YW-1:0] rows [NPP];

  assign xe = {x_r, 1'b0};  // x(-1) = 0

  for (genvar m = 0; m < NPP; m++) begin : g_pp
    booth_digit_t        digit;
    logic signed [L+1:0] pp;
    logic signed [YW-1:0] pp_ext;

    booth_encoder u_enc (.triple(xe[2*m+2:2*m]), .digit);
    booth_selector #(.L(L)) u_sel (.a(a_r), .digit, .pp);

    assign pp_ext  = YW'(pp);
    assign rows[m] = pp_ext <<< (2 * m);
  end

  // Stage 3: Wallace tree, tags delayed alongside.
  logic [YW-1:0] ts, tc;
  tag_t          tag_t_out;

  wallace_tree #(.NPP(NPP), .YW(YW)) u_tree (.clk, .rows, .s(ts), .c(tc));

  if (LEVELS == 0) begin : g_notag
    assign tag_t_out = tag_in;
  end else begin : g_tag
    tag_t pipe [LEVELS];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int j = 0; j < LEVELS; j++) pipe[j] <= '0;
      end else begin
        pipe[0] <= tag_in;
        for (int j = 1; j < LEVELS; j++) pipe[j] <= pipe[j-1];
      end
    end
    assign tag_t_out = pipe[LEVELS-1];
  end

  // Stage 4: accumulation compressor with feedback.
  logic [YW-1:0] acc_s, acc_c, fb_s, fb_c, nx_s, nx_c;

  always_comb begin
    fb_s = tag_t_out.first ? '0 : acc_s;
    fb_c = tag_t_out.first ? '0 : acc_c;
  end

  csa42 #(.YW(YW)) u_acc (.a(ts), .b(tc), .d(fb_s), .e(fb_c), .s(nx_s), .c(nx_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_s     <= '0;
      acc_c     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= tag_t_out.valid && tag_t_out.last;
      if (tag_t_out.valid) begin
        acc_s <= nx_s;
        acc_c <= nx_c;
      end
    end
  end

  // Stage 5: final carry-propagate adder (not pipelined).
  assign y = signed'(acc_s + acc_c);
endmodule
