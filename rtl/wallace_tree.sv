// wallace_tree - pipelined Wallace tree of the Booth/Wallace multiplier.
//
// Reduces NPP partial-product rows (YW bits each) to a sum row and a carry row
// whose total equals the sum of the inputs modulo 2^YW.  Each level takes its
// rows in groups of four through 4-2 unit adders; a leftover group of three
// goes through a 3-2 unit adder and any other leftover row is carried along
// through a register.  Every level ends in a register, so the latency is
// LEVELS = dot_pkg::wallace_levels(NPP) cycles and a new set of rows can enter
// every cycle.  For nine rows this gives the 4-2/4-2/FF, 4-2/FF, 3-2
// arrangement of the original multiplier design; for the four rows of an 8-bit
// operand it is a single 4-2 level.  With NPP <= 2 the rows pass straight
// through.  Registers are not reset; the caller tracks which stages hold
// valid data.
module wallace_tree
  import dot_pkg::*;
#(
  parameter int NPP = 4,
  parameter int YW  = 32
) (
  input  logic          clk,
  input  logic [YW-1:0] rows [NPP],
  output logic [YW-1:0] s,
  output logic [YW-1:0] c
);
  localparam int LEVELS = wallace_levels(NPP);

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int NIN  = wallace_rows_at(NPP, l);
    localparam int NOUT = wallace_next_rows(NIN);
    localparam int Q    = NIN / 4;
    localparam int R    = NIN % 4;

    logic [YW-1:0] din [NPP];
    logic [YW-1:0] nxt [NPP];
    logic [YW-1:0] q   [NPP];

    if (l == 0) begin : g_from_in
      assign din = rows;
    end else begin : g_from_prev
      assign din = g_lvl[l-1].q;
    end

    for (genvar g = 0; g < Q; g++) begin : g_c42
      csa42 #(.YW(YW)) u_c42 (
        .a(din[4*g]), .b(din[4*g+1]), .d(din[4*g+2]), .e(din[4*g+3]),
        .s(nxt[2*g]), .c(nxt[2*g+1])
      );
    end

    if (R == 3) begin : g_c32
      csa32 #(.YW(YW)) u_c32 (
        .a(din[4*Q]), .b(din[4*Q+1]), .d(din[4*Q+2]),
        .s(nxt[2*Q]), .c(nxt[2*Q+1])
      );
    end else begin : g_pass
      for (genvar j = 0; j < R; j++) begin : g_row
        assign nxt[2*Q+j] = din[4*Q+j];
      end
    end

    for (genvar j = NOUT; j < NPP; j++) begin : g_unused
      assign nxt[j] = '0;
    end

    always_ff @(posedge clk) q <= nxt;
  end

  if (LEVELS == 0) begin : g_direct
    assign s = rows[0];
    if (NPP > 1) begin : g_two
      assign c = rows[1];
    end else begin : g_one
      assign c = '0;
    end
  end else begin : g_out
    assign s = g_lvl[LEVELS-1].q[0];
    assign c = g_lvl[LEVELS-1].q[1];
  end
endmodule
