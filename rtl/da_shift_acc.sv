// da_shift_acc - shift-accumulator of one output of the distributed-arithmetic
// (DA) engine: the XOR after the ROM, the adder, the FF, the shift register
// SR and the multiplexer that injects the constant D_extra.
//
// Bit slices arrive LSB first.  Each enabled cycle computes
//     acc <= base + (+/-word) * 2^(W-1)
// where base is acc >>> 1 (the shifted previous sum) or, when S2 marks the
// first cycle of a transform, the constant EXTRA * 2^(W-1).  The ROM word is
// negated, when `neg` is set, by XORing it with `neg` and adding `neg` as the
// carry-in, which is the two's-complement form of the inverting XOR.  After
// the W-th cycle acc = sum_m 2^m R_m + EXTRA = 2 Y exactly (every right shift
// drops only zero bits), and `y` = acc >>> 1 is the result.  acc is AW bits
// wide, enough for W slices of RW-bit words.  Register is not reset: S2
// overwrites it on the first cycle of every transform.
module da_shift_acc #(
  parameter  int N     = 4,
  parameter  int W     = 8,
  parameter  int L     = 8,
  parameter  int EXTRA = 0,
  localparam int RW    = L + $clog2(N) + 1,
  localparam int AW    = RW + W + 1
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 s2,
  input  logic                 neg,
  input  logic signed [RW-1:0] word,
  output logic signed [AW-1:0] y
);
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] base;
  logic signed [AW-1:0] term;
  logic signed [RW-1:0] inv;

  always_comb begin
    inv  = word ^ {RW{neg}};
    term = (AW'(inv) + AW'(neg)) <<< (W - 1);
    base = s2 ? (AW'(EXTRA) <<< (W - 1)) : (acc >>> 1);
  end

  always_ff @(posedge clk) begin
    if (en) acc <= base + term;
  end

  assign y = acc >>> 1;
endmodule
