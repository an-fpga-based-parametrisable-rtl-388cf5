// csa32 - the "3-2 unit adder" of the Booth/Wallace multiplier: a carry-save
// adder over three YW-bit rows.
//
// Each bit position is a full adder; the sum bits form row `s` and the carry
// bits, moved up one position, form row `c`, so that s + c == a + b + d
// modulo 2^YW.  Purely combinational, no carry propagation.  The name and role
// follow the original multiplier design; the full-adder construction is the usual one.
module csa32 #(
  parameter int YW = 32
) (
  input  logic [YW-1:0] a,
  input  logic [YW-1:0] b,
  input  logic [YW-1:0] d,
  output logic [YW-1:0] s,
  output logic [YW-1:0] c
);
  // The carry out of the top bit position falls outside the YW-bit result.
  logic [YW-2:0] maj;

  always_comb begin
    s   = a ^ b ^ d;
    maj = (a[YW-2:0] & b[YW-2:0]) | (a[YW-2:0] & d[YW-2:0]) | (b[YW-2:0] & d[YW-2:0]);
    c   = {maj, 1'b0};
  end
endmodule
