// csa42 - the "4-2 unit adder" of the Booth/Wallace multiplier: reduces four
// YW-bit rows to a sum row and a carry row with s + c == a + b + d + e
// (modulo 2^YW).
//
// Built as two cascaded 3-2 carry-save adders, which is the plain way of
// making a 4-2 compressor; only the name and the 4-in/2-out role come from
// the original multiplier design.  Combinational.
module csa42 #(
  parameter int YW = 32
) (
  input  logic [YW-1:0] a,
  input  logic [YW-1:0] b,
  input  logic [YW-1:0] d,
  input  logic [YW-1:0] e,
  output logic [YW-1:0] s,
  output logic [YW-1:0] c
);
  logic [YW-1:0] s1, c1;

  csa32 #(.YW(YW)) u_first  (.a(a),  .b(b),  .d(d), .s(s1), .c(c1));
  csa32 #(.YW(YW)) u_second (.a(s1), .b(c1), .d(e), .s(s),  .c(c));
endmodule
