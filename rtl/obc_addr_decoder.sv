// obc_addr_decoder - the XOR address decoding of the offset-binary-coded (OBC)
// distributed-arithmetic engine.
//
// The OBC ROM table is antisymmetric: the word for bit slice x equals minus
// the word for the inverted slice.  Only the half with the bit of input 0
// equal to 0 is stored, so the address is formed from the other N-1 bits each
// XORed with the bit of input 0 (input 1 at the address MSB, input N-1 at the
// LSB), and the ROM output must be negated when the bit of input 0 is 1.  On
// the sign-bit cycle (S1 = 1) the OBC digit of every input changes sign, so the
// negation is flipped once more: neg = x_0 XOR S1.  Combinational.
module obc_addr_decoder #(
  parameter int N = 4
) (
  input  logic [N-1:0] xbits,  // bit m of X_0 .. X_{N-1}
  input  logic         s1,     // 1 on the sign-bit cycle
  output logic [N-2:0] addr,
  output logic         neg
);
  always_comb begin
    for (int k = 1; k < N; k++) addr[N-1-k] = xbits[k] ^ xbits[0];
    neg = xbits[0] ^ s1;
  end
endmodule
