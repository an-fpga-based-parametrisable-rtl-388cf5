// booth_encoder - one modified-Booth (radix-4) encoder "B" of the multiplier.
//
// Input is the bit triple {x(2m+1), x(2m), x(2m-1)} of the two's-complement
// operand X (x(-1) = 0).  Output is the digit D_m = x(2m-1) + x(2m) - 2 x(2m+1)
// in {-2,-1,0,+1,+2}, as a negate flag and a one-hot magnitude {two, one}:
//   000 -> 0   001 -> +1  010 -> +1  011 -> +2
//   100 -> -2  101 -> -1  110 -> -1  111 -> 0 (neg set, magnitude zero)
// which is the encoding table of the modified Booth algorithm.  The
// {neg, two, one} signal form is this design's choice.  Combinational.
module booth_encoder
  import dot_pkg::*;
(
  input  logic [2:0]   triple,
  output booth_digit_t digit
);
  always_comb begin
    digit.neg = triple[2];
    digit.one = triple[1] ^ triple[0];
    digit.two = (triple == 3'b011) || (triple == 3'b100);
  end
endmodule
