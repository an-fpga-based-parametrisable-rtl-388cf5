// booth_selector - partial-product "Selector" of the Booth/Wallace multiplier.
//
// Given the signed L-bit coefficient A and a Booth digit D in {-2..+2}, it
// produces the partial product PP = A * D as an (L+2)-bit signed value:
// select 0, A or 2A, then negate (invert and add one) when the digit is
// negative.  The selector role and the PP = A*D rule follow the Booth encoding
// table; the explicit negation by +1 (rather than a separate correction row)
// is this design's choice.  Combinational.
module booth_selector
  import dot_pkg::*;
#(
  parameter int L = 8
) (
  input  logic signed [L-1:0] a,
  input  booth_digit_t        digit,
  output logic signed [L+1:0] pp
);
  logic signed [L+1:0] mag;

  always_comb begin
    if (digit.two)      mag = (L+2)'(a) <<< 1;
    else if (digit.one) mag = (L+2)'(a);
    else                mag = '0;
    pp = digit.neg ? -mag : mag;
  end
endmodule
