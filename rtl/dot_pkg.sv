// dot_pkg - shared types and constant functions for the discrete orthogonal
// transform (DOT) engines.
//
// Every transform computed here is a matrix-vector product Y_i = sum_k A_ik X_k
// with a fixed N x N kernel matrix A of signed L-bit integer constants.  The
// kernel is chosen at elaboration time by the TRANSFORM parameter of the
// engines; this package turns that choice into coefficients:
//   DOT_DCT  A_ik = round(S * c_i * cos((2k+1) i pi / 2N)),  c_0 = 1/sqrt(2), c_i = 1
//   DOT_DHT  A_ik = round(S * cas(2 pi i k / N) / sqrt(2)),  cas = cos + sin
//   DOT_FHT  A_ik = (-1)^popcount(i & k)   (Sylvester-ordered Hadamard, N a power of 2)
// with S = 2^(L-1) - 1, so every coefficient fits in L bits.  The scaling and
// the integer rounding are this design's choice; the three transform families
// are the ones of the transform library the engines are meant to serve.
//
// It also holds the helpers that size the Booth/Wallace multiplier and the
// contents of the offset-binary-coded (OBC) ROMs of the distributed-arithmetic
// engine, so that RTL and the elaboration-time tables agree by construction.
package dot_pkg;

  typedef enum logic [1:0] {
    DOT_DCT = 2'd0,
    DOT_DHT = 2'd1,
    DOT_FHT = 2'd2
  } transform_e;

  // Radix-4 (modified Booth) digit D_m in {-2,-1,0,+1,+2}: magnitude as
  // one-hot {two, one} plus a negate flag.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_digit_t;

  localparam real PI = 3.14159265358979323846;

  // Kernel coefficient A_ik of an n-point transform with l-bit coefficients.
  function automatic int kernel_coef(transform_e t, int n, int l, int i, int k);
    real s;
    real v;
    int  p;
    s = real'((1 << (l - 1)) - 1);
    case (t)
      DOT_DCT: begin
        v = $cos(real'((2 * k + 1) * i) * PI / real'(2 * n));
        if (i == 0) v = v / $sqrt(2.0);
        return int'($floor(s * v + 0.5));
      end
      DOT_DHT: begin
        v = ($cos(2.0 * PI * real'(i * k) / real'(n)) +
             $sin(2.0 * PI * real'(i * k) / real'(n))) / $sqrt(2.0);
        return int'($floor(s * v + 0.5));
      end
      default: begin
        p = $countones(i & k);
        return (p % 2 == 1) ? -1 : 1;
      end
    endcase
  endfunction

  // OBC ROM word of output row i at address a (half table).
  // Address bit n-1-k (k = 1..n-1) is the bit of input k XOR the bit of
  // input 0; the half table is the one with input-0 bit = 0, so input 0
  // always contributes -A_i0.  The stored value is sum_k A_ik d_k with
  // d_k = +1 for a 1-bit and -1 for a 0-bit: twice the textbook OBC entry,
  // which keeps every word an integer.
  function automatic int obc_rom_word(transform_e t, int n, int l, int i, int a);
    int acc;
    acc = -kernel_coef(t, n, l, i, 0);
    for (int k = 1; k < n; k++) begin
      if (((a >> (n - 1 - k)) & 1) == 1) acc += kernel_coef(t, n, l, i, k);
      else                                acc -= kernel_coef(t, n, l, i, k);
    end
    return acc;
  endfunction

  // Initial value of the shift-accumulator of row i: -sum_k A_ik, twice the
  // D_iextra constant of the OBC formulation.
  function automatic int obc_extra(transform_e t, int n, int l, int i);
    int acc;
    acc = 0;
    for (int k = 0; k < n; k++) acc -= kernel_coef(t, n, l, i, k);
    return acc;
  endfunction

  // Number of rows left after one Wallace level: groups of four go through a
  // 4-2 unit adder, a leftover group of three through a 3-2 unit adder, any
  // other leftover row through a register.
  function automatic int wallace_next_rows(int rows);
    if (rows <= 2) return rows;
    return 2 * (rows / 4) + (((rows % 4) == 3) ? 2 : (rows % 4));
  endfunction

  // Number of registered Wallace levels needed to reduce `rows` to two.
  function automatic int wallace_levels(int rows);
    int r;
    int lv;
    r  = rows;
    lv = 0;
    while (r > 2) begin
      r  = wallace_next_rows(r);
      lv = lv + 1;
    end
    return lv;
  endfunction

  // Rows present at the input of Wallace level `lv`.
  function automatic int wallace_rows_at(int rows, int lv);
    int r;
    r = rows;
    for (int j = 0; j < lv; j++) r = wallace_next_rows(r);
    return r;
  endfunction

endpackage
