// obc_rom - half-size offset-binary-coded ROM of output row ROW.
//
// Holds 2^(N-1) words, word a = sum_k A_ROW,k * d_k, with d_0 = -1 and, for
// k >= 1, d_k = +1 when address bit N-1-k is 1 and -1 when it is 0.  This is
// the OBC table of the original design halved by its mirror symmetry; each word is
// twice the table's entry so that it stays an integer (the engine halves the
// final sum instead).  Contents are computed at elaboration from the kernel
// chosen by TRANSFORM (see dot_pkg).  Asynchronous read, as a LUT ROM.
module obc_rom
  import dot_pkg::*;
#(
  parameter int         N         = 4,
  parameter int         L         = 8,
  parameter int         ROW       = 0,
  parameter transform_e TRANSFORM = DOT_DCT,
  localparam int        RW        = L + $clog2(N) + 1
) (
  input  logic [N-2:0]         addr,
  output logic signed [RW-1:0] word
);
  localparam int DEPTH = 1 << (N - 1);

  function automatic logic signed [RW-1:0] rom_entry(int a);
    return RW'(obc_rom_word(TRANSFORM, N, L, ROW, a));
  endfunction

  logic signed [RW-1:0] mem [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_word
    assign mem[a] = rom_entry(a);
  end

  assign word = mem[addr];
endmodule
