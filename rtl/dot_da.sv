// dot_da - N-point discrete orthogonal transform by distributed arithmetic
// with offset binary coding (OBC).
//
// The N input words X_0..X_{N-1} (signed, W bits) are loaded in parallel into
// N parallel-to-serial converters and then consumed one bit slice per cycle,
// LSB first.  Each slice is turned by the XOR address decoder into an (N-1)-bit
// address shared by N half-size ROMs, one per output row i; each ROM word,
// negated when the decoder says so, is added into that row's
// shift-accumulator, which starts from the row constant D_extra.  After W
// cycles all N results Y_i = sum_k A_ik X_k are complete at once, and a new
// vector can already be loading.  No multiplier is used.
//
// Interface: `in_valid`/`in_ready` accept a vector `x`; `y_valid` pulses for
// one cycle with all N results on `y` (sign-extended to YW bits), W + 1 cycles
// after the accepted vector.  Throughput one vector per W cycles.
// The structure (PSCs, XOR decoding, ROM per output, XOR after the ROM,
// adder/FF/SR loop, D_extra multiplexer, S1/S2) follows the OBC engine
// description; the handshake, word widths and the integer (doubled) ROM words
// are this design's choices.
module dot_da
  import dot_pkg::*;
#(
  parameter int         N         = 4,
  parameter int         W         = 8,
  parameter int         L         = 8,
  parameter int         YW        = 32,
  parameter transform_e TRANSFORM = DOT_DCT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [N-1:0][W-1:0]  x,
  output logic                        y_valid,
  output logic signed [N-1:0][YW-1:0] y
);
  localparam int RW = L + $clog2(N) + 1;
  localparam int AW = RW + W + 1;
  localparam int MW = (W > 1) ? $clog2(W) : 1;

  logic          load, busy, s1, s2;
  logic [MW-1:0] m;
  logic [N-1:0]  xbits;
  logic [N-2:0]  addr;
  logic          neg;

  da_controller #(.W(W)) u_ctrl (
    .clk, .rst_n, .start(in_valid), .ready(in_ready), .load, .busy,
    .s1, .s2, .done(y_valid), .m
  );

  for (genvar k = 0; k < N; k++) begin : g_psc
    psc #(.W(W)) u_psc (
      .clk, .load, .shift(busy), .din(x[k]), .bit_out(xbits[k])
    );
  end

  obc_addr_decoder #(.N(N)) u_dec (.xbits, .s1, .addr, .neg);

  for (genvar i = 0; i < N; i++) begin : g_row
    logic signed [RW-1:0] word;
    logic signed [AW-1:0] yi;

    obc_rom #(.N(N), .L(L), .ROW(i), .TRANSFORM(TRANSFORM)) u_rom (
      .addr, .word
    );

    da_shift_acc #(.N(N), .W(W), .L(L),
                   .EXTRA(obc_extra(TRANSFORM, N, L, i))) u_acc (
      .clk, .en(busy), .s2, .neg, .word, .y(yi)
    );

    assign y[i] = YW'(yi);
  end

  // S2 opens and S1 closes every transform, at bit-cycles 0 and W-1.
  assert property (@(posedge clk) disable iff (!rst_n) s2 == (busy && m == '0));
  assert property (@(posedge clk) disable iff (!rst_n) s1 == (busy && int'(m) == W - 1));
endmodule
