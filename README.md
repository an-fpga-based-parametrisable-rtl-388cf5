# Discrete orthogonal transforms on an FPGA: distributed-arithmetic and systolic engines

Transforms such as the DCT, the discrete Hartley transform (DHT) and the
Hadamard (Walsh) transform are all a matrix-vector product

    Y_i = sum_{k=0}^{N-1} A_ik X_k,   i = 0 .. N-1

with a fixed N x N kernel `A`. This RTL computes such a product in two
different ways, packaged side by side in one core (`dot_top`):

* **`dot_da`, distributed arithmetic with offset binary coding (OBC).** It has
  no multipliers. The N input words are loaded in parallel and consumed one
  bit per cycle, LSB first. Each bit slice addresses N small ROMs, one per
  output. The ROM words are accumulated with a shift, and all N results are
  complete after W cycles. Thanks to OBC, each ROM needs only `2^(N-1)` words.
* **`dot_sa`, a systolic array of N multiply-accumulate units.** Each MAC
  uses a radix-4 (modified Booth) encoder, a pipelined Wallace tree of 4-2 and
  3-2 carry-save adders, a carry-save accumulator and one final adder. The
  vector is streamed in one element per cycle, and the N results come out
  `N + 2` cycles after the first element (6 cycles at N = 4), i.e. within
  about 2N cycles.

The defaults are the configuration the design was evaluated in: N = 4 points
and W = 8-bit signed inputs. The coefficient width is L = 8 and the results
are YW = 32 bits wide. The kernel is chosen at elaboration time by
`TRANSFORM` (`DOT_DCT`, `DOT_DHT` or `DOT_FHT`). Everything is plain
synthesizable SystemVerilog, parameterised in N, W, L and YW.

## The OBC distributed-arithmetic engine

This engine is the harder of the two to follow, so it gets the most space.

### From products to table look-ups

Write each signed W-bit input through its bits `x_k,m`. Offset binary coding
replaces every bit by a digit `d_k,m` in {-1, +1}:

    d_k,m = 2 x_k,m - 1          for m < W-1
    d_k,W-1 = -(2 x_k,W-1 - 1)   (sign bit)

With these digits, `2 X_k + 1 = sum_m d_k,m 2^m` holds exactly. Substituting
into the product gives

    2 Y_i = sum_m 2^m R_i(m)  +  E_i,
    R_i(m) = sum_k A_ik d_k,m,     E_i = -sum_k A_ik

So for every bit position m, output i needs `R_i`, which is a function of the
N bits `x_0,m .. x_N-1,m` only. It can therefore be read from a table instead
of being computed with multipliers.

### Half-size ROM

Inverting all N bits of a slice negates every `d`, and so negates `R`. Only
the half of the table where input 0's bit is 0 is stored (`obc_rom`,
`2^(N-1)` words). The full table is recovered like this:

* **address** bit `N-1-k` is `x_k,m XOR x_0,m` for k = 1 .. N-1
  (`obc_addr_decoder`);
* **negate** the word read when `x_0,m = 1`.

On the sign-bit cycle every digit changes sign. This again only negates the
word, and leaves the address unchanged. The negate flag is therefore
`x_0,m XOR S1`, where S1 is high on that cycle. The negation is the inverting
XOR on the ROM output plus the negate flag as the adder's carry-in, which
together make an exact two's-complement negation.

The ROM words are stored as `R` itself, which is twice the usual OBC table
entry (`sum ±A/2`). This keeps every word an integer. The factor of two is
removed by a single arithmetic shift at the output.

### Shift-accumulator and control signals

`da_shift_acc` holds one output's running sum. On every bit-cycle it computes

    acc <= base + (±R) * 2^(W-1)
    base = (S2) ? E_i * 2^(W-1) : acc >>> 1

S2 marks the first bit-cycle. In that cycle the constant `E_i` (twice the OBC
"extra" term) is injected where the shifted feedback normally enters. After W
bit-cycles, `acc = 2 Y_i` exactly: every right shift discards only zero bits,
as the weights are arranged. The result is `y = acc >>> 1`.

`da_controller` counts the bit-cycles m = 0 .. W-1 and produces four signals:

* `load` copies the input vector into the N parallel-to-serial converters
  (`psc`);
* `s2` is high in bit-cycle 0;
* `s1` is high in bit-cycle W-1 (the sign bit);
* `done` is high for one cycle after the last bit-cycle.

A new vector is accepted in the last bit-cycle of the current one, so
back-to-back vectors run at one per W cycles.

### Timing

    cycle      t0         t0+1 .. t0+W          t0+W+1
    in_valid & in_ready   (load PSCs)
               bit-cycles m = 0 .. W-1 (S2 at m=0, S1 at m=W-1)
                                                y_valid, y = Y
    next vector may be accepted at t0+W (in_ready high in the last bit-cycle)

At the defaults, the engine uses 117 flip-flops: 4 x 8 converter bits,
4 x 20 accumulator bits and 5 control bits. This is the same flip-flop count
as the published DA implementation of this size.

## The Booth/Wallace systolic engine

`dot_sa` holds N `mbwm_mac` units, one per output row. Element `X_k` is
broadcast to all of them. MAC i gets `A_ik` from a constant table indexed by
an element counter. After the N-th element, MAC i holds `Y_i`.

Each MAC is a five-stage arrangement:

1. **Input registers** for `A` (L bits) and `X` (W bits).
2. **Booth encoding and selection.** W/2 `booth_encoder`s take the bit triples
   `{x_2m+1, x_2m, x_2m-1}` of X (with `x_-1 = 0`) and produce a digit
   `D_m` in {-2, -1, 0, +1, +2}. `booth_selector` forms `A * D_m`.
   Each partial product is sign-extended to YW bits and shifted by 2m.
3. **`wallace_tree`**, with one register per level. At each level, rows are
   grouped in fours into `csa42` (4-2 unit adders). A leftover group of three
   goes into a `csa32`, and any other leftover row passes through a register.
   For W = 8 there are four rows, so this is one level. For nine rows the rule
   gives the 4-2/4-2/FF, 4-2/FF, 3-2 arrangement.
4. **Accumulation compressor.** A `csa42` adds the tree's two rows to the
   carry-save running sum, which is held in two feedback registers. The
   feedback is zeroed on a vector's first element.
5. **Final adder.** A combinational (not pipelined) YW-bit adder turns the
   carry-save sum into `y`.

`out_valid` comes LEVELS + 2 cycles after the last element (3 at W = 8).
Vectors can follow each other with no gap, and idle cycles inside a vector are
allowed. Arithmetic is modulo 2^YW. With the defaults, the largest result
needs 18 bits.

## Kernels

`dot_pkg` computes the kernel at elaboration time, with `S = 2^(L-1) - 1`:

| `TRANSFORM` | `A_ik` |
|---|---|
| `DOT_DCT` | `round(S * c_i * cos((2k+1) i pi / 2N))`, `c_0 = 1/sqrt(2)`, otherwise 1 |
| `DOT_DHT` | `round(S * (cos + sin)(2 pi i k / N) / sqrt(2))` |
| `DOT_FHT` | `(-1)^popcount(i & k)`: Sylvester-ordered Hadamard; N must be a power of two |

The same package derives the OBC ROM words (`obc_rom_word`), the row
constants (`obc_extra`) and the Wallace tree shape (`wallace_levels`). This
way the hardware and its tables are always built from one description. To
use another kernel, add a case to `kernel_coef`. Both engines follow it
automatically.

## Interface of `dot_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock. Synchronous active-low reset, applied to control state only. |
| `da_in_valid` / `da_in_ready` | in / out | 1 | DA engine: offer / accept an input vector. |
| `da_x` | in | N x W | DA engine: input vector, signed, element k at `da_x[k]`. |
| `da_y_valid`, `da_y` | out | 1, N x YW | DA engine: one-cycle result strobe and the N signed results. |
| `sa_x_valid`, `sa_x` | in | 1, W | SA engine: one vector element per valid cycle, `X_0` first. |
| `sa_y_valid`, `sa_y` | out | 1, N x YW | SA engine: one-cycle result strobe and the N signed results. |

Results are held until the engine overwrites them, so capture them on the
strobe.

## Files

| File | Contents |
|---|---|
| `rtl/dot_pkg.sv` | Types (`transform_e`, `booth_digit_t`) and elaboration-time functions |
| `rtl/dot_top.sv` | Both engines side by side |
| `rtl/dot_da.sv` | DA/OBC engine: `da_controller`, `psc`, `obc_addr_decoder`, `obc_rom`, `da_shift_acc` |
| `rtl/dot_sa.sv` | Systolic engine: coefficient table, element counter, N x `mbwm_mac` |
| `rtl/mbwm_mac.sv` | Booth/Wallace MAC: `booth_encoder`, `booth_selector`, `wallace_tree`, `csa42`, `csa32` |
| `tb/tb_*.sv` | One self-checking testbench per module, plus `tb_dot_top` and `tb_dot_workloads` |
| `tb/dot_ref_pkg.sv` | Reference kernels and products, written independently of `dot_pkg` |
| `tb/dot_top_runner.sv` | Helper for `tb_dot_workloads`: one checked `dot_top` at a given size and kernel |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
To build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dot_pkg.sv tb/dot_ref_pkg.sv tb/tb_dot_top.sv --top-module tb_dot_top
    ./obj_dir/Vtb_dot_top

Replace `tb_dot_top` with any other testbench name.

* **`tb_dot_top`** runs the core at its defaults. It sends 200 random vectors,
  with extremes included, through both engines. It checks:
  * both engines against a 64-bit reference, and against each other;
  * both latencies;
  * that every mechanism occurs at least once: S2 preload, OBC ROM inversion,
    sign-bit inversion, back-to-back DA vectors, all five Booth digits,
    back-to-back and gapped SA vectors.
* **`tb_dot_workloads`** runs the core at N = 3 and N = 4 with W = 8, with the
  DCT, DHT and Hadamard kernels. It also runs an 8-point, 16-bit DCT, which
  gives a two-level Wallace tree.
* The per-module testbenches check their block exhaustively, or with random
  vectors against an independently computed value. They also check cycle
  counts where the block has a defined latency.

## Where this RTL departs from, or goes beyond, the original design

* **Coefficient width, result width and kernel.** The evaluated design does
  not state its coefficient width or which transform it ran. L = 8 and the
  DCT default are choices of this RTL. YW = 32 follows the 32-bit final adder
  of the MAC diagram.
* **Booth-encoded operand.** The method's equations encode the data `X` and
  select multiples of `A`. Here the same is done, although the MAC diagram
  draws the encoder beside the coefficient register. The product is the same
  either way.
* **Wallace tree size.** The MAC diagram shows a tree for nine partial
  products, ending in a 32-bit adder. An 8-bit X has only four rows. The tree
  here is generated from the row count with the diagram's rules, and
  reproduces the diagram when given nine rows.
* **Systolic engine registers.** This engine keeps full-width carry-save state
  and pipeline registers: 550 flip-flop bits at the defaults. The published
  figure is 128 flip-flops, for a register placement that is not described.
* **OBC inversion control.** The engine diagram combines input 0's bit with S1
  before the address XORs. Here S1 only flips the ROM-output negation, which
  is what the OBC equations require. The address stays `x_k XOR x_0`.
* **S1/S2 timing.** S1 is read as "the sign-bit cycle". S2 is read as "the
  cycle that starts a transform", which is the cycle after the last bit of the
  previous transform when vectors run back to back.
* **Doubled ROM words.** The ROMs hold twice the textbook OBC entries, so
  every word is an integer. The results are identical.
* **Handshakes and reset.** The valid/ready handshakes, the one-cycle result
  strobes and the synchronous reset belong to this RTL. No host bus, SRAM or
  board I/O interface is provided. The engines' own ports are the core's
  interface.
* **Not provided.** The surrounding system's software (user interface,
  transform library, HDL generator, vendor tools), the host computer, and the
  board's SRAMs and I/O are not part of this RTL.
