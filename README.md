# Parallel CRC / LFSR in transformed state space

A CRC (or the parity of a BCH code word) is the remainder of the message
polynomial, shifted up by K places, divided by a generator polynomial g(x) of
degree K. A linear feedback shift register (LFSR) computes it one bit per
clock. At tens of Gb/s that is too slow, so L bits have to be taken per clock.
The usual way to do that puts a dense K x K matrix inside the feedback loop,
and the loop then limits the clock rate. Since it is a loop, it cannot simply
be pipelined.

This design changes the basis in which the state is stored. In the new basis
the feedback loop is once again a plain LFSR ring, with at most two XOR levels
per bit, whatever L is. All the dense XOR logic moves into two feed-forward
blocks, one in front of the loop and one behind it. Those blocks are
pipelined, so the clock rate is set by the short loop alone.

The default build is a 32-bit-wide CRC-32: 32 state bits, 32 message bits
per clock. K, L and the generator are parameters.

## The state-space view

Number the LFSR stages x_0 … x_{K-1}, where x_i holds the coefficient of x^i
of the running remainder. One serial step with input bit u is

    x(n+1) = A x(n) + b u(n)

A is the companion matrix of g. It has ones on the sub-diagonal (stage i
takes stage i-1) and g_0 … g_{K-1} in its last column (the taps fed from the
top stage). The vector b is [g_0 … g_{K-1}]. The message enters most
significant bit first.

Applying the step L times gives the L-parallel update:

    x(mL+L) = A^L x(mL) + B_L u_L(mL),      B_L = [A^{L-1}b … A b  b]

A^L is dense, and it sits inside the loop.

Now store xt = T^-1 x for a fixed non-singular matrix T. The update becomes

    xt(mL+L) = ALt xt(mL) + BLt u_L(mL),    y = T xt
    ALt = T^-1 A^L T,   BLt = T^-1 B_L

If T can be chosen so that ALt is again a companion matrix, the loop costs
what a serial LFSR costs. T then appears only in front of the loop (inside
BLt) and behind it (as the output map).

Such a T exists exactly when A^L is similar to a companion matrix, i.e. when
the minimal polynomial of A^L equals its characteristic polynomial. For an
irreducible generator this holds whenever α^L (α a root of g) lies in no
proper subfield of GF(2^K): always when L is a power of two, and for most
other widths. It can fail, e.g. for x^4+x+1 taken 5 bits per clock, where
α^5 lies in GF(4). It also holds for many reducible generators: the CRC-12
generator (x+1)(x^11+x^2+1) at L = 12 works. T is not unique.

## How T is chosen

This design takes T to be the Krylov matrix

    T = [ v,  A^L v,  A^{2L} v,  …,  A^{(K-1)L} v ]

where v is the first unit vector e_j for which T is non-singular. For CRC-32
that is e_0. Then A^L T = T C, where C has ones on the sub-diagonal and a last
column c. That column holds the coefficients of the characteristic polynomial
of A^L. So ALt = C is a companion matrix by construction, and the loop taps
are c.

When L is a power of two and g is irreducible, the characteristic polynomial
of A^L is g itself. The loop then has exactly the taps of the serial CRC-32
LFSR, which is the case at the defaults. For other widths the taps differ.
For example, the 8-bit generator 0x1B taken 3 bits per clock gives loop taps
0x39.

All matrices are computed at elaboration by constant functions in
`lfsr_ss_pkg`: A^L, B_L, the rank test, Gauss-Jordan inversion over GF(2),
T, ALt, BLt and the transformed initial state T^-1 INIT. They become
parameters of the three blocks. No table is stored. Elaboration stops with an
error if no unit vector gives a non-singular T, or if ALt does not come out
in companion form.

## Datapath

    din[L-1:0] ─► blt_input_map ─► w ─► companion_loop ─► xt ─► clt_output_map ─► crc[K-1:0]
                  BLt = T^-1 B_L        xt <= ALt·xt ^ w        y = T·xt
                  PIPE_B stages                                 PIPE_C stages

* **`blt_input_map`** is an XOR network. Output bit r is the parity of the
  input bits selected by row r of BLt. It is followed by PIPE_B register
  stages, which reset clears to zero.
* **`companion_loop`** is the state register and its feedback. Stage 0
  receives tap c_0 of the top stage XOR w_0. Stage i receives stage i-1 XOR
  (c_i and the top stage) XOR w_i. It has a synchronous reset to T^-1 INIT.
* **`clt_output_map`** is an XOR network by the rows of T. It is followed by
  PIPE_C register stages, which reset to INIT. With PIPE_C = 1, `crc` comes
  straight from flip-flops.
* **`crc_parallel_top`** wires the three blocks. It also delays the loop's
  reset by PIPE_B clocks: while the BLt pipeline refills after a reset, it
  carries empty words, and the loop must not advance on them. Advancing on a
  zero word is not a no-op, because it multiplies the state by ALt.

At the defaults, coarse synthesis gives 97 flip-flops: 32 in the loop, 32 in
each of the two pipeline stages, and 1 for the reset delay.

## Interface and timing (`crc_parallel_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | rising-edge clock |
| `rst` | in | 1 | synchronous, active high: restart from INIT |
| `din` | in | L | next L message bits; `din[L-1]` is the earliest |
| `crc` | out | K | remainder; bit i is the coefficient of x^i |

| parameter | default | meaning |
|-----------|---------|---------|
| `K` | 32 | generator degree / state bits (2 … 64) |
| `L` | 32 | message bits per clock (1 … 64) |
| `POLY` | 32'h04C11DB7 | g_0 … g_{K-1}; g_K = 1 is implied |
| `INIT` | all ones | initial remainder |
| `PIPE_B` | 1 | register stages after BLt |
| `PIPE_C` | 1 | register stages after T |

After `rst` falls, a word is taken on every rising edge. There is no
data-valid input, so a message must be presented as a contiguous run of
words, and its length must be a multiple of L.

`crc` shows the remainder over all words up to and including the one sampled
PIPE_B + PIPE_C edges earlier. That is 2 clocks at the defaults. On the clock
after a reset, and until the first word has come through, `crc` shows INIT.
An assertion in the top checks the first of these.

The output is the raw remainder: it is neither bit-reflected nor
complemented. For a whole message it therefore equals CRC-32/MPEG-2. For
example, "123456789" gives 0x0376E6E7. For the Ethernet CRC, reflect the
bytes on the way in, and reflect and complement the result.

## Verification

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog. The reference models are bit-serial LFSRs written independently of
`lfsr_ss_pkg`.

* `tb_companion_loop`: an 8-bit loop against an explicit companion-matrix
  product, with a reset in mid-run.
* `tb_blt_input_map`: 32x32. Checks T·w = B_L·u, where both sides are
  computed serially, and checks the one-clock latency.
* `tb_clt_output_map`: 32x32. Checks y = T·xt one clock later, and the reset
  value.
* `tb_crc_parallel_top`: full size, default parameters. Runs zero and
  all-ones runs and 3000 random words, with restarts in mid-stream. Compares
  `crc` on every clock at the 2-clock latency. It counts words, restarts and
  pipeline-refill cycles, and fails if any count is zero.
* `tb_crc_configs` (with helper `crc_config_check`) runs these
  configurations:
  * L = 8: the check string "123456789" → 0x0376E6E7.
  * L = 64, unpipelined.
  * L = 16 with two output stages.
  * K = 8, L = 3, generator 0x1B, where the loop taps differ from g.
  * K = L = 12 with the CRC-12 generator.

To simulate with plain Verilator, for example the full-size test:

    verilator --binary --timing --assert rtl/lfsr_ss_pkg.sv rtl/blt_input_map.sv \
      rtl/companion_loop.sv rtl/clt_output_map.sv rtl/crc_parallel_top.sv \
      tb/tb_crc_parallel_top.sv --top-module tb_crc_parallel_top
    ./obj_dir/Vtb_crc_parallel_top

For `tb_crc_configs`, add `tb/crc_config_check.sv`. Each testbench runs in
well under a second.

## What follows the original description and what does not

These parts follow the original description:

* the state-space model, with A, b and the L-parallel form;
* the transformation x = T xt with ALt = T^-1 A^L T, BLt = T^-1 B_L and
  CLt = T;
* the requirement that ALt be a companion matrix;
* the block structure (input map, loop with a companion-matrix feedback,
  output map);
* the 32-bit CRC-32 arrangement with ports clk, rst, Din and crc;
* MSB-first message order;
* pipelining of the feed-forward paths.

The following are this design's own choices:

* the CRC-32 generator value;
* the all-ones initial value. A listed synchronous-set flip-flop on crc bit 0
  agrees with it;
* the synchronous reset and its delayed release into the loop;
* the Krylov construction of T and its unit-vector seed;
* one pipeline stage on each side;
* having no data-valid input.

The original results also include a small build: 12 state flip-flops, with
12 input and 12 output pins. That matches K = L = 12 with
PIPE_B = PIPE_C = 0, which this RTL supports but does not use as its default.

Not built:

* **Pipelining or look-ahead inside the feedback loop, and retiming around
  high-fan-out nodes** for long generators. These schemes are named, but no
  circuit is given for them. Here the loop stays a single companion ring. The
  top stage drives every tap; for CRC-32 that is 14 taps.
* **BCH encoding.** It needs the code-word framing around the remainder:
  message words passed through, then the parity shifted out. Framing is
  described only for a serial encoder, and no BCH code is specified. The core
  accepts any BCH generator through POLY and K.
