# Block-based non-separable 2D FIR filter with BZ-FMD multipliers and MCLA adders

This is a streaming 2D FIR filter for images. It computes

    y(m, n) = sum_{i=0}^{N-1} sum_{j=0}^{N-1} h(i, j) * x(m-i, n-j)

for an M x M image that arrives in raster order. The image comes in blocks of L
neighbouring samples of one row. The main idea is memory reuse in a fully
direct-form structure. Registers sit only on the input path. The N-1 previous image
rows are kept once, in shift registers, and are read again for every block. The L
outputs of a block share most of their input samples, so a block of L outputs needs
only N+L-1 distinct samples per row instead of L*N.

The arithmetic uses two special cells:

- **BZ-FMD multiplier.** A sequential shift-add multiplier ("bypass zero, feed
  multiplicand directly"). It skips the addition for '0' multiplier bits and shifts
  only half of the partial product.
- **MCLA adder.** A parallel-prefix carry look-ahead adder built on a *modified
  carry* (a Ling-type carry).

The architecture follows the one published as "Area-Delay-Power Efficient VLSI
Architecture 2D FIR Filter using Modified Multipliers and Adders". Its main
configuration is the default here: M = 512, L = 4, N = 8, 8-bit samples and
coefficients, and 16-bit intermediate words. The sections below say which details
come from that architecture and which are choices made for this RTL.

## Structure

```
              x_in (L samples)                                    h (N x N)
                 |                                                   |
   memory_module |                                   arith_module    |
   +-------------v--------------------------+   +--------------------v-----------+
   | tap0 ------------------------> IRU 0 --+-->| FU 0 (L x IPC, row h0) --+      |
   |   |                                    |   |                          |      |
   |   +-> SRB 1 -> skew -> tap1 --> IRU 1 -+-->| FU 1 (row h1) -----------+ PAU -+--> y (L outputs)
   |                         |              |   |   ...                    |      |
   |                         +-> SRB 2 -> ...   | FU N-1 (row hN-1) -------+      |
   +----------------------------------------+   +--------------------------------+
```

| module | role | default size |
|---|---|---|
| `fir2d_top` | handshake, output-valid tracking, wiring | M=512, L=4, N=8, B=8, DW=16 |
| `memory_module` | SRB chain, skew registers, IRUs, block position counters, border masking | 7 SRBs, 8 IRUs |
| `srb` | shift register block: L shift registers of P = M/L words | 4 x 128 x 8 bit |
| `iru` | input register unit: N-1 history registers that form L overlapping N-point vectors | 7 x 8 bit |
| `arith_module` | N functional units and the pipeline adder unit | 256 multipliers, 252 MCLAs |
| `fu` | functional unit: L inner product cells sharing one coefficient row | 4 IPCs |
| `ipc` | inner product cell: N multipliers and an adder tree | 8 multipliers, 7 MCLAs |
| `adder_tree` | balanced tree of K-1 MCLAs | K=8, 16 bit |
| `pau` | pipeline adder unit: N-1 registers and N-1 MCLAs per output lane | 4 lanes |
| `bzfmd_mult` | BZ-FMD sequential multiplier | 8 x 8 bit |
| `mcla` | modified carry look-ahead parallel-prefix adder | 8 or 16 bit |
| `fir2d_pkg` | default sizes | |

At the defaults there are 256 multipliers and 252 MCLAs, and the row memory holds
28 x 128 x 8 = 28672 bits. These are the counts the architecture is built around
(L*N^2 multipliers, L*(N^2-1) adders).

## Timing: the block step

One *block step* takes in one block and puts out one block. The multipliers are
sequential, so a step lasts B+1 = 9 clock cycles: one start cycle and one cycle per
multiplier bit.

- A block is accepted when `in_valid && in_ready`. At that edge, every multiplier
  captures its sample from the input vectors, and the row memory and the IRU
  registers advance.
- `in_ready` stays low while the multipliers work.
- After B cycles the multipliers signal `done`. In that cycle `out_valid` is high
  and `y` is valid. The PAU registers advance at the end of the cycle.
- A new block may be accepted in that same cycle.

The published architecture describes one block per clock cycle, with a whole
multiplication counted inside one clock period. With the sequential BZ-FMD
multiplier as described, the rate is one block per B+1 cycles. A full 512 x 512
frame takes 65536 steps (589824 cycles).

Inside a step, the longest register-to-register path starts at the product
registers. It runs through the adder tree (log2 N MCLA levels) and one PAU MCLA,
and ends at the PAU registers. Inside the multipliers, one cycle contains one
8-bit MCLA and a multiplexer.

Outputs come out in input order. The output of a step belongs to the block accepted
N-1 steps earlier. To flush the end of an image, feed N-1 further blocks; the start
of the next frame works.

## The row memory and the row skew

Each SRB delays the block stream by P = M/L steps, which is exactly one image row.
SRBs are chained, so chain position i supplies row m-i.

The pipeline adder unit is registered at every stage (see below). It adds the
contribution of row m-i exactly i steps after the contribution of row m. To line
the rows up, a one-block *skew register* follows every SRB. Tap i is therefore the
input delayed by i*(P+1) steps, not i*P steps. At step t:

- IRU i works on row m-i of the output block that entered i steps earlier.
- The column of that block is i block positions to the left of the current input.

The skew registers cost (N-1)*L*B = 224 flip-flops. They are this design's
addition; the published description leaves the alignment open.

### IRU window

An IRU holds the N-1 samples just before the current block, newest first:
D1 = x(kL-1), ..., D7 = x(kL-7). With L = 4 and N = 8, D1..D4 load the current
block and D5..D7 load the old D1..D3. Output vector l, tap j is x(kL+l-j), taken
from the block or from the registers. The input order of the block (`x_in[l]` =
x(m, kL+l), oldest first) is reversed inside the unit.

### Borders

The filter computes a zero-padded convolution:

- Samples left of column 0 read as zero. The IRU decides this from the block
  column index.
- Rows above row 0 of the output's frame read as zero. This includes the rows of
  the previous frame.

Counters in `memory_module` track the column and row of the incoming block. The
stream must start at row 0, column 0 after reset, and frames must follow each other
back to back. The SRB storage has no reset, because masking hides anything that
was not written. The border handling is this design's choice.

## Arithmetic

### Functional units and inner product cells

FU i applies coefficient row h(i, .) to the L vectors of IRU i. Each of its L IPCs
multiplies N samples by N coefficients in N BZ-FMD multipliers and sums the
products in an adder tree of N-1 MCLAs. FU outputs are vectors `V_i` of L words.

### BZ-FMD multiplier (`bzfmd_mult`)

The multiplier has these parts:

- a multiplier register (not shifted);
- a binary counter that selects one multiplier bit per cycle;
- a PW-bit MCLA that adds the multiplicand to the feeder register;
- a multiplexer;
- a feeder register;
- a product register.

In each cycle the multiplexer passes the sum for a '1' bit and the unchanged feeder
value for a '0' bit, so zero bits bypass the adder. Bit 0 of the multiplexer
output is a finished product bit. It is written in place into the lower half of the
product register, so the lower half never shifts. The remaining bits go back to the
feeder register, which is the only register that shifts. After MW cycles the
feeder holds the upper half of the product.

In the filter, the coefficient is the multiplicand. It is fed to the adder directly
and must stay constant. The sample is the multiplier operand and is captured at
start. That assignment is this design's choice.

### MCLA adder (`mcla`)

Bit i has three signals: g_i = a_i & b_i, p_i = a_i | b_i and d_i = a_i ^ b_i. The
adder does not compute ordinary carries. It computes modified carries:

    M_i = g_i + g_{i-1} + p_{i-1} g_{i-2} + ... + p_{i-1}...p_1 g_0
    c_i = M_i & p_i                (true carry out of bit i)
    S_i = d_i ^ (p_{i-1} & M_{i-1})

The prefix works as follows:

1. It starts from two-bit pairs (G*_i, P*_{i-1}) = (g_i | g_{i-1}, p_{i-1} & p_{i-2}).
2. Even and odd bit positions form two separate chains, combined with
   (G, P) o (G', P') = (G | P & G', P & P').
3. The lower half of the word is resolved directly.
4. In parallel, the upper half builds local groups down to the middle. Each local
   group is joined with the lower half's modified carry at bit W/2-2 or W/2-1. For
   example, for 16 bits, M_8 = G_{8:7} + P_{7:6} G_{6:-1}.

Prefix cells are placed in a Kogge-Stone pattern inside each half. That placement
is this design's choice. The published drawings fix the equations and the split
into halves, not the exact placement. The adder has no carry input. W must be even
and at least 4. The filter uses W = 8 in the multipliers and W = 16 elsewhere.

### Pipeline adder unit (`pau`)

Each of the L lanes is a chain:

    d_0 <= V_0
    d_i <= d_{i-1} + V_i    (i = 1 .. N-2)
    y    = d_{N-2} + V_{N-1}

The last sum is not registered, so `y` is valid in the `done` cycle. The row skew
described above supplies each `V_i` at the right step.

## Number format

All data is unsigned:

- samples and coefficients are B = 8 bits;
- products are 16 bits;
- every sum is DW = 16 bits.

MCLA carry-outs are dropped, so outputs are the true convolution **modulo 2^16**. A
filter whose sum of coefficients times 255 stays below 65536 never wraps. For
larger coefficient sets, raise `DW`; it must stay even. The 16-bit intermediate
width is the published one. The wrap-around is a consequence of that width, not a
feature.

## Interface (`fir2d_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid`, `in_ready` | in / out | 1 | block handshake; `in_ready` is low while the multipliers work |
| `x_in` | in | L x B | `x_in[l]` = x(m, kL+l) |
| `h` | in | N x N x B | `h[i][j]` = h(i, j); keep stable while `in_ready` is low |
| `out_valid` | out | 1 | `y` holds the block accepted N-1 steps earlier |
| `y` | out | L x DW | `y[l]` = y(m, kL+l) mod 2^DW |

Parameters: `M` (image size, a multiple of L, with N-1 <= M/L), `L`, `N` (>= 2),
`B`, `DW`. Defaults come from `fir2d_pkg`.

## Departures from the published architecture

- **Rate.** One block per B+1 = 9 cycles, not one per cycle, because the BZ-FMD
  multiplier is sequential.
- **Row skew.** One-block skew registers after each SRB align the rows with the
  registered PAU stages.
- **Borders.** Zero padding at the left and top image borders uses block position
  counters. The stream must start at row 0, column 0.
- **Handshake.** The `in_valid`/`in_ready`/`out_valid` handshake and the
  start/busy/done signals of the multipliers are added.
- **Number format.** All operands are unsigned, and every sum wraps modulo 2^DW.
- **Multiplier operands.** The coefficient is the multiplicand and the sample is
  the multiplier operand.
- **MCLA prefix.** Prefix cells are placed in a Kogge-Stone pattern inside each
  half, and the adder has no carry input.
- **IRU order.** History registers run newest first (D1 = the sample just before
  the block).

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module with
an independent reference and prints `TB_RESULT checks=... failures=...`.

| testbench | what it checks |
|---|---|
| `tb_mcla` | 8-bit adder exhaustively, 16-bit with corner and random operands |
| `tb_bzfmd_mult` | products, latency of 9 cycles, product held while idle |
| `tb_adder_tree`, `tb_ipc`, `tb_fu` | sums and inner products modulo 2^16, latency |
| `tb_iru`, `tb_srb`, `tb_pau` | windows with border masking, 128-step delay, skewed pipeline sum |
| `tb_memory_module` | every input-vector sample over 2.5 frames of a 32 x 32 image |
| `tb_arith_module` | outputs of 8 FUs plus PAU against reference inner products |
| `tb_fir2d_top` | two 32 x 32 frames with random stalls. It counts input stalls, idle cycles, left and top padding, frame-to-frame change and modulo wrap, and requires each to occur. |
| `tb_fir2d_full` | all defaults: one 512 x 512 frame, all 262144 outputs, and the frame time of 65536 x 9 cycles (about 20 s) |
| `tb_fir2d_configs` | 512 x 512 frames with N=4/L=2, N=4/L=4 and N=8/L=2 (uses the harness `fir2d_cfg_run`, about 45 s) |

To run one testbench with Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fir2d_pkg.sv tb/tb_fir2d_full.sv --top-module tb_fir2d_full -o sim
./obj_dir/sim
```

No gate-level timing, power or area figures come with this RTL. The architecture's
savings in switching activity (bypassed additions, half-width shifting) are
structural and are not measured here.
