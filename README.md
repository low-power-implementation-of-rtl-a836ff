# Single-multiplier linear phase FIR filter with ordered coefficients

A DSP that computes an FIR filter with one multiplier spends much of its
power in that multiplier. Its switching depends on how much the multiplier's
inputs change from one product to the next. If consecutive products use
coefficients that differ in only a few bits, the multiplier switches less.
Ideally equal coefficients come one after another and the coefficient input
does not change at all.

In the usual sequential FIR loop the coefficients have to be processed in
tap order. This design removes that restriction. The filter is computed in
transpose direct form (TDF). Each partial sum goes into a small
*Pre-Calculated Value Memory* (PCVM), and each coefficient is stored with the
PCVM address it updates. The coefficients can then be multiplied in any
order, for example sorted by value. For a linear phase filter, whose
coefficients are symmetric, a sort puts each pair of equal coefficients next
to each other. The plain unfolded TDF loop then gets most of the saving that
a folded structure (one multiplication per symmetric pair) would give, with
no hardware for folding. The RTL supports folded coefficient words too, so
the two can be compared.

The scheme was published by A. T. Erdogan and T. Arslan (Cardiff University)
in "Low Power Implementation of Linear Phase FIR Filters for Single
Multiplier CMOS Based DSPs". This RTL implements the multiplication scheme
and the datapath described there. The cycle timing, the interfaces, the
layout of the coefficient word and the folded word format are this design's
own choices. They are marked below.

## The PCVM scheme

Take a TDF filter with N taps. With state values s(k):

    y(n)  = h(0) x(n) + s1(n-1)
    sk(n) = h(k) x(n) + s(k+1)(n-1)          0 < k < N-1
    s(N-1)(n) = h(N-1) x(n)

Tap k reads the *previous* sample's s(k+1) and writes the *current* s(k). If
the taps are processed in order 0, 1, …, N-1, every read happens before the
value is overwritten. In any other order, tap k may run before tap k-1. In
that case tap k-1 would read the new s(k) instead of the old one.

The scheme fixes this with one flag per coefficient. Every coefficient word
holds:

- `h`: the coefficient;
- `PCVMA`: the PCVM address of the value to add to the product;
- `SF`: the shift flag.

One step of the processor does:

    PCV = x(n) * h + [PCVMA]
    if SF:  [PCVMA-2] <= [PCVMA-1];  [PCVMA-1] <= PCV
    else:   [PCVMA-1] <= PCV

SF is set for tap k when tap k is processed before tap k-1. In that case the
state s(k) gets two cells. The shift moves the old value into the lower cell
before the new value is written into the upper one. Tap k-1 reads the lower
cell later in the same sample, so it still sees the old value. After all N
words of a sample, PCVM cell 0 holds y(n).

### Assigning the addresses

Let pos(k) be the position within a sample at which tap k is processed. Then:

    SF(0)    = 0
    SF(k)    = 1 if pos(k) < pos(k-1), else 0        (k >= 1)
    PCVMA(0) = 1
    PCVMA(k) = PCVMA(k-1) + SF(k) + 1

Tap k writes cell `PCVMA(k)-1`. Tap k-1 reads cell `PCVMA(k-1)`:

- with SF(k) = 0, that is the same cell;
- with SF(k) = 1, it is the cell below, which receives the shifted old value.

The last tap reads a cell that is never written. That cell stays 0 and
supplies the zero term of s(N-1). The largest address is at most 2N-1, so the
PCVM has `2*N_TAPS` cells.

### Worked example

This example comes from the source. The 4-tap filter has
h = {-9, 23, 40, -15}, and the inputs are x = 3, -7, -4, 8. The coefficients
are processed in the order h1, h0, h3, h2. That is also the order that the
Hamming-distance sort below gives for these values.

| tap | processed | SF | PCVMA | writes | shift |
|-----|-----------|----|-------|--------|-------|
| h1 = 23  | 1st | 1 | 3 | cell 2 | 2 → 1 |
| h0 = -9  | 2nd | 0 | 1 | cell 0 | – |
| h3 = -15 | 3rd | 1 | 6 | cell 5 | 5 → 4 |
| h2 = 40  | 4th | 0 | 4 | cell 3 | – |

Cell 6 is the zero cell. The outputs are y = -27, 132, -5, -489. After the
fourth sample the PCVM holds {-489, -417, 129, 380, 60, -120, 0}. The
`tb_lpfir_dsp` testbench checks every one of these numbers.

### Folded and anti-symmetric coefficient words

In a linear phase filter h(k) = ±h(N-1-k). The folded TDF structure
multiplies once per symmetric pair and uses the product twice. This design
encodes that with an optional second update in the coefficient word:

| field | width | meaning |
|-------|-------|---------|
| `h` | COEF_W | coefficient, signed |
| `pcvma` | AW | PCVMA of the first update (tap k) |
| `sf` | 1 | SF of the first update |
| `pair` | 1 | the word also updates the mirror tap N-1-k |
| `neg2` | 1 | the second update subtracts the product (anti-symmetric filter) |
| `pcvma2` | AW | PCVMA of the second update |
| `sf2` | 1 | SF of the second update |

The fields are packed in this order, MSB first (`rtl/lpfir_cw.svh`). The
width is `COEF_W + 2*AW + 4`, which is 28 bits at the defaults. A pair word
takes two clocks. The multiplier inputs stay the same during the second
clock, so only the adder and the PCVM work. A folded filter therefore needs
ceil(N/2) words and ceil(N/2) multiplications, but still N PCVM updates.
Unfolded words just leave `pair` at 0. The addresses are computed as above,
with pos() counting a pair's two taps one after the other.

The source names the folded structure and says that it halves the
multiplications and the coefficient memory. It does not give a word format
for it, so the `pair`/`neg2`/`pcvma2`/`sf2` extension is this design's own.

## Preparing the coefficient memory

Ordering and address assignment happen before filtering. They are not done
in hardware. Two orderings are evaluated:

- **sort1**: ascending coefficient value.
- **sort2**: neighbours differ in few bits. The testbench version builds a
  nearest-neighbour chain by Hamming distance from every possible start and
  keeps the chain with the smallest total distance.

The source only says that sort2 reduces the Hamming distance between
adjacent coefficients. The exact procedure here is a choice, picked because
it reproduces the order of the worked example.

`tb/lpfir_tb_pkg.sv` has reference functions for this:

- `make_order` builds an ordering;
- `build_words` / `build_words_ord` apply the address rule;
- `rand_lp_coefs` generates random symmetric or anti-symmetric coefficient
  sets.

Use them as the model for your own coefficient loader.

## Modules

| module | role |
|--------|------|
| `lpfir_dsp` | top: wires the blocks below, data register, first/second update selection |
| `lpfir_ctrl` | sequencer: IDLE → RUN (one update per clock) → OUT |
| `coef_mem` | coefficient words; synchronous write, asynchronous read |
| `pcv_mem` | PCVM register array with the relative write and shift; cell 0 is y(n) |
| `mac_unit` | PCV = [PCVMA] ± x·h |
| `array_mult` | two's complement array multiplier, one adder row per multiplier bit |
| `lpfir_pkg` | default sizes, controller state type, PCVM depth function |
| `lpfir_cw.svh` | coefficient word struct macro |

## Interface and timing of `lpfir_dsp`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset that also zeroes the PCVM |
| `cw_we`, `cw_waddr`, `cw_wdata` | in | 1, log2 N_TAPS, CW_W | load one coefficient word |
| `n_words` | in | log2(N_TAPS+1) | words used per sample (1..N_TAPS), held while running |
| `pcv_clr` | in | 1 | zero the PCVM; use it while idle, before a new filter |
| `in_valid`, `in_ready`, `x_in` | in/out/in | 1, 1, DATA_W | sample handshake |
| `out_valid`, `y_out` | out | 1, PCV_W | y(n), valid for one clock |
| `busy` | out | 1 | a sample is being processed |

Let S be the number of updates per sample: `n_words` plus one for each pair
word.

- A sample accepted in clock t produces `out_valid` in clock t+S+1.
- `in_ready` is high in the idle state and in the output clock. Samples can
  therefore stream at one every S+1 clocks.
- During a run, `in_ready` is low and the sample waits.
- The PCVM read is asynchronous, so each read-add-write finishes within one
  clock. A step can therefore read a cell that the step before it wrote.

To run a filter:

1. Load its words.
2. Set `n_words`.
3. Pulse `pcv_clr`.
4. Stream the samples.

## Parameters

| parameter | default | notes |
|-----------|---------|-------|
| `DATA_W` | 8 | data word length; 8, 16 and 24 bits were evaluated with the scheme |
| `COEF_W` | 8 | coefficient word length |
| `N_TAPS` | 128 | maximum taps (coefficient memory depth); 32, 64 and 128 were evaluated |
| `PCVM_DEPTH` | 2·N_TAPS | derived |
| `AW` | log2 PCVM_DEPTH | PCVMA width, derived |
| `PCV_W` | DATA_W+COEF_W+log2 N_TAPS | accumulation width, cannot overflow |
| `CW_W` | COEF_W+2·AW+4 | coefficient word width, derived |

The defaults, an 8 × 8 multiplier with up to 128 taps, are the configuration
where the scheme's largest saving was reported. For the 16- and 24-bit filters,
override `DATA_W` and `COEF_W`. Shorter filters need no rebuild: set
`n_words`.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`. All
of them pass.

| testbench | what it checks |
|-----------|----------------|
| `tb_array_mult` | all 65536 8×8 operand pairs; random and extreme 24×24 and 16×8 operands |
| `tb_mac_unit` | random add and subtract against integer arithmetic |
| `tb_coef_mem` | write, read-back, single-word overwrite |
| `tb_pcv_mem` | random plain and shift writes and clears against a model of the write rule |
| `tb_lpfir_ctrl` | step order, two-clock pair words, S+1 latency, refusal while running, sample accepted in the output clock |
| `tb_lpfir_dsp` | worked example (words, outputs, final PCVM); random 1–8 tap filters: general, symmetric, anti-symmetric; each ordering; unfolded and folded; gaps and streaming |
| `tb_lpfir_full` | default build; 32/64/128-tap symmetric 8-bit filters; each ordering; unfolded and folded; 1000 samples each |
| `tb_lpfir_wordlen` | 16- and 24-bit builds, 32/64/128 taps, each ordering, unfolded and folded |

The top-level testbenches work as follows:

- Outputs are compared with a direct convolution.
- Every latency is checked.
- They count each mechanism: shift write, plain write, pair, subtraction,
  back-pressure, back-to-back sample, idle gap, clear. If any mechanism never
  occurs, that counts as a failure.

To run one, for example the full-size test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/lpfir_pkg.sv tb/lpfir_tb_pkg.sv tb/tb_lpfir_full.sv \
        --top-module tb_lpfir_full -o sim
    ./obj_dir/sim

`tb_lpfir_full` takes about a second of simulation. The unit testbenches run
the same way, with their own top module named.

### What the orderings do to the multiplier input

`tb_lpfir_full` reports two counts per sample:

- the bit toggles on the multiplier's coefficient input, computed from the
  word sequence;
- the bit toggles on both multiplier inputs, measured inside the processor
  during runs.

The filters are random symmetric 8-bit filters, not designed low-pass or
band-pass filters, so the exact numbers depend on the seed. Each cell gives
coefficient input / both inputs measured:

| N | structure | norm | sort1 | sort2 |
|---|-----------|------|-------|-------|
| 32 | unfolded | 126 / 130 | 47 / 58 | 32 / 40 |
| 32 | folded | 63 / 70 | 47 / 58 | 32 / 40 |
| 64 | unfolded | 254 / 257 | 96 / 103 | 54 / 61 |
| 64 | folded | 127 / 135 | 96 / 103 | 54 / 61 |
| 128 | unfolded | 506 / 510 | 136 / 146 | 80 / 90 |
| 128 | folded | 253 / 262 | 136 / 146 | 80 / 90 |

In original order, the folded words toggle half as much as the unfolded
ones. Once the coefficients are sorted, the two structures are the same.
This matches the claim of the scheme: after sorting, the unfolded filter
gets the benefit of symmetry without a folded structure. The testbench also
checks that the second clock of a pair word leaves the multiplier inputs
unchanged. These are input toggle counts, not power. Gate-level switched
capacitance needs a layout and is outside this RTL.

## Departures and limits

- **Timing and interfaces are this design's.** The source gives the
  algorithm, not a clock-level schedule. Here there is one update per clock,
  asynchronous memory reads, a valid/ready input and a one-clock output
  strobe.
- **Memories are register arrays.** Each shift step writes two PCVM cells in
  the same clock, which needs a register array or a two-write-port memory.
  The coefficient memory has an asynchronous read. To map onto synchronous
  SRAMs, pipeline the read and add forwarding for a cell written in the
  previous step.
- **The folded word format and the anti-symmetric subtraction are
  extensions** (see above).
- **The PCVM is cleared by reset or `pcv_clr`.** Starting a new filter
  without clearing carries the old state into the first N-1 outputs.
- **No overhead hardware is modelled beyond what is needed.** Compared with
  plain TDF, the scheme costs the wider coefficient words, the extra PCVM
  cells and the address logic. These are all present. Their share of the
  power was only estimated in the source and is not modelled here.
- **Coefficient ordering and address assignment are software.** Reference
  code is in the testbench package.
- **Assertions:**
  - `pcv_mem` asserts that a write never addresses below cell 0.
  - `lpfir_ctrl` asserts that `n_words` is in range and stays stable during
    a run.
