# Partitioned-signature BIST diagnosis for embedded ROMs

A ROM can be tested with a single signature: read every word at speed,
compact everything into a signature register and compare with the expected
value.  That says *whether* the ROM is faulty, not *where*.  This design
keeps the at-speed, tester-light flow but makes the signatures diagnostic.
The test reads the whole ROM many times.  Each pass is a **run**, and each
run lets only a chosen subset of the cells reach the signature register.
The subsets are **partitions** of the rows, of the columns, or of both at
once.  One run gives one signature per channel.  A faulty row corrupts only
the signatures of the partitions that contain it.  Repeating the test with
other partitionings (other **groups**) pins it down: the failing row is the
one whose partition failed in every group.  Columns and single cells are
found the same way.

The partitions come from small counters and LFSRs next to the address
counter.  No component is clocked faster than the address counter, so the
ROM is read at full speed, one word per clock, with no gap between runs.
That is what lets the test catch timing defects.

The RTL is SystemVerilog-2017 in `rtl/`.  Self-checking testbenches are in
`tb/`.

## Array organisation and sizes

The ROM has R = 2^(2n) rows.  Each row holds M = 2^WB words of B bits.  The
bits of a word are **interleaved** along the row: bit b of word w sits in
physical column b*M + w.  The array is square, with M*B = R columns, and the
same n-bit partition and group numbers serve rows and columns.

| parameter | default | meaning |
|---|---|---|
| `N` | 5 | n; R = 1024 rows, 32 partitions per group, 5-bit diffractors (x^5 + x^2 + 1) |
| `WB` | 4 | log2 M; M = 16 words per row |
| (derived) B | 64 | bits per word, 2^(2n)/M |
| (derived) tau | 2 | bits of each word observed at once in column mode, 2^n/M |
| `SIG_W` | 32 | signature register length (x^32 + x^22 + x^2 + x + 1) |

The published scheme fixes the 1024 x 1024 array and the 5-bit
polynomial.  The 16-word x 64-bit split and the signature register are
choices of this implementation.  Any `N` from 2 to 10 and any `WB` from 1 to
`N` elaborate.  `WB = N` gives one word bit per partition per word, so there
are no phase shifters.  The testbenches also run n = 2 and n = 3.

A complete test of G groups takes G * 2^n runs of R*M reads each.  At the
defaults that is G * 32 * 16384 clock cycles.

## Row partitions

Split the 2n-bit row address into a block number k (upper n bits) and an
offset within the block (lower n bits).  Partition p of group g takes one
row from every block:

    row(k) = 2^n * k + (p XOR d_k),   d_0 = 0,   d_k = g * alpha^(k-1)  (k >= 1)

The product g * alpha^(k-1) is taken in GF(2^n).  The group number thus
scrambles which offset is chosen in each block.  Two rows that share a
partition in one group are separated in the next.

`row_selector` computes this without any arithmetic on the row address:

* The **diffractor** is an n-bit Galois LFSR.  One step multiplies its state
  by alpha.  It is loaded with g in block 0 and steps once per block after
  that, so in block k it holds g * alpha^(k-1).
* The **offset** down-counter is reloaded at the first row of every block
  (lower address bits zero, gate N1) with p XOR the diffractor state.
  **AND gates** force the diffractor term to zero in block 0.  The counter
  decrements on every row step.  The row at which it reads zero (gate N2)
  is observed.

Example, n = 2 with diffractor 1 -> 2 -> 3 -> 1, partition 2, group 3: the
offset loads are 2, 1, 3, 0 at rows 0, 4, 8, 12.  The observed rows are 2,
5, 11 and 12.  `row_selector_tb` checks this cycle by cycle.

## Column partitions, phase shifters

A column partition also holds 2^n columns.  One sweep of the M words of a
row must therefore visit tau = 2^n / M columns per word.  Each word is cut
into tau slices of 2^n bits, and each slice has its own 1-of-2^n
`column_decoder`.  For word w, decoder j selects bit

    p XOR (g * alpha^(w + j*M))      (decoder 0 at word 0: p XOR 0)

of its slice.  The column diffractor is loaded with g at word 0 and steps on
every word increment.  Decoder 0 takes it directly, gated to zero at word 0
by AND gates.  Decoder j > 0 takes it through a `phase_shifter`, a fixed XOR
network that multiplies by alpha^(j*M).  So the decoders read consecutive
stretches of one diffractor trajectory.  Over a sweep of M words they cover
the 2^n - 1 non-zero states once, plus the zero state from the AND gates.
Across the 2^n partitions, every column is observed exactly once per group.

With n = 2, M = 2, B = 8 and groups 1 and 2, this rule gives the following
observed columns, listed as (word 0; word 1) for partitions 0 to 3:

    group 1: (0,14; 5,11) (2,12; 7,9) (4,10; 1,15) (6,8; 3,13)
    group 2: (0,10; 7,13) (2,8; 5,15) (4,14; 3,9) (6,12; 1,11)

With n = 3 from state 1, the three phase shifters start the trajectory at 4,
6 and 5.  Both cases are checked in `column_selector_tb` and
`phase_shifter_tb`.

## Test modes and the two channels

`gating_logic` ANDs every data bit with the row decision and with its column
decision.  Either decision can be switched off:

| row_disable | col_disable | cells reaching the signature |
|---|---|---|
| 0 | 1 | whole words of the selected rows (row signatures) |
| 1 | 0 | the selected bit lines of every word (column signatures) |
| 0 | 0 | only where selected rows and columns cross (trellis) |
| 1 | 1 | every cell (plain signature) |

`combined_selector` feeds both selectors from the same partition and group
numbers.  Row and column partitions therefore advance together.  The top has
**two** gating/signature channels, each with its own `row_disable` /
`col_disable` bit.  Row and column signatures are then collected in the same
sweep, which halves the test time compared with two separate tests.

### Trellis mode and the +1 incrementer

A failing row plus a failing column corrupts nearly every row signature and
nearly every column signature.  Trellis mode observes only the crossings, so
many of its signatures stay clean.  A clean signature clears the rows and
columns it covered.

That only works if rows and columns are not permanently paired.  With equal
group numbers in both diffractors, 1024 row-column pairs share a partition
in every group, however many groups are run.  Setting `col_group_plus1` puts
an n-bit +1 incrementer between the group register and the column
diffractor.  That breaks the pairing: only the 32 pairs tied by the two
zero-state AND gates stay together.  `trellis_correlation_tb` measures this
on the full 1024 x 1024 array.  It reports the whole histogram for 3, 4, 5
and 32 groups and checks 1024 and 32.

## Signature register

`mirg` is a 32-stage ring.  Each stage takes the one before it, and the
last stage feeds back into the stages of a primitive polynomial.  Every
input channel (bit line) is XORed into its own pair of stages:

    {c mod 32, (c mod 32 + 1 + c div 32) mod 32}

No two channels share a pair, so an error on one bit line leaves a
signature that differs from an error on any other.  `mirg_tb` checks this
for all 64 channels.  The register restarts from zero on the first read of
each run, in the same cycle as that read.  No idle cycle is needed.

This is a ring-shaped internal-XOR LFSR, the simplest compactor with this
structure.  It is not a fan-out-optimised ring generator.  The length and
polynomial were chosen for this implementation.

## Controller and top-level timing

`bist_controller` holds the counter chain {group, partition, row, word}.
The word address changes first (fast-column order).  With `fast_row` the
chain is {group, partition, word, row} instead, with the row address
changing first.  The selectors are told, through `row_step` and
`word_step`, when their own address changes, so they work in either order.
`group_first` and `group_count` choose the groups.  Groups count modulo 2^n,
and group 0 is allowed: it gives the unscrambled partitioning.

`rom_diag_top` ports:

* `start` begins a test.  `fast_row`, `col_group_plus1`, `row_disable[1:0]`,
  `col_disable[1:0]`, `group_first` and `group_count` are sampled with it.
* `rom_en` and `rom_addr = {row, word}` drive a ROM with synchronous read.
  `rom_data` is expected one clock later.  The selector decisions go through
  one register stage to meet it.
* `sig_valid` pulses once per run, two cycles after the run's last read.
  `signature[0]`, `signature[1]`, `sig_partition` and `sig_group` are valid
  in that cycle only, so the tester must capture them then.
* `done` pulses together with the last run's `sig_valid`.  `done` rises on
  the (`group_count * 2^n * R * M + 1`)-th clock edge after the edge that
  samples `start`.

Choices of this implementation, not of the published scheme: the
start/done handshake, the group range inputs, the parallel unload port, the
one-cycle ROM latency, the two channels with independent modes, and sampling
the modes at start.

## Diagnosis

The on-chip logic only produces signatures.  Locating faults is done off
chip.  The end-to-end bench shows a minimal version.  It compares each
unloaded signature with the fault-free one.  A row (or column) is a
**suspect** if its partition failed in every group.  With three groups this
finds the following, each as the single suspect:

* a stuck-at row;
* a stuck-at column, read in fast-row order with the incrementer on;
* both coordinates of a single inverted cell, also on the full-size array.

It also checks that with a row-plus-column failure some trellis signatures
stay error-free.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog.  The models in `tb/tb_ref_pkg.sv` are written independently of the
RTL.  Field products are computed by carry-less multiplication and
reduction, not by stepping an LFSR.  Partitions are evaluated straight from
the formulas above.

| testbench | what it covers |
|---|---|
| `diffractor_tb` | trajectories g*alpha^k for all g (n = 5), period 31, n = 2 example |
| `phase_shifter_tb` | n = 3 example (4, 6, 5), all inputs at n = 3 and n = 5 |
| `column_decoder_tb` | exhaustive |
| `row_selector_tb` | worked example with cycle numbers; all p, g at n = 2; n = 5 in both address orders |
| `column_selector_tb` | the 16-line table at n = 2; n = 3 and n = 5 against the rule; each column once per group |
| `combined_selector_tb` | full-size sweeps with and without +1; pairing counts 1024 / 32 over 3 groups |
| `gating_logic_tb` | all four modes, random data |
| `mirg_tb` | against a reference model; distinct single-channel signatures |
| `bist_controller_tb` | address order, steps, run framing, no-gap cycle count, group wrap |
| `rom_diag_top_tb` | n = 3, M = 2 (four decoders): every signature exact; fault diagnosis; every mechanism counted |
| (same bench) | also run on 16 rows of two 8-bit words (n = 2) |
| `rom_diag_full_tb` | default size, 3 groups (1.5 M reads), cell fault located |
| `trellis_correlation_tb` | the correlation experiment, all 32 groups |

`tb/rom_model.sv` is a behavioural ROM with the interleaved layout, a
pseudo-random fill and injectable faults: a stuck row, a stuck column, and
an inverted cell.

To run one, e.g. the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb --top-module rom_diag_top_tb \
        rtl/rom_diag_pkg.sv tb/tb_ref_pkg.sv tb/rom_diag_top_tb.sv
    ./obj_dir/Vrom_diag_top_tb

The package files must come first.  Verilator finds the other modules
through `-I`.  The full-size test and the correlation test each take a few
seconds.

## Limits

* The ROM itself is not part of the RTL.  Its ports are brought out of
  the top.
* The off-chip diagnostic algorithm is not part of the RTL.  The
  intersection rule in the bench is a minimal stand-in for it.
* Two rules were inferred from worked examples rather than stated as
  rules:
  * the phase shift of decoder j is j*M;
  * the column diffractor's current state is used at each word, while the
    row selector uses the state of the previous block.

  Both reproduce every example exactly.
* The signature register is a plain ring with XOR taps, not an optimised
  ring generator.  Its size was chosen here.
* Signatures are unloaded in parallel, not through a scan path.
