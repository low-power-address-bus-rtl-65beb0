# Low-power address bus codes: T0 DAT, T0_BI_1/S/RW and Stride-Table

Driving an off-chip address bus costs energy on every line that toggles,
roughly ½·C·V² per transition, and the bus lines' capacitance is far larger
than that of on-chip nodes. The codes in this repository cut the number of
toggles by letting the memory side *compute* most addresses instead of
receiving them. The encoder and the decoder keep identical copies of a small
amount of history: the last address, learned strides, and tables of branch
targets or per-instruction strides. When the decoder can predict the next
address, the encoder leaves the address lines frozen and raises one extra
control line. Only addresses that cannot be predicted are driven on the bus.

The RTL implements the three schemes proposed in the thesis "低耗電的位址匯流排編碼方法
(Low-Power Address BUS Encoding)". Each targets one kind of address bus:

| bus | architecture | code | extra lines |
|---|---|---|---|
| instruction address | separate I and D buses | **T0 DAT**: T0 plus a Discontinuous Address Table of taken branches | INC-DAT |
| data address | separate I and D buses | **T0_BI_1/S/RW**: T0 and Bus-Invert on one line, learned stride, separate read/write history | INCV (plus the usual Read/Write) |
| mixed instruction/data address | shared bus | **I/D selector + T0 DAT + Stride-Table**: per-stream coding, with a stride per load/store instruction | INC-DAT/ST, I/D selector |

`addr_bus_codec_top` places the three links side by side. Each link is
encoder → bus → decoder. The CPU and the memories are not part of the design:
their addresses enter and leave through ports.

## Shared idea: one control line, two meanings

T0 (an earlier code) adds an INC line. INC high means "this address is the
previous one plus the stride, and the bus is unchanged". Every scheme here
loads that line with a second meaning. The decoder works out which meaning
applies from state that both sides share:

* **T0 DAT**: is the previous address a *source* in the DAT?
* **T0_BI_1**: did the bus value change? A frozen bus means increment. A
  changed bus means the inverted address was sent.
* **Mixed bus**: the I/D selector line picks the instruction or the data
  interpretation.

A second meaning works only while the encoder never sends a pattern the
decoder would read the other way. Each scheme has one such corner case. The
encoder sends the address directly when it hits that case (see below). Most of
the subtle behaviour in the RTL sits in these corner cases.

## T0 DAT (instruction address bus)

Files: `t0dat_encoder.sv`, `t0dat_decoder.sv`, `dat_table.sv`.

Let L be the previous instruction address. For a new address A:

1. If (L, A) is a pair in the DAT, the branch from L to A was seen before.
   INC-DAT goes high and the bus stays frozen.
2. Otherwise, if A = L + 4 and L is **not** a source in the DAT, INC-DAT goes
   high and the bus stays frozen.
3. Otherwise INC-DAT goes low and A is driven on the bus. If A ≠ L + 4, the
   pair (L, A) is recorded in the DAT.

The decoder reverses this. INC-DAT high with L in its DAT gives the recorded
target. INC-DAT high otherwise gives L + 4. INC-DAT low gives the bus value,
and the decoder records the pair just as the encoder did.

**Loop exit.** Take a loop whose last instruction at 0x104 branches back to
0x000. Once (0x104, 0x000) is in the DAT, falling through from 0x104 to 0x108
cannot use INC-DAT, because the decoder would read it as the jump to 0x000.
So 0x108 is driven directly. This costs one bus transfer per loop exit.

**DAT bookkeeping.** This part is this implementation's choice:

* A source address is stored only once. A new target for a known source
  replaces the old target, so a lookup by source is never ambiguous.
* Only discontinuous pairs are recorded. A consecutive address that was sent
  directly (the loop-exit case) leaves the DAT alone.
* The first address after reset records nothing, because its "previous
  address" is only the reset value of the bus.
* When the table is full, new pairs overwrite entries in round-robin order.

Encoder and decoder apply identical rules, so their tables stay equal.

Worked check, from the testbench, with a 16-bit bus and two loop iterations
through 0000–0008 → 0100–0104 → 0000: INC-DAT is high for every address
except the first 0100, the first 0000 and the final 0108. Bus plus INC-DAT
make 10 transitions.

## T0_BI_1/S/RW (data address bus)

Files: `t0bi1srw_encoder.sv`, `t0bi1srw_decoder.sv`, `vstride_unit.sv`.

Data addresses come in sequential runs mixed with scattered accesses. The
code therefore combines three ideas.

**One line for T0 and Bus-Invert (T0_BI_1).** Let B be the current bus value
and P the predicted address. For an address A:

* A = P: INCV goes high and the bus stays frozen.
* More than AW/2 lines would toggle (popcount(A xor B) > AW/2) **and**
  ~A ≠ B: INCV goes high and ~A is driven on the bus.
* Otherwise: INCV goes low and A is driven on the bus.

The decoder keeps the previous bus value. With INCV high, an unchanged bus
gives P and a changed bus gives ~bus. The ~A ≠ B test covers the corner case:
if ~A equals B, the inverted transfer would look like a frozen bus. One way
this happens is when the same address is sent twice in a row and the first
copy went out inverted. The address is then driven plainly, at the cost of a
full-width toggle.

**Variable stride (S).** The stride is learned, not fixed at 4. Each
`vstride_unit` holds the last address, the *chosen* stride (P = last +
chosen), a *candidate* stride and a run counter. If a transfer's stride
differs from the chosen one, it becomes the candidate or extends the
candidate's run. Once the candidate has been seen ENDURANCE times in a row,
it becomes the chosen stride.

* ENDURANCE = 1 (the default, called "VS1" in the thesis) adopts every new
  stride at once.
* ENDURANCE = 0 keeps the initial stride forever. This is the fixed-stride
  code FS4.

**Separate read and write streams (RW).** The Read/Write line already
exists on every memory bus, so both sides keep one `vstride_unit` for reads
and one for writes. The line selects between them. A copy loop that reads one
array and writes another keeps both runs predictable, even though the
accesses alternate on the bus.

Worked check, on a 16-bit bus with initial stride 0: the sequence 0004, 0008,
7FF0, 7FF2, 7FF4 goes out as direct 0004, increment, inverted 800F, inverted
800D, increment. That is 7 transitions on bus plus INCV.

## I/D selector with T0 DAT and Stride-Table (mixed bus)

Files: `idst_encoder.sv`, `idst_decoder.sv`, `stride_table.sv`,
`dat_table.sv`.

On a shared bus, instruction and data addresses interleave and break each
other's runs. An extra line, the I/D selector (1 = instruction), sends each
address to its own predictor:

* **Instructions** use T0 DAT exactly as above. The previous address is the
  last *instruction* address L, not the last bus value.
* **Data** uses the Stride-Table. A data access comes from a load/store
  instruction, and the last instruction address sent before it identifies
  that instruction well enough. Each entry is (index = L, applied stride,
  last data address). If an entry for L exists and A = last + stride, the bus
  stays frozen with the shared control line high. In every case the entry
  then learns stride = A − last and last = A. If no entry exists, a new one
  (L, 4, A) is inserted, with round-robin replacement when the table is full.

Worked check, from the testbench: a 15-instruction loop (addresses 20..60)
has loads/stores after instructions 20, 28, 32 and 40. Their data addresses
step by +4, +4, −4 and −2. The addresses driven on the bus are:

| iteration | driven on the bus | everything else |
|---|---|---|
| 1 | 20 and all four data addresses | frozen |
| 2 | 20 (new DAT pair 60→20), 396 and 898 (stride differs from the default 4) | frozen |
| 3 and later | nothing | frozen; only the control and I/D lines move |

With `ST_INV = 1` (the thesis's "INC-DAT/ST-INV" variant), a data address
that misses the Stride-Table may also go out inverted, under the T0_BI_1
rule. The decoder then tells a Stride-Table hit from an inversion by whether
the bus changed. The thesis's headline result leaves this off, so the
default is 0.

## Interfaces and timing

Every block uses one clock and an active-low synchronous reset. The bus
carries one address per clock.

* **Encoder.** Inputs are `in_valid` (the MemRequest strobe), `in_addr`, and
  `in_read` and/or `in_is_data`. All bus-side outputs are registered and
  appear one clock later: `bus`, the control line(s), `bus_valid`,
  `bus_read`, `isel` and `kind`. Between transfers, every line keeps its
  value.
* **Decoder.** Takes those lines and registers `out_addr` and its flags one
  clock later. CPU to memory therefore takes two clocks (three with the
  optional XOR stage).
* **Reset.** Buses, control lines and last addresses reset to 0, strides to
  4, tables to empty, and I/D selector and Read/Write to 1.
* **`kind`.** An `addr_codec_pkg::xfer_kind_e` that reports how the last
  address was sent (direct, increment, DAT hit, invert, Stride-Table hit). It
  is for monitoring only and is not a bus line.

Both tables are fully associative and searched in the same clock. At the
default sizes, the 128-entry Stride-Table compare plus the 32-bit add sit on
the encoder's input-to-register path. A fast design may need to pipeline
that path; the thesis does not address it.

## Optional XOR stage on the lines

Some buses already use transition signalling. Each pattern is sent
exclusive-ored with the one before it, and the receiver undoes this with its
own copy of the last pattern. The thesis notes that its codes can sit on top
of such a layer: the code's encoder goes before the XOR stage and its decoder
after it. A frozen bus then shows up on the lines as all zeros.
Files: `xor_link_encoder.sv`, `xor_link_decoder.sv`.
`XOR_LINK = 1` puts them on the address lines of all three links.

* `xor_link_encoder` is registered. When `XOR_LINK = 1`, each link takes
  one more clock, so CPU to memory takes three clocks.
* The control lines are not XOR-coded. They only go through the same
  register, which keeps them aligned with the address lines.
* `xor_link_decoder` is combinational from lines to bus. Between transfers
  it holds the recovered value, so the bus decoder sees exactly what the
  bus encoder drove.
* With `XOR_LINK = 1`, the `*_bus` ports of the top show the XOR-coded lines.

On this repository's synthetic streams the stage does not pay off (see
Verification). A long frozen stretch costs nothing either way. But the
lines show the difference between two bus values, not the bus value itself.
A direct transfer between two frozen stretches therefore moves the lines
away from all-zero, and the next frozen transfer moves them back. Its
toggles are paid twice.

## Parameters (top level)

| parameter | default | origin |
|---|---|---|
| `AW` | 32 | 32-bit ARM bus in the thesis |
| `IDAT_DEPTH` | 32 | thesis: a 32-entry DAT covered all its benchmarks (4 also evaluated) |
| `ENDURANCE` | 1 | thesis example VS1; the results do not say which value was used |
| `MDAT_DEPTH` | 32 | own choice; not given for the mixed bus |
| `ST_DEPTH` | 128 | thesis: 128 entries covered all benchmarks (32 also evaluated) |
| `ST_INV` | 0 | own choice, matching the thesis's headline configuration |
| `XOR_LINK` | 0 | own choice: the XOR stage (below) is an add-on, not part of the headline configuration |

Lower-level modules also take `STRIDE` (instruction stride, 4) and
`INIT_STRIDE` (initial data stride, 4).

## Where this RTL departs from or fills in the thesis

* The thesis gives the codes as software algorithms. The clocking, the
  registered outputs and the valid strobes are this design's.
* The DAT rules are choices made here: one entry per source, only
  discontinuous pairs recorded, nothing recorded for the first address after
  reset, and round-robin replacement. One statement of the thesis algorithm
  would record every directly sent pair; its own example does not.
* The initial data stride is 4, as in the thesis's encoder algorithms. Its
  decoder algorithm and one example start at 0. The RTL follows the encoder;
  `INIT_STRIDE` selects either value.
* The thesis's fixed-stride example sends 0004 directly after reset, although
  its algorithm would freeze the bus for it. The RTL follows the algorithm.
* The instruction-bus example in the thesis states 9 transitions. Counting
  its own table gives 10, which is the figure the testbench checks.
* Bus-Invert counts toggles on the AW address lines only, not on the control
  line.
* The XOR stage is built from a one-paragraph description. Its register
  placement and reset value are this design's own choices. Bus power, area
  and timing models are not built.

## Verification

Each module has a self-checking testbench in `tb/`. The behavioural models
in `tb/codec_ref_pkg.sv` work out the expected values independently of the
RTL. The testbenches are:

* `tb_dat_table`, `tb_stride_table`, `tb_vstride_unit`: compare the table
  and stride state with software models, including wrap-around replacement
  and endurance 0, 1 and 2.
* `tb_t0dat_encoder`, `tb_t0bi1srw_encoder`, `tb_idst_encoder`: replay the
  worked examples above cycle by cycle, including both T0_BI_1 corner cases,
  then compare against the models on random program and data streams.
* `tb_t0dat_decoder`, `tb_t0bi1srw_decoder`, `tb_idst_decoder`: feed
  model-encoded streams and require every address back.
* `tb_addr_bus_codec_top`: the whole design at default parameters for
  20,000 clocks. It checks that every address arrives intact after two
  clocks. It also requires that every mechanism was used at least once:
  increment, DAT hit, forced loop-exit transfer, invert, the
  inverted-equals-bus case, stride change, read/write interleave, and
  Stride-Table hit and insert.
* `tb_addr_bus_codec_top_stinv`: the same run with `ST_INV = 1`.
* `tb_xor_link_encoder`, `tb_xor_link_decoder`: check the XOR stage against
  its rule on random streams that include frozen runs and gaps.
* `tb_addr_bus_codec_top_xor`: the end-to-end run with `XOR_LINK = 1`. The
  latency here is three clocks. The run also checks that frozen buses
  appear as all-zero lines.
* `tb_table_size_sweep`: runs encoder and decoder side by side with
  different table sizes on the same streams: a 4-entry against a
  32-entry DAT on the instruction bus, and a 32-entry Stride-Table, a
  128-entry one and a 128-entry one with Bus-Invert on the mixed bus.

The generated program is a set of loops. Each branch site has one fixed
target and is taken 85% of the time (98% in the sweep); one time in fifty
it jumps somewhere at random. The data stream interleaves several array
walks with different strides, scattered scalar accesses, and
read-modify-write pairs, where a write goes back to the address just read.
On these streams the end-to-end test measured the following transition
reductions. Each counts bus lines plus control lines against the unencoded
stream.

| bus | reduction |
|---|---|
| instruction (T0 DAT, 32 entries) | 93.1% |
| data (T0_BI_1/S/RW) | 42.5% |
| mixed (I/D selector, DAT and 128-entry Stride-Table) | 77.3% |

With `XOR_LINK = 1`, the same streams gave 87.6% (instruction), 19.2%
(data) and 64.7% (mixed), counted on the XOR-coded lines.

The sweep measured these:

| configuration | reduction |
|---|---|
| instruction, DAT with 4 entries | 91.4% |
| instruction, DAT with 32 entries | 97.4% |
| mixed, Stride-Table with 32 entries | 70.0% |
| mixed, Stride-Table with 128 entries | 77.3% |
| mixed, Stride-Table with 128 entries plus Bus-Invert | 78.3% |

A larger DAT only helps when branches are mostly taken. A branch that
often falls through leaves its pair in the table. The following
consecutive address then has to go out directly, because the decoder
cannot tell it from a DAT jump. In an earlier stream where branches fell
through more often, a 32-entry DAT did worse than a 4-entry one.

These numbers depend entirely on the generated streams. They are not the
thesis's MediaBench figures (90.5%, 26% and 77.4%), which need traces that
are not part of this repository.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal rtl/addr_codec_pkg.sv tb/codec_ref_pkg.sv \
  rtl/dat_table.sv rtl/stride_table.sv rtl/vstride_unit.sv \
  rtl/t0dat_encoder.sv rtl/t0dat_decoder.sv rtl/t0bi1srw_encoder.sv \
  rtl/t0bi1srw_decoder.sv rtl/idst_encoder.sv rtl/idst_decoder.sv \
  rtl/xor_link_encoder.sv rtl/xor_link_decoder.sv \
  rtl/addr_bus_codec_top.sv tb/tb_addr_bus_codec_top.sv \
  --top-module tb_addr_bus_codec_top -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The RTL is
clean under `verilator --lint-only -Wall`. `-Wno-fatal` is needed only
because the reference models in `tb/` do their arithmetic in 64 bits, and
Verilator reports the width changes.
