# LUT-based scan tester for a die in a 3D stack

When an FPGA die sits in a 3D stack next to the die it should test, it can
reach that die over many TSVs. It can then load many short scan chains in
parallel instead of a few long ones fed from package pins. This RTL is such a
tester. It applies a fixed set of deterministic ATPG patterns (for example the
top-off patterns that logic BIST misses). It also uses the FPGA fabric to store
those patterns compactly.

The key idea is that a scan pattern, cut into one slice per chain, is mostly
don't-care (X) bits. Two slices that agree wherever both are specified can be
**merged** into one word. The merged words are stored in 1-bit-wide LUTs: a
5-input LUT holds exactly one 32-bit slice. Each chain gets a multiplexer over
the LUTs it needs. A small RAM holds, for every pattern, the select value of
every chain's multiplexer. One LUT can then serve several patterns of one chain
and several chains at once. Usually only a fraction of the raw pattern bits has
to be stored.

```
            +--------------+  addr  +-----------+  N_LUTS bits  +-----------+  N_CHAINS  +----------+
            | lut_addr_gen |------->| lut_layer |-------------->| mux_layer |----------->| scan_reg |--> scan_data (to SerDes/TSVs)
            +--------------+        +-----------+               +-----------+            +----------+
                   ^                                                  ^ SEL_BITS
                   |               +--------------+  addr  +---------+
                   |               | ram_addr_gen |------->| sel_ram |
                   |               +--------------+        +---------+
                   |                      ^
            +------+----------------------+------+
            |           scan_ctrl                |--> scan_en, asic_rst (to the die)
            +------------------------------------+
                                 | sig_capture, done
   asic_sig --> sig_reg ---------+--> sig_checker (== GOLDEN) --> test_pass, test_done
```

The top module is `fpga_tester`. The block names match the tester's block
diagram: LUT address generator, LUT layer, RAM address generator, RAM layer,
multiplexer layer, scan register, scan-enable/die-reset generator, signature
register and signature checker.

## How one scan bit is produced

* `lut_addr_gen` counts 0 … CHAIN_LEN-1 while the tester shifts. Every LUT
  in `lut_layer` is read at that address, so each LUT presents one bit.
  Address 0 is the first bit shifted, so it ends up in the cell farthest
  from the chain input.
* `ram_addr_gen` holds the index of the current select word. `sel_ram` has a
  registered read, as a block RAM or a registered distributed RAM has. It is
  addressed with the generator's look-ahead address (`addr_next`, the value
  the counter takes at the coming edge), so it always outputs the current
  word, even when words change on consecutive clocks.
* `mux_layer` has one multiplexer per chain. The multiplexer of chain c has
  `MUX_INPUTS[c]` data inputs, and input j is wired to LUT `MUX_MAP[c*MAX_IN+j]`.
  It uses its own field of the select word.
* `scan_reg` registers the N chain bits. The die sees registered data, and the
  bus rests at 0 outside pattern loads.

LUT contents, wiring and select words are **configuration**. They are fixed at
elaboration, just as an FPGA bitstream fixes LUT contents and routing. Nothing
is loaded at run time.

## Configuration parameters (the output of merging)

| parameter | meaning |
|---|---|
| `CHAIN_LEN` | bits per LUT (32 for a 5-input LUT); a chain has SEGMENTS x CHAIN_LEN cells |
| `N_LUTS`, `LUT_INIT[k]` | the LUT pool; bit i of `LUT_INIT[k]` is the i-th bit shifted out of LUT k |
| `N_CHAINS`, `MUX_INPUTS[c]` | data inputs of chain c's multiplexer |
| `MAX_IN`, `MUX_MAP[c*MAX_IN+j]` | LUT wired to input j of chain c (unused entries are ignored) |
| `N_PATTERNS`, `SEL_BITS` | patterns; width of one select word |
| `SEGMENTS` | LUT passes per chain load; a chain holds SEGMENTS x CHAIN_LEN cells (default 1) |
| `SEL_INIT[p*SEGMENTS+s]` | select word for LUT pass s of pattern p |
| `SIG_BITS`, `GOLDEN` | width and expected value of the die's signature |
| `RST_CYCLES`, `SIG_WAIT` | die-reset clocks at the start; clocks between the last shift and signature capture (at least 1) |

**Select word layout.** Chain c uses ceil(log2(`MUX_INPUTS[c]`)) select lines
(none for a single input). The fields are packed one after another with chain 0
in the least significant bits. `SEL_BITS` must equal their sum, and
`mux_layer` stops elaboration with an error otherwise. A select value beyond
the wired inputs gives 0.

**Producing a configuration.** This is done offline by the merging step that
`tb/workload_run.sv` implements as an elaboration-time function:

1. Order the slices chain by chain: all patterns of chain 0, then chain 1, …
2. Merge each slice into the first pool word that is compatible with it in
   every specified bit (X against a value takes the value). If none is
   compatible, the slice becomes a new pool word.
3. If that word is not yet wired to the chain's multiplexer, wire it to the
   next free input. Record the input number as the chain's select value for
   that pattern.
4. Fill the X bits that remain in each word by *adjacent fill*: each X copies
   the bit shifted just before it. This keeps scan-shift toggling low.

The algorithm favours few multiplexer inputs per chain over the smallest pool:
reusing a LUT that is already wired to the chain costs no new input.

## Default configuration: the worked example

With no parameters, `fpga_tester` holds the published three-chain,
four-pattern, 5-bit example (`CHAIN_LEN` = 5). Its contents are:

* LUT words, written with the first-shifted bit on the left: LUT0 = 01111,
  LUT1 = 10000, LUT2 = 10110, LUT3 = 11001.
* Select sequence as S4 S3 | S2 | S1 S0, for patterns 1 to 4:
  00|0|00, 01|1|01, 10|1|10, 00|0|00.
* Chain 1 has a 4-input multiplexer on S1 S0, with LUT0, LUT1 and LUT2 on
  inputs 0 to 2.
* Chain 2 has a 2-input multiplexer on S2, with LUT2 and LUT3.
* Chain 3 has a 4-input multiplexer on S4 S3, with LUT3, LUT0 and LUT1 on
  inputs 0 to 2.

Input 3 of the 4-input multiplexers is unused. The wiring of chain 2's second
input and of chain 3 is taken from the drawing of the example, which is hard
to read there. Treat it as illustrative.

In the example, every LUT feeds two chains, and chains 1 to 3 each reuse a LUT
on a later pattern. The RTL reproduces the example's final LUT words and select
sequence as given. It does not re-derive them from the example's source
patterns.

Real designs use `CHAIN_LEN` = 32 and configurations produced by the merging
step. `tb_workloads` builds such configurations.

## Chains longer than one LUT

In the usual configuration a chain is exactly as long as a LUT
(`SEGMENTS` = 1), so each pattern needs one select word. For longer chains,
each chain load is made of `SEGMENTS` passes of the LUT address counter.
Every pass has its own select word, so a chain can take its first 32 bits
from one LUT and the next 32 from another. The pool then holds 32-bit pieces
of chains rather than whole chain slices. The merging step works unchanged on
those pieces, treating pass s of a chain as its own column.

## Test sequence and timing

`scan_ctrl` runs one test after reset (synchronous, active high) and then
stops with `test_done` high:

| phase | clocks | scan_en | data on `scan_data` |
|---|---|---|---|
| die reset (`asic_rst` = 1) | RST_CYCLES | 0 | 0 |
| per pattern: shift | SEGMENTS x CHAIN_LEN | 1 | LUT bits, pass 0 and address 0 first |
| per pattern: capture | 1 | 0 | 0 |
| unload | SEGMENTS x CHAIN_LEN | 1 | 0 (shifts out the last response) |
| signature wait | SIG_WAIT | 0 | 0 |

Each pattern's response is shifted out while the next pattern is shifted in.
`scan_data`, `scan_en` and `asic_rst` are registered together, so the die shifts
on every edge that ends a cycle with `scan_en` high and captures on one with it
low.

The RAM address advances on the last shift clock of every LUT pass. The signature
register loads `asic_sig` in the last wait clock. With SIG_WAIT = 2 this allows
one clock for the die's compactor to absorb the final shift, with no SerDes
delay. Raise SIG_WAIT if the return path has latency.

`test_done` rises RST_CYCLES + N_PATTERNS·(SEGMENTS·CHAIN_LEN+1) +
SEGMENTS·CHAIN_LEN + SIG_WAIT clocks after reset is released. That is 33
clocks for the default. Scan shift
therefore runs at the tester clock, one bit per chain per clock. All chains
shift in parallel, so a chain load takes CHAIN_LEN clocks whatever the number
of chains.

## Signature checking

The die is expected to compact its scan-out data itself, for instance with a
MISR, and to return an M-bit signature (`asic_sig`). `sig_reg` captures it once
at the end of the test. `sig_checker` XNORs it bit by bit with `GOLDEN` and
ANDs the results. `test_pass` is additionally qualified with `test_done`, so it
never pulses high during a test. The design does not fix the compactor or the
width. `SIG_BITS` = 32 and `GOLDEN` = 0 are placeholders: set `GOLDEN` to the
fault-free signature of the die.

## Storage: what the benchmark sizes need

Published benchmark sizes, with 32-bit chains. The LUT and select counts are
derived from the published storage figures: LUT bits / 32 and select bits /
patterns.

| circuit | chains | patterns | raw pattern bits | LUTs | select lines (all chains) |
|---|---|---|---|---|---|
| quadratic | 5 | 40 | 6 400 | 162 | 30 |
| des56 | 11 | 113 | 39 776 | 596 | 66 |
| colorconv | 28 | 82 | 73 472 | 1 141 | 186 |
| fm_receive | 17 | 411 | 223 584 | 1 124 | 110 |
| fpu_double | 168 | 294 | 1 580 544 | 3 054 | 1 096 |

The default parameters hold only the 3-chain example. Any of these circuits
needs the parameters above (`CHAIN_LEN` = 32) and its own merged contents.
`tb/tb_workloads.sv` does exactly that for quadratic, des56 and colorconv. It
uses synthetic test sets of the same shape, with 45 % care bits because the
real ATPG sets are not available. It runs the merging step, simulates the
tester against a die model and checks every care bit on the bus. The pools it
gets are of the same order as the table: for colorconv, 899 LUTs and 195
select lines. fm_receive and fpu_double were not simulated. Merging at
elaboration time in the simulator grows roughly with slices × pool size; at
colorconv it already takes about 1.5 minutes and 3 GB.

## Design choices beyond the published description

The published description fixes the block structure, the LUT/multiplexer/
select-RAM storage scheme, the 32-bit chains and the example contents. The
following are this implementation's own choices:

* the phase plan of `scan_ctrl`: die reset, one capture clock, the unload
  phase, and `RST_CYCLES` = 2 and `SIG_WAIT` = 2;
* the registered select-RAM read with a look-ahead address, and no write
  port to it;
* the select-word layout for chains longer than one LUT;
* the zero fill on the scan bus outside pattern loads;
* the `test_done` output and the qualification of `test_pass`;
* the signature width and the default golden value;
* synchronous active-high reset everywhere;
* the bit order: LUT address 0 is shifted first;
* the select-field packing, with chain 0 in the low bits.

The SerDes/TSV link and the die under test are outside this RTL. The scan bus,
`scan_en`, `asic_rst` and `asic_sig` are plain ports.

## Files and simulation

`rtl/` holds one module or package per file. `tester_pkg.sv` contains the phase
enum and `sel_width()`. The other files are `lut_addr_gen`, `lut_layer`,
`ram_addr_gen`, `sel_ram`, `mux_layer`, `scan_reg`, `scan_ctrl`, `sig_reg`,
`sig_checker` and the top, `fpga_tester`.

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). Each
prints `TB_RESULT checks=… failures=…`. `tb/` also contains:

* `tb_fpga_tester.sv`: the whole tester against the die model. One instance
  has the correct golden signature and must pass; another keeps a wrong one
  and must fail. A third loads 10-cell chains from two LUTs each
  (`SEGMENTS` = 2). It checks every output cycle by cycle.
* `tb_fpga_tester_full.sv`: the same trace with the top at its defaults.
* `tb_workloads.sv` with `workload_run.sv`: the benchmark-size runs described
  above.
* `asic_model.sv`: a behavioural die with scan chains, a fixed capture
  function, a 32-bit MISR and a scan-shift toggle counter.

To run a testbench, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tester_pkg.sv tb/tb_fpga_tester.sv \
          --top-module tb_fpga_tester -Mdir obj && ./obj/Vtb_fpga_tester
```

`tb_workloads` takes about two minutes and 3 GB to build, mostly the merging
done at elaboration; it simulates in well under a second. To try your own
configuration, instantiate `fpga_tester` with the parameters in the table
above. `workload_run.sv` shows how to compute them from a pattern set inside
SystemVerilog.
