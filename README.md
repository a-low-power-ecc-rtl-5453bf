# Low-power SEC check bit generation with on-line input ordering

An on-chip ECC unit for a DRAM that protects every 64-bit word with 7 check
bits and corrects any single-bit error. Its main idea is about power, not
about coverage. The check bit generator is a bank of XOR trees. A data bit
that toggles often costs power in every tree it feeds. The unit watches the
data being written, finds out which bits toggle most, and re-wires the
generator's inputs while the chip runs. The busiest bits then feed the fewest
trees.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It passes
Verilator's lint and the slang front end without errors. The DRAM arrays
themselves are not part of it: the unit brings out ports for a data bit
memory core and a check bit memory core.

## The code: minimum weight column code

The code is single error correcting (SEC) only. It gives up double error
detection, and in exchange it needs 7 check bits instead of 8. Its H-matrix
has 7 rows, one per check bit, and 64 columns, one per data input. The
columns are chosen with as few ones as possible:

| generator input paths | column weight | columns used             |
|-----------------------|---------------|--------------------------|
| 0 .. 20               | 2             | all 21 of weight 2       |
| 21 .. 55              | 3             | all 35 of weight 3       |
| 56 .. 63              | 4             | 8 of the 35 of weight 4  |

That is 179 ones in total. The eight weight-4 columns are `0x0F 0x1E 0x2B
0x3C 0x47 0x63 0x71 0x78`. This choice is the design's own. It balances the
rows: their weights are 26, 26, 25, 26, 25, 26, 25, so no check bit depends
on more than 26 inputs. A 26-input parity fits in three levels of 3-input
XOR gates, and `check_bit_generator` builds exactly that tree (27 slots, then
9, 3 and 1). Inside a weight group, the columns are in increasing numeric
order. Bit `r` of a column is check bit `r`. `ecc_pkg` computes all of this at
elaboration (`h_column`, `h_row`).

Each column is distinct and has weight 2 or more. So a non-zero syndrome that
equals a column locates a data error. A weight-1 syndrome means that a stored
check bit flipped. Any other syndrome cannot come from a single error. The
decoder reports the last two cases (`rsp_check_err_o`,
`rsp_uncorrectable_o`). Most double errors still look like a single error
and are miscorrected, as with any SEC-only code.

## Input ordering: routes

The generator does not see data bits. It sees 64 *input paths*, and each
path has a fixed column. Which data bit drives which path is set by a
**route**:

```systemverilog
typedef struct packed {
  logic [63:0] m2;   // 21 data bits on the weight-2 paths
  logic [63:0] m3;   // 35 data bits on the weight-3 paths
} route_t;           // the other 8 bits go to the weight-4 paths
```

Inside a group, data bits take that group's paths in increasing bit order.
`ecc_pkg::route_map(route)` gives the path of every data bit. At reset the
route is the identity: data bit `i` drives path `i`.

All three weight groups are needed. What is worth optimising is which group
each bit lands in. A toggle on a weight-2 path reaches 2 trees, and a toggle
on a weight-4 path reaches 4.

### Ranking the bits: correlation detector and path selector

`correlation_detector` keeps one transition counter per data bit. On every
write it compares the new word with the previous written word. Each bit that
changed advances its counter, which is `CNT_W` bits wide (default 8). The
transition that takes a counter past its top value is transition number
2^CNT_W, that is 256. This marks the bit as *reached*, and the counter then
stops. Reached bits are announced one at a time on `corr_o`, a one-cycle
pulse per bit. When several bits reach their count in the same cycle, the
lowest-numbered goes first. Each bit is announced once per analysis
interval.

Bits that toggle more reach their count sooner. So the order of the pulses
ranks the bits. `path_selector` turns that order into a route with two shift
registers that fill with ones, 21 and 35 bits long:

* While the 21-bit register is not full, each announced bit joins `m2`.
* After that, while the 35-bit register is not full, each announced bit
  joins `m3`.
* Once both are full (56 bits ranked), `rank_done` rises and further pulses
  are ignored. The 8 bits that were never placed, the quietest ones, get the
  weight-4 paths.

The selector holds two routes. The *active* route is the one the stored
check bits were computed with. The *learned* route is the one just ranked.

### Switching routes: the check bit update

Check bits already in memory belong to the active route. Before the learned
route can take over, every stored word must be re-encoded.
`check_bit_updater` does this. It starts as soon as a ranking is done, and
the host waits meanwhile. For every address, 0 to 2^ADDR_W-1, it spends three
cycles:

| cycle | action |
|-------|--------|
| RD    | read the data word and its check bits |
| CAP   | the normal read path checks and corrects the word under the **active** route; the result is captured |
| WR    | the captured word goes through the selector on the **learned** route; the new check bits are written, and so is the data word if a bit was corrected |

After the last address there is one COMMIT cycle. The learned route becomes
active, the counters are cleared, the ranking starts over, and the host is
released. An update takes `3 * 2^ADDR_W + 1` cycles. At the default
2^24 words that is 50,331,649 cycles. As a side effect, the update scrubs
single-bit errors out of the whole array.

Reordering only pays off if routes change rarely compared with how often the
data is accessed. How often they change is set by `CNT_W`: a new ranking
needs 56 bits that have each toggled 2^CNT_W times since the last switch.

## Datapath

```
 write: req_wdata ─┬─► correlation_detector ──corr──► path_selector (ranking)
                   └─► path_selector (switch) ─► check_bit_generator ─► mem_wcheck
 read:  mem_rdata ───► path_selector (switch) ─► check_bit_generator ─┐
        mem_rcheck ─────────────────────────────► syndrome_generator ◄┘
        ─► ecc_decoder (error path) ─► path_deselector (error bit) ─► corrector ─► rsp_rdata
```

A single path selector and a single check bit generator serve both
directions. The decoder's error vector is in path order. `path_deselector`
applies the inverse of the route to it, giving data bit order, and
`corrector` flips that bit of the word read from memory.

## Interfaces and timing (`ecc_top`)

Host side (a valid/ready handshake, chosen for this design):

* A request is taken in a cycle where `req_valid_i && req_ready_o`.
  `req_write_i` selects a write or a read.
* A write stores `req_wdata_i` and its check bits in that same cycle
  (`mem_data_we_o`, `mem_check_we_o`).
* A read raises `mem_re_o`. The next cycle has `rsp_valid_o` high, with
  `rsp_rdata_o` corrected and the flags `rsp_corrected_o`, `rsp_check_err_o`
  and `rsp_uncorrectable_o`.
* `req_ready_o` is low in these cases:
  * in a read's answer cycle, because the generator is busy with the read;
  * from the moment a ranking completes until the update has committed
    (`reorder_busy_o`).

Memory side: `mem_addr_o` with `mem_re_o`. Read data and check bits are
expected on `mem_rdata_i` and `mem_rcheck_i` one cycle later. Writes use
`mem_wdata_o`/`mem_data_we_o` and `mem_wcheck_o`/`mem_check_we_o`
independently.

Status: `active_route_o` is the route in use in the current cycle.
`learned_route_o` is the route being ranked.

All state uses an active-low asynchronous reset (`rst_n`).

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W`  | 24      | word address width; 2^24 words × 64 bits = 1 Gb of data |
| `CNT_W`   | 8       | correlation counter width; a bit is ranked after 2^CNT_W transitions |

The code dimensions (64 data bits, 7 check bits, groups 21/35/8) are fixed
constants in `ecc_pkg`.

## Files

| file | contents |
|------|----------|
| `rtl/ecc_pkg.sv` | constants, `route_t`, H-matrix and route functions |
| `rtl/check_bit_generator.sv` | 3-level 3-input XOR trees |
| `rtl/syndrome_generator.sv` | read check bits xor stored check bits |
| `rtl/ecc_decoder.sv` | syndrome → error path, check bit error, uncorrectable |
| `rtl/path_deselector.sv` | path order → data bit order |
| `rtl/corrector.sv` | flips the located bit |
| `rtl/correlation_detector.sv` | per-bit transition counters, staggered correlation pulses |
| `rtl/path_selector.sv` | ranking shift registers, group registers, active/learned route, switch |
| `rtl/check_bit_updater.sv` | re-encodes the whole memory and commits a new route |
| `rtl/ecc_top.sv` | the unit |
| `tb/ecc_ref_pkg.sv` | independent reference: columns by nested loops, encoder, route map |
| `tb/dram_core_model.sv` | behavioural model of both memory cores |
| `tb/tb_*.sv` | self-checking testbenches |

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M`. For example:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_top.sv --top-module tb_ecc_top
./obj_dir/Vtb_ecc_top
```

To run another testbench, replace `tb_ecc_top` with its name.

* `tb_check_bit_generator`, `tb_syndrome_generator`, `tb_ecc_decoder`,
  `tb_corrector`, `tb_path_deselector`: the combinational blocks. They check
  the code's properties (weights per group, distinct columns, 179 ones, row
  weight ≤ 26), all 128 syndromes, and random routes and words against the
  reference.
* `tb_correlation_detector`: random per-bit toggle rates, compared every
  cycle with a reference that counts transitions. It includes bits that reach
  their count together.
* `tb_path_selector`: random pulse orders. It checks the group contents, the
  end of ranking, routing on the learned and the active route, commit and
  restart.
* `tb_check_bit_updater`: checks the read / capture / write-back sequence,
  the write-back of corrected words and the `3·2^ADDR_W + 1` cycle length.
* `tb_ecc_top`: two complete rounds at `ADDR_W=6`, `CNT_W=3`. Each round
  writes a stream in which known bit sets toggle at different rates. The test
  checks that the learned route matches them, that every stored check word
  is re-encoded, and that an error planted in memory is scrubbed. It then
  injects single data errors, check bit errors and double errors on reads.
  It fails if any mechanism never occurred: staggered pulses, ranking,
  stalls by update and by read, update, scrub, route switch, correction,
  check bit error, uncorrectable.
* `tb_ecc_top_full`: the same test, one round, with `ecc_top` at its default
  parameters, so the update walks all 2^24 words. It takes about 75 s under
  Verilator and needs about 150 MB for the memory model.
* `tb_ecc_workload`: a synthetic stream in which each bit toggles with its
  own probability (0.5·0.92^rank, ranks shuffled over the word). It counts
  XOR-tree input transitions, Σ toggles(path) × weight(path), over 4000
  writes before and after the reordering. With the default seed the count
  falls by about 19%. The test checks that it falls and that the weight-2
  paths hold the busiest bits. This is a switching-activity proxy, not a
  power figure.

## What is taken from the source and what is chosen here

Taken from the published scheme:

* the SEC-only minimum weight column code for 64 bits (7 check bits, 21/35/8
  columns of weight 2/3/4, 179 ones, row weight ≤ 26, 3-level 3-input XOR
  trees);
* the block structure: correlation detector → path selector → check bit
  generator, and syndrome generator → decoder → path de-selector → corrector;
* per-bit transition counting with one correlation signal per bit;
* ranking with 21- and 35-bit shift registers into three group registers,
  busy bits on low-weight columns;
* updating the stored check bits when the generator changes.

Chosen here, where the source gives no detail:

* the eight weight-4 columns and the column order inside each group;
* the bit order inside a group;
* the counter width (`CNT_W = 8`);
* sending simultaneous correlation signals one per cycle, lowest bit first
  (the source shows a separate delay stage per signal);
* keeping an active and a learned route;
* the whole update procedure, including the write-back of corrected data,
  and blocking the host during it;
* the host and memory handshakes, the one-cycle memory read latency and the
  reset values (identity route);
* the check bit error and uncorrectable flags.

Limitations to be aware of:

* **A ranking completes only after 56 bits have reached their count.** If
  fewer than 56 bits of the stored data ever toggle 2^CNT_W times, for
  example when the high bits of every word are constant, the route never
  changes. The unit then keeps working under its current route. No time
  limit on the analysis interval is built in.
* The update stalls the host for `3·2^ADDR_W + 1` cycles, and nothing stops
  DRAM refresh from needing the array meanwhile. A real integration would
  interleave the update with normal traffic. That needs a second generator,
  or a per-word record of which route encoded it.
* The gate-level structure of the pulse generator and counter (inverter
  delay chain, ripple flip-flops) is replaced by synchronous logic. Power
  results for a given process and supply voltage cannot be reproduced from
  RTL. The workload testbench only counts transitions.
* Only the 64-bit configuration is built. The code construction is not
  parameterised for other data widths.
