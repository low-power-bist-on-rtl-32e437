# Low-power BIST for a memory and its interface logic

A memory BIST usually tests the storage array through its address, data
and read/write pins. It misses the glue logic in front of the array: the
registers that capture the address and the enables, and the logic that
aligns or multiplexes the data. Scan-based pattern testing also has trouble
with that glue. A read returns undefined data unless the same address was
written in an earlier cycle, so every pattern becomes a multi-cycle
sequence.

This design avoids the problem with a **BIST mode in which every write also
reads, in the same cycle**. The write drivers overpower the cell, so the
bitlines carry the write data and the sense path returns them. A one-cycle
pattern therefore travels through the interface registers, into the array
and out to the output register. Nothing has to be written beforehand. The
patterns come from an embedded 8-bit pattern generator. This is either a
plain LFSR or a low-power LFSR (LP-LFSR), which swaps neighbouring bits and
so lowers the switching activity. Two shifters let patterns and responses
be scanned in and out serially.

The RTL also holds the smaller experiments used to compare the two
generators:

- a BIST of a 4-bit multiplier;
- a BIST of a 64 x 8 single-port RAM;
- a read/write controller for an asynchronous memory;
- a string-matching automaton (for "HIS", "HERS" and "SHE") from the same
  discussion of memory interfacing logic.

All of it is synthesizable SystemVerilog-2017.

## The memory interface BIST (`mem_if_bist`)

```
           write ──►[Wr_en reg]──┬────────────── we ─┐
           read  ──►[Rd_en reg]──┼─(OR)─── re ───────┤
      bist_mode  ──►[mode reg]───┘ (AND)             │
           addr  ──►[addr reg] ──────────── addr ────┤
                                                     ▼
 [LFSR / LP-LFSR]──d──►[input shifter]──q──din──►[sub-array 64x8]──dout──d──►[output shifter]──q──► data_out[7:0]
                 sin ──►si           so ───────────────────────────────────►si             so ──► sout
```

- **Interface registers.** `write`, `read`, `addr` and `bist_mode` are
  registered first. These registers are the glue logic that the scheme is
  meant to cover.
- **Read activation.** The array's read enable is
  `re = rd_en_q | (bist_mode_q & wr_en_q)`. In functional mode, read and
  write stay independent. In BIST mode, a write is also a read.
- **Sub-array (`mem_subarray`).** Holds 64 words of 8 bits, with separate
  `we` and `re`:
  - `we` alone stores `din`;
  - `re` alone loads `dout` with the stored word;
  - `we` and `re` together store `din` and also load it into `dout`
    (write-through).
- **Shifters (`shifter`).** Each has a shared `shift` control:
  - `shift = 0`: the input shifter captures the generator pattern and the
    output shifter captures the array output;
  - `shift = 1`: the two form one 16-bit scan chain,
    `sin → input shifter → output shifter → sout`, shifting towards the MSB.
- **Generator.** Parameter `USE_LP` selects the LP-LFSR (1, the default) or
  the plain LFSR (0). `SEED` sets its reset value.

**Timing.** Controls presented in cycle *t* are registered at the end of
*t*. The array acts on them in *t+1*, the output shifter captures the read
word at the end of *t+2*, and the word appears on `data_out` in cycle *t+3*.
The data written in *t+1* is whatever the input shifter holds in that
cycle. That is either the generator pattern captured at the end of *t*, or
the last bit shifted in if `shift` was 1 in *t*.

To apply a chosen byte to the interface:

1. Scan it in over 8 cycles with `shift = 1`.
2. Raise `write` together with `bist_mode` in the cycle of the last shift.
3. Read the byte back on `data_out` three cycles later.

A later functional read of the same address returns the byte with the
same three-cycle latency.

**Reset.** Reset (synchronous, active high) clears the interface registers,
the shifters and the array output register. The array cells are not reset,
like a real memory array. Reading a location that was never written
returns an arbitrary value.

## Pattern generators

**`lfsr`** is an 8-stage Fibonacci LFSR. Every clock, stage *k+1* takes
stage *k*, and stage 1 takes the XOR of the tapped stages. The default taps
are stage 1 and stage 8, which is the register as drawn. Those taps are
not a primitive polynomial. From seed `8'h01` the register runs through a
cycle of **63** states, not 255. Set `TAPS` to a primitive polynomial if a
full-length sequence is needed, for example `8'b1011_1000` for
x^8+x^6+x^5+x^4+1. `temp[0]` is stage 1.

**`lp_lfsr`** is the same LFSR followed by 2:1 multiplexers. All the select
lines are driven by the last stage (`state[7]`):

- `state[7] = 1`: bit pairs (6,5), (4,3) and (2,1) are exchanged;
- `state[7] = 0`: the pattern passes unchanged.

Bit 7 and bit 0 are never swapped. The seed comes from an input port and is
loaded during reset. A zero seed is replaced by 1.

Which pairs are swapped is a choice of this implementation. Over one
63-pattern cycle from seed 1, the pattern toggles 176 bits for the LP-LFSR
against 208 for the plain LFSR. The 4-bit multiplier behind them toggles
138 output bits against 146 (`tb_switching_activity`). Toggle counts are a
proxy for dynamic power; no power figure is computed here.

## Generator-comparison BISTs

All four use the same layout: one generator drives two identical copies of
a circuit under test, and `bist_comparator` checks their responses. The
comparator registers `test_pass = valid & equal` and
`test_fail = valid & ~equal`, so each comparison shows one cycle later.

- **`lfsr_bist` / `lplfsr_bist`.** The circuit under test is `mult4`, a 4 x 4
  shift-and-add multiplier, with `a = pattern[7:4]` and `b = pattern[3:0]`.
  The flags are valid every cycle from the first cycle after reset.
- **`ram_bist_lfsr` / `ram_bist_lplfsr`.** The circuit under test is
  `ram64x8`, a single-port RAM built as an 8 x 8 grid of words. A row
  decoder takes `addr[5:3]`, a column decoder `addr[2:0]`, and `rw = 1`
  means read. `ram_bist_ctrl` is the address generator and sequencer. In
  each 128-cycle round it writes addresses 0..63 with the running pattern,
  then reads them back. The read word is compared the cycle after the
  read, so `test_pass` is high in cycles 66..129 of every round (cycle 1 is
  the first clock after reset). Every word is written before it is read,
  so the read data are always defined. Reset also clears the RAM.

The two copies are identical, so in a fault-free chip `test_fail` can never
be 1, and synthesis reduces it to a constant. This redundant-copy layout
detects a defect in one copy only. It does not check a response against
expected values.

## Memory read/write controller (`mem_rw_fsm`)

A five-state controller for an asynchronous memory with active-low strobes:

| state | strobes low | register transfer on leaving |
|-------|-------------|------------------------------|
| idle  | none (`ready = 1`) | on `mem = 1`: `addr_reg <= addr`; for a write (`rw = 0`) also `data_f2s_reg <= data_f2s` |
| r1    | `oe_n` | |
| r2    | `oe_n` | `data_s2f_reg <= dio_in` |
| w1    | `we_n`, `tri_n` | |
| w2    | `tri_n` | |

- Reads go idle → r1 → r2 → idle.
- Writes go idle → w1 → w2 → idle. The data bus stays driven one cycle past
  the write strobe.
- Each access makes `ready` low for two cycles.
- The bidirectional data bus is split into `dio_out`, driven while
  `tri_n = 0`, and `dio_in`. The pad is left to the chip level.
- Assertions check the bus rules: `we_n` and `oe_n` are never low together,
  the bus is driven whenever `we_n` is low, and `we_n` is low for exactly
  one cycle.

## String automaton (`dfa_matcher`)

The automaton takes one character per clock (when `ch_valid` is 1) and
tracks the longest tail of the input that begins one of the strings:

| state | tail | state | tail |
|-------|------|-------|------|
| S0 | (none) | S5 | HE |
| S1 | S | S6 | HER |
| S2 | SH | S7 | HERS |
| S3 | SHE | S8 | HI |
| S4 | H | S9 | HIS |

Reaching S3, S7 or S9 raises `match`. `match_id` tells which string
matched. The transitions are:

- **Forward edges** follow the strings.
- **Other characters** go to S1 for "S", S4 for "H" and S0 otherwise.
- **Exceptions** keep an overlap alive: SH/H + I → S8; HERS/HIS + H → S2;
  SHE/HE + R → S6.

Overlapping matches are reported, so "SHERS" gives SHE and then HERS.
Characters are upper-case ASCII; any other code counts as a character that
no string contains.

## Top level (`lp_bist_top`)

The top instantiates every block side by side on one clock and one reset.
Each block's ports are brought out with a prefix:

| prefix | block |
|--------|-------|
| `mif_` | memory interface BIST |
| `mbl_`, `mbp_` | multiplier BIST with the LFSR / with the LP-LFSR |
| `rbl_`, `rbp_` | RAM BIST with the LFSR / with the LP-LFSR |
| `rwc_` | read/write controller; its memory side goes to pins for an external memory |
| `dfa_` | string automaton |

The blocks share nothing else. `USE_LP` is passed to `mem_if_bist`. Shared
widths and state types are in `bist_pkg`.

## What follows the published scheme and what was filled in

These parts follow the description:

- the same-cycle write and read in BIST mode, with write-through;
- the registered enables and address, the two shifters and the generator
  feeding the input shifter;
- the 8-bit generators, with the last LFSR bit selecting the swap;
- the 4-bit multiplier and the 64 x 8 single-port RAM as circuits under
  test, with a duplicated CUT and comparator;
- the states and register transfers of the read/write controller;
- the strings, states and end states of the automaton.

These are this implementation's own choices:

- **Inputs and pins:**
  - the `bist_mode` input (no mode pin is drawn);
  - the `en` and `rw` pins of the RAM;
  - the split of the controller's data bus.
- **Generators:**
  - the LFSR taps and seed (the drawn two-tap register was kept, with its
    63-state cycle);
  - which bits the LP-LFSR swaps.
- **Bit and address mapping:**
  - the split of the pattern into multiplier operands;
  - the row/column split of the RAM address.
- **Sequencing and timing:**
  - the write-then-read march of the RAM BIST;
  - the `valid` qualifier and output register of the comparator;
  - all reset behaviour (synchronous, active high);
  - all latencies.
- **Automaton edges:** the failure edges, filled in with the longest-tail
  rule. The simpler rule "go to the first state of a string starting with
  this character" would lose overlaps such as "SHIS" → HIS.
- **Not modelled:**
  - the sense amplifiers of the RAM: the array is a register array;
  - the FPGA power figures: only toggle counts are measured.

## Simulation

Every module has a self-checking testbench in `tb/` named `tb_<module>`.
Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb/async_mem_model.sv` is a behavioural model of the external memory,
used by the controller tests. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_lp_bist_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/bist_pkg.sv tb/tb_lp_bist_top.sv -o sim
./obj_dir/sim
```

Replace `tb_lp_bist_top` with any other testbench name to run that one.

**`tb_lp_bist_top`** runs the whole design at its default parameters, for
three RAM-BIST rounds. It checks:

- BIST-mode write-through and read-back, and the 16-bit scan chain;
- pass flags of all four comparison BISTs, and that no fail flag ever rises;
- 20 writes and 20 reads through the controller;
- the automaton on "SHERSXHISHE".

It counts each of these mechanisms and fails if any of them never happened.

**`tb_mem_if_bist`** runs 3000 cycles of mixed traffic against a cycle
model, for both generator choices.

**`tb_switching_activity`** measures the toggle counts quoted above.
