# Longest-match TCAM search without a priority encoder

A ternary CAM compares a key with every stored pattern at once. Several
patterns can match, because of their don't-care (X) bits, and a lookup such
as longest-prefix match must then pick the most specific one. The usual way
is to keep the table sorted by pattern length and put a priority encoder
behind the match lines. Sorting makes every insertion a shuffle of entries,
and the encoder costs energy and delay on every search.

This design drops both. Patterns are stored in any slot, in any order. The
longest match is decided inside the array, in two extra passes over the same
cells (priority decision in memory, PDM):

1. **Phase 1, search.** The key is compared with all entries, as in any TCAM.
2. **Phase 2, longest length.** Every column ORs the care bits of the
   entries that matched. With contiguous care masks, that OR is the mask of
   the longest matching pattern.
3. **Phase 3, select.** Each matching entry compares its own care mask with
   that longest mask. Only the entries of the longest length keep their
   line high. That one-hot line reads the SRAM word of the entry directly.

A second idea saves search energy. Each entry is split into a short
**input segment** (for example a signature byte) and a longer **state
segment** (the state of a per-flow matching automaton). The input segment
is searched first, and an entry's state segment is searched only if its
input segment matched (sequential input-state search, SIS). Most state
words therefore never switch. The final result is the same as a full
search.

The RTL is a logic-level model of these circuits, with one clock per step.
Each cell is 4T2R (four transistors, two resistive devices). Its analog
behaviour is reduced to the logic value each line settles to. This covers
precharge, match-line discharge and sense amplifiers.

## The 4T2R cell and its four data-line inputs

A cell stores one ternary value as the resistance of two devices, RT and RB.
A device is either low-resistance (LRS) or high-resistance (HRS):

| value | RT  | RB  | code `{RT_LRS, RB_LRS}` |
|-------|-----|-----|-------------------------|
| 0     | LRS | HRS | `T0 = 2'b10`            |
| 1     | HRS | LRS | `T1 = 2'b01`            |
| X     | HRS | HRS | `TX = 2'b00`            |

The data lines DL and DLB gate a source-line pulse through RT and RB onto
an internal node, NX. NX turns on the match-line pull-down only through a
low-resistance device:

    nx = dsl_en & ((DL & RT_LRS) | (DLB & RB_LRS))      // 1 = pulls ML low

| DL DLB | meaning            | NX high for        |
|--------|--------------------|--------------------|
| 1 0    | search for a 1     | stored 0           |
| 0 1    | search for a 0     | stored 1           |
| 0 0    | masked key bit     | never (all match)  |
| 1 1    | "length read"      | stored 0 or 1      |

The last row is useless for searching, because every care cell mismatches.
It is what makes PDM work, though: with DL=DLB=1, NX tells whether the cell
is care or don't care. The pattern's length can thus be read back from the
pattern itself, with no length field stored beside it.

## Phases 2 and 3 in the cell

Each cell carries two small circuits that both hang off NX, and so both
see "this cell is care" while DL=DLB=1:

* **Length evaluation** (`pdm_len_eval`). Two series transistors pull the
  column's mask data line CMD low. One is gated by NX, the other by the
  entry's Phase 1 result. A column's CMD ends low when any matching entry
  is care there. `cmd_sense_p2r` stores `P2R = ~CMD`, where 1 means care.
* **Length comparison** (`pdm_len_cmp`). When P2R is care at this bit and
  the cell is don't care, a node MX rises. MX discharges the entry's mask
  match line MML: this entry is shorter than the longest match. The
  combination "P2R don't care, cell care" cannot occur for a matching
  entry. The circuit then keeps MML high.

Only Phase 1 matches take part: their source lines are pulsed and their MML
is precharged in Phases 2 and 3. The result of Phase 3 is
`mml = p1r & (no bit with P2R=1 and cell=X)`.

Worked example (8-bit input segment, state segment all X). Key `10100101`.

| slot | pattern    | care mask  | Phase 1 |
|------|------------|------------|---------|
| 0    | `1010XXXX` | `11110000` | match   |
| 1    | `101001XX` | `11111100` | match   |
| 2    | `11XXXXXX` | `11000000` | miss    |
| 3    | `1XXXXXXX` | `10000000` | match   |

Phase 2 ORs the masks of slots 0, 1 and 3 into `11111100`. In Phase 3 only
slot 1 has no X where P2R is 1. The result line is `0010`, whatever the
slot order.

**What PDM assumes.** Each entry's care bits must form one contiguous run,
as prefixes do. The length is compared as a mask, not as a number. Two
cases follow from that:

* With other masks, the OR may equal no entry's mask. The search then
  reports no hit, even though Phase 1 matched.
* Two matching entries with the same mask both keep their line. On the SRAM
  side, the words of all selected entries are ORed.

The entry bit order for lengths is `{input segment, state segment}`, input
segment in the most significant bits. A prefix runs from the first bit of
the input segment into the state segment.

## Sequential input-state search

`sis_state_driver` enables the state word of entry *e* only when
pre-charge control is low (the state step) and the input match line of *e*
is high:

| pre-charge control | input ML | search state word |
|--------------------|----------|-------------------|
| low                | high     | yes               |
| any other          |          | no                |

In `tcam_array`, the input words are searched in step `PH_IN`. Their match
lines are latched, and in step `PH_ST` only the enabled state words get a
source-line pulse. The engine brings the enable vector out as
`state_search_en`, so the saving can be counted. When one hex digit in 16
matches, 15 of every 16 state words stay idle (93.75 %).
`tb_sis_hex_workload` measures this.

## Engine interface and timing

`tcam_search_engine` (parameters `ENTRIES=4`, `IN_W=8`, `ST_W=16`,
`DATA_W=16`):

* **Write.** The signals are `wr_en`, `wr_addr`, `wr_valid`, `wr_in[]`,
  `wr_st[]` (of type `ternary_t`) and `wr_data`. A write stores or deletes
  (`wr_valid=0`) one entry together with its SRAM word, in one clock. It is
  taken only while `search_ready` is high; an assertion flags a write
  during a search. No other entry moves.
* **Search.** Raise `search_valid` with `key_in`, `key_in_mask`, `key_st`
  and `key_st_mask`; a mask bit of 1 ignores that key bit. The request is
  taken in a clock where `search_ready` is high, and the key is registered
  then. The engine steps through `PH_IN`, `PH_ST`, `PH_LEN`, `PH_CMP` and
  `PH_RD`, one clock each.
* **Result.** `result_valid` pulses for one clock, **six clocks after the
  request was taken**. With it come `result_hit`, the one-hot
  `result_line`, the SRAM word `result_data` and the longest length
  `result_len` (1 = care, `{input, state}` order). The debug vectors
  `input_match`, `state_search_en` and `phase1_match` come at the same
  time. All of them hold until the next search ends.
* **Throughput.** `search_ready` is high only when idle, so one search can
  start every six clocks.

Reset (`rst_n`, active low, synchronous) clears the valid bits, the phase
registers and the controller. The cell contents are not reset; they stand
for nonvolatile storage.

## Modules

| module               | role                                                               |
|----------------------|--------------------------------------------------------------------|
| `tcam_pkg`           | `ternary_t`, `dl_t`, `dl_mode_t`, `phase_t`                        |
| `tcam_cell_4t2r`     | storage and NX of one cell                                         |
| `pdm_len_eval`       | Phase 2 CMD pull-down of one cell                                  |
| `pdm_len_cmp`        | Phase 3 MX/MML pull-down of one cell                               |
| `pdm_cell`           | cell + both PDM circuits                                           |
| `tcam_row`           | W cells sharing ML and MML                                         |
| `dl_driver`          | key / masked / DL=DLB=1 / standby on the data lines                |
| `sis_state_driver`   | state-word enables                                                 |
| `cmd_sense_p2r`      | column CMD sensing and P2R register                                |
| `tcam_array`         | entries (input + state rows, valid bit) and phase registers        |
| `pdm_controller`     | step sequencer, valid/ready, result pulse                          |
| `result_sram`        | SRAM words read by the one-hot match line                          |
| `tcam_search_engine` | top                                                                |

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/tcam_pkg.sv tb/tb_tcam_search_engine.sv --top-module tb_tcam_search_engine
    ./obj_dir/Vtb_tcam_search_engine

The testbenches that compare against a reference lookup use
`tb/tcam_ref_pkg.sv`, a plain longest-match search on (care, value)
vectors. `tb_tcam_search_engine` runs the engine at its default size:

* the worked example above,
* an update where a longer pattern wins at once,
* 2000 random searches over random prefix patterns, with overwrites,
  deletes, masked keys and requests held through busy clocks.

It checks every output and the six-clock latency, and fails if any of
these mechanisms never occurred. `tb_tcam_array` checks each phase's
register on its own. The cell-level testbenches go row by row through the
cell's tables.

## How far the model goes

* **Logic, not circuits.** The analog and process-specific parts are not
  modelled: RRAM devices, precharge to VPRE, sense amplifiers, write
  voltages and the 45 nm realisation. A line is 1 if nothing pulls it down.
  Energy, power and delay cannot be read from this RTL. The SIS enable
  vector is the only energy proxy it gives.
* **Clocking is this design's.** A TCAM is often described as searching in
  one clock. Here the input search, the state search, Phase 2 and Phase 3
  each take one clock, plus one clock for the SRAM read. A faster design
  could merge steps within a clock, at the cost of the SIS sequencing.
* **Sizes.** The 8-bit input segment and the four-entry table match the
  worked example and the 8-bit cell row. The state width (16), the SRAM
  word (16) and the valid bit are this design's choices. All sizes are
  parameters. `tb_sis_hex_workload` runs 16 entries.
* **State feedback.** The state-segment key is an input. An engine that
  follows an automaton per flow would feed `result_data` back as the next
  `key_st`, with a state register per flow. That loop is left to the user.
