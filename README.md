# Multi-functional memory: an SRAM with a PLA address pre-decoder inside its array

A table lookup in memory normally needs one row per possible input. If many
inputs share an output, or only part of the input range matters, most of those
rows are wasted. This memory places a small reconfigurable PLA (a
programmable logic array, which computes sums of products) inside the SRAM
array, next to the data. The PLA is programmed with ordinary memory writes.
In *pre-decoder mode* the address goes through the PLA before the row decoder.
The memory then returns `table[g(address)]`, where `g` is any function the PLA
can hold. In *normal mode* the PLA is bypassed and the array is a plain SRAM.

The intended use is approximate computing: a costly function `y = f(x)` is
stored as a table, and the PLA compresses the input `x` into a smaller row
address `g(x)`. Inputs with nearly equal `f(x)` share a row.

The RTL is a digital model of the circuit. Wires that the circuit precharges
and discharges are modelled as wired-NOR nets. The SRAM cells are a
synchronous memory array.

## The uni-switch and the mp-cell

The PLA is built from one kind of cell, repeated. Each cell sits where a
horizontal wire (X in, X' out) crosses a vertical wire (Y in, Y' out). Both
wires are precharged high, and a cell can only discharge them. A *uni-switch*
decides how the two wires interact. Three stored bits control it:

| bit | case | effect on the wires |
|-----|------|---------------------|
| `a` | (a)  | a high X turns on a pull-down of Y |
| `b` | (b)  | a high Y turns on a pull-down of X' |
| `c` | (c)  | X and Y are joined, so a low on either pulls the other low |
| none | (d) | the wires cross without contact |

The three bits act independently. In the circuit they are three separate
transistor groups.

An *mp-cell* ("memory-programmable cell") is a uni-switch plus three ordinary
SRAM bit cells stacked in one column. The bits sit on consecutive word lines:
`c` on the first (W1), `b` on the second (W2) and `a` on the third (W3). So an
mp-cell is programmed by writing three memory rows. No special configuration
port is needed. `mp_cell.sv` holds the switch logic. The bits themselves live
in `bitcell_array.sv`.

## How the PLA sits in the array

`pla_predecoder` is a NOR-NOR PLA, the usual two-plane structure:

* **Input columns** (`N_IN` of them) are driven by input buffers with `x`.
* **Product-term wires** run horizontally, one per mp-cell row, so one term
  uses three word lines. A term wire is precharged high, and any cell of the
  AND plane can pull it low:
  * case (b) pulls it low when the input is 1, so the term contains `~x_i`;
  * case (c) joins it to the input, which pulls it low when the input is 0, so
    the term contains `x_i`;
  * no bit set means `x_i` is not in the term.

  One wire per input therefore gives both literal polarities. A classic PLA
  needs a true wire and a complement wire for each input.
* **Sum columns** (`N_OUT`) are precharged high. Case (a) pulls one low when a
  term is high, so the sum wire is the NOR of its terms. An inverter at the
  bottom makes `y` the OR of its terms.

Some cases are left out so that no loops can form. Case (a) on an input column
has no effect, because the input buffer wins. Case (b) on a sum column would
feed a sum back into a term, and is treated as no connection. Case (c) on a sum
column pulls the sum low while the term is low. This is legal, but ordinary
programs do not use it.

A term wire with no cells set stays high. It is harmless unless a sum column
is connected to it. An all-zero PLA region therefore gives `y = 0`.

### Word layout (`mf_memory`)

With address width `AW`, the word is `WORD_W = 2*AW + DATA_W` bits wide:

| columns | content |
|---------|---------|
| `0 .. AW-1` | PLA input columns `x0..x(AW-1)` |
| `AW .. 2*AW-1` | PLA sum columns `y0..y(AW-1)` |
| `2*AW .. WORD_W-1` | stored data |

Term `t` uses rows `3t` (`c` bits), `3t+1` (`b` bits) and `3t+2` (`a` bits) of
the PLA columns. So `N_TERMS = floor(2**AW / 3)`. The PLA may use every row of
the array, because data and PLA settings occupy different columns of the same
rows. A write always writes the whole word. To change only the data of a row
that also holds PLA settings, write the row's PLA bits back unchanged. Both
testbenches keep a shadow image of the array for this.

Programming term `t` with literal list `L` and output set `O`:

```
row 3t   : bit i = 1  for each literal x_i     in L     (case c)
row 3t+1 : bit i = 1  for each literal ~x_i    in L     (case b)
row 3t+2 : bit AW+o = 1 for each output o      in O     (case a)
```

## Modes and the access cycle

`switch_matrix` selects the addressing:

* `s = 0`, normal: `a' = addr`, and the PLA inputs are held at 0.
* `s = 1`, pre-decoder: `x = addr` and `a' = y`.

`a'` is brought out as `addr_eff`, so in pre-decoder mode the PLA can also be
used as a plain logic function: drive `x` on `addr` and read `y` on `addr_eff`
(or store each row's own index in its data columns and read it). Both reads
and writes follow the selected mode.

Each access takes one clock cycle:

```
cycle n   : csb=0, web=1 (read) or web=0 (write), addr, din, s stable
edge      : write -> the cell array takes din on the selected row
            read  -> the sense amplifiers latch the selected row
cycle n+1 : dout valid, rd_valid=1 (reads only); dout holds until the next read
```

The PLA, the row decoder and the word-line driver are all combinational. In
pre-decoder mode the address passes through all three within the access
cycle. `rst_n` only clears `rd_valid`. The array and `dout` have no reset,
because SRAM contents are undefined at power-up.

Inside one access:

* `control_logic` turns `csb`/`web` into `wl_en`, `w_en` and `s_en`.
* `addr_decoder` and `wordline_driver` raise one word line.
* `write_driver` drives each bit-line pair differentially (`bl = d`,
  `blb = ~d`). When idle it leaves both lines high, which is the precharged
  state.
* `bitcell_array` writes a cell whose pair is differential. It models reading
  as precharged read lines that the selected cell discharges.
* `sense_amp_array` latches each column whose pair is differential.

## Application: compressed lookup of a function of a 6-bit float

The worked example is a 6-bit unsigned float `{e1 e0 m3 m2 m1 m0}` with
exponent 01 or 10. It covers 32 values: 1.0, 1.0625, …, 1.9375, then 2.0,
2.125, …, 3.875. The function `f` rises, falls to a minimum near 1.9, then
climbs to its maximum at 3.875, with a small dip near 3. The decoder `g` sends
each code to a 5-bit row chosen by its function value, so codes with close
values share a row. The 32 codes land on 19 rows, between 4 and 27:

```
code  1.0  ..1.4375 : rows  5  6  8  9 10 11 12 12
     1.5  ..1.9375 : rows 11 10  9  7  6  5  4  4
     2.0  ..2.875  : rows  5  7 10 12 15 17 19 20
     3.0  ..3.875  : rows 18 17 19 21 22 23 25 27
```

`tb/tb_fp_approx.sv` holds this mapping as a 24-term sum of products over the
six input bits. Codes with exponent 00 or 11 are don't-cares. Twenty-four
terms need 72 word lines, more than the default 16-row unit has. The
testbench therefore builds `mf_memory` with `AW = 7`: 128 rows, room for 42
terms, with input bit 6 held at 0. It checks every code's row and data in
pre-decoder mode.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| `mf_memory` | `AW` | 4 | 4-bit address a0..a3 of the published design |
| `mf_memory` | `DATA_W` | 8 | 8 data bits d0..d7 of the published design |
| `mf_memory` | `N_TERMS` | `2**AW/3` = 5 | this design: every row holds a third of a term |
| `pla_predecoder` | `N_IN`, `N_OUT`, `N_TERMS` | 4, 4, 5 | as above |
| `bitcell_array` | `ROWS`, `COLS`, `PLA_COLS`, `N_TERMS` | 16, 16, 8, 5 | as above |

## Files

| file | content |
|------|---------|
| `rtl/mfm_pkg.sv` | `mp_cfg_t` (the c/b/a bits) and the row offsets of an mp-cell |
| `rtl/mp_cell.sv` | uni-switch |
| `rtl/pla_predecoder.sv` | PLA of mp-cells |
| `rtl/bitcell_array.sv` | SRAM array and mp-cell view of its PLA columns |
| `rtl/switch_matrix.sv` | mode switch |
| `rtl/addr_decoder.sv`, `rtl/wordline_driver.sv` | row selection |
| `rtl/control_logic.sv` | access control, `rd_valid` |
| `rtl/write_driver.sv` | write driver and idle (precharged) bit lines |
| `rtl/sense_amp_array.sv` | read latch |
| `rtl/mf_memory.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_fp_approx.sv` | the float lookup example at `AW = 7` |

`tb_mf_memory` runs the top at its default size. It loads several PLA
programs: bitwise inversion, bit reversal, the three-output example below and
20 random five-term programs. For each program it checks every address in
both modes, writes through the pre-decoder, checks the read latency, and counts
mode switches and reconfigurations. `tb_pla_predecoder` checks the example
`Y1 = ~X2 X4 + X3 X4`, `Y2 = ~X2 X4 + ~X1 X3`, `Y3 = ~X1 X3 + X3 X4` against
all 16 inputs, plus 200 random programs against a reference model.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/mfm_pkg.sv tb/tb_mf_memory.sv --top-module tb_mf_memory -o sim
./obj_dir/sim
```

Replace `tb_mf_memory` with any other testbench name. The package must be
listed first. Each testbench runs in well under a second. The simulator is
two-state, so the testbenches write the array before reading it.

## What follows the source design and what is this design's own

The following come from the published design:

* the four uni-switch cases;
* the c/b/a placement on three word lines;
* three bit cells per mp-cell;
* the PLA as an AND plane and an OR plane with output inverters;
* the switch matrix and its two modes;
* the 4-bit address and 8-bit data of the main configuration;
* the blocks of the SRAM periphery, by name;
* the float-to-address truth table.

The following are this design's own choices:

* **Wired nets as digital logic.** Discharge is modelled as wired NOR, and a
  join (case c) as "a low level propagates". Some cases are given no effect to
  avoid loops (see above).
* **One wire per input.** The literal polarity comes from case (b) or (c)
  rather than from separate complement wires.
* **Word layout.** The source shows a PLA region and a data region sharing the
  8 data lines. A 4-in/4-out PLA needs 8 columns of its own, so here the PLA
  columns are added to the 8 data columns, giving a 16-bit word.
* **Term count.** `N_TERMS` is set by the number of rows; the source gives no
  term count.
* **Timing and control.** The one-cycle synchronous protocol, `csb`/`web`,
  `rd_valid`, holding `x` at 0 in normal mode, and whole-word writes (no write
  mask).
* **Periphery insides.** The write driver, sense amplifier, decoder and
  word-line driver are reduced to their logic decisions.
* **The 24-term cover** of the float decoder. The source gives the truth table
  but no term list.
* **The float table's mapping.** The source describes the float decoder as
  producing 32 consecutive addresses, but its truth table maps the codes to 19
  rows. The RTL and testbench follow the truth table.

The following are not modelled:

* the analog precharge circuit;
* a column multiplexer (one word per row here);
* the cell layout;
* the memory compiler flow that generates the layout;
* electrical timing of any kind.
