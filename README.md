# 8-bit unary current-steering DAC with a re-orderable four-sub-array decoder

A unary (thermometer-coded) current-steering DAC turns code *v* into *v*
equal current sources switched to the output. In silicon the sources are not
equal: each carries a random error, and the worst-case integral
non-linearity (INL) depends on the order in which the sources are switched
on. A conventional row-column decoder fixes that order for good, so a chip
whose mismatch happens to pile up badly along that order is simply out of
spec.

This design splits the 16 x 16 unit-cell array into four identical 8 x 8
sub-arrays, A to D, and fills them one after another. Because the four are
interchangeable, the order in which they are filled can be changed by a
small multiplexer without touching the cells. After fabrication each
built-in order (an *index pattern*) can be measured and the most linear one
kept. With four patterns, the fraction of converters whose |INL| stays below
0.5 LSB at 3.5 % unit mismatch rises from about 64 % to about 87 % in the
included Monte-Carlo testbench. Alternatively, the unit sources can be made
smaller for the same yield.

## Code bits and how a code lights the array

The 8-bit code is M1..M8, with M1 the most significant bit (`code[7]`):

| bits   | role                                                    |
|--------|---------------------------------------------------------|
| M1, M2 | level: how many sub-arrays are completely on (0..3)     |
| M3..M5 | row thermometer T0..T6: full rows in the partial sub-array |
| M6..M8 | column thermometer C0..C6: cells on in the partial row  |

For code *v* = 64·*L* + 8·*r* + *c*, the sub-arrays driven by control levels
0..*L*-1 are fully on. In the sub-array driven by level *L*, rows 0..*r*-1 are
on, along with cells 0..*c*-1 of row *r*. Exactly *v* cells are on. Code 255
leaves the last cell of the top level's sub-array unused, so 255 of the 256
cells are ever switched.

### Unit cell

Each cell does the classic row-column local decode:

    on = R_j  OR  (R_j-1 AND C_i)

`R_j` means "my row is full", `R_j-1` means "the row before mine is full" and
`C_i` is this cell's column line. The cell drives a differential switch pair:
`sw_p` steers the current to Iop and `sw_n` steers it to Ion.

### Row rails and the control levels

Each sub-array gets nine *row rails*. `rails[0]` is the "previous row" signal
of its first row. `rails[k+1]` is the "row *k* full" signal. `rails[8]` is the
"last row full" signal. In a conventional array the first rail is tied to
VDD and the last to ground. Here both come from M1 and M2, so a whole
sub-array can be switched fully on or fully off. Each of the four control
levels (`control_level`, LEVEL = 0..3 for A..D) makes one set of rails:

| level | first rail | rows k = 0..6            | last rail |
|-------|------------|--------------------------|-----------|
| A (0) | 1          | T_k + M1 + M2            | M1 + M2   |
| B (1) | M1 + M2    | T_k·M2 + M1              | M1        |
| C (2) | M1         | T_k·M1 + M1·M2           | M1·M2     |
| D (3) | M1·M2      | T_k·M1·M2                | 0         |

Put simply, a level below the code's level {M1,M2} is all ones, a level
above it is all zeros, and the level equal to it passes the row thermometer
through. This scheme uses two 3-to-7 thermometer decoders plus these few
gates per level. A conventional 16 x 16 row-column decoder needs two 4-to-15
decoders instead.

### Index interface (pattern multiplexer)

`index_mux` hands the rails of each control level to one physical sub-array.
The choice comes from a constant table indexed by `pattern_sel`. Of the
4! = 24 possible orders, a build with `NUM_PATTERNS` = *N* offers pattern *k* =
permutation number ⌊*k*·24/*N*⌋ in lexicographic order of (A,B,C,D). As a
result:

* pattern 0 is always the conventional order A, B, C, D;
* the sets for N = 2, 4, 8, 12 and 24 are nested, so adding patterns never
  lowers the achievable yield;
* a select value of *N* or more falls back to pattern 0.

The column lines and the row thermometer are shared by all sub-arrays. Only
the nine rails per sub-array go through the multiplexer.

Which orders to offer is a free design choice: any fixed subset works the
same way. To offer a different set, change the table in `index_mux` (the
function `level_of_sub` in `mdac_pkg`).

## Modules

| file | what it is |
|------|------------|
| `rtl/mdac_pkg.sv` | sizes, the `row_rails_t` type, the permutation functions |
| `rtl/therm_decoder.sv` | binary to thermometer, 3 → 7 lines |
| `rtl/control_level.sv` | one control level A..D (table above) |
| `rtl/index_mux.sv` | pattern table and the rail multiplexer |
| `rtl/unit_cell.sv` | local decode of one cell, differential switch outputs |
| `rtl/sub_array.sv` | 8 x 8 cells |
| `rtl/dac_core.sv` | input register, both decoders, four levels, multiplexer, four sub-arrays |
| `rtl/current_array.sv` | behavioural model of the 256 current sources, summing Iop and Ion |
| `rtl/mdac_top.sv` | top: `dac_core` + `current_array` |

Cell numbering in `cell_on`: bit 64·*s* + 8·*r* + *c* is row *r*, column *c* of
physical sub-array *s* (0 = A … 3 = D).

### Top-level interface (`mdac_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (code 0, pattern 0) |
| `code` | in | 8 | M1..M8 |
| `pattern_sel` | in | `SEL_W` | index pattern, set after test and then held |
| `unit_current` | in | 256 × `CUR_W` | current of each source, nominal value plus mismatch |
| `cell_on` | out | 256 | switch states |
| `iop`, `ion` | out | `OUT_W` | summed currents to the two outputs |

Parameters: `NUM_PATTERNS` = 4 (1 to 24 are supported), `SEL_W` =
clog2(`NUM_PATTERNS`), `CUR_W` = 16 and `OUT_W` = 24.

Timing: `code` and `pattern_sel` are registered on the rising edge. The cell
switches, and through the model Iop and Ion, follow combinationally, so the
latency is one clock. The decoder is otherwise purely combinational.
`dac_core` also has a concurrent assertion that checks, on every clock, that
the number of cells on equals the registered code.

## What is modelled and what is not

* The current sources and switches are analog. `current_array` is a
  behavioural model: an ideal sum of integer unit currents, with no settling,
  glitches or output impedance. The mismatch of each source is an input.
  The currents are a property of the fabricated array, not a signal, so a
  real chip would not have this port.
* Measuring the patterns and picking the best one is a test-floor procedure,
  not hardware. The testbenches do it.
* The converter is fully unary: no binary-weighted LSB section is built.

## Choices made in this RTL

These points are not fixed by the architecture and were decided here:

* There is an input register on `code` and `pattern_sel`, with reset.
* Both thermometer decoders have 7 outputs. The eighth column line, `C7`, is
  tied low, so the last cell of a row only turns on through its row rail.
  This keeps the cell count equal to the code.
* The pattern table uses permutations spaced evenly in lexicographic order,
  and an out-of-range select falls back to pattern 0.
* The cells fill in order within a sub-array: row 0 first, and from column 0
  within a row.
* Currents are integers rather than reals.

## Testbenches

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | checks |
|-----------|--------|
| `tb_therm_decoder` | all 8 codes |
| `tb_unit_cell` | full truth table |
| `tb_control_level` | all four levels × all M1,M2 × all 128 row patterns against the level rule |
| `tb_sub_array` | all thermometer rail/column pairs, plus random inputs per cell |
| `tb_index_mux` | 4-, 12- and 24-pattern builds against an independently generated permutation list; the out-of-range fallback |
| `tb_current_array` | random switch states and currents against a plain sum |
| `tb_dac_core` | every code under every pattern, cell by cell; one-cycle latency; reset |
| `tb_mdac_top` | end to end at the default build: 8 mismatch draws × 4 patterns × 256 codes against reference sums. Also computes the INL, picks the best pattern, and counts each mechanism (partial and full sub-arrays, partial rows, lit last rows, every pattern, best pattern ≠ 0) |
| `tb_mdac_montecarlo` | INL-yield experiment with 2, 4, 8, 12, 23 and 24 patterns at σ = 2.5 … 4.5 % (1000 runs at 3.5 %). The yields must be ordered by pattern set |
| `tb_mdac_sfdr` | SFDR from a DFT of a coherent full-scale sine, conventional order against the best of 4 patterns, at σ = 2, 3.5 and 5 % |

Results of the two experiment testbenches, using endpoint INL and unit
currents drawn from a Gaussian:

| σ_rel = 3.5 %, 1000 runs | conventional | 2 | 4 | 8 | 12 | 23 | 24 patterns |
|---|---|---|---|---|---|---|---|
| INL-yield (\|INL\| < 0.5 LSB) | 64.1 % | 78.8 % | 87.3 % | 94.2 % | 95.9 % | 97.5 % | 97.7 % |

| σ_rel | 2 % | 3.5 % | 5 % |
|---|---|---|---|
| mean SFDR, conventional | 63.7 dB | 60.6 dB | 57.6 dB |
| mean SFDR, best of 4 patterns | 65.3 dB | 62.9 dB | 60.3 dB |
| 20log(3π/4) + 3N − 20log σ | 65.4 dB | 60.6 dB | 57.5 dB |

These figures are close to the published ones for this architecture: 66.5 %
conventional; 78, 89, 93, 96 and 98 % for 2, 4, 8, 12 and 24 patterns.

### Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/mdac_pkg.sv tb/tb_mdac_top.sv \
        --top-module tb_mdac_top -Mdir obj && ./obj/Vtb_mdac_top

Replace `tb_mdac_top` with any testbench name above. The package must be
listed first. The Monte-Carlo testbench runs for about two minutes. The
others take seconds.
