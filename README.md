# A 20×20 XC6200-style FPGA in SiGe current-mode logic: RTL model

This design is a fine-grained FPGA meant for multi-gigahertz work. It is
built from SiGe bipolar current-mode logic (CML), where every MUX and latch is
a differential current-steering tree. The logic is kept deliberately
simple: each basic cell (BC) has three routing MUXes, a 2:1 MUX and a D-flip-flop,
and nearest-neighbour routing, like the Xilinx XC6200 cell. That keeps the
delay of one cell at tens of picoseconds. CML draws its full tail current
all the time, so power is the limiting resource. The cell is therefore built
so that **every current tree can be switched off by configuration**. An unused
MUX, an unused flip-flop, an unused redirection or a whole unused cell costs
no current.

The RTL here models the logic function of the chip at the cycle level:

* the cell with its routing MUXes, logic block and per-tree power switches;
* the per-cell programming circuit, with two stored configurations;
* the 20×20 array;
* the test periphery around the array: oscillator, divider, input MUXes,
  clock MUX and output select.

It does not model CML delays or power. The clock H-tree, power rails and pads
have no logic function and are left out. The oscillator is a behavioural
model.

## The basic cell

```
            F3 (16:1)
               |
  F1 (17:1) -> CLB -> C, Q  ----> to all four neighbours (Cx, Qx)
  F2 (17:1) ->
                          Nout/Eout/Sout/Wout (4:1 redirection MUXes)
```

### Inputs seen by a cell

From each direction d ∈ {E, W, S, N} the cell receives four signals (the
`nbr_t` struct in `sige_fpga_pkg`):

| member | meaning |
|---|---|
| `x`  | the neighbour's redirection output pointing at this cell (E, W, S, N) |
| `x4` | the length-4 signal of the 4×4 block in that direction (E4, W4, S4, N4) |
| `c`  | the neighbour's combinational output (Ce, Cw, Cs, Cn) |
| `q`  | the neighbour's flip-flop output (Qe, Qw, Qs, Qn) |

### Input routing MUXes (`input_routing_mux`, `mux_decoder`)

F1 and F2 are 17:1 MUXes and F3 is a 16:1 MUX. Each is two levels of small
MUXes. There is one 4:1 MUX per direction, and then a 5:1 MUX whose fifth
input is the cell's own Q. F3 uses a 4:1 MUX at this second level and has no
Q input. A decoder turns the 5-bit configuration code into one-hot enables:
4 per first-level MUX and 5 for the second level, 21 lines for the 17:1 MUX.
Only the first-level MUX on the selected path is powered.

| code | selects |
|---|---|
| 0 | nothing: tree off, output 0 |
| 1–4 | E, E4, Ce, Qe |
| 5–8 | W, W4, Cw, Qw |
| 9–12 | S, S4, Cs, Qs |
| 13–16 | N, N4, Cn, Qn |
| 17 | own Q (F1 and F2 only) |
| 18–31 | off |

### Logic block (`clb`)

`C = F3' ? F2' : F1'`. Here `Fi'` is `Fi` XOR the polarity bit `inv[i]`
(a rail swap, which costs nothing in differential logic). A 2:1 MUX with
polarity control gives every two-input function that a MUX can make:
AND (F1 off), OR, XOR with a fixed input, and inverter or buffer.

The flip-flop has the 2:1 selection built into its master latch, as two
independent current trees:

| `on1` | `on2` | on the rising clock edge |
|---|---|---|
| 1 | x | Q ← C (load) |
| 0 | 1 | Q ← Q (hold) |
| 0 | 0 | flip-flop off, Q = 0 |

`clear` (active high) clears Q asynchronously. It is common to the whole array.

### Output routing (`output_routing_mux`)

C and Q go straight to all four neighbours. Four 4:1 MUXes redirect signals
that pass through the cell. Each takes the `x` inputs from the three other
directions, plus a feed-through of one input MUX:

| output | code 1 | code 2 | code 3 | code 4 (feed-through) |
|---|---|---|---|---|
| Nout | E | W | S | F3 |
| Eout | N | S | W | F2 |
| Sout | E | W | N | F3 |
| Wout | N | S | E | F1 |

Code 0 (and 5–7) switches the MUX off.

### Power-saving cases

Code 0 in any field switches off that tree. The original circuit's
tree counts per case are:

* logic only: 7 trees for combinational, 9 for sequential;
* each enabled redirection MUX: +3 trees;
* redirection only: 3 trees per direction;
* all 21 trees: sequential logic with four redirections.

An all-zero configuration word switches off the whole cell. `tb_basic_cell`
runs every one of these cases.

## Configuration word and programming chain

`bc_cfg_t` (32 bits, MSB first):

| bits | field |
|---|---|
| 31:27 | `f1_sel` |
| 26:22 | `f2_sel` |
| 21:17 | `f3_sel` |
| 16:14 | `inv` (F3, F2, F1) |
| 13 | `on1` |
| 12 | `on2` |
| 11:9 | `nout_sel` |
| 8:6 | `eout_sel` |
| 5:3 | `sout_sel` |
| 2:0 | `wout_sel` |

Every cell has a `bc_config` block. It holds three things:

* a 32-bit shift register;
* a two-word RAM;
* a read gate.

The shift registers of all cells form one chain. It starts at cell (0,0) and
runs row by row, bit 0 to bit 31 within a cell. To load an R×C array, shift
R·C·32 bits with `shift_en`. Bit `b` of the cell with index `k = row*C + col`
is the bit shifted in at step `R·C·32 − 1 − (32k + b)` (counting from 0). So
the last cell's bit 31 goes in first and cell (0,0)'s bit 0 goes in last.

* `write_en` copies every shift register into RAM word `wr_sel` in one clock.
* `read_en` drives the cells from RAM word `rd_sel`. While `read_en` is low,
  every cell sees an all-zero word, which is "all off". The RAM powers up with
  random contents, and this gate stops them from turning on random trees.
* Two words mean the array can switch between two complete configurations in
  one cycle with `rd_sel`. A new configuration can be shifted into the
  inactive word while the array keeps running.

The chain's value at each quarter of its length (`prog_tap[3:0]`; `[3]` is
the serial output) is brought out for checking.

## The array (`fpga_core`)

Row 0 is the north edge and column 0 the west edge.

* Cell (r,c) gets its E inputs from cell (r,c+1): that cell's Wout, C and Q.
  The W, S and N inputs come from the other neighbours in the same way.
* The length-4 input E4 of cell (r,c) is the C output of cell (r,c+4), the
  same place in the neighbouring 4×4 block. W4, S4 and N4 work the same way.
* At the array edge, the edge input of that row or column replaces the
  missing neighbour. The length-4 inputs that reach past the edge all share
  that edge input's `x4` bit.
* Edge outputs carry the edge cell's redirection output, C and Q. Their `x4`
  is the C of the fourth cell in.

The redirection MUXes form structural combinational loops through the fabric,
as every FPGA routing fabric does. Verilator reports them (UNOPTFLAT). A loop
only closes if a configuration selects one, for example a ring oscillator
made of cells. A zero-delay two-state simulation cannot run such a
configuration.

## Chip periphery (`sige_fpga_chip`)

* `ffi_vco` is a behavioural model of the feed-forward interpolated
  ring oscillator. It has four differential stages. Each stage mixes the
  previous stage with the one before it, under the control voltage, so the
  ring runs between a 4-stage ring and two 2-stage rings. The model maps
  `vctrl` linearly from 0.7 V → 8 GHz to 1.2 V → 13.7 GHz, the chip's measured
  range, and clamps outside that span. Its output is `osc_out`.
* `freq_divider` divides the oscillator clock by 2, 4, 8 and 32 (parameter
  `DIV_LOG2`; `'{1,2,3,4}` gives /16 instead of /32).
* Two `test_signal_mux` instances feed the core either the external 4-bit
  Signal A / Signal B (`sel_a`/`sel_b` = 0) or the four divider outputs.
  Signal A drives the W redirection input of rows 0–3 on the west edge, and
  Signal B that of rows 4–7.
* `clock_select` clocks the array from `ext_clk` or the oscillator
  (`clk_sel`). It is a plain MUX, so change it only while the array is idle.
* `output_select` brings one of four core outputs to `fpga_out` (`core_sel`)
  and one of the four chain taps to `prog_out` (`prog_sel`). The core outputs
  are the Eout redirection outputs of rows 0–3 on the east edge.
* The programming chain is clocked by `ext_clk`, with its serial input at `data`.

## Mapping circuits onto the array

`tb/tb_chip_workloads.sv` maps two application circuits cell by cell onto the
full chip and runs them from the oscillator clock. Both show how the cell's
small vocabulary is used.

**4:1 serialiser** (configuration word 0). Four channels enter as Signal A,
and their bits leave one per clock cycle. In the original demonstration the
first-stage flip-flops run from a separately divided half-rate clock. This
array has a single clock tree, so the slower selects are made from cells
instead:

* A toggle cell (`f1 = own Q`, `inv[0]`, `on1`) gives T0 = clk/2.
* A divide-by-4 cell gives T1, with `C = T0 ? ~Q : Q`: `f1 = f2 = own Q`,
  `inv[1]`, `f3 = Qe`.
* Channel registers sit at (0,0), (1,0), (3,0) and (4,0). Sout redirections
  bring CH3 and CH4 down column 0.
* First-stage MUX+flip-flop cells sit at (1,1) and (3,1), both selected by T1.
  T1 is rebuilt next to each of them, and all copies start in step after `clear`.
* The final 2:1 MUX sits at (2,1), selected by T0. T0 comes in through the
  Wout feed-through of (2,2).
* The output leaves through the F2 feed-through of (2,2) and then along row 2.

The mapping takes 16 cells, twice the 8 of the original clock-divided mapping,
because the half-rate selects come from cells.

The output order is CH2, CH4, CH1, CH3, one bit per oscillator cycle. This
gives 13.7 Gbit/s in simulation at the top of the tuning range. That rate is
the model's clock, not a timing claim.

**4-bit counter** (configuration word 1):

* Bit cells (3,0)–(3,3) compute `C = carry ? ~Q : Q`. Bit 0 toggles every cycle.
* Carry cells (2,0)–(2,3) compute `carry[k+1] = carry[k] & Q[k]`. A 2:1 MUX
  with F1 switched off is an AND.
* Each carry cell passes `carry[k]` down to its bit cell through its Sout
  (F3) feed-through.

Bit 3 leaves on row 3.

## How far to trust it, and where it is this design's own

The routing structure is taken from the published cell:

* 17:1/16:1 MUXes built as 4:1 + 5:1/4:1 with decoders;
* Q fed back into F1/F2;
* the CLB's F3-selected 2:1 MUX;
* the flip-flop with a built-in load/hold choice and clear;
* C and Q going to all neighbours;
* 4:1 redirection MUXes with a feed-through;
* the per-tree power switches.

So are the programming scheme (serial shift, Write_EN into RAM, Read_EN gate,
two stored configurations), the 20×20 size and the periphery.

The following are this design's choices:

* all code values and the 32-bit word layout;
* which F3 value selects F2;
* the polarity bits. The cell is meant to be function-compatible with the
  XC6200, whose function unit has selectable input inversion.
* the feed-through sources of Eout (F2), Nout and Sout (F3). Wout's F1
  feed-through follows the original;
* the meaning of E4/W4/S4/N4 (C of the cell four away);
* edge handling, chain order and tap points;
* which array rows the chip's 4-bit buses connect to;
* the 4:1 form of the output select;
* the asynchronous active-high clear;
* "Q = 0 when both flip-flop trees are off";
* separate read and write word selects.

The divider's last tap is /32, as the block diagram labels it. The
accompanying description says /16, which is one parameter value away.

Not modelled: CML timing (about 42–100 ps per cell, depending on process and
mode), power, the differential H-tree clock distribution with its repeaters,
the power rails and the pads.

## Simulating

Any testbench builds with plain Verilator 5. The package goes first:

```
verilator --binary --timing -Wno-fatal --top-module tb_fpga_core -y rtl -y tb +libext+.sv \
    -Irtl rtl/sige_fpga_pkg.sv tb/tb_fpga_core.sv
./obj_dir/Vtb_fpga_core
```

`-Wno-fatal` is needed because Verilator warns about the fabric's structural
combinational loops (see "The array") and otherwise stops on the warning.

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_mux_decoder`, `tb_input_routing_mux`, `tb_output_routing_mux`, `tb_clb`, `tb_bc_config` | each cell component against an independent model |
| `tb_basic_cell` | the whole cell against a reference model, with random configurations, including every power-saving case |
| `tb_fpga_core` | an 8×8 array programmed through the chain: routing in all four directions, length-4 hop, 8-stage pipeline latency, toggle, plane switch during a load, clear, Read_EN |
| `tb_sige_fpga_chip` | the full 20×20 chip through its pins: inverter, 20-stage shift register (register-to-register), MUX, toggle, hold, clear, plane switch, divider into the core, oscillator-clocked core, output and tap select |
| `tb_chip_workloads` | the serialiser and counter mappings above, at full size |
| `tb_freq_divider`, `tb_test_signal_mux`, `tb_clock_select`, `tb_output_select`, `tb_ffi_vco` | the periphery |

The full-size chip tests take one to three minutes each. Most of that time
goes into shifting 12,800 configuration bits per word. To change the array
size, set `ROWS`/`COLS` on `sige_fpga_chip` or `fpga_core`.
