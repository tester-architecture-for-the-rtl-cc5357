# Source synchronous strobing for a test system

A device with a source synchronous bus sends its own clock (strobe) next to each group of
data pins, and specifies its data only relative to that clock. A conventional tester places
its compare strobes at fixed times in its own test period. It first has to search for where
the device clock lands, and it still fails good parts once clock and data jitter or wander
by a large part of a bit time. This design instead makes the device clock itself the strobe
that samples the device data. Clock and data move together, so whatever moves both cancels
out. The tester's own compare only has to read a latch during the "quiet time" between two
latch loads.

The RTL covers the digital part of such a tester option:

* the **data strobe receiver (DSR) card**, which turns up to four device clocks into even
  and odd data strobes and fans them out to eight pin slices;
* the **SS pin slice**, which delays those strobes per pin and latches each pin's comparator
  bits with them. Its response compare then checks either the latched bits (SS strobing) or
  the live bits (normal strobing);
* a top level with eight DSR groups: 32 device clocks, 64 SS pin slices and 512 data
  channels.

## Reading the RTL: one clock cycle is 2.5 ps

The real hardware is edge-driven: device clock edges clock latches directly, and the delay
lines are analog. To make this synthesizable, simulate it with a two-state simulator and
check it cycle by cycle, the RTL is written as a **discrete-time model**. One fast sample
clock `clk` drives every module, and one period of it is one time step of 2.5 ps, the
resolution at which strobe delays are programmed.

* A comparator output (`achi`, `ach`, `bcl`) is a bit stream, one sample per step.
* A strobe is a **one-step pulse** in the step where the real strobe edge would be.
* A delay is a number of steps.
* The "SS latch" is a register that loads when its delayed strobe pulse is high.

A 1600 Mbps bit is therefore 250 cycles long and an 800 MHz device clock period is 500
cycles. The testbenches drive whole waveforms at this resolution. If you connect this RTL to
anything else, keep that in mind: `clk` is a time base, not a bus clock.

## Strobe path: the DSR card (`ss_dsr`, `ss_strobe_gen`)

The DSR card gets the "above comparator high" bits of four device clocks, `achi[3:0]`. Each
clock feeds two strobe generators, one even and one odd, each with its own configuration
`stb_gen_cfg_t`:

| field  | meaning |
|--------|---------|
| `en`   | strobe generation on. Clear it when the card is used as a normal channel. |
| `mode` | `EDGE_RISE`, `EDGE_FALL` or `EDGE_BOTH` (double strobe) |
| `div2` | pass only every second selected edge |

With even and odd generators per clock, the even strobe and the odd strobe can come from the
rising and falling edges of one clock, or from two different clocks.

**The by-2 divider and DINH.** Each generator has its own drive-inhibit input (`dinh_e[c]`,
`dinh_o[c]`), which the tester's DSR pin slice raises at a programmed time in the pattern.
While DINH is low the divider is held in its start phase and sends nothing. The first
selected edge after DINH rises gives a strobe, then every second edge after it. A device
clock edge per bit then loads each latch only every fourth bit: bits 0,1,4,5,… go to the
even/odd latches. In a second functional pass, DINH is raised one device clock later, and
bits 2,3,6,7,… are tested. Without `div2`, DINH is ignored. Each DINH input first passes a
programmable delay line (`dinh_code_e/o`), so calibration can place the event exactly. There
are eight such lines, one per generator. A DINH level is delayed by sending each of its
transitions through a strobe delay line and toggling a register at the output. DINH must
therefore not toggle faster than the line can hold transitions in flight.

**Fan-out.** Eight 4:1 muxes pick one of the four even generators for each even output
`estb[k]` (select `sel_e[k]`). Eight more muxes do the same for `ostb[k]`. Output `k` feeds
pin slice `k` of the group. To wire one strobe pair to several slices, give their outputs
the same select.

Latency: a strobe appears one step after the sample in which the edge is seen.

## Compare path: the SS pin slice (`ss_pinslice`, `ss_pin_channel`)

A pin slice serves eight channels, taken as four even/odd pairs. Even channels use the even
strobe and odd channels use the odd strobe.

```
 ach/bcl of pin 2p, 2p+1 ──► pin mux ──► ACH ─┬──────────────► SS mux ─► response compare ─► fail
                          (normal / mux)      └─► SS latch ─┘    ▲           ▲
 estb/ostb ──► delay line A/B (fixed + coarse + fine) ──┘     ss_en     tstb, exp_st
```

* **Pin mux.** In normal mode each channel compares its own pin. In mux mode
  (`mux_mode[p]`), the ACH/BCL bits of one pin of the pair go to both channels: the even pin,
  or the odd pin when `mux_odd[p]` is set. Each channel handles at most 800 Mbps. In mux mode
  the even channel takes the even bits and the odd channel the odd bits of one 1600 Mbps pin.
* **Delay lines.** Every channel has one delay line for the ACH latch and one for the BCL
  latch, 16 per slice. A line's delay is a common fixed delay plus a coarse and a fine
  element in series: `8 + 16*coarse + fine` steps (20 ps to 1297.5 ps). A line can hold four
  strobes in flight. A fifth one is dropped and raises the sticky `dly_overflow` flag. Use
  the delay both to deskew the strobe path and to place the latching point in the data eye.
  Sweep it to measure the device's clock-to-data timing.
* **SS latch and SS mux.** The delayed strobe loads the latch. With `ss_en[i]` set, the
  response compare sees the latch, otherwise the live bit.
* **Response compare** (`ss_ric_compare`). At the tester strobe `tstb` it checks the two
  comparator bits against the expected state: `EXP_H` needs ACH, `EXP_L` needs BCL,
  `EXP_Z` needs neither, `EXP_X` masks the compare. One step later `cmp_valid` pulses and
  `fail` gives the result. `fail_sticky` collects failures until `clr`.

**Where to put the tester strobe.** The latch holds bit *k* from its load until the next
load of the same latch. Clock jitter moves both loads, so the safe window, the quiet time,
is the latch reload interval minus the peak-to-peak clock jitter:

* normal mode: 1 UI minus the jitter;
* mux mode: 2 UI minus the jitter;
* two-pass mode: 4 UI minus the jitter.

Put the tester strobe in the middle of that window. In mux mode a tester strobe 1.5 UI after
the nominal start of the bit tolerates about ±1 UI of common clock/data wander. In two-pass
mode, 2.5 UI after the bit start tolerates about ±2 UI.

## Programming delays: the deskew table (`ss_deskew_lut`)

Real delay elements are not linear, so a code cannot be computed from a wanted delay.
Calibration measures the elements and fills a 512-entry table per slice. The entry for a
wanted delay *t* (in 2.5 ps steps) holds the coarse/fine code that comes closest to it.
Write the table with `lut_we/lut_addr/lut_wdata`. To program line `l` (line `2i` is pin
`i`'s ACH path, `2i+1` its BCL path), give `dly_we`, `dly_line = l` and `dly_time = t`. The
slice reads the table and loads the line's code register one clock later. The model's
elements are ideal, so a table that maps *t* to `coarse = (t-8)/16`, `fine = (t-8)%16`
gives exactly *t*. A real calibration would fill it with measured values. The table RAM is
not reset, and code registers reset to zero (20 ps).

## Top level (`ss_option_top`)

`N_DSR` groups (default 8), each with one `ss_dsr` and eight `ss_pinslice`. Slice
`s = 8*g + k` takes `estb[k]`/`ostb[k]` of DSR `g`. All inputs and outputs are arrays
indexed by DSR or slice. The table fill and delay programming bus is shared, with one write
enable bit per slice. Everything the tester's other parts supply is an input port:

* the digitized pin data `ach`/`bcl`;
* the device clock bits `achi`;
* the DINH events;
* the tester strobes and expected states.

Cable delays are applied to those inputs. The strobe cables are made shorter than the data
cables, so the strobe arrives first and the delay line moves it into the eye.

## Sizes

| quantity | value | origin |
|---|---|---|
| DSR cards | 8 | described system maximum |
| device clocks per DSR | 4 | described |
| even / odd strobe outputs per DSR | 8 / 8 (4:1 muxes) | described |
| DINH delay lines per DSR | 8 | described |
| pin slices per DSR, channels per slice | 8, 8 | described |
| max channel rate; mux-mode pin rate | 800 / 1600 Mbps | described |
| delay step | 2.5 ps | described |
| fixed / coarse / fine delay | 20 ps / 32 × 40 ps / 16 × 2.5 ps | own choice |
| strobes in flight per delay line | 4 | own choice |
| deskew table | 512 entries × 9 bits per slice | own choice |
| expect encoding, sticky fail | X/L/H/Z | own choice |

At the defaults the top has about 61k flip-flops and 295 kbit of table RAM.

## What is not here

* The analog front end: pin electronics comparators and drivers, terminations, DC
  parametric measurement, cables and cable compensators.
* The tester's existing pin slice functions: pattern memories, capture memory, timing
  generation and formatting. The same goes for the DSR pin slice that issues DINH.
* The software that fills the table, sweeps delays and places tester strobes.

Departures from the described hardware:

* Strobe edges become one-step pulses.
* The latch is a clock-enabled register.
* The delay lines are ideal counters with a limit of four strobes in flight.
* Tester strobes are inputs. The testbenches compare each latched bit once per latch load,
  in the quiet time. Strobing a latch every UI is possible, but it only repeats the compare.
* Each DSR output feeds exactly one slice. A drawing of the system shows one strobe pair
  shared by two slices; you get that by giving two outputs the same select.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. Build any of
them with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_ss_option_top rtl/ss_pkg.sv tb/tb_ss_option_top.sv
./obj_dir/Vtb_ss_option_top
```

| testbench | what it shows |
|---|---|
| `tb_ss_strobe_gen` | all edge modes, enable, by-2 with DINH at two start times; every step checked against a model of the driven edges |
| `tb_ss_delay_line` | random codes, several strobes in flight, exact output steps, overflow on a fifth strobe |
| `tb_ss_deskew_lut` | table fill with a non-linear code set, read latency and hold |
| `tb_ss_ric_compare` | the H/L/Z/X truth table, result timing, sticky flag and clear |
| `tb_ss_pin_channel` | a wandering 64-step-UI stream: SS strobing passes every compare; normal strobing fails exactly where the wander moves the data edge past the fixed strobe |
| `tb_ss_pinslice` | random modes, per-pin SS enable and table-programmed delays; every compare on all 8 pins checked against a model |
| `tb_ss_delay_search` | a per-pin delay sweep on one slice: with SS strobing the passing window starts exactly at each pin's clock-to-data skew and spans the shortest bit; with fixed strobes the same wander narrows it by its peak-to-peak size |
| `tb_ss_option_top` | the full default system (512 channels) running the test modes below, with deliberate bad bits that must fail and nothing else failing |

`tb_ss_option_top` runs, at 1600 Mbps unless noted:

1. two clocks, rising edges, mux mode, one pass (UI 250 steps);
2. the same with the by-2 divider, in both passes, with 1.2 UI of wander;
3. one pass with that wander, which must now show extra failures;
4. one clock, rising edge to even and falling edge to odd;
5. a double strobe at 800 Mbps in normal mode;
6. SS strobing off, which must show wander failures.

It takes about 20 s of simulation plus build time.

To change a size, edit the constants in `rtl/ss_pkg.sv`: delay element widths and step,
slots, table depth. For the number of groups, use `N_DSR` on `ss_option_top`. The
testbenches compute delays as `8 + 16*coarse + fine` and must follow such a change.
