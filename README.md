# Systolic array graphics engine (SAG)

A raster display is refreshed one pixel row at a time. This engine computes a
row's shading just before it is displayed, so no frame buffer is needed. The
engine is a one-dimensional systolic array with one small processing element
(PE) per pixel column. A stream of drawing instructions passes through the
row, and each PE works out the intensity of its own pixel from them.

Each instruction names a range of columns and gives start values for an
intensity polynomial. The PEs in that range then evaluate the polynomial
incrementally with forward differences: a PE adds the intensity to its pixel
and passes `I + DI` and `DI + DDI` on to its neighbour. This one mechanism
covers constant, Gouraud (linear) and second-order shading. Second-order
interpolation with the second derivative changed at a few points along the
span is a cheap approximation of Phong shading.

Several spans may cover the same pixel, and their intensities add up. At the
end of the row a refresh instruction (`REF`) moves through the array. It
collects each pixel onto a video chain and clears the PEs for the next row.

Every PE has one 36-bit adder. That adder does all the arithmetic: it finds
the PE's address, interpolates and accumulates. Each operation gets its own
time slot in the instruction packet. The adder's long carry chain limits the
clock rate, so the PEs are pipelined inside: registers on the carry cut the
adder into short sections, and the control is delayed to match.

There are three PE types, and they behave identically:

- **`sag_pe_gy`** (the default): nine sections of 3 to 5 bits each, the
  layout of the silicon prototype.
- **`sag_pe_gx`**: three 12-bit sections.
- **`sag_pe`**: no pipelining; the easiest one to read.

## Instructions

An instruction is a packet of five words on the 36-bit data bus. The words
arrive on consecutive clocks, always in this order:

| slot | word | meaning |
|---|---|---|
| 0 | `X`   | 12-bit address: the instruction starts at column `X + 1` |
| 1 | `DX`  | 12-bit length of the range, or period for `SETP*` |
| 2 | `DDI` | second difference of the intensity |
| 3 | `DI`  | first difference |
| 4 | `I`   | intensity at the first column |

Words an instruction does not use are don't-care. An engine with `N` PEs
covers columns 1 … `N`. Ranges are half-open: `[X+1, X+DX+1)`.

| op (code) | action |
|---|---|
| `NOP` (0) | Nothing. It fills unused packet slots. |
| `REF` (1) | Send every pixel to video, then clear the pixel, the corrections, the `DIS` marks and the `ACC_M` mode. |
| `EVAL0` (2) | Add the constant `I` to every pixel of the range. |
| `EVAL1` (3) | Linear: `I`, `I+DI`, `I+2DI`, … |
| `EVAL2` (4) | Second order: `DI` grows by `DDI` at every column. |
| `SETPI`/`SETPDI`/`SETPDDI` (5–7) | Store a correction for `I`/`DI`/`DDI` at columns `X+1`, `X+1+DX`, `X+1+2DX`, … up to the end of the row. |
| `SETI`/`SETDI`/`SETDDI` (8–10) | Store a correction at column `X+1` only. |
| `DIS` (11) | Exclude the range from the next `EVAL*` (holes in a facet). |
| `ACC_M` (12) | Toggle whether negative intensities are added to the pixel. After `REF` they are added. |

A stored correction takes effect in the next `EVAL*` whose range covers that
PE. There, the corrected value replaces the interpolated `I`, `DI` or `DDI`
at that pixel, and the differences carried on from there start from it. The
correction is then used up, and so is a `DIS` mark. `EVAL0` ignores `DI` and
`DDI` corrections, and `EVAL1` ignores `DDI` corrections.

Each word has a 12-bit tag on a parallel instruction bus. The tag is
`instr_t` in `sag_pkg`:

| bits | field | meaning |
|---|---|---|
| `[11:8]` | `op` | opcode |
| `[7:5]` | `slot` | 0–4, the word's position in the packet |
| `[4:3]` | `st` | address state: `SEEK` = 0, `ACTIVE` = 1, `DONE` = 2 |
| `[2:0]` | reserved | |

The host sends every word with `st = SEEK`. The PEs update the state as the
packet moves along.

## Finding the columns: address counting

PEs have no fixed addresses. The address word is decremented once per PE, and
the PE that sees `X = 0` is column `X + 1`. A broken PE can therefore be
skipped without renumbering anything.

The test uses the PE's own adder. In the `X` slot the adder forms
`X + 0xFFF…F` (that is, `X - 1`). The carry into bit 12, C12, is 0 exactly
when the low 12 bits of `X` are zero.

When a PE hits, it replaces the address word by `DX - 1`, using the adder
again in the `DX` slot. That is why the address word waits one extra clock in
a delay register inside the PE. Later PEs then decrement `DX - 1` in the same
way, which finds the end of an `EVAL*`/`DIS` range or the next period of a
`SETP*`.

The state field records where the packet is:

- **`SEEK`:** the start has not been found yet.
- **`ACTIVE`:** the PE is inside a range.
- **`DONE`:** the packet has finished. PEs ignore it and pass it on.

`DX = 0` gives an empty range. It also ends a `SETP*` after its first column.

## Inside a PE: one adder, five slots

In `sag_pe`, every word leaves a PE two clocks after it entered. The first
clock is the input buffer and the second is the delay register. In each slot
the adder does one job:

| slot | adder computes |
|---|---|
| `X`   | `X - 1`: the location test, C12 |
| `DX`  | `DX - 1`: the new address after a hit |
| `DDI` | `P + I_pending`: deferred accumulation, or the pixel read-out for `REF` |
| `DI`  | `DI + DDI`, sent on as the next PE's `DI` |
| `I`   | `I + DI`, sent on as the next PE's `I` |

The adder is busy in the `I` slot, so an `EVAL` cannot add its own intensity
to the pixel register `P` there. Instead the PE keeps that `I` (after any
correction) and a "pending" flag. It adds them to `P` in the `DDI` slot of the
**next** packet, the one slot where the adder is always free. Because `REF`
reads out through the same sum, the last instruction before a `REF` is
included correctly.

The pending flag is cleared when (`sag_pe_gy` reaches the same result
another way, described below):

- the pixel is marked `DIS`, or
- the intensity is negative while `ACC_M` excludes negative values.

`EVAL0` sends `DI` and `DDI` on as zero, and `EVAL1` sends `DDI` on as zero.
Later PEs therefore see a clean lower-order polynomial even if the host left
data in those words.

Registers `A`, `B` and `C` hold the corrections for `I`, `DI` and `DDI`. Each
has a valid bit.

## Numbers and video

Data words are 36-bit two's complement with 23 fraction bits. The integer part
therefore runs from −4096 to below +4096. Addresses are 12-bit unsigned
integers.

A pixel's 12-bit video value is bits 34..23 of `P`: the integer part,
truncated. A negative `P` is shown as 0. The design does no saturation: a
positive sum of 4096 or more wraps into the sign bit and then reads as 0.

The video chain has one register fewer per PE than the number of clocks a
`REF` packet spends in each PE:

| PE type | `REF` clocks per PE | video registers per PE |
|---|---|---|
| `sag_pe`, `sag_pe_gx` | 2 | 1 |
| `sag_pe_gy` | 4 | 3 |

So the pixels of a row leave `vout` left to right, with `vout_vld` set, on
consecutive clocks. A bypassed PE leaves a one-clock gap.

Rules for the host:

- Send packets back to back, and fill idle time with whole `NOP` packets. The
  default PE needs this strictly: its sign correction, described below, is
  timed from the packet that follows. An assertion in `sag_pe` checks that a
  packet's words arrive on consecutive clocks.
- Send `REF` packets at least `N_PE` clocks apart, so that two rows do not
  meet on the video chain.
- Send a row's instructions after the previous row's `REF` and before the
  `REF` that displays the row.

## Pipelined PEs: skew and delayed control

### Three 12-bit sections (`sag_pe_gx`)

In the unpipelined PE (`sag_pe`), the clock period covers a 36-bit ripple
carry plus its multiplexers. `sag_pe_gx` splits the data path into three
12-bit sections with a register on the carry between sections. Section `j`
handles a word `j` clocks after section 0. The data bus is therefore
**skewed**: bits 23..12 of a word arrive one clock after its tag and bits
11..0, and bits 35..24 two clocks after. `dout` leaves with the same skew, so
PEs chain directly.

Every address lies within the low 12 bits. So every address decision is taken
in section 0, in the same clock as the decrement, and the tag still leaves
after two clocks. The control for one word is computed once, in section 0's
clock, and passed through `j` pipeline registers to section `j` (`ctl_t` in
the source). Each section thus sees the multiplexer settings meant for its
part of the word.

Only one decision depends on a high section: whether a negative intensity is
accumulated, which needs bit 35. The sign of the `I` slot's value is known two
clocks after the `I` slot. The deferred accumulation needs it three clocks
after, in the following packet's `DDI` slot. So the sign is fed back to the
control in time, and the schedule above still holds.

This PE sends each pixel to video two clocks later than `sag_pe` does. Its
carry path is 12 bits long instead of 36.

### Nine short sections (`sag_pe_gy`, the default)

The prototype split the adder into nine sections of 3, 5, 4, 3, 5, 4, 3, 5
and 4 bits (LSB first). The longest carry path is then 5 bits. The bus is
skewed by section: the bits of section `j` travel `j` clocks after the tag.

Here the 12-bit address ends in section 2, so `X = 0` is known only two
clocks after the tag. The PE therefore handles the decision as follows:

- **Where the decision is taken:** in section 2's time frame.
- **While the decision is pending:** the interpolation sums are computed
  speculatively, and both the raw word and the computed word travel on
  through two extra bus registers.
- **Output:** the output multiplexer picks one of the two once the decision
  is known. Every word, tag and data section alike, therefore spends four
  clocks in a PE instead of two.

The sign of an intensity is in the top section, eight clocks after the `I`
slot. By then the deferred accumulation (three clocks after the `I` slot) is
already under way in the low sections. The PE therefore handles `ACC_M`
like this:

1. It always accumulates.
2. It keeps the previous pixel value of each section in a backup register.
3. If the sign shows that the intensity should have been skipped, it
   restores the backup.

The restore reaches section `j` exactly when that section next reads its
pixel register: eight clocks plus `j` after the `I` slot. A `REF` that read
the pixel in the meantime gets the corrected value, because the read-out is
assembled only once the top section has its part. This timing is why
`NOP` idle time must come in whole packets.

A pixel enters the video chain eight clocks later than in `sag_pe`, once the
top section has formed its part of the `REF` sum.

## Bypassing faulty PEs

`bypass[k]` takes PE `k` out of the row. It passes bus words, tags and video
through unchanged, with the same latency. It does not decrement addresses, so
the next working PE takes its column number.

Change `bypass` only while no packet is inside the array, for example after
a few `NOP` packets. A PE switched in the middle of a packet would split that
packet.

## The top: `sag_engine`

```
sag_engine #(N_PE = 9, GROUP_Y = 1, GROUP_X = 1)
  clk, rst                    synchronous active-high reset
  bypass[N_PE-1:0]            per-PE bypass
  din  (36b), iin (instr_t)   packet words and tags into PE 0
  vin  (12b), vin_vld         video into PE 0 (for cascading; tie to 0)
  dout (36b), iout (instr_t)  packet words and tags out of the last PE
  vout (12b), vout_vld        pixels of the row, left to right
```

- **`N_PE`:** the default of 9 is the prototype chip's PE count. A real
  display needs one PE per column: chain engines through `dout`/`iout` and
  `vout`, or set `N_PE`. Address decoding allows up to 4096 columns.
- **PE type:** `GROUP_Y = 1` selects `sag_pe_gy`. With `GROUP_Y = 0`,
  `GROUP_X = 1` selects `sag_pe_gx` and `GROUP_X = 0` selects `sag_pe`.
  `din` and `dout` use the skew of the chosen PE type; `sag_pe` uses none.

Latency, counted from the clock edge that loads the `REF` packet's `DDI` word
into PE 0 (`k` is the physical index of a PE):

| PE | `iin` to `iout` | pixel of PE `k` on `vout` |
|---|---|---|
| `sag_pe_gy` | `4*N_PE` | `3*N_PE + k + 6` |
| `sag_pe_gx` | `2*N_PE` | `N_PE + k + 2` |
| `sag_pe`    | `2*N_PE` | `N_PE + k` |

| file | contents |
|---|---|
| `rtl/sag_pkg.sv` | widths, `instr_t`, opcodes, helper functions |
| `rtl/sag_adder.sv` | ripple-carry adder with a C12 tap |
| `rtl/sag_pe.sv` | unpipelined PE |
| `rtl/sag_pe_gx.sv` | PE with three 12-bit pipelined sections |
| `rtl/sag_pe_gy.sv` | PE with nine 3/5/4-bit pipelined sections (default) |
| `rtl/sag_engine.sv` | the array |

## Design decisions not fixed by the original description

The following follow the original engine:

- the instruction set and slot order;
- the word widths (36-bit data, 12-bit addresses);
- the C12 location test and the substitution of `DX` for `X`;
- one shared adder per PE;
- bypassing of faulty PEs;
- the skewed, section-pipelined data path with delayed control;
- the 3/5/4-bit section layout;
- the two-clock postponement of address decisions, with two extra bus
  registers.

The following are choices made here:

- the tag encoding and the `SEEK`/`ACTIVE`/`DONE` states;
- the half-open ranges;
- the slot in which each addition happens, and the one-packet deferral of
  accumulation;
- that a correction replaces the value at one pixel and is used up by one
  `EVAL`;
- that `REF` also clears corrections, `DIS` marks and `ACC_M`;
- the 23-bit fraction and the position of the video bits;
- synchronous reset;
- in `sag_pe_gy`, the speculative interpolation, the accumulate-then-restore
  handling of the sign, and the three-register video chain.

Not included:

- the surrounding display system that feeds the engine: display-list memory,
  pattern loader and store, the scan-line command buffer, and a
  span-generating front end;
- the scan-path test register.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sag_adder` | Sums against wide arithmetic; C12 for all 4096 addresses. |
| `tb_sag_pe` | Directed cases for every instruction, with exact output words, tags, state and timing. |
| `tb_sag_pe_gx` | The same cases through the 12-bit-section PE, with skewed words. |
| `tb_sag_engine` | Default engine (9 `sag_pe_gy`, no parameters set). Directed rows plus 400 random rows with random bypass masks. Compares every pixel value and its output clock against a reference model, and checks packets leaving the array. Counts 15 mechanisms and fails if any never occurs. Skipped negative intensities are among them, which exercises the restore. |
| `tb_sag_pe_gy` | The same bench on nine `sag_pe_gy` chained directly. |
| `tb_sag_engine_gx`, `tb_sag_engine_flat` | The same bench for the other two PE types. |
| `tb_sag_fig2` | Constant, Gouraud, second-order with two `DDI` changes, Gouraud with a `DIS` hole, and Gouraud with two `DI` changes over one 8-pixel span. Checked against closed-form values. |

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Wno-fatal \
  rtl/sag_pkg.sv rtl/sag_adder.sv rtl/sag_pe.sv rtl/sag_pe_gx.sv rtl/sag_pe_gy.sv \
  rtl/sag_engine.sv \
  tb/tb_sag_engine.sv --top-module tb_sag_engine -Mdir obj
./obj/Vtb_sag_engine
```

Replace the testbench file and top-module name to run the others.
`tb_sag_adder` needs only `sag_adder.sv`.
