# A reconfigurable array for the discrete wavelet transform

This is a small coarse-grained reconfigurable fabric built for one job: the
one-dimensional discrete wavelet transform (DWT) used in JPEG2000-style image
coding. A generic FPGA puts lookup tables in its logic blocks. This array
instead has three kinds of word-level clusters: add-subtract units,
shift-and-add constant multipliers, and delay/normalizing buffers. They sit in
a routing mesh of 24-bit tracks. One lifting or filter step is one cluster
plus some wiring, so a whole transform fits in a few dozen clusters. Changing
the algorithm, for example from the reversible 5/3 lifting transform to a 9/7
integer transform, is only a matter of rewriting the configuration.

The RTL follows the architecture published by S. Baloch, I. Ahmed and
T. Arslan, "Domain-Specific Reconfigurable Array Targeting Discrete Wavelet
Transform for System-on-Chip Applications". That paper describes what the
clusters do and how they are arranged, but leaves most of the structure open.
Everything it does not specify was filled in here, and the section
*Departures and open points* lists those choices.

## Array at a glance

```
 column:   0        1          2        3        4        5        6
        AddSub  CoeffMult   AddSub   AddSub   Buffer   AddSub   Buffer     row 0
        AddSub  CoeffMult   AddSub   AddSub   Buffer   AddSub   Buffer     row 1
          ...                                                              ...
        AddSub  CoeffMult   AddSub   AddSub   Buffer   AddSub   Buffer     row ROWS-1
```

* `dwt_ra` is the top. By default it has 5 rows × 7 columns: 20 add-subtract,
  5 coefficient-multiplier and 10 buffer clusters. Cluster `r*7 + c` is in
  row `r`, column `c`.
* All data is 24-bit two's complement. That is enough for 16-bit 5/3 and
  20-bit 9/7 integer data with headroom.
* Every cluster registers its result. A value therefore gains **one clock of
  latency per cluster it passes through**. Routing is combinational.
* Inputs: `din[0..8]`, nine 24-bit array inputs that any cluster pin can
  read. A typical use is a sliding window of samples.
* Outputs: `dout[0..1]`. Each one carries the result of one selected cluster.
* Control: `ctrl_in[0..23]`, one bit each. These are the control tracks. An
  add-subtract cluster's serial-mode `first` marker reads one of them.
* Configuration: `cfg_we`/`cfg_addr`/`cfg_wdata`, one 64-bit word per clock.
  A write takes effect at the next clock edge.

## The clusters

### Add-subtract cluster (`addsub_cluster`, core in `addsub_core`)

The cluster is built from three 8-bit add/subtract modules. Two cascade
switches (`casc01`, `casc12`) pass the carry between neighbouring modules:

* both switches closed: one 24-bit unit;
* one switch closed: a 16-bit and an 8-bit unit;
* both switches open: three independent 8-bit lanes.

The operation `op` is A+B, A−B or B−A. Subtraction adds the complement of
the subtrahend and feeds a carry-in of 1 to every module whose carry switch is
open.

There are two serial styles:

* **Digit-serial**: one 8-bit digit per clock on `a[7:0]` and `b[7:0]`,
  least significant digit first.
* **Bit-serial**: one bit per clock on bit 0, least significant bit first.

In both styles a flip-flop carries the carry from one clock to the next. The
`first` input marks the first digit or bit of a word and loads the initial
carry. The result appears on the same low bits one clock later.

### Coefficient multiplier cluster (`coeff_mult_cluster`, shifters in `cfg_shifter`)

This cluster multiplies by constants using only shifts and adds:

```
in1 ─┬─ shifter0 ─┐
     └─ shifter1 ─┴─ AS0 ─────────────┬──────────────► mux
in2 ─┬─ shifter2 ─┐                   ├─ AS3 ─┬──────► mux ─► register ─► y
     └─ shifter3 ─┴─ AS1 ─────────────┤       │
in3 ─┬─ shifter4 ─┐                   │    (switch)
     └─ shifter5 ─┴─ AS2 ─┬───────────┴───────┴─ AS4 ─► mux
                          └────────────────────────────► mux
```

* **Shifters.** Each shifter multiplies or divides by 2^k, with k from 0 to 5.
  Division is an arithmetic shift, so it rounds towards −∞. A shifter can also
  output zero.
* **First level.** Each input feeds a pair of shifters, and the pair feeds an
  add-sub (AS0 to AS2). Each input can therefore be scaled by ±2^a ± 2^b,
  for example 64 = 32 + 32, or −4 = 0 − 4.
* **Second level.** AS3 adds the scaled in1 and in2. AS4 adds the scaled in3
  to either the scaled in2 or, with the switch `as4_from_as3` set, to AS3.
  With the switch set, a single cluster computes `c1·in1 + c2·in2 + c3·in3`.
* **Output.** A multiplexer picks one of the five add-sub results. The result
  is registered.

### Buffer cluster (`buffer_cluster`)

The buffer cluster processes a word in three steps:

1. **Cut to width.** It keeps the low 4, 8, …, 24 bits of the word and
   sign-extends them back to 24 bits.
2. **Normalize.** It shifts right arithmetically by 0 to 15 places (floor
   division by 2^n).
3. **Delay.** It holds the result for 1 to `DEPTH` (4) clocks.

The transforms use it for two things: lining up paths of different length,
and the final normalization of the 9/7 integer transform (2^-8 and 2^-7).

## The routing mesh

This is the part that takes most care when you write a configuration.

**Channels and segments.** A horizontal channel runs above and below every
row, and a vertical channel runs left and right of every column. Each channel
has `NTRK` = 24 tracks, and each track carries one 24-bit word. Channels are
cut into segments one cluster long:

| segment | index | meaning |
|---|---|---|
| horizontal `H(h,c)` | `h*7 + c` | h = 0..ROWS (channel above row h), c = 0..6 |
| vertical `V(v,r)` | `(ROWS+1)*7 + v*ROWS + r` | v = 0..7 (channel left of column v), r = 0..ROWS-1 |

**Switch boxes** (`sbox`) sit at every crossing `(h,v)`, index `h*8 + v`.
Each box has four sides: 0 N, 1 E, 2 S, 3 W. Track *i* leaving a side can be
joined to track *i* of one of the other three sides (Fs = 3). Select code
`c` takes side `(side + c) mod 4`, and 0 leaves the track open. A signal
keeps its track number all along its route.

**Segment drivers** are connection boxes (`cbox`). Every track of every
segment has exactly one driver. It is chosen by a 3-bit code:

| code | driver |
|---|---|
| 0 | none (reads 0) |
| 1 | switch box at the west (H) or north (V) end |
| 2 | switch box at the east (H) or south (V) end |
| 3 | cluster above (H) or to the left (V) |
| 4 | cluster below (H) or to the right (V) |

**Cluster input pins** are connection boxes too. A data pin of the cluster in
row `r`, column `c` reads one of 4×24 + 9 sources:

| source code | source |
|---|---|
| `0*24 + t` | track t of the north segment `H(r,c)` |
| `1*24 + t` | track t of the east segment `V(c+1,r)` |
| `2*24 + t` | track t of the south segment `H(r+1,c)` |
| `3*24 + t` | track t of the west segment `V(c,r)` |
| `96 + j` | array input `din[j]` |

A code past the end leaves the pin open, and it then reads 0.

**Routing a net.** A net is a tree of segments on one track number. The root
segment is driven by the source cluster (code 3 or 4). Every other segment is
driven from its parent through the switch box they share: the segment's
driver code names that end (1 or 2), and the switch box's select for the
segment's side names the parent's side.

Because tracks are multiplexers rather than pass switches, the fabric has
combinational loops as drawn. For example, a segment can drive its neighbour
through a switch box, and the neighbour can drive it back. Verilator reports
these as `UNOPTFLAT`. A configuration made of trees never closes a loop. The
testbench `tb_dwt_ra.sv` contains a breadth-first router (`route_net`,
`route_all`) that produces such trees from a list of nets. Use it as the
reference for writing configurations.

## Configuration address map

`cfg_addr[15:12]` selects a page, and `cfg_addr[11:0]` is the index within
the page. The field layouts of the cluster words are the packed structs in
`rtl/dwt_ra_pkg.sv`.

| page | index | data |
|---|---|---|
| 0 `A_CLUSTER` | cluster | `as_cfg_t` (6 bits), `cm_cfg_t` (44 bits) or `buf_cfg_t` (10 bits), depending on the column |
| 1 `A_PIN` | 3·cluster + pin | source code of that data pin (see above) |
| 2 `A_CTRL` | cluster | control track number for the add-sub `first` pin |
| 3 `A_SEG` | 2·segment + half | drivers of tracks `half*12 .. half*12+11`, 3 bits each |
| 4 `A_OUT` | output | cluster whose result the output carries |
| 5 `A_SBOX` | 4·box + side | select of the 24 tracks leaving that side, 2 bits each |

After reset, every cluster word is zero and every pin, driver, switch and
output is open.

## Mapping the 9/7 integer transform

The integer 9/7 transform used here writes both analysis filters as a product
of small matrices:

`A = N · C · S · L · Iᵀ`

The terms are:

* `I = [x(n−4) … x(n+4)]` is a 9-sample window.
* `L` folds the symmetric taps into five sums:
  `p0 = I0+I8`, `p1 = I1+I7`, `p2 = I2+I6`, `p3 = I3+I5`, `p4 = I4`.
* `S` has five rows. Each row has at most three non-zero power-of-two
  entries:

  | row | terms |
  |---|---|
  | s4 | −4·p1 + 4·p3 + 16·p4 |
  | s3 | 64·p3 + 128·p4 |
  | s2 | 8·p0 − 16·p2 + 8·p4 |
  | s1 | −p0 − 4·p2 + 2·p4 |
  | s0 | −8·p1 − 8·p2 + 8·p3 |

* `C` sums the rows: `a0 = s4+s3+s2+s1` and `a1 = s4+s3+s0`.
* `N = diag(2^-8, 2^-7)` normalizes the two results.

The low-pass result, from a0, has taps `[7, −4, −20, 68, 154, 68, −20, −4, 7]/256`.
These are the CDF 9/7 low-pass coefficients rounded to 1/256. The second
row, a1, is built exactly as the matrices give it:
`[−12, −8, 76, 144, 76, −8, −12]/128`.

The matrices map onto the array as follows:

| step | clusters | notes |
|---|---|---|
| `p0..p3`, and `p4' = 2·I4` | 5 add-sub (column 0) | doubling `I4` halves every p4 coefficient, so `128·p4 = 64·p4'` fits a shifter pair (32+32) |
| `s4, s3, s2, s1, s0` | 5 coefficient multipliers | one row each, three-term sum via the AS4 switch |
| `s4+s3`, `s2+s1` | 2 add-sub | |
| `s0` delayed one clock | 1 buffer | balances `a1`'s path |
| `a0`, `a1` | 2 add-sub | |
| `a0·2^-8`, `a1·2^-7` | 2 buffers | floor |

A new window can enter every clock, and both results leave **5 clocks**
later. A two-channel decimating filter bank keeps `a0` at even `n` and `a1`
at odd `n`.

## Mapping the 5/3 lifting transform

This is the JPEG2000 reversible transform:

* Y(2n+1) = X(2n+1) − ⌊(X(2n)+X(2n+2))/2⌋
* Y(2n) = X(2n) + ⌊(Y(2n−1)+Y(2n+1)+2)/4⌋

The inputs are `din[0..2] = X(2n), X(2n+1), X(2n+2)`, and `din[8]` is held
at the rounding constant 2. The mapping uses 5 add-subs, 2 coefficient
multipliers (as ÷2 and ÷4) and 4 buffers:

* **Predict step.** An add-sub computes X(2n)+X(2n+2) and a multiplier
  divides it by 2. A buffer delays X(2n+1) by 2 clocks, and an add-sub
  subtracts. **Y(2n+1) leaves 3 clocks after its window.**
* **Update step.** A buffer delays Y(2n+1) by one window, giving Y(2n−1).
  Two add-subs add Y(2n−1), Y(2n+1) and the constant 2, and a multiplier
  divides by 4. Two buffers in series delay X(2n) by 6 clocks, and a final
  add-sub adds it. **Y(2n) leaves 7 clocks after its window.**

Adding the constant before the division gives exactly the JPEG2000 result
with integer data.

## Departures and open points

Things this RTL does differently from the published array, or had to decide
on its own:

* **Track width.** The paper uses 24 four-bit tracks per channel. Here every
  track carries a whole 24-bit word. A word track stands for six 4-bit tracks
  routed together, so routing at the level of single 4-bit tracks is not
  modelled. Fc = 24 and Fs = 3 are kept.
* **Switches.** Switches are directional multiplexers, not bidirectional pass
  transistors. Switch boxes use the disjoint pattern, in which a signal keeps
  its track number. Segments are one cluster long.
* **Array I/O.** Every data pin can read an array input directly, and every
  output takes a cluster result directly. The paper does not say how data
  enters or leaves the array.
* **Control tracks.** The 24 one-bit control tracks are not routed through
  the mesh. Each one carries an external `ctrl_in` bit to every add-sub
  cluster.
* **Wider words.** Words wider than 24 bits cannot be built by chaining
  clusters: an add-sub cluster has no carry output for the mesh to carry.
* **Shifter range.** The shifter also has factor 1 and a zero output. The
  paper gives a range of 2 to 32. The integer 9/7 matrices need unit
  coefficients.
* **Multiplier wiring.** The wiring between the multiplier's add-subs, and
  the switch in front of AS4, are one reading of "programmable switches"
  between the sub-modules.
* **Delays and sizes.** The buffer delay range (1–4), the digit size (8
  bits), the `first` marker and the one-clock register in every cluster are
  this design's choices.
* **5/3 update order.** The published 5/3 drawing divides by 4 before the
  delay buffer and adds 0.5 at the end. This mapping adds the +2 before
  dividing, so the integer result is exact.
* **Configuration port.** The configuration port and its address map are
  this design's own. The paper mentions configuration registers and memory
  but does not describe them.
* **Two-dimensional transform.** The paper's figures show a 2-D transform.
  The array computes 1-D passes. The row/column transpose between passes is
  left to the system (the testbench does it).
* **Not covered.** The power, area and frequency figures of the paper are
  silicon results. Nothing here reproduces them.

The default array holds both published workloads: one-level 5/3 and 9/7
transforms of a 128×128 frame. The 5/3 mapping uses 5 add-sub, 2 multiplier,
4 buffer clusters and 10 routed nets. The 9/7 mapping uses 9 add-sub, 5
multiplier, 3 buffer clusters and 15 routed nets. The router uses one track per net,
which leaves most of the 24 tracks in each channel free.

## Files

| file | contents |
|---|---|
| `rtl/dwt_ra_pkg.sv` | widths, configuration structs, enums, address map, side and driver codes |
| `rtl/addsub_core.sv`, `rtl/addsub_cluster.sv` | add-subtract cluster |
| `rtl/cfg_shifter.sv`, `rtl/coeff_mult_cluster.sv` | coefficient multiplier cluster |
| `rtl/buffer_cluster.sv` | buffer cluster |
| `rtl/cbox.sv`, `rtl/sbox.sv` | connection box and switch box |
| `rtl/dwt_ra.sv` | the array |
| `tb/tb_<module>.sv` | self-checking testbench of each block |

## Simulating

Each testbench checks against values it computes itself. It ends by printing
`TB_RESULT checks=N failures=M`. For example, to build and run the full-size
array test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/dwt_ra_pkg.sv \
    tb/tb_dwt_ra.sv --top-module tb_dwt_ra
obj_dir/Vtb_dwt_ra
```

`tb_dwt_ra` routes and configures the 9/7 mapping and transforms a 128×128
test image: rows first, then columns. It then reconfigures the array for 5/3
and transforms the image again. Finally it exercises the serial, split-lane
and narrow-buffer modes. Each output is checked at its exact latency. The
run takes about two minutes, because Verilator evaluates the routing loops
iteratively. Set `IMG` in the testbench to 8 for a run of a few seconds.

The block testbenches run in well under a second. Build them the same way
with their own top, for example
`tb/tb_coeff_mult_cluster.sv --top-module tb_coeff_mult_cluster`.
