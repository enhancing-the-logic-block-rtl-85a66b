# An FPGA soft logic cluster with hardened adders under fracturable LUTs

Adders are among the most common operations mapped onto FPGAs, and building
them from LUTs alone is slow: each bit needs LUTs for both the sum and the
carry, and the carry has to cross general routing. This design is the logic
cluster of an FPGA in which a *hard* adder runs underneath the LUTs. Each
logic element can hand two LUT-computed operands to one bit of that adder and
take the sum back, and the carry travels on a dedicated chain from element
to element and from cluster to cluster. The LUTs are *fracturable*: each
6-input LUT can also work as two 5-input LUTs that share four inputs. So an
element gives either one large function or two smaller ones, and those two
smaller ones are exactly what the adder's two operands need.

The RTL is a synthesizable, configurable model of that cluster: truth
tables, multiplexer selects and mode bits live in a configuration memory
that is shifted in serially. Loaded with a configuration, the cluster
computes what the FPGA user mapped onto it. It models logic only. It has no
transistor-level timing.

## Organisation of one cluster

```
                 cin (carry link from the cluster above)
                  |
 gen_in[39:0] --> +-----------+   6 pins   +--------+  a,b   +-----------+
  (4 groups      |  local     |----------->| elem 0 |------->| adder bit0|
   of 10)        |  crossbar  |     ...    |  ...   |<-------|    ...    |
 feedback ---->  | (4 sub-    |----------->| elem 7 |  sum   | adder bit7|
 (element outs)  |  crossbars)|            +--------+        +-----------+
                 +-----------+                |                    |
                                        out[15:0]                 cout
```

| Part | Module | What it is |
|---|---|---|
| cluster | `soft_logic_block` | 8 elements, crossbar, hard adder, configuration chain |
| fracturable element | `fble` | one fLUT, two outputs, two optional flip-flops |
| non-fracturable element | `ble` | one 6-LUT, one output, fast register feedback |
| fracturable LUT | `flut` | 6-LUT, or two 5-LUTs sharing inputs 0..3 |
| local crossbar | `crossbar`, `xbar_full` | four fully populated sub-crossbars, 50% of inputs per pin |
| hard adder | `hard_adder_chain`, `cla4`, `ripple_carry_chain`, `hard_full_adder` | 8 bits per cluster, as CLA-4 blocks or ripple full adders |
| configuration memory | `config_chain` | serial shift chain, parallel outputs |
| shared types | `fpga_pkg` | sizes, adder-kind enum, per-element configuration records |

Sizes that come from the reference architecture: 8 elements per cluster,
6-input LUTs, 40 general inputs in four groups of ten, and a local crossbar
that is 50% populated and built from four fully populated crossbars. The
fracturable cluster has 16 outputs instead of 8. The hard adder is either
8 ripple-carry full adders or 4-bit carry-lookahead adders, and the cluster
has one carry-in pin and one carry-out pin.

## The logic element and its adder bit

An element's LUT is built the way a 6-LUT is built in silicon: two 5-LUTs
(halves A and B, truth-table bits [31:0] and [63:32]) and a 2:1 mux on
input 5.

* **6-LUT mode** (`frac = 0`): both halves see inputs 0..4, and input 5
  picks between them. Output 0 is `lut[in]`.
* **Fractured mode** (`frac = 1`): A sees `{in4, in3..in0}` and B sees
  `{in5, in3..in0}`. That gives two independent 5-input functions that share
  four inputs. They appear on outputs 0 and 1.
* **Adder mode** (`adder_en = 1`): half A drives adder operand *a* and
  half B drives operand *b*. Output 0 then carries this bit's sum. This is
  the *balanced* interaction, with the same depth of logic in front of each
  operand. In it, any 5-input function of the element's pins can feed each
  side of the adder, for example a multiplexer choosing what to add. Output
  1 still shows operand b.

Each output has a flip-flop and a bypass mux (`reg_out`). A mux in front of
each flip-flop (`ff_din`) can load LUT input 5 directly instead, so an
unrelated register can share the element. The non-fracturable `ble` has one
output. It adds a fast path (`fb_en`) that feeds its own flip-flop back
into LUT input 0 without going through the crossbar.

## Starting and chaining an addition

Element 0 is the least significant adder bit. Its carry-in is the cluster's
`cin` pin, and bit 7's carry-out is `cout`. Connecting `cout` of one cluster
to `cin` of the next gives adders wider than 8 bits.

**No element has a multiplexer that forces the carry to 0 or 1.** To start
an addition at some bit, the mapping tool puts a *dummy adder bit* just
below it. That bit's LUT halves are constants:

* operands 0, 0 give carry-out 0, which starts an addition;
* operands 1, 1 give carry-out 1, whatever the incoming carry.

Subtraction `a - b` is then LUT half A = `a`, LUT half B = `NOT b`, with a
dummy 1,1 bit below: `a + ~b + 1`. The end-to-end test does exactly this in
element 0. It checks that elements 1..7 give `(a - b) mod 128` and that
`cout` is the no-borrow flag `a >= b`. The dummy bit costs one element per
addition. In exchange, the carry path has no start mux anywhere.

The CLA-4 primitive uses generate `g = a & b` and inclusive-OR propagate
`p = a | b`, and it computes all four carries from `cin` in two logic
levels. With `ADDER_CLA4` the cluster holds two CLA-4 blocks, and the carry
ripples from the first block to the second. With `ADDER_RIPPLE` it holds
eight chained full adders. The two give the same results; they differ only
in delay and area. The reference characterises the 1-bit hard adder at
47.7 minimum-width transistor areas. Its delays are 11 ps cin→cout, 56 ps
operand→cout, 30 ps cin→sum and 83 ps operand→sum. None of this timing is
in the RTL.

## Local crossbar: who can reach which pin

The 48 element input pins (8 × 6) are served by four fully populated
sub-crossbars. Sub-crossbar *s* drives all pins of elements 2s and 2s+1.
Its inputs, numbered as the select values that choose them:

| select | source |
|---|---|
| 0..9 | general inputs `10*s .. 10*s+9` (group s) |
| 10..19 | general inputs of group `(s+1) mod 4` |
| 20 + 2r + k | output k of element `(2s + r) mod 8`, r = 0..3 |
| 28..31 | constant 0 (pin unused) |

In the non-fracturable cluster each element has one output, and the
feedback selects are `20 + r`.

Each pin therefore reaches exactly half of the general inputs and half of
the element outputs. Within a group the ten inputs are logically
equivalent: placement and routing may put a signal on any of them. A signal
that elements in different pairs need must arrive in a group both pairs
can see, or go through feedback. For example, element 3 can read element 5,
but element 4 cannot read element 3. The group-to-pair assignment is this
design's own; the reference fixes only the 4 × 10 grouping and the 50%
population.

## Configuration image

`CFG_W` bits (800 by default; 784 with non-fracturable elements) are
shifted in on `cfg_in` while `cfg_en` is high, most significant bit first.
The bits shifted out appear on `cfg_out`, so clusters can be daisy-chained
and a configuration can be read back. Layout:

```
[XBAR_W-1:0]                      crossbar: pin p of element e at bits (e*6+p)*5 +: 5
[XBAR_W + e*ELEM_W +: ELEM_W]     element e: fble_cfg_t (70 bits) or ble_cfg_t (68 bits)
```

with `XBAR_W = 240`. The element records are packed structs in `fpga_pkg`.
From the most significant field down:
`fble_cfg_t = {lut[63:0], frac, adder_en, reg_out[1:0], ff_din[1:0]}` and
`ble_cfg_t = {lut[63:0], adder_en, reg_out, ff_din, fb_en}`.

**Start-up rule.** While `rst_n` is low or `cfg_en` is high, the element
outputs that feed back into the crossbar read as 0. A half-loaded
configuration is arbitrary, and could otherwise wire a LUT's output back
into itself as an oscillator. Hold `rst_n` low while shifting, then release
it. This mirrors an FPGA's start-up sequence. A *loaded* configuration can
still close a combinational loop through feedback, exactly as a real FPGA
can be misprogrammed. That possibility is also why lint and synthesis
report a circular path through `out → crossbar → LUT → out`. The loop is
structural and is broken by the configuration.

## Timing

Everything between `gen_in`/`cin` and an unregistered output is
combinational, including the carry chain to `cout`. Registered outputs
change on the rising edge of `clk`, one cycle after their D value, and
`rst_n` clears them asynchronously. The configuration chain shifts one bit
per clock. It has no reset; it is valid after `CFG_W` shifts.

## Parameters

`soft_logic_block #(FRACTURABLE, ADDER_ARCH)`:

* `FRACTURABLE = 1` (default): `fble` elements, 16 outputs.
  `FRACTURABLE = 0`: `ble` elements, 8 outputs, fast register feedback.
* `ADDER_ARCH = ADDER_CLA4` (default) or `ADDER_RIPPLE`.

The other parameters are derived sizes (`FB`, `N_OUT`, `M_SUB`, `SW`,
`XBAR_W`, `ELEM_W`, `CFG_W`) and should be left alone. The cluster geometry
constants are in `fpga_pkg`. The crossbar's select arithmetic assumes 8
elements in 4 pairs.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. For example, the end-to-end test at
default sizes:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fpga_pkg.sv \
    tb/tb_soft_logic_block.sv --top-module tb_soft_logic_block
./obj_dir/Vtb_soft_logic_block
```

| Testbench | What it checks |
|---|---|
| `tb_soft_logic_block` | Default cluster, end to end, with the expected values worked out from integer arithmetic. It covers: 8-bit hard addition from `cin` to `cout`; a 7-bit subtraction started by a dummy bit; a registered adder with one cycle of latency; two 5-input functions per element; random 6-input functions through random crossbar selects; two-level logic through feedback, within and across sub-crossbars; a registered toggle through feedback; a 2-bit LUT-only adder, with sum and carry in one fractured LUT and the low sum bit in a second element; `(sel ? X : Y) + (sel ? U : V)`, with a 2:1 mux in each LUT half in front of each adder operand; and configuration read-back. Each mechanism is counted and must run at least once. |
| `tb_soft_logic_block_variants` | Non-fracturable/ripple, non-fracturable/CLA-4 and fracturable/ripple clusters, through `slb_variant_check`. It covers addition, dummy-started subtraction and a registered toggle, using the `ble` fast path. |
| `tb_carry_link_adder` | Two default clusters joined by the carry link and the configuration chain (one 1600-bit image). It covers 16-bit addition with the carry crossing between clusters, and 15-bit subtraction started by a dummy bit. |
| `tb_cla4` | The six operand pairs of the reference waveform, with their sum, generate, propagate and carry vectors; then all 512 input combinations. |
| `tb_flut`, `tb_fble`, `tb_ble` | LUT modes over all 64 inputs, adder operand and sum selection, register latency, direct flip-flop input, feedback toggle, reset. |
| `tb_crossbar` | Random selects against the select table above, plus a walk showing which pins can and cannot see each general input. |
| `tb_hard_full_adder`, `tb_ripple_carry_chain` | Exhaustive or random arithmetic, including a carry rippling through all bits. |

## Departures and limits

* **Physical placement is not modelled.** In the reference layout the
  cluster's input pins are spread over its bottom and right sides; here they
  are just a 40-bit port.
* **Logic only.** The delays and areas of the hard adder, of the 22 ps /
  15-area-unit configuration muxes and of the 20 ps carry link are not
  modelled.
* **Choices of this design** are marked as such in each file's header:
  * which LUT inputs are shared or private in fractured mode;
  * how the fracturable element connects to the adder (the balanced
    interaction was specified for the non-fracturable element and is
    reused here);
  * the source of the flip-flops' direct input and which LUT input the
    fast feedback path uses;
  * the crossbar's group and feedback assignment;
  * the configuration chain and its bit layout;
  * the feedback start-up gating;
  * the reset behaviour;
  * CLA-4 rather than ripple carry as the default adder.
* **Not included:**
  * the inter-cluster routing fabric. Its stated parameters are wire
    segments of length 4, Wilton switch blocks with Fs = 3, single-driver
    wiring and connection-block flexibilities of 0.2 in and 0.1 out. The
    channel width and circuits are not specified.
  * the hard 32 kbit RAM blocks, the 36×36 fracturable multipliers and the
    I/O blocks of the surrounding FPGA.
  * the *unbalanced* adder interaction, in which one operand comes from the
    6-LUT and the other from a LUT input. It is an alternative, not this
    design.
  * a variant with two adder bits per fracturable element. The idea is
    mentioned as promising, but its structure is not defined.
