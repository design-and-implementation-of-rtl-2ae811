# Crosstalk-avoiding inversion coding for a 4-line bus

Long parallel wires on a chip are coupled by the capacitance between neighbours. When two
adjacent lines switch in opposite directions, one rising and one falling, the coupling
capacitance sees twice the voltage swing. That transition is the slowest and the most
power-hungry one, and it is the one that injects the most noise. This RTL puts a small encoder in
front of a 4-line bus. Each cycle the encoder decides whether to send the data word as it is or
bitwise inverted, so as to avoid such transitions. A single extra line, `con`, tells the receiver
which choice was made, and a decoder at the far end undoes the inversion.

The whole link costs one 4-bit register, a comparator network of roughly twenty two-input gates,
and an inverter plus a 2:1 multiplexer per line on each side.

```
             +-------------------------+
 data_in --->| xtalk_detector          |<---- enc_reg (word sent last cycle) <---+
   |         +-----------+-------------+                                          |
   |                     | oc_ebw                                                 |
   |         +-----------v-------------+          bus[3:0]                        |
   +-------->| inv_selector  oc?~b:b   |------------+-----------------------------+
             +-----------+-------------+            |
                         | inv -> con               v
                         +------------------> bus_decoder  con?~bus:bus ---> data_out
```

## The decision rule (xtalk_detector)

This is the part that needs the most care. The detector compares the new data word `b` with
`p`, the word the bus carries now, which is the word the encoder sent in the previous cycle.
Line `i` switches if `t[i] = b[i] ^ p[i]`. The encoder inverts when either of two conditions
holds.

* **OC: opposite switching of neighbours.** For some adjacent pair `i, i+1`, both lines switch
  and their new values differ, so one line rises while the other falls:
  `t[i] & t[i+1] & (b[i] ^ b[i+1])`. There are three such pairs on a 4-line bus.
* **EBW: most of the bus switches.** At least three of the four lines switch. For four lines this
  is the OR of the four three-line products `t0t1t2 | t0t1t3 | t0t2t3 | t1t2t3`.

Inverting a word swaps the lines that switch with the lines that stay still. An opposite-switching
pair therefore becomes a pair of quiet lines, and three or four switching lines become one or
none.

The inversion can create a new opposite pair elsewhere. This happens when two neighbours that
would have stayed still at different values are both flipped. So the coding reduces such
transitions but does not remove them. One property is guaranteed, and the end-to-end testbench
checks it: **the coded bus never switches more than two of its four lines in one cycle.**

In a random test of 5000 words, the raw data carried 1759 opposite-direction neighbour
transitions and the coded bus carried 148.

The module is written for any `WIDTH` with a threshold `EBW_MIN` (package `xtalk_pkg`). With the
defaults, 4 and 3, it is exactly the gate network described above. Other widths are this RTL's
generalisation and have not been evaluated.

## The reference word and timing (bus_encoder, enc_reg)

`bus` and `con` are combinational functions of `b` and the register contents:

```
if (oc_ebw) { bus = ~b; con = 1; } else { bus = b; con = 0; }
```

The register captures `bus` on every rising clock edge, so the word sent in cycle *t* is the
reference for cycle *t+1*. The register stores the coded word, not the data, because the coded
word is what the wires actually carry.

`enc_reg` has a behaviour you might not expect. On each edge it loads
`(en && !rst) ? x : 0`. Reset is synchronous and active high. A cycle with `en` low does **not**
hold the old value: it clears the reference to zero. The encoder then compares the next word with
an idle all-zero bus. This is the structure of the original register, which is an AND of `en`
with inverted `rst` selecting between the input and zero. It was kept as it is. If you want a
hold-on-disable register, change that one line.

After reset the reference word is `0000`.

The encoder has 12 I/O bits (`clk`, `rst`, `en`, 4 data, 4 bus, `con`) and holds 4 flip-flops.
That matches the size of the reference FPGA implementation. Its LUT count (11) depends on the
FPGA mapping and is not reproduced here.

## The receiver (bus_decoder)

`data_out = con ? ~bus_in : bus_in`. It is purely combinational. In `xtalk_bus_top`, `data_out`
equals `data_in` in the same cycle.

## Modules

| file | role |
|---|---|
| `rtl/xtalk_pkg.sv` | `BUS_W = 4`, `EBW_MIN = 3` |
| `rtl/xtalk_detector.sv` | decision rule above; ports `b_enc_prev`, `b`, `oc_ebw` |
| `rtl/inv_selector.sv` | `b_out = oc ? ~b : b`, `inv = oc` |
| `rtl/enc_reg.sv` | previous-word register; `clk`, `rst`, `en`, `x`, `y` |
| `rtl/bus_encoder.sv` | detector + selector + register; `clk`, `rst`, `en`, `b`, `bus`, `con` |
| `rtl/bus_decoder.sv` | `bus_in`, `con`, `data_out` |
| `rtl/xtalk_bus_top.sv` | encoder and decoder joined by `bus` and `con`, which are also outputs |

The synthesis tool reports `inv_selector.inv` as an output wired straight to an input. That is
intended: it is the buffered select that becomes `con`.

## How far to trust it, and where it departs from the original design

* **Detector wiring.** The gate types, the gate names (`t0..t2` as XORs of adjacent data bits,
  the pair and triple AND terms, the OC and EBW OR trees) and the bit indices come from the
  original schematic. The connections between the gates follow this design's reading of that schematic.
* **A conflicting example.** One published example conflicts with this rule. It shows the
  previous word `0111` and the new word `0110` flagged for inversion, although only one line
  switches. This RTL does not invert there. It follows the gate network and the stated aim of
  avoiding coupling between neighbours. If you have another source for the intended behaviour,
  `xtalk_detector.sv` is the only file to change.
* **Register type.** The original text calls the reference store a "4-bit shift register". Its
  schematic shows a parallel-load register, and that is what is built.
* **Wires.** The coupled RC wires (driver resistance, load capacitance C_L, coupling capacitance
  C_c) have no logic function and are plain connections here. Their energy,
  `P = f·(T_s + λ·T_c)·C_L·V²` with `λ = C_c/C_L`, is not modelled. The end-to-end testbench
  reports transition counts instead.
* The reference design's timing and power figures are FPGA results and are not claimed for this
  RTL. Those figures are setup slack of 1.713 ns, hold slack of 0.166 ns, and 0.149 W total
  on-chip power, almost all of it static.

## Simulating

Every testbench checks itself. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.
For example, to run the end-to-end test at the default size:

```
verilator --binary --timing --assert -y rtl rtl/xtalk_pkg.sv tb/tb_xtalk_bus_top.sv \
          --top-module tb_xtalk_bus_top -Mdir obj && ./obj/Vtb_xtalk_bus_top
```

| testbench | what it checks |
|---|---|
| `tb_xtalk_detector` | all 256 (previous, new) pairs against an explicit product-term reference, plus worked cases |
| `tb_inv_selector`, `tb_bus_decoder` | all 32 input combinations |
| `tb_enc_reg` | random `x`, `en` and `rst`; one-cycle latency; clear on `en` low |
| `tb_bus_encoder` | cycle model of the reference word; `bus` and `con` every cycle; reset and `en` behaviour |
| `tb_xtalk_bus_top` | `data_out == data_in` every cycle; at most 2 bus lines switch per cycle; counts pass-throughs, inversions caused by opposite switching, inversions caused by many lines switching, resets and `en` clears, and fails if any of them never occurs |

To widen the bus, change `BUS_W` in `xtalk_pkg` or pass `WIDTH`. The testbenches are written
for 4 lines.
