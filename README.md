# LEDR/FPDR hybrid asynchronous FPGA fabric

An asynchronous FPGA has no clock. Every cell hands its data to the next one with a handshake.
Two dual-rail codes suit this, and each is good at a different job:

* **FPDR (four-phase dual-rail).** One bit travels on a true rail and a false rail: `1 = (1,0)`,
  `0 = (0,1)`. Every data word must be followed by a *spacer* `(0,0)`. Logic built for FPDR is
  small and simple. The spacer, however, doubles the wire transitions and halves the data rate
  of a link.
* **LEDR (level-encoded dual-rail).** One bit travels as a value wire `V` and a redundant wire
  `R = V xor phase`. The phase toggles with every token, so a receiver sees a new token when
  `V xor R` changes. No spacer is needed: two tokens pass per acknowledge round. Logic that
  computes directly on LEDR is expensive, though.

This fabric uses each code where it is strong:

* All routing between cells, and both connection blocks, use LEDR. A one-bit channel has three
  wires: V, R and the acknowledge.
* Inside the logic block, each LEDR input set is converted to FPDR, evaluated by a 4-input FPDR
  look-up table, and converted back.
* The LUT is duplicated so that its spacer costs no throughput. Sets with phase 0 go to LUT0 and
  sets with phase 1 go to LUT1. While one LUT evaluates data, the other returns to spacer.

The RTL models the fabric at the level of handshake registers, with a time-step clock (see
"Timing model" below). In these units a single FPDR LUT manages one result every 4 steps. The
logic block with its two alternating LUTs, a cell, and a path across the array each deliver one
result every 2 steps, which is the full rate of the LEDR links.

## Structure

```
fpga_array (ROWS x COLS, default 4 x 4)
 └─ fpga_cell                    8 LEDR input channels, 8 LEDR output channels
     ├─ input_cb  x4             8:1 LEDR mux, 2 pipeline stages, one per LUT input
     ├─ ledr_join x8             acknowledge join per input channel
     ├─ logic_block
     │   ├─ ledr_fpdr_conv       LEDR -> FPDR, phase 0 -> LUT0, phase 1 -> LUT1
     │   ├─ fpdr_lut x2          4-input FPDR LUT, 3 pipeline stages
     │   └─ fpdr_ledr_conv       FPDR -> LEDR, reads LUT0/LUT1 alternately
     └─ output_cb                1:8 LEDR demux tree with fan-out, 3 pipeline stages
```

`fpga_pkg` holds the types (`ledr_t`, `fpdr_t`, `icb_cfg_t`, `cell_cfg_t`, `dir_e`), the codec
functions (`ledr_phase`, `ledr_enc`, `fpdr_enc`, `fpdr_valid`) and the direction offsets.

### Cell and array

* Each cell connects to its eight neighbours.
* Directions are numbered `N=0, NE, E, SE, S, SW, W, NW=7`.
* Cell (r,c) receives on its channel `d` what the neighbour in direction `d` sends on the
  opposite channel `(d+4) mod 8`.
* `fpga_array` brings out every channel slot that faces outside the array as a port:
  * `edge_in`, `edge_in_ack`, `edge_out` and `edge_out_ack`, each indexed `[row][col][dir]`.
  * Entries that face an internal neighbour are ignored on inputs and driven to 0 on outputs.

Configuration is a static parallel input, one `cell_cfg_t` per cell:

| field        | bits | meaning |
|--------------|------|---------|
| `icb[i].en`  | 1    | Input CB i in use. If 0, it supplies constant-0 tokens. |
| `icb[i].sel` | 3    | Input channel (direction) feeding LUT input i. |
| `lut`        | 16   | Truth table. The output for inputs a,b,c,d is `lut[{d,c,b,a}]`, with a = input 0. |
| `ocb_en`     | 8    | Output channels that carry the LB result. Any subset may be set. |

## The handshakes, and where the difficulty lies

**LEDR register rule.** A register takes its input when two things are true:

* the input shows a phase different from its own (a new token), and
* the next stage holds the register's current phase (the old token was taken).

The acknowledge a register returns is simply its own phase. A sender may present its next
token once the acknowledge equals the phase of its current token.

**FPDR register rule (Muller pipeline).** A stage takes data when its input word is complete and
the next stage is empty. It takes the spacer when its input is all-spacer and the next stage is
full. The acknowledge is "this stage is full".

**Fan-out needs a join.** One token may be consumed by several receivers. This happens in three
places:

* two Input CBs listen to the same channel;
* the Output CB drives several channels;
* one demux node feeds both of its children.

In each case the sender must wait until *every* receiver has the token. `ledr_join` is the
C-element for this. Receivers never run ahead of the sender, so it reduces to:
`ack = token_phase` if every enabled receiver holds it, otherwise `~token_phase`.

* A channel that no Input CB listens to is acknowledged at once. Stray traffic therefore drains
  away and cannot block its sender.
* An Output CB with no channel enabled drops the LB result.

**Input completion and the dual pipeline.** `ledr_fpdr_conv` keeps one acknowledge level,
`lb_ack`, shared by all four Input CBs: it is the phase of the last input set it consumed.

* It waits until all four inputs show phase `~lb_ack`.
* It then writes the set as FPDR data into the FPDR register of LUT `~lb_ack`. This happens only
  if that register holds a spacer and the LUT's first stage is empty.
* It then toggles `lb_ack`.
* The register returns to spacer as soon as the LUT acknowledges.

The first token after reset has phase 1, so the first set goes to LUT1. `fpdr_ledr_conv` always
takes its next token from LUT `~current_phase`. This restores the original order. Each LUT
thus sees one data/spacer round per two tokens.

**Unused LUT inputs.** An Input CB with `en = 0` is a constant-0 source. Its output register
issues a fresh 0 token every time the LB acknowledges, so an unused input never stalls the LB.

## Inside the units

* **input_cb.** Stage 1 is two 4:1 mux registers, one for channels 0–3 and one for channels 4–7.
  Only the register of the selected half moves. Stage 2 is a 2:1 mux register.
  * `ch_ack[k]` is the phase of the stage-1 register for the selected channel, and 0 for every
    other channel.
  * `ch_listen` is one-hot on the selected channel. The cell uses it to join acknowledges.
* **output_cb.** A tree of 1:2 demux registers with 2, 4 and 8 registers on its three levels.
  * A node is active when its subtree contains an enabled channel.
  * A node takes its parent's token once all its active children hold its current phase.
* **fpdr_lut.**
  * Stage 1 latches the four dual-rail inputs.
  * Stage 2 decodes a,b into four minterm lines and AND-ORs them with the truth table. The
    results are the four dual-rail candidates `m[cd] = lut[{cd,ab}]`. Stage 2 also passes c,d on.
  * Stage 3 decodes c,d and selects one candidate.

  The equations give a spacer for a spacer input, as domino dual-rail logic does. An assertion
  checks that the output never carries the illegal code (1,1).

Concurrent assertions check the protocol rules as the design runs:

* Each new LEDR token differs from the previous one in a single wire, and it is issued only
  after the receiver holds the previous phase. This is checked on the Input CB output, on every
  Output CB channel and on the logic-block output.
* An FPDR LUT input word is either all spacer or all data.

## Timing model

The circuit is asynchronous, but the RTL is written as ordinary synchronous logic so that
standard simulators and synthesis tools accept it:

* `clk` is a time step, and every handshake register is a flip-flop.
* One step stands for one stage delay. Cycle counts therefore measure pipeline depth and
  handshake rounds, not nanoseconds.
* `rst_n` is an active-low asynchronous reset. It sets LEDR registers to `(0,0)`, which is
  value 0 in phase 0. It sets FPDR registers to spacer and acknowledges to 0.

| path | latency (steps) | rate |
|------|-----------------|------|
| Input CB | 2 | 1 token / 2 steps |
| logic block (converter, 3 LUT stages, converter) | 5 | 1 set / 2 steps |
| single FPDR LUT on its own | 3 | 1 result / 4 steps |
| Output CB | 3 | 1 token / 2 steps |
| cell, input channel to output channel | 10 | 1 token / 2 steps |

The physical figures of the original circuit have no counterpart in this model. That circuit is
a 65 nm domino implementation reaching 3.91 G data sets/s per cell, with 3882 transistors and
871 fJ per data set.

## Departures and choices

The following are choices made here where the source description gives no detail:

* the array size (4 x 4);
* the edge ports;
* the static configuration input (how configuration is loaded is not specified);
* the mux and demux tree shapes inside the connection blocks;
* the three-stage split inside the LUT;
* the shared truth table of the two LUTs;
* the constant-0 behaviour of a disabled Input CB;
* the acknowledge join and the sink behaviour of unused channels.

Two further limits apply:

* The asynchronous timing is modelled with a step clock, not with delay-insensitive gates. The
  model therefore says nothing about hazards, isochronic forks or analog delay.
* Configuration must not change while tokens are in flight. Apply it during reset.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog.
Example with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_fpga_array \
    -y rtl -y tb +libext+.sv -Irtl rtl/fpga_pkg.sv tb/tb_fpga_array.sv
./obj_dir/Vtb_fpga_array
```

| testbench | what it shows |
|-----------|---------------|
| `tb_fpdr_lut` | Random truth tables, four-phase driver and receiver, 3-step latency, 4 steps per result. |
| `tb_ledr_fpdr_conv` | Skewed LEDR inputs; sets routed by phase, complete and in order. |
| `tb_fpdr_ledr_conv` | Alternate merging of two FPDR sources, LEDR phases, no added bubble. |
| `tb_logic_block` | Truth-table results, both LUTs used in turn, 1 set per 2 steps, random stalls. |
| `tb_input_cb` | Every select, unselected channels stay idle, constant mode, latency and rate. |
| `tb_output_cb` | Random enable masks with stalling receivers, fan-out join, latency and rate. |
| `tb_fpga_cell` | Two CBs on one channel, unused input, random masks, 10-step latency. |
| `tb_fpga_array` | End-to-end test, described below. |

`tb_fpga_array` runs the default 4 x 4 array:

* It maps a five-cell circuit with fan-out and reconvergence, fed from three edge inputs and
  read at two edge outputs.
* It checks every result against a model, the 40-step latency and the 2-step rate.
* It counts each mechanism (LUT0 use, LUT1 use, spacers, acknowledge join, constant tokens,
  fan-out, back-pressure, draining of an unused input) and fails if one never occurs.

`tb/ledr_src.sv` and `tb/ledr_sink.sv` are reusable LEDR channel drivers with random stalls.
