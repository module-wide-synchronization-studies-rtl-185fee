# Reset phase alignment for a tile-detector module

A tile module of the Mu3e tile detector carries 13 timing ASICs. Each one
samples the common run-start reset with its local 625 MHz clock (1.6 ns
period). The clock cycle in which a chip first sees the reset low becomes its
timestamp zero. Clock and reset reach the chips through a chain of LVDS buffers,
so every chip sees the reset edge at a slightly different phase of its clock.
If that edge lands in the setup/hold window of a chip's reset flip-flop, the
chip may start one cycle early or late, and its timestamps are then off by
1.6 ns against the rest of the module.

Across one module the clock-to-reset skew stays within a band of about 40 ps,
far below a clock period. So one delay, applied in the front-end FPGA to the
reset of the whole module, can move the edge to a phase where no chip is near
its sampling window. This RTL is that delay unit (`rst_shift_block`). It takes a
6-bit setting `s` and delays the reset by

    s[5] * 800 ps  +  s[4:0] * 22 ps

so 64 settings span almost a full clock period. The coarse part is half a
cycle, made with a DDR output register. The fine part is the FPGA's IO delay
chain. The setting is written over the board's register bus, and a small
state machine loads it into the delay chain.

## Data path: how half a cycle and 22 ps steps are made

```
 i_d ──┬──────────────────────────────► datain_l ┐
       │                                         ├─ ddio_out ── delay_chain ── o_d
       └─► FF ─┐                                 │   (625 MHz)   (s[4:0] x 22 ps)
               ├─ mux(s[5]) ─────────► datain_h ┘
 i_d ──────────┘
```

`ddio_out` is a double-data-rate output register. At each rising edge it
captures two bits. It drives the first (`datain_h`) while the clock is high and
the second (`datain_l`) while the clock is low.

* With `s[5] = 0` both inputs carry `i_d`, and the reset leaves at the rising
  edge that samples it.
* With `s[5] = 1` the high input instead gets `i_d` one cycle late, from the
  flip-flop in `half_cycle_stage`. In the cycle where `i_d` changes, the
  high phase still shows the old value and the low phase shows the new one.
  The edge therefore leaves half a cycle (800 ps) later. Both rising and
  falling edges are delayed the same way.

`delay_chain` then adds `s[4:0]` steps of 22 ps, up to 682 ps. The 22 ps step
is the value measured on the target FPGA: 22.17 ps in the lower half of the
settings and 22.42 ps in the upper half. The model's range is 800 + 682 =
1482 ps of the 1600 ps period. On real silicon the two halves do not join
seamlessly: the measured gap between settings 31 and 32 is about 85 ps. The
model leaves that gap out, because it belongs to the physical delay cells.

## Configuration path: from a register write to a new delay

The delay chain cannot be loaded in parallel. Its configuration cell
(`io_config`) takes the 5-bit word serially, on a slow clock, and applies it
only when `update` is pulsed. At least 10 cycles must separate the last data
bit from that pulse. `rst_shift_fsm` produces this sequence on a 31.25 MHz
clock, which `clk_div` makes from 156.25 MHz (divide by 5):

| state       | cycles | what happens                                               |
|-------------|--------|------------------------------------------------------------|
| `FS_IDLE`   | –      | waits until `start` is seen high in two adjacent cycles     |
| `FS_REC`    | 1      | latches `s[4:0]` into a shift register and `s[5]` aside     |
| `FS_SEND`   | 5      | `o_cena` = 1, `o_cdata` = shift register bit 0, LSB first   |
| `FS_UPDATE` | 11     | waits; `o_cupdate` = 1 in the last cycle; `o_datashift` = `s[5]` from then on |

From the second start sample to the update takes 17 FSM cycles (544 ns).
The half-cycle select and the new delay-chain word take effect on the same
edge, so the path never runs with a mix of the old and new settings. Until
the update the old delay stays in force. A firmware reset (`i_reset_n` low)
at any time returns the FSM to idle and clears the setting to 0.

The two-cycle start condition filters a one-cycle glitch on the start line.
This design's register slice never produces such a glitch, because a write
raises `start` for 15 register-clock cycles, which is 3 FSM cycles.

## Register interface

`rst_shift_reg` decodes one address on the FPGA's register bus. The bus has
an address, read enable with read data, and write enable with write data.

| address `RST_SHIFT_ADDR` (default 8'h30) | bits |
|---|---|
| write: `[5:0]` new setting; the write also starts a configuration | |
| read, one cycle after `i_reg_re`: `[31]` FSM busy, `[30]` start pending, `[5:0]` current setting | |

To change the delay, write the setting and then poll until bits 31 and 30 are
both 0. Other addresses read 0.

## Clocks and crossings

| clock | used by |
|---|---|
| `i_clk625` (625 MHz) | `half_cycle_stage`, `ddio_out`: the reset path |
| `i_clk156` (156.25 MHz) | `rst_shift_reg`, `clk_div` |
| 31.25 MHz from `clk_div` | `rst_shift_fsm`, `io_config` |

The divided clock is in phase with `i_clk156`, so the setting and the start
request go straight into the FSM. Busy goes back to the register clock
through two flip-flops. The half-cycle select goes into the 625 MHz domain
through two flip-flops. Both are static settings. `i_d` must be synchronous to
`i_clk625`. `i_reset_n` is asynchronous and active low; it should be released
synchronously to the clocks.

## Which parts are models

`ddio_out`, `delay_chain` and `io_config` stand for dedicated cells of the
FPGA's IO element: the vendor's DDR output register, the programmable delay
line, and its configuration cell. They are behavioural models with the cells'
ports, and they exist so that the block can be simulated. On an FPGA they are
replaced by the vendor primitives. `delay_chain` uses `#` delays and is not
synthesizable. `io_config` holds an assertion for the 10-cycle rule.
Everything else is synthesizable RTL. `rst_shift_pkg` holds the shared
constants and the FSM state type.

## Choosing a setting for a module

`tb/tb_module_sync.sv` runs the procedure used to pick the operating point on
a real module, against two banks of 13 chip models (`tb/mutrig_rst_model.sv`):

* Each chip model samples the reset with a flip-flop. If the reset changed
  less than 40 ps before a clock edge, the result is random.
* In bank 0 the chips' clock-to-reset skews are spread over a 41 ps band, the
  spread measured on a bare board. In bank 1 they are spread over 180 ps,
  the chip-to-chip offset seen in pairwise scans on a running module.
* For the settings 0, 2, …, 62, the testbench issues 12 resets. After each one
  it latches all timestamps with a common test pulse.
* For each of the 12 pairs (chip 0, chip i), a setting is safe when the pair's
  timestamp difference never leaves its usual value.
* The module's safe settings are the intersection over all pairs, and the
  operating point is the middle of the longest safe run.

With a 400 ps reset cable offset, bank 0 loses settings 48 and 50 and bank 1
loses five settings. The chosen settings are 24 and 20. They keep every reset
edge at least 200 ps (bank 0) and 100 ps (bank 1) away from the chip's clock
edges. The testbench checks each pair's result against a prediction made from
the skews alone, at every setting where no edge falls into a sampling window.
The skews, the cable offset and the 40 ps window are assumptions, not measured
values.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rst_shift_block rtl/rst_shift_pkg.sv tb/tb_rst_shift_block.sv
./obj_dir/Vtb_rst_shift_block
```

| testbench | checks |
|---|---|
| `tb_rst_shift_block` | All 64 settings end to end at default parameters: rise and fall delay of `o_d`, the step between neighbouring settings, configuration time, read-back, old delay kept until the update, firmware reset during a configuration. It counts each of these mechanisms and fails if one never happened. |
| `tb_module_sync` | the module-wide scan above |
| `tb_rst_shift_fsm` | serial word and order, 5 enable cycles, update 11 cycles after the last bit, glitch rejection, reset abort |
| `tb_clk_div`, `tb_half_cycle_stage`, `tb_ddio_out`, `tb_io_config`, `tb_delay_chain`, `tb_rst_shift_reg` | one unit each |

All testbenches run in well under a second. The simulator has no X state, so
everything read in a testbench is reset or initialised first. One known
simulator limitation: if `delay_chain` is given a constant `delayctrlin`,
Verilator's scheduler may fail to converge. In the design the input is always
driven by `io_config`.

## Departures and open points

* The source gives the send phase both as "four clock cycles" and as ending
  when the bit counter reaches 5. This RTL sends five bits, one per cycle,
  because the word is five bits wide.
* The original FSM clears all of its outputs on the way back to idle. Here
  `o_datashift` is a held register instead, so the half-cycle shift stays in
  force between configurations.
* Where the source says nothing, these are this design's own choices: the bit
  order into the configuration cell (LSB first), the register address and
  layout, the auto-start on write, the moment `o_datashift` changes, the
  divider's duty cycle (2 of 5), and the clock-domain synchronizers.
* The delay model uses one integer step (22 ps) for both halves. It has no
  insertion delay and no gap between settings 31 and 32.
* The rest of the front-end firmware (readout data path, slow control, links)
  and the board hardware (buffers, ASICs) are outside this RTL.
