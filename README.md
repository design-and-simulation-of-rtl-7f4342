# SAR ADC with a single-lane serial output

A successive-approximation analog-to-digital converter finds the digital code
of a sampled voltage by binary search. It does not compare the input against
every level in parallel. Instead it tries one bit per clock, MSB first. It
sets the bit, converts the trial code back to a voltage and compares that with
the input. The bit stays if the input is at least as large, and is cleared
otherwise. After RES clocks the code is complete. The cost is one comparator,
one DAC and a few registers, paid for with RES clocks of conversion time.

Each result is then framed and shifted out on one serial wire, in the spirit of
a JESD204B link but much simpler: a fixed header, then the data bits. No line
coding, no synchronisation handshake.

This RTL is a *simulation model* of the whole converter. The analog quantities
(input voltage, held voltage, DAC output) are carried as unsigned integers, by
default 12 bits at 1 mV per unit with Vref = 3.3 V. The loop, the sequencing and
the output interface are ordinary synthesizable logic.

## Structure

```
            +-------------+   vhold   +------------+  keep
 vin ------>| sample_hold |---------->| comparator |-------+
            +-------------+           +------------+       |
                  ^ sah                      ^ vdac        v
                  |                   +------------+   +--------------+
 start --> +----------------+         |  sar_dac   |<--| sar_register |
           | timing_control |         +------------+   +--------------+
           +----------------+  clear, decide, bit_idx      | code
              | load    | eoc                              v
              |         +---------------------+   +-----------------+
              +---------|-------------------->|   | output_register |--> dout
                        |                         +-----------------+
                        v                                  |
                  +---------+ <----------------------------+
                  | jesd_tx | --> ser_data, ser_valid, ser_sof
                  +---------+
```

| Module | Role |
|---|---|
| `sar_adc_top` | Wires the blocks below together. |
| `timing_control` | State machine IDLE, SAMPLE, CONV, DONE. Drives SAH, CONV, the bit index, LOAD and EOC. |
| `sample_hold` | Loads `vin` while SAH is high and holds it for the rest of the conversion. |
| `sar_register` | Holds the decided bits. Shows the trial code, which is those bits plus the bit under test. Writes the comparator's verdict into that bit. |
| `sar_dac` | Ideal binary-weighted DAC: `vdac = floor(code * VREF / 2^RES)`. |
| `comparator` | `keep = (vhold >= vdac)`. |
| `output_register` | Holds the finished code on `dout` until the next one arrives. |
| `jesd_tx` | Sends each result as the frame `{2'b10, code}`, MSB first, one bit per clock. |
| `adc_pkg` | The state enum and the frame header constants. |

## How a conversion runs

Control signals are active high. Reset is asynchronous and active low, on `rst_n`.

| Cycle (relative to the cycle Start is sampled high in IDLE) | State | What happens |
|---|---|---|
| 0 | IDLE | `start` seen |
| 1 | SAMPLE | `sah` = 1: the held value loads `vin`. The SAR register is cleared. |
| 2 … RES+1 | CONV | `conv` = 1. Cycle 2 tests bit RES-1 and cycle RES+1 tests bit 0. `vdac` shows the trial code's voltage, and at the clock edge the bit is kept or cleared. |
| RES+2 | DONE | `load`: the code moves into the output register |
| RES+3 | — | `eoc` = 1 for one cycle. `dout` holds the new code. |

- **Sample timing.** The value sampled is `vin` in the SAH cycle. `vin` can change freely after that.
- **Back-to-back conversions.** If `start` is still high in DONE, the next SAMPLE follows at once. Conversions then repeat every RES+2 clocks. In that mode the EOC of one result and the SAH of the next fall in the same cycle.
- **Start during a conversion.** It is ignored.

**What code comes out.** The result is the largest code whose DAC voltage does not
exceed the sample: `max c : floor(c*VREF/2^RES) <= vin`. A tie keeps the bit.
Inputs at or above Vref give all ones.

Worked example with RES = 4, VREF = 3300 and vin = 1100:

| Bit tested | Trial code | V_DAC | vhold ≥ V_DAC? | Bit |
|---|---|---|---|---|
| 3 | 1000 | 1650 | no | 0 |
| 2 | 0100 | 825 | yes | 1 |
| 1 | 0110 | 1237 | no | 0 |
| 0 | 0101 | 1031 | yes | 1 |

The result is 0101. The V_DAC values form the usual staircase that closes in on
the input.

## Serial output (`jesd_tx`)

A frame is FL = RES + 2 bits: the header `1,0`, then the code, MSB first.

- `ser_valid` is high for every frame bit. `ser_data` is 0 between frames.
- `ser_sof` marks the first header bit.
- The lane takes a new word (`ready`) when it is idle or sending the last bit of a frame. Frames can therefore follow each other without a gap.
- A word offered in mid-frame is dropped. `overrun` flags it in the same cycle.

In the top, `eoc` loads the word and `dout` supplies it. A frame lasts RES+2
clocks, exactly one back-to-back conversion period, so the lane keeps up with
the converter and never overruns. An assertion in `sar_adc_top` checks this.
The serial bit clock is the conversion clock.

The link keeps only the parts of JESD204B that matter for moving samples:
framing and serialisation. It has no 8b/10b coding, scrambling, code-group
synchronisation (SYNC~), initial lane alignment or multi-lane operation.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `RES` | 8 | Resolution in bits, and the number of CONV cycles |
| `AW` | 12 | Width of the analog words (`vin`, `vdac`) |
| `VREF` | 3300 | Reference voltage in analog units. Must be below 2^AW. |
| `jesd_tx.DW` | 8 | Data bits per frame. The top sets it to RES. |
| `jesd_tx.HDR_W`, `HDR` | 2, `2'b10` | Frame header |

## What comes from where

These parts follow the description this model was built from:

- the block set: sample & hold, comparator, DAC, SAR register, control logic, an output register and a simplified JESD204B-style serial interface;
- the MSB-first search with one bit decision per clock;
- the signal names Start, SAH, CONV, EOC and V_DAC;
- serialisation of the parallel result.

The following are choices of this implementation, because the description does
not fix them:

- **Numbers.** The resolution (8), the number format and scale of the analog values, and Vref.
- **Timing.** The extra SAMPLE and DONE cycles, the registered EOC, the back-to-back rule and the reset behaviour.
- **Comparator.** A tie keeps the bit.
- **Link.** The frame format and header value, the single lane, the bit clock equal to the conversion clock, and the overrun rule.

The description also reports FPGA results: a resource count of 89 flip-flops,
95 LUTs and 37 I/Os, plus timing and power figures. It does not give the
resolution or the port list behind them, so this model cannot be matched
against them. At default parameters it has 51 flip-flop bits and 42 port bits.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. A watchdog stops it if it hangs. For example:

```
verilator --binary --timing --assert -Irtl rtl/adc_pkg.sv tb/sar_adc_top_tb.sv \
          --top-module sar_adc_top_tb -Mdir obj && obj/Vsar_adc_top_tb
```

The other files in `rtl/` are found through `-Irtl` / `-y rtl`.

| Testbench | What it shows |
|---|---|
| `sar_adc_top_tb` | End to end at default parameters: 615 conversions, covering edge levels, a sine and random levels. It checks each code against a search done independently of the design, EOC exactly RES+2 cycles after SAH, and every serial frame. Each behaviour must occur at least once: single and back-to-back conversion, kept and cleared bit, gap-free frames, zero and full-scale codes, and the input moving while held. |
| `fig2_example_tb` | The 4-bit example above, checked step by step: the V_DAC staircase, the code, 4 CONV cycles and the frame. Then a sweep of input levels at RES = 4. |
| `timing_control_tb` | Cycle-exact control sequence at RES = 8 and 4, Start ignored mid-conversion, and the back-to-back period |
| `jesd_tx_tb` | Frames against a reference counter and receiver: gap-free back-to-back frames, mid-frame overrun and random loads |
| `sar_register_tb`, `sar_dac_tb`, `comparator_tb`, `sample_hold_tb`, `output_register_tb` | The individual blocks against independent models |

The analog-side values are plain integers. To model a non-ideal DAC or
comparator (gain error, offset, noise), change `sar_dac` or `comparator`. The
loop and the control logic do not depend on how those two compute their
results.
