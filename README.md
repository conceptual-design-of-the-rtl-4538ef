# A dead-time-less analog memory for a 64-channel detector readout

A segmented germanium detector array needs every pulse on every channel
digitised at 200 MS/s for about a microsecond. A separate fast ADC per channel
costs too much power and space, and a plain switched capacitor array (SCA)
per channel is dead while its contents are read out. This design is an analog
memory chip that removes that dead time and uses about a quarter of the
storage cells a plain SCA per channel would need.

The idea is a **two-stage, asymmetric SCA**:

* Every input writes continuously into a short **pre-trigger SCA** of 32 cells. The cells form a ring, so they always hold the last 160 ns of the signal.
* The chip shares **8 output slots** among all 64 inputs. Each slot has a 192-cell **post-trigger SCA** and a 32-cell **storage buffer**.
* When an input triggers, a **64 × 8 switching matrix** connects it to a free slot. The slot records the 192 samples that follow the trigger. During that time, the frozen 32 pre-trigger samples are copied into the slot's buffer.
* The copy ends before the post-trigger capture does. The input returns to sampling at once, so an input has **no dead time**. Pulses are lost only when all 8 slots are busy, and those losses are counted.
* Full slots are read out in trigger order, like a FIFO. Each one becomes a serial **event frame**: a digital header carrying the input number, trigger position, slot and timestamp, followed by the 224 analog samples. The frame goes out on one differential output at a 50 MHz read clock. An external ADC digitises it.

Cell count: 64·32 + 8·(192+32) = 3840 cells, compared with 64·224 = 14336
for one full-length SCA per input.

The storage cells, the input amplifier, the comparators, the DACs and the
output amplifier are analog. Here they are behavioural models that carry
voltages as signed 12-bit codes in millivolts. All control is synthesizable
RTL.

## Contents

- [A dead-time-less analog memory for a 64-channel detector readout](#a-dead-time-less-analog-memory-for-a-64-channel-detector-readout)
  - [Contents](#contents)
  - [Block map](#block-map)
  - [Life of one pulse](#life-of-one-pulse)
    - [1. Trigger](#1-trigger)
    - [2. Slot assignment (the hard part)](#2-slot-assignment-the-hard-part)
    - [3. Capture and copy, in parallel](#3-capture-and-copy-in-parallel)
    - [4. Readout](#4-readout)
  - [Event frame](#event-frame)
  - [Clocks and timing](#clocks-and-timing)
  - [Configuration registers (I2C)](#configuration-registers-i2c)
  - [Top-level ports (`trace_amem`)](#top-level-ports-trace_amem)
  - [Where this model departs from, or adds to, the original concept](#where-this-model-departs-from-or-adds-to-the-original-concept)
  - [Verification](#verification)
  - [Simulating](#simulating)

## Block map

```
 vin[i] ─► input_stage ─┬─► sca_channel (32, pre) ─┐       ┌─► sca_channel (192, post) ─┐
 (×64)   (amp, DACs,    │   input_channel_ctrl     ├─► switch_matrix (64×8) ─► sca_channel (32, buffer) ─┼─► readout_ctrl ─► output_driver ─► out_p/out_n
          comparators)  └─► trigger_logic ──► slot_allocator ──► output_slot_ctrl (×8) ──────────────────┘        │
                                                 ▲     timestamp_counter ─┘                       hamming_secded_enc
 scl/sda ─► i2c_slave ─► config_regs (VREFs, per-input setup, trigger and lost-pulse counters)
```

| Module | Role |
|---|---|
| `trace_pkg` | Sizes, frame field widths, and shared types. `sample_t` is the analog value. `chan_bus_t` is the bundle that crosses the matrix. `ch_cfg_t` is the per-input setup. |
| `input_stage` | *Model.* Inverting amplifier biased at Vref1 or Vref2, with a test-input selector. Two threshold DACs with comparators. |
| `trigger_logic` | Decides when an input has a pulse: leading edge with hysteresis, the input's own external trigger, or any of 4 global triggers. |
| `onehot_ring` | Regenerative one-hot shift register that points at the active SCA cell. |
| `sca_channel` | *Model.* N capacitor cells, written through a one-hot select and read by address. Can precharge the cells ahead of the write position. |
| `input_channel_ctrl` | Pre-trigger channel sequencer: sample, copy 32 cells, send ID and position, sample again. |
| `slot_allocator` | Matrix control and queue: free-slot search, crosspoints, lost pulses, read order, EMPTY and FULL. |
| `switch_matrix` | *Model.* Full crosspoint matrix between the 64 inputs and the 8 slots. |
| `output_slot_ctrl` | One slot: latches the timestamp, runs the 192-cell capture, fills the buffer, and receives ID and position. |
| `timestamp_counter` | 36-bit free-running time, with a clear input. |
| `readout_ctrl` | Builds and sequences the event frame. |
| `hamming_secded_enc` | 7-bit SEC-DED check bits over the frame's digital word. |
| `output_driver` | *Model.* Differential output amplifier. |
| `i2c_slave`, `config_regs` | Configuration and status access. |
| `trace_amem` | Top. |

## Life of one pulse

### 1. Trigger

`input_stage` compares the amplified signal with two DAC thresholds, `thr_hi`
and `thr_lo`. `trigger_logic` fires on any of these:

- **Leading edge.** The high comparator turns on. The input is then *disarmed* until the low comparator turns off. This hysteresis keeps the noisy tail of one pulse from re-triggering.
- **The input's own external trigger.** Inputs 0–3 have one, enabled with `ext_en`.
- **A global trigger.** There are 4 global triggers, `gtrig[3:0]`, and each input chooses which ones it reacts to with `gtrig_mask`. One global trigger can capture a whole group of inputs at once. For example, all segments of one crystal can be read on a hit in its central contact.

A `polarity` bit inverts both comparators, so the chip can handle negative
pulses. All asynchronous trigger inputs go through two-flop synchronizers.
The latency from an input edge to the registered `trig` is 3 clock cycles.
While an input is busy copying, new triggers on it are ignored.

### 2. Slot assignment (the hard part)

`slot_allocator` owns the 8 slots. Each slot is in one of three states:

| State | Meaning |
|---|---|
| FREE | Available for a new pulse. |
| CAPTURE | Recording post-trigger samples. |
| READY | Waiting to be read out. |

Slots are handed out in circular order from a write pointer. The readout takes
them from a read pointer in the same order, so the slots form a FIFO even when
they complete in a different order.

In the same clock cycle, any number of inputs may trigger. The allocator
passes a "next free slot" token down the inputs in index order. Each
triggering input takes the token's slot and passes on the following free
slot. When no slot is left, every further triggering input in that cycle
counts as a lost pulse. The write pointer then jumps past all the slots taken
in that cycle. Granting an input a slot does two things:

* It closes the crosspoint `xpoint[slot][input]`.
* It starts the slot (`slot_start`). The input is told through `grant`, which is what actually freezes its pre-trigger SCA.

An input that is refused is not locked and keeps sampling. `lost_n` reports
the number of refused triggers in each cycle, and the status counter adds
them up. `full` is high while all slots are in use, and `empty` while none is.

Check when changing the allocator: `N_SLOTS` must be a power of two, and an
assertion stops the simulation if a slot in use is ever handed out again.

### 3. Capture and copy, in parallel

Once the crosspoint is closed, the slot's bus carries two things at the same
time:

- the input's live signal, which the slot writes into its 192-cell post-trigger SCA, one cell per 200 MHz cycle;
- the copy traffic from the frozen pre-trigger SCA.

The copy runs at the read clock, one item every 4 sampling cycles:

- the 32 pre-trigger cells, in cell order, into the storage buffer;
- then 12 serial bits, MSB first: the 7-bit input number followed by the 5-bit *start position*.

The start position is the pre-trigger cell that held the newest sample when
the trigger arrived. The readout needs it because the buffer is copied in
cell order, not in time order.

The copy takes 44 × 4 = 176 sampling cycles, which is shorter than the
192-cycle capture. The input therefore returns to sampling before the slot is
done with it. At the end of the capture the slot marks itself READY and
releases the crosspoint. A second pulse on the same input can be taken
176 cycles after the first, by another slot.

**Precharge.** Each pre-trigger SCA clears the 2 cells ahead of the one being
written. This stands for the cell precharge circuit of the real chip. In a
frozen SCA, those two cells are therefore the oldest "samples", and they read
0 V. In every frame, the first two samples of the time-ordered pre-trigger
part are lost.

### 4. Readout

When the oldest slot is READY and `start` is high, `readout_ctrl` sends one
frame and then frees the slot. The frame is described in the next section.

## Event frame

Each symbol lasts one read cycle (20 ns at 50 MHz).

| Part | Read cycles | Content |
|---|---|---|
| Idle | – | Alternating 0/1, a 25 MHz square wave, so the ADC side can lock onto the read phase. |
| Header | 4 | `1100`. This never occurs in the idle pattern. |
| Digital word | 64 | MSB first: input number (7), start position (5), slot (4), timestamp (36), reserved (5, zero), ECC (7). |
| 7 sections | 7 × (1 + 32) | One *wait* cycle at 0 V, then 32 analog samples. |

- **Total length:** 4 + 64 + 231 = 299 read cycles = 5.98 µs. At most about 167,000 frames per second leave the chip.
- **Section order:** section 1 is the storage buffer, which holds the pre-trigger samples in cell order. Sections 2–7 are the post-trigger cells 0–191, already in time order.
- **Rebuilding the time order of the pre-trigger part:** with the start position `p`, the oldest sample is in buffer cell `(p+1) mod 32` and the newest is in cell `p`. The first two of these (cells `p+1` and `p+2`) are the precharged cells and read 0. The first post-trigger cell is the first sample after the trigger.
- **Levels:** digital bits are sent as ±1600 mV, samples as their own voltage, and wait cycles as 0 V. `out_n` is always `-out_p`.
- **ECC:** an extended Hamming (64,57) code over the other 57 bits. Six check bits sit at positions 1, 2, 4, 8, 16 and 32, and one overall parity bit is added. A receiver can correct any single-bit error and detect any double-bit error. The order of the data bits is given in `hamming_secded_enc.sv`.

## Clocks and timing

* `clk` is the sampling clock, 200 MHz, and writes one cell per rising edge. In the chip, two interleaved cell banks would be driven by both edges of a 100 MHz clock. Here that is modelled as a single 200 MHz clock.
* The read clock runs at clk/4, or 50 MHz. Internally it is a one-cycle enable, `rd_tick`. The `rdclk` output is high during the first two clk cycles of each read cycle, so the external ADC can sample on the falling edge.
* The timestamp counts clk cycles (5 ns), is 36 bits wide, and is cleared by `ts_rst`. A slot latches it in the cycle it is started.
* Reset is asynchronous and active low for the logic. The SCA cell contents are not reset.

## Configuration registers (I2C)

The chip is an I2C target at 7-bit address `0x2A`. After the address, a write
sends a 16-bit register pointer, MSB first, and then data bytes. A read starts
at the last pointer set. The pointer increments after every byte in both
directions.

| Address | Register | Reset value |
|---|---|---|
| `0x0000` | VREF1 DAC code | `0x80` |
| `0x0001` | VREF2 DAC code | `0x80` |
| `0x0004`–`0x0007` | Trigger-request counter, 32-bit, little-endian, saturating. A write to `0x0004` clears it. | 0 |
| `0x0008`–`0x000B` | Lost-pulse counter, same format. A write to `0x0008` clears it. | 0 |
| `0x0100 + 4·i` | Input *i* flags: bit0 leading-edge enable, bit1 polarity, bit2 Vref select (0 = VREF1), bit3 test-input select, bit4 external-trigger enable | `0x00` |
| `0x0101 + 4·i` | Input *i* global-trigger mask, bits 3:0 | `0x0` |
| `0x0102 + 4·i` | Input *i* high (trigger) threshold | `0xC0` |
| `0x0103 + 4·i` | Input *i* low (re-arm) threshold | `0xA0` |

- **DAC codes:** a code maps to (code − 128) × 8 mV.
- **Amplifier:** the input amplifier inverts about its reference with a gain of 12/13, and its output is clipped to ±2047 mV.
- **Reset state:** after reset all triggers are off.

## Top-level ports (`trace_amem`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | 200 MHz sampling clock, asynchronous active-low reset |
| `ts_rst` | in | Clears the timestamp |
| `vin[N_CH]`, `test_in` | in | Input voltages (mV codes) and the shared test input |
| `ext_trig[N_EXT]`, `gtrig[4]` | in | Per-input external triggers, global triggers |
| `scl`, `sda_in`, `sda_oe` | in/in/out | I2C. `sda_oe` pulls SDA low. |
| `start` | in | Enables frame readout |
| `trigger_out` | out | OR of all input triggers |
| `empty`, `full` | out | Queue state |
| `rdclk` | out | 50 MHz read clock |
| `out_p`, `out_n` | out | Differential output (mV codes) |

Parameters and their defaults:

| Parameter | Default |
|---|---|
| `N_CH` | 64 |
| `N_SLOTS` | 8 |
| `PRE_CELLS` | 32 |
| `POST_CELLS` | 192, a multiple of `PRE_CELLS` |
| `N_EXT` | 4 |
| `I2C_ADDR` | `7'h2A` |

## Where this model departs from, or adds to, the original concept

The architecture follows the original concept:

- input SCA, matrix, slot queue, cell counts;
- frame layout and field widths, read-clock ratio;
- trigger modes, register contents.

The following are this design's own choices.

Sampling and storage:

* One 200 MHz clock edge instead of both edges of 100 MHz.
* Analog values are 12-bit mV codes. Noise, charge injection, leakage and the analog bandwidth are not modelled.
* Precharge level (0 V) and depth (2 cells).

Triggering and slots:

* The copy rate is one cell or bit per read cycle, and the ID and position bits are sent MSB first.
* When several inputs trigger in the same cycle, lower-numbered inputs get slots first.
* Triggers on a busy input are dropped.
* The external trigger exists on 4 inputs only.
* `N_SLOTS` must be a power of two.

Frame and output:

* Header value, field and bit order, the bit-to-position mapping of the ECC, and the ±1600 mV digital level.
* The exact place of the 7 wait cycles: one before each 32-sample section.

Configuration:

* The I2C address, the register map, the reset values, the DAC scale and the amplifier gain.
* The counters saturate.

Not included: the charge preamplifier, the board-level shaping and trigger
circuit, the external ADC, line driver and FPGA, and the clock distribution
circuits. The top brings out their signals as ports.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are
computed in the testbench, not taken from the design.

`tb_trace_amem` runs the full-size chip (64 inputs, 8 slots, default
parameters) end to end:

- **Configuration:** sets up over I2C through `tb/i2c_master_bfm.sv`.
- **Trigger sources:** drives a leading-edge pulse with a noisy tail, an external trigger, and two global-trigger groups.
- **Queue overflow:** the second group has 11 inputs and overflows the queue.
- **Readout:** holds `start` low for a while, then reads all frames.
- **Fast retrigger:** triggers one input twice within 190 cycles.
- **Checks:** decodes every frame from `out_p`: header, fields, ECC, every sample against the driven waveform, the precharged zeros and the frame length. It also reads the counters back over I2C.

It counts each mechanism and fails if one never happens:

- full queue;
- lost pulses;
- idle pattern;
- precharge;
- readout held off;
- back-to-back triggers on one input.

`tb/i2c_master_bfm.sv` is a helper, not a testbench.

## Simulating

With Verilator 5, any testbench builds like this:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_trace_amem \
    rtl/trace_pkg.sv rtl/*.sv tb/i2c_master_bfm.sv tb/tb_trace_amem.sv
./obj_dir/Vtb_trace_amem
```

- **Other testbenches:** use the same command with the testbench's name. Only `tb_trace_amem` and `tb_i2c_slave` need the bus functional model.
- **Build time:** the full-size build takes about a minute, and the run takes a few seconds.
- **Changing sizes:** `N_CH`, `N_SLOTS`, `PRE_CELLS` and `POST_CELLS` can be overridden on `trace_amem`. Keep `POST_CELLS` a multiple of `PRE_CELLS`, `N_SLOTS` a power of two, and `N_CH ≤ 128`, because the input number in the frame is 7 bits.
