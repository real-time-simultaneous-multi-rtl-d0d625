# Skew-free multi-channel data acquisition front end

Many measurement systems need many analog channels sampled at *exactly* the
same instant. One ADC behind an analog multiplexer skews the channels in time.
One ADC per channel needs many FPGA pins and extra work to keep the converters
in step. This design sits between the two. It uses six-channel
simultaneous-sampling 16-bit ADCs (ADS8556 class, up to 450 kS/s). Their three
CONVST pins, and those of every ADC in the system, are tied to **one** FPGA
pin, so a single edge samples all channels. The ADCs are daisy-chained, so the
data of any number of converters reaches the FPGA over only three serial
lines.

The RTL is the FPGA side: it starts conversions, waits for them to finish,
reads the chained serial frame, and hands out complete sample sets (one 16-bit
value per channel, all from the same CONVST edge) through a small FIFO.

```
             +-----------+ start  +--------------+ CONVST (one pin, all ADCs)
 enable_i -->| sync_unit |------->| control_unit |---------------------------> ADC chain
 period_i -->| (timer)   |        |  IDLE/CONV/  |---- FS_n, sel_A/B/C ------>
             +-----------+        |  READ        |
                                  +--------------+
                                    ^busy_fall ^frame_done
                                    |          |
 BUSY, SCLK, SDO_A/B/C ------> +---------------+  sample set  +--------------+
 (from the last ADC)           | adc_interface |------------->| frame_buffer |--> frame_o
                               +---------------+              +--------------+    valid/ready
```

## Files

| file | contents |
|---|---|
| `rtl/daq_pkg.sv` | constants (6 channels, 16 bits, 3 lines, 36 MHz SCLK, 144 MHz clock, 450 kS/s), `sample_t`, `out_mode_e` |
| `rtl/bit_sync.sv` | flip-flop synchronizer |
| `rtl/sync_unit.sv` | sample-period timer, start request |
| `rtl/control_unit.sv` | CONVST / FS_n / sel sequencer |
| `rtl/adc_interface.sv` | BUSY edge detection and serial deserializer for the daisy chain |
| `rtl/frame_buffer.sv` | FIFO of complete sample sets |
| `rtl/daq_top.sv` | top level |
| `tb/adc_model.sv`, `tb/adc_chain.sv` | behavioural ADC and daisy-chain models (simulation only) |
| `tb/tb_*.sv` | self-checking testbenches |

## One conversion, step by step

1. **Start.** `sync_unit` pulses `start` once every `period_i` clock cycles
   while `enable_i` is high. For 450 kS/s at 144 MHz, `period_i` = 320
   (`DEFAULT_SAMPLE_PERIOD`).
2. **Sample.** `control_unit` raises CONVST. The rising edge samples every
   channel of every ADC at once. CONVST stays high while the ADCs convert and
   hold BUSY high.
3. **End of conversion.** `adc_interface` watches the synchronized BUSY. On
   its falling edge the results are in the ADC output registers.
   `control_unit` then drops CONVST and FS_n in the same cycle.
4. **Readout.** With FS_n low, each SCLK rising edge presents one bit per line,
   MSB first. `adc_interface` counts the bits and sorts them into channels.
5. **Hand-off.** After the last bit, the full set is written to
   `frame_buffer` and FS_n goes high again.

A start request that arrives before step 5 is dropped and reported on
`overrun_o`. This happens when the sample period is shorter than conversion
time plus readout time.

## Clocking: the ADC clock is data, not a clock

The ADCs run from an internal 36 MHz clock and send it out as SCLK. That clock
is not clean enough to clock the FPGA. The FPGA therefore runs from its own
oscillator at a multiple of 36 MHz. This RTL assumes ×4 = 144 MHz.

SCLK, BUSY and SDO_A/B/C all pass through the same two-stage synchronizer.
`adc_interface` works on the SCLK *edges* it detects after that synchronizer.
Because every pin has the same delay, each SDO bit stays lined up with its
SCLK edge. The data changes on the falling edge and is sampled two or more
system clocks later, on the rising edge.

FS_n is generated inside the FPGA. To compare it with the synchronized SCLK,
the interface delays it by the synchronizer depth plus one cycle. An SCLK
rising edge that lands in the same system-clock cycle as the FS_n falling edge
is therefore not counted. It is treated as too close to FS_n, the way the
converter treats an FS-to-SCLK setup violation.

The oversampling needs the system clock to be at least about three times SCLK.
Four times leaves margin, and the testbenches add ±1-cycle jitter to the SCLK
half period (SCLK between roughly 29 and 36 MHz) without errors.

## The serial frame and the daisy chain

Each ADC has six channels: A0, A1, B0, B1, C0, C1.

| mode (`mode_i`) | sel_A, sel_B, sel_C | per line, per ADC |
|---|---|---|
| `MODE_THREE_LINE` (0) | 1, 1, 1 | SDO_A: A0, A1 · SDO_B: B0, B1 · SDO_C: C0, C1 (32 bits) |
| `MODE_ONE_LINE` (1) | 1, 0, 0 | SDO_A: A0, A1, B0, B1, C0, C1 (96 bits) |

In the chain, the first ADC has DCEN tied low and every later one has DCEN
tied high. Each later ADC takes the previous ADC's SDO lines on its DCIN pins.
The ADC nearest the FPGA (the last in the chain) first shifts out its own
words. Then it passes on what came in on DCIN, which is the previous ADC's
words, and so on back to the first ADC. With `NUM_ADC` converters, a line
carries `NUM_ADC × 32` bits in three-line mode and `NUM_ADC × 96` bits in
one-line mode.

`adc_interface` undoes this ordering. In the delivered set,
`frame_o[6*a + c]` is channel `c` (0..5 = A0..C1) of ADC `a`. ADC 0 is the
first of the chain, the one with DCEN low.

The output mode is captured when a conversion starts. A change on `mode_i`
therefore takes effect at the next conversion and never splits a frame.

## Throughput

Readout time per sample set is `NUM_ADC × 32 / 36 MHz` in three-line mode. To
that, add the ADC's conversion time and a few cycles of synchronizer latency.

* One ADC, three-line: 0.89 µs of readout. This leaves about 1.3 µs of the
  2.22 µs period (450 kS/s) for the conversion. `tb_rate_450k` sustains
  exactly 320 cycles per set with a 1.04 µs model conversion time.
* Three ADCs (the default, 18 channels), three-line: 2.67 µs of readout
  alone, which is more than one 450 kS/s period. The chain runs at a lower
  rate. At `period_i` = 320, with the test model's conversion time, every
  other start request is dropped and flagged on `overrun_o`.

The sample period is a run-time input, so the rate can be set to whatever the
chain length allows.

## Top-level interface (`daq_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | system clock (144 MHz nominal), asynchronous active-low reset |
| `enable_i` | in | 1 | sample continuously while high |
| `period_i` | in | 16 | sample period in clock cycles |
| `mode_i` | in | 1 | `out_mode_e`: 0 three-line, 1 one-line |
| `adc_convst_o` | out | 1 | CONVST, wired to CONVST_A/B/C of every ADC |
| `adc_fs_n_o` | out | 1 | FS (active low), common to all ADCs |
| `adc_sel_o` | out | 3 | sel_A (bit 0), sel_B, sel_C, common to all ADCs |
| `adc_busy_i` | in | 1 | BUSY of the ADC nearest the FPGA |
| `adc_sclk_i` | in | 1 | SCLK, the ADCs' 36 MHz clock |
| `adc_sdo_i` | in | 3 | SDO_A (bit 0), SDO_B, SDO_C of the ADC nearest the FPGA |
| `frame_valid_o`, `frame_ready_i` | out/in | 1 | sample-set handshake |
| `frame_o` | out | 16 × 6·NUM_ADC | oldest sample set in the buffer |
| `overflow_o` | out | 1 | one-cycle pulse: a set was dropped because the buffer was full |
| `overrun_o` | out | 1 | one-cycle pulse: a start request came while still converting or reading |
| `idle_o` | out | 1 | no conversion or readout in progress |
| `buffer_level_o` | out | clog2(BUFFER_DEPTH+1) | sets in the buffer |

Parameters: `NUM_ADC` (default 3, i.e. 18 channels) and `BUFFER_DEPTH`
(default 4).

The buffer cannot stall the ADCs: sampling is real-time. When it is full, the
newest set is dropped and `overflow_o` pulses. Sets are never reordered or
split.

## What is and is not here

Built:

* Sample timing, the CONVST / BUSY / FS_n sequence, sel-pin output modes,
  daisy-chain readout with clock-domain crossing, and the sample-set buffer.

Left to the system around it (there are ports or notes instead):

* **Data processing, external PROM, SD card / host PC link.** What the
  processing computes and how storage is reached are not specified. The
  buffer's read port is the hand-off point.
* **Vref and input-range configuration of the ADCs.** The control unit is
  meant to set these, but there is no register map or sequence to implement.
  The ADCs' power-up defaults are assumed (0–5 V unipolar input: 1 LSB =
  5 V / 2^16 = 76.29 µV).
* **DCEN pins.** These are board straps (low on the first ADC, high on the
  others), not FPGA outputs.
* **The ADCs themselves.** `tb/adc_model.sv` models only their digital pin
  behaviour. Its conversion time and SCLK jitter are model values, not
  datasheet figures.

Choices made in this RTL that a user may want to revisit:

* System clock of 4 × 36 MHz and a 2-stage synchronizer.
* Channel order in `frame_o`.
* One-line word order on SDO_A (A0, A1, B0, B1, C0, C1).
* The programmable period timer in `sync_unit`.
* Overrun and overflow policies (drop and flag).
* Buffer depth and entry format.
* No timeout if BUSY never falls: the sequencer waits.
* SCLK direction. Here SCLK is an input, generated by the ADC. Some board
  drawings of this system route SCLK from the FPGA to the ADCs instead. If
  your board does that, generate SCLK in the FPGA (for example a divide-by-4
  of the system clock) and feed the same signal to `adc_sclk_i`. The
  interface then works unchanged.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_daq_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/daq_pkg.sv tb/tb_daq_top.sv
./obj_dir/Vtb_daq_top
```

Replace `tb_daq_top` with the testbench you want:

| testbench | what it covers |
|---|---|
| `tb_daq_top` | Whole design at default size (3 ADCs, 18 channels) against a chain model. Checks every channel of every set and the exact sample period. Exercises three-line and one-line modes, a mode switch, overruns at 450 kS/s, and buffer full, overflow and drain. It counts each of these and fails if one never happened. |
| `tb_rate_450k` | One ADC at 320 cycles per set: 200 sets in real time, no loss |
| `tb_adc_interface` | Deserializer and BUSY edge timing with a jittery SCLK, both modes |
| `tb_control_unit` | Sequencer cycle timing and a random comparison against a reference |
| `tb_sync_unit` | Pulse spacing, including the 320-cycle default |
| `tb_frame_buffer` | FIFO against a queue model, including overflow and read+write when full |

Each run takes well under a second.
