# Preshower front-end slice: PACE_AM control, K-chip concentrator and fast control

A silicon-strip preshower detector stores the signal of every strip in an
analog pipeline at the 40 MHz bunch-crossing rate. It keeps each sample for
a few microseconds, waiting for the Level-1 trigger decision. When a trigger
arrives, three consecutive time samples of every strip are digitised and sent
off the detector. Nothing is zero-suppressed on the detector, so every
triggered event produces a full-size packet.

This RTL models the digital part of one readout slice:

- four **PACE_AM** chips, each with 32 strips plus 4 dummy channels and 160 pipeline columns;
- one **K-chip**, which concentrates the four PACE channels (through their 12-bit ADCs) into checksummed packets for one optical link;
- the **fast-control** path that turns the T1 command line into LV1, Reset, Test Pulse and BC0.

All chips are configured over one I2C bus. The analog parts sit outside the
RTL and are reached through ports: the pipeline itself, the ADCs, the
serializer/laser, the PLL and the ring controller.

```
 T1 line ──► pll_trigger_delay ──► t1_decoder ─┬─ LV1 ───────────┬──────────────► K-chip
 (0-15 clk delay)                  (3-bit cmds) ├─ Reset ─► PACE ReSync, K-chip General Reset
                                                ├─ Test Pulse ─► cal_pulse (≥200 ns) ─► 4 × delta_cal_ctrl ─► delta_cal_sw
                                                └─ BC0 ─────────────────────────► K-chip
 control data line ─► hw_reset_detect (2 µs silence) ─► chip reset

            ┌──────────┐ Data_Valid, serial col. address, FIFO_full  ┌────────────────────┐
  LV1 ─────►│ PACE_AM 0│────────────────────────────────────────────►│ K-chip             │
            │  ...  3  │ ana_valid/col/ch ─► ADC (outside) ─ 12 bit ─►│ 4 × readout ctrl   │
            └──────────┘                                              │ 4 × input FIFO 1600│
                 ▲                                                    │ trigger FIFO       │
   I2C (SCL/SDA) ┴──────────────────────────────────────────────────►│ builder + CRC      │
                                                                      │ output FIFO 336    │──► 16 bit @ 40 MHz
                                                                      │ HSL interface      │    to serializer
                                                                      └────────────────────┘
```

| Module | Role |
|---|---|
| `preshower_fe_top` | One slice: fast control, LVDS ring mux, 4 × `pace_am`, `kchip` |
| `pace_am` | PACE_AM digital part: I2C registers and `pace_am_ctrl` |
| `delta_cal_ctrl` | Delta chip calibration switches: CalChanReg1-4 mask AND Cal_Pulse |
| `pace_am_ctrl` | Pipeline write pointer, trigger tagging, pointer FIFO, readout sequencer |
| `kchip` | K-chip: wires the blocks below together |
| `kchip_readout_ctrl` | Follows one PACE's readout: column address and ADC words |
| `sync_fifo` | Show-ahead synchronous FIFO of any depth (input, column, trigger, output buffers) |
| `kchip_counters` | Bunch counter (3560 per orbit) and 16-bit event counter |
| `kchip_builder` | Packet builder: header, 3 slots, 12→16-bit packing, POS check, status, CRC |
| `crc16` | CRC-16 register, one 16-bit word per clock |
| `kchip_hsl_if` | Streams whole packets from the output buffer to the link |
| `kchip_regs` | K-chip register map, sticky status, link-test FIFO access |
| `i2c_slave` | 7-bit-address, single-byte, combined-format I2C slave |
| `t1_decoder` | Decodes the 3-bit T1 commands |
| `pll_trigger_delay` | Programmable 0-15 clock delay of the T1 line |
| `hw_reset_detect` | Hardware reset after 2 µs without transitions on the control data line |
| `lvdsmux` | Routes the control ring's A/B ports and selects the PLL clock |
| `preshower_pkg` | Shared constants, packet types, T1 codes, register addresses, CRC function |

Everything runs on one 40 MHz clock (`clk`). Resets are asynchronous and
active low (`rst_n`). The T1 Reset command acts synchronously.

## How an event travels

1. **Tagging (PACE_AM).** In RUN mode the write pointer steps through the 160
   columns, one per clock. An LV1 seen at a clock edge tags the column
   written `latency` clocks earlier: `tag = wptr − latency (mod 160)`. The tag
   joins an 8-entry pointer FIFO. `latency` is an I2C register.
2. **Analog readout (PACE_AM).** The sequencer takes one tag at a time and reads
   three columns: `tag`, `tag+1` and `tag+2`. For each column:
   - Data_Valid is high for 36 samples of two clocks each (the multiplexer runs at 20 MHz).
   - The 8-bit column address goes out on `col_addr`, MSB first, one bit per sample over the first 8 samples.
   - `ana_valid/ana_col/ana_ch` name the cell presented to the ADC.
   - Data_Valid stays low for 4 clocks between columns, and 5 between events.

   One event takes 3 × (72 + 4) = 228 clocks.
3. **Digitising (outside).** The ADC returns each sample two clocks later.
4. **Capture (K-chip readout control).**
   - The first clock of Data_Valid is phase 0 of sample 0. On phase 1 of each sample the K-chip takes the address bit.
   - Two clocks later it writes the ADC word into the channel's input FIFO.
   - After 8 samples the assembled column address goes into a column queue.
5. **Trigger bookkeeping (K-chip).** The same LV1 pushes `{empty, event number, bunch number}` into the trigger FIFO. The entry is flagged *empty* when 13 or more triggers are already pending, or when any PACE raises FIFO_full at that edge.
6. **Building (K-chip builder).** Building starts when a trigger is pending and every channel holds a complete event: 3 addresses and 108 samples. The builder never waits mid-packet for input. An empty entry produces a 6-word packet and reads nothing. The builder writes one word per clock into the output buffer and stalls only when the buffer is full.
7. **Sending (HSL interface).** A packet leaves only when it is completely in the output buffer. It then goes out at one 16-bit word per clock, without gaps (`link_valid` high). There is no flow control towards the link.

### Packet format (336 words, 6 for an ignored trigger)

| Word | Content |
|---|---|
| 0 | SOF `16'hFCFC` |
| 1 | `{control[7:0], event_number[7:0]}`. Control bit 0 = link-test packet, bit 2 = empty (ignored trigger), others 0 |
| 2 | `{KID[3:0], bunch_number[11:0]}` |
| 3 + 110·s | `{colA, colB}`: column addresses of channels A and B, slot s = 0, 1, 2 |
| 4 + 110·s | `{colC, colD}` |
| 5 + 110·s … 112 + 110·s | 108 data words: samples A1 B1 C1 D1 A2 … D36, four 12-bit samples packed MSB first into three 16-bit words |
| 333 | Status: bit 7 error (any of 6:1), bits 6:3 POS of channels D..A, bit 2 empty, bit 1 PACE error code seen, bit 0 link test |
| 334 | CRC-16, polynomial x¹⁶+x¹⁵+x²+1 (0x8005), initial value 0, MSB first, over words 1 … 333 |
| 335 | EOF `16'hFDFD` |

An empty packet keeps words 0, 1 and 2, then the status word, CRC and EOF.

**Out of sequence (POS).** While the column addresses of a slot are written,
the four are compared. A channel is out of sequence when fewer than two of
the other three channels carry the same address. One wrong channel is
therefore flagged alone. A 2-2 split flags all four channels. An address of
160 or more is the PACE error code (below) and sets status bit 1. Errors
appear only in the status word: the control field has already been written
by the time the addresses are compared.

## Keeping chips in step

- **Reset command (T1 `101`).** It drives PACE ReSync, which clears the write pointer, the pointer FIFO and the sequencer. It also drives the K-chip General Reset, which clears the counters, all FIFOs, the output buffer, the link interface and the error flags. Configuration registers survive it.
- **BC0 (T1 `111`)** clears the bunch counter, which otherwise wraps after 3560 crossings.
- **Ignored triggers.**
  - When a PACE's pointer FIFO is full, the trigger is dropped there and FIFO_full tells the K-chip at the same edge. The K-chip then flags the event empty.
  - The next event that PACE reads sends `8'hFF` instead of its first column address, so the loss stays visible downstream.
- **Known limitation.** The K-chip can also ignore a trigger for its own reason: 13 events already pending. The PACEs still read that event, so its data end up under the next trigger, and packets stay one event out of step until the next Reset. The tests show this and the recovery. In a full system, the trigger rules of the central trigger keep the occupancy below this level.
- **Hardware reset.** A control data line without transitions for 80 clocks (2 µs) raises `hw_reset`. It resets every chip, I2C registers included, so the PACEs return to SLEEP. The first transition releases it.

## Fast control

- **T1 commands** are three bits, always starting with 1:

  | Code | Command |
  |---|---|
  | `100` | LV1 accept |
  | `110` | Test Pulse |
  | `101` | Reset |
  | `111` | BC0 |

  The decoder waits for a 1, collects two more bits and pulses one output. The chips act on the command at the 4th clock edge after the edge that sampled its first bit, plus the PLL delay.
- **Test Pulse** is stretched to `CAL_PULSE_CYCLES` = 8 clocks (200 ns) on `cal_pulse` for the Delta chips. While it is high, `delta_cal_sw[i][k]` closes the calibration switch of channel k+1 of the Delta chip behind PACE i, for every channel set in that chip's CalChanReg1-4 mask. Bit b of CalChanReg(r+1) selects channel 8r+b+1. The phase of the pulse against the sampling clock is not adjustable.
- **PLL trigger delay** (`pll_trig_delay`) delays the T1 line by 0-15 whole clocks before decoding. The phase fine-tuning of the real PLL is analog and is not modelled.
- **LVDSMUX** passes the ring's data and clock lines to the ring controller. `pllcksel` selects port A or B as the PLL clock and as the forwarded clock.

## Registers

One I2C bus serves all five chips:

- 7-bit addressing, one data byte per transfer.
- Writes are `S addr+W A reg A data A P`.
- Reads use the combined format `S addr+W A reg A Sr addr+R A data NA P`.
- The K-chip answers at `KCHIP_I2C_ADDR` (7'h40) and PACE i at `PACE_I2C_BASE + i` (7'h20 + i).
- SCL/SDA are oversampled by `clk`, so the bus must run much slower (100 kHz against 40 MHz).

**K-chip** (`kchip_regs`):

| Addr | Name | Access | Content |
|---|---|---|---|
| 0 | CONFIG | R/W | bit 7: 0 normal, 1 link test |
| 1 | ECONFIG | W (reads 0) | bit 7 CLPOS clears the POS bits; bit 0 STRSRT starts a link-test packet |
| 2 | KID | R/W | K-chip ID (bits 3:0 go into the header) |
| 4 | STATUS | R | 7 GERR, 6:3 POS3..0, 2 trigger ignored, 1 PACE error code seen, 0 input FIFO overflow. Sticky until General Reset (POS also until CLPOS) |
| 5 | FIFOMAP | R/W | 0-3 input FIFO 0-3, 4 output FIFO |
| 6, 7 | FIFODATA_H/L | R/W | Link-test only. Writing L pushes `{H, L}` into the mapped FIFO. Reading H pops the FIFO and returns the high byte; reading L then returns the low byte of that word |
| 8, 9 | EVCNT_H/L | R | Event counter. Reading H latches L |
| 10, 11 | BNCHCNT_H/L | R | Bunch number of the last trigger. Reading H latches L |

**Link test.**
1. With CONFIG bit 7 set, fill each input FIFO with 108 words through FIFOMAP and FIFODATA.
2. Write STRSRT.

The builder then sends one normal-format packet with control bit 0 set, zero column addresses and the FIFO contents as data. Triggers are not recorded in this mode.

**PACE_AM** (`pace_am`). All registers are 8-bit R/W and cleared by the hardware reset:

| Addr | Register | Content |
|---|---|---|
| 0 | Control | bits 1:0 mode: 0 SLEEP, 1 RESET, 2 RUN. Only RUN moves the pointer and accepts triggers |
| 1 | Latency | In clocks, 0-159 |
| 2-5 | IreadAmp, ISF, Vadj, IoutBuf | Bias settings, on `pace_bias_regs` |
| 20-30 | Delta chip: Control, CalChanReg1-4, CalV, Iin, DeltaPC, LccRef, Ishaper, ShaperRef | On `delta_regs[0..10]`; registers 21-24 also drive `delta_cal_ctrl` |

## Sizes and throughput

- **Link load.** At the 100 kHz maximum Level-1 rate a trigger arrives every 400 clocks on average. A packet needs 336 link clocks, so the 16-bit × 40 MHz (640 Mb/s) link is 84% busy. The PACE readout (228 clocks) is faster still.
- **Input FIFOs** hold 1600 words: 14 events of 108 samples. Triggers are refused at 13 pending, so an input FIFO cannot overflow while the PACEs send only events the K-chip accepted.
- **Output buffer** holds exactly one packet: 336 words (672 bytes).
- **Pointer FIFO.** Each PACE queues 8 tags besides the event it is reading. A burst of up to 9 closely spaced triggers is therefore read without loss.

The sizes, the column count, the sample count, the orbit length and the T1
codes are those of the Preshower front-end description. All default
parameters are at these sizes, and the top-level test runs them unchanged.

## Where this design makes its own choices

The original description gives the architecture, the sizes, the packet
layout, the register maps and the command codes. These details are this
design's own:

- **Framing and encodings:**
  - SOF/EOF values;
  - the control-field and status-word bit assignments;
  - STATUS bits 2:0;
  - the 12→16-bit packing order;
  - the K-chip ID in the upper nibble of the bunch-number word.
- **Packet length.** A packet is 336 words: 3 header words + 3 × 110 + 3 trailer words. The 337-word total sometimes quoted for this layout does not match the sum of its terms.
- **Capture timing:**
  - the sampling phase in the K-chip (phase 1 of each two-clock sample);
  - the two-clock ADC latency;
  - MSB-first column addresses;
  - the 4-clock gap between columns.
- **PACE_AM control:**
  - the 8-deep pointer FIFO;
  - the mode encoding;
  - the bit order of the Delta calibration masks;
  - `8'hFF` as the PACE error code;
  - reading the tagged column and the two after it.
- **Buffers and start rules:**
  - the trigger-FIFO depth (16);
  - the column-queue depth (48);
  - starting a build only when a whole event has arrived;
  - sending a packet only when it is complete.
- **Reset detection.** The hardware-reset detector counts clocks without a transition, and the first transition releases it.
- **Register reads.** Reading the `_H` byte latches the `_L` byte.
- **Simultaneous pops.** If a FIFODATA read of the output FIFO coincides with a link pop, the buffer is popped only once. Reading the output FIFO is meant for link-test mode with the link idle.

## Not in the RTL

These parts are analog, come from elsewhere, or are outside the front end:

- the PACE amplifier/pipeline and the Delta chip's analog part (its calibration capacitors and charge DAC included);
- the ADCs (a behavioural ADC model is in `tb/adc_model.sv`);
- the GOL serializer and laser;
- the PLL's clock recovery and phase shifter;
- the CCU ring controller and its I2C masters;
- the DCU;
- the optical transceivers;
- the FEC, FED and trigger supervisor.

Their signals are ports of `preshower_fe_top`.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- uses `$urandom` stimulus and reference models written independently of the RTL (`tb/tb_pkg.sv` builds expected packets and has its own bit-serial CRC).

Helper models: `tb/adc_model.sv` and the I2C master `tb/i2c_bfm.sv`.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/preshower_pkg.sv tb/tb_pkg.sv tb/tb_preshower_fe_top.sv --top-module tb_preshower_fe_top
./obj_dir/Vtb_preshower_fe_top +verilator+rand+reset+2
```

Pass `+verilator+rand+reset+2` so that state not covered by reset starts random.

`tb_preshower_fe_top` runs the whole slice at its default sizes (about 4 ms
of simulated time, well under a minute). It:

- configures the four PACEs and the K-chip over I2C;
- sends T1 command sequences;
- closes the loop through four ADC models;
- compares every packet word by word with the reference.

Each of these mechanisms is counted, and the test fails if one never happens:

- LV1
- Reset
- BC0
- Test Pulse
- trigger queueing
- POS
- PACE FIFO overflow and the error code
- K-chip watermark
- link test
- PLL delay
- hardware reset
- LVDSMUX switch

`tb_kchip` does the same for the K-chip alone with emulated PACE outputs. It also checks back-to-back packets at full link rate and the counter registers.
