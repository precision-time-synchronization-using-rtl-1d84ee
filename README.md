# IEEE 1588 time node for distributed acoustic measurement

Several acoustic sensors spread over an Ethernet LAN must sample at the same
instants, to well under a microsecond. This design disciplines each node's
local crystal clock to a grandmaster clock using IEEE 1588 (PTP). It has
three parts:

- **Hardware timestamps.** A timestamping tap sits on the MII between the
  Ethernet MAC and the PHY. It timestamps every PTP event frame at the wire,
  so software delays never enter the measurement.
- **Phase and frequency correction.** A management unit turns each
  Sync/Delay_Req exchange into two corrections:
  - a step of the clock by the measured offset (phase);
  - a new frequency compensation value for the clock's fractional
    accumulator (frequency). It comes from a Kalman-filtered estimate of the
    crystal's skew.
- **Outputs.** The disciplined time drives a programmable sampling clock for
  an ADS1271 converter and a pulse-per-second output. Every sample is
  stamped with the time at which it was converted.

The protocol itself runs in software on a host CPU. This includes choosing
the master, building and parsing messages, and collecting T1 and T4 from
Follow_Up and Delay_Resp. The RTL does everything that is time-critical and
the arithmetic of the servo.

## Time base: the frequency compensated clock (`fcrtc`)

Time is a 64-bit count of ticks of the nominal 44 MHz oscillator, so one
tick is 22.73 ns. Next to the counter is a 32-bit accumulator. Every cycle
the 32-bit signed **addend** is added to it. The counter then advances by
`1 + carry`, where the carry is +1 on overflow, -1 on borrow and 0
otherwise. The addend is therefore a frequency correction in units of 2^-32
(2.3e-10) of the clock rate:

- a positive addend makes the clock run fast;
- a negative one makes it skip ticks.

The accumulator resolution is 2^-32. The design target is 1e-9 at a 1 s sync
interval, which needs 30 bits, and 32 are used. The counter wraps after
about 13,000 years.

Three ways change the clock:

- `addend_we` writes a new frequency;
- `step_en` adds a signed phase step;
- `set_en` loads an absolute time, and wins over a step.

All three take effect on the next cycle.

## One exchange, step by step (`mgmt_unit`)

Software gathers the four timestamps of an exchange:

- T1: the master sends Sync.
- T2: the slave receives it.
- T3: the slave sends Delay_Req.
- T4: the master receives it.

Software writes them to the registers T1..T4 and issues START. The unit then
does the following:

1. `offset_calc` forms `offset = ((T2-T1) - (T4-T3)) / 2` and
   `delay = ((T2-T1) + (T4-T3)) / 2` in 66-bit signed arithmetic. This
   assumes the path is equally long both ways.
2. The clock is stepped by `-offset`.
3. The **measured skew** of the past interval is formed:
   `S*_k = offset_k + Ŝ_(k-1)`. The offset is only the residual drift left
   by the compensation already in force. Adding the previous estimate back
   gives the crystal's total drift per interval. The skew is in ticks per
   sync interval, with 8 fraction bits.
4. `kalman_skew` updates the estimate with the scalar filter:

   ```
   S-_k = Ŝ_(k-1)
   P-_k = P_(k-1) + Q
   K_k  = P-_k / (P-_k + R)
   Ŝ_k  = S-_k + K_k (S*_k - S-_k)
   P_k  = (1 - K_k) P-_k
   ```

   The gain is computed by a restoring divider, one bit per cycle, to 16
   fraction bits. As P converges, the gain tends to a constant. In the
   fixed-gain mode (CTRL bit 0), a precomputed K from the KF_KFIX register
   is used instead. The update then costs one subtraction, one
   multiplication and one addition, with no divider.
5. `skew_to_addend` converts the estimate into the compensation
   `addend = -round(Ŝ · 2^32 / (f · S_i))` and writes it. Here f is the
   oscillator frequency and S_i the sync interval. The division by the
   constant `f·S_i` is a multiplication by a reciprocal computed at
   elaboration, with 28 guard bits. The result saturates to the 32-bit
   signed range.

**Restarts.** The first exchange after reset does not feed the filter.
Neither does an exchange whose |offset| exceeds `STEP_LIMIT` (44,000 ticks,
1 ms), for example after software set the time. Such an exchange only steps
the clock and resets P to KF_P0. The estimate Ŝ is kept, so that it still
matches the addend that is in force. The RELOCKS counter counts restarts.
STATUS.locked is set after the first filtered update.

Latency from START to the new addend is about KW + 8 = 24 cycles with the
computed gain. It is shorter in fixed-gain mode.

Q, R, P0 and the fixed gain are programmable; the published description gives no values.
The reset values are Q = 16, R = 4096, P0 = 65536 and K = 1/16, all in the
filter's fixed-point units.

## Timestamping on the MII (`mii_tap`, `ptp_detector`, `tsu`)

The tap sits in both directions:

- PHY receive data goes to the MAC.
- MAC transmit data goes to the PHY.

It forwards each nibble one MII clock later, unchanged. The whole design
runs on the 44 MHz clock. The MII receive and transmit clocks enter as
enables (`rx_ce`, `tx_ce`), one pulse per 25 MHz edge, already synchronised
to the local clock.

Each direction has a `ptp_detector`:

- On the start-of-frame delimiter it latches the current time. This is the
  timestamp point.
- It then reads the frame nibble by nibble and recognises PTP in two forms:
  - directly over Ethernet (EtherType 0x88F7);
  - over UDP/IPv4 to port 319 (IHL 5, no VLAN tag).
- For an event message (Sync, Delay_Req, Pdelay_Req, Pdelay_Resp) it pushes
  an entry to the `tsu`. The entry holds the timestamp, the messageType and
  the sequenceId.

Software matches entries to messages by sequenceId. The two queues (receive
and transmit) are 4 deep. An entry that arrives at a full queue is dropped,
and the queue's sticky overflow flag is set.

Frames are never modified. A one-step clock, which writes the timestamp into
the departing Sync, is not built. The two-step exchange (Sync followed by
Follow_Up carrying T1) needs only capture.

## Triggers: sampling clock and PPS (`trigger_gen`)

A trigger generator makes a square wave on the disciplined time. Its rising
edges fall at `start + 2k·half` and its falling edges half a period later.
An edge is produced in the cycle when the time reaches its scheduled value.

The clock can jump by a step, or advance 2 ticks in one cycle. When that
happens, the schedule catches up one half-period per cycle while the output
pin holds its level, and then rejoins the grid. A step therefore never
causes a burst of short pulses.

Two instances are used:

- the ADC clock / sampling trigger, from TRIG_LO/HI (start) and TRIG_HALF;
- the PPS, which starts at 0 with a half-period of PPS_HALF (F/2 at reset).

The half-period must be at least 2 ticks; this is asserted.

## Sampling (`adc_capture`, `sample_packer`)

`adc_capture` reads the ADS1271 through its SPI-style interface:

- The falling edge of DRDY marks a finished conversion. The local time at
  that edge becomes the sample's timestamp.
- Then 24 SCLK periods follow, each `2·SCLK_DIV` cycles long (11 MHz at the
  defaults).
- DOUT passes a two-flop synchroniser and is taken at the end of each high
  phase.
- A DRDY that falls during a read-out is counted as missed.

`sample_packer` groups N = 8 samples into a packet in a 64-entry FIFO of
32-bit words. The host reads it through ADC_WORD and ADC_POP. A packet is:

- a header `{0xA5, N, seq}`;
- the 64-bit timestamp of the first sample, low word first;
- the N sign-extended samples.

## Host interface (`host_regs`)

A synchronous 32-bit register bus with `we`, `re`, an 8-bit word address,
`wdata`, `rdata`, and `rvalid` one cycle after `re`. Reading TIME_LO
captures TIME_HI into a shadow register, so the 64-bit time is read
atomically.

| addr | name | notes |
|---|---|---|
| 0x00 | ID | 0x15880001 |
| 0x01 | CTRL | bit0 fixed gain, bit1 trigger enable, bit2 PPS enable |
| 0x02 | STATUS | busy, locked, rx/tx timestamp available, rx/tx overflow, ADC word available, ADC overflow |
| 0x03 | CMD (write 1s) | bit0 START, bit1 SET_TIME, bit2 RX_POP, bit3 TX_POP, bit4 CLR_OVF, bit5 ADC_POP |
| 0x04/05 | TIME lo/hi | current time |
| 0x06/07 | SET lo/hi | time loaded by SET_TIME |
| 0x08..0x0F | T1..T4 lo/hi | exchange timestamps |
| 0x10..0x15 | OFS, DLY, SKEW (lo/hi) | last offset, delay, skew estimate |
| 0x16 | ADDEND | read; a write sets the addend by hand |
| 0x17..0x1A | KF_Q, KF_R, KF_P0, KF_KFIX | filter settings |
| 0x1B..0x1D | KF_GAIN, KF_VAR, MEAS_LO | filter state |
| 0x20..0x22, 0x24..0x26 | RX / TX timestamp lo, hi, info {seq, type} | head of the queue |
| 0x28..0x2B | TRIG lo/hi, TRIG_HALF, PPS_HALF | trigger schedule |
| 0x30..0x3A | ADC_WORD, ADC_COUNT, RELOCKS, frame and PTP counters, edge counters, ADC_MISSED, ADC_PKTS | |

A write to ADDEND is ignored in a cycle where the management unit writes the
addend.

## Top level (`ptp_node_top`)

The top puts the timing functions and the sampling functions side by side,
on one clock and one register bus. The following are outside the top, and
their pins are the top's ports:

- the PHY;
- the MAC and the CPU that runs the protocol;
- the converter;
- the crystal.

Parameters:

| parameter | default | source |
|---|---|---|
| F_OSC_HZ | 44,000,000 | published design |
| SYNC_INTERVAL_S | 1 | published design (1 or 2 s) |
| TSU_DEPTH | 4 | own choice |
| PKT_SAMPLES | 8 | own choice |
| PKT_FIFO_DEPTH | 64 | own choice |
| SCLK_DIV | 2 | own choice |

The clock widths are `fcrtc` parameters P_W, Q_W and R_W, whose defaults
are the published design's 64, 32 and 32.

## Where this design departs from or adds to the published description

- **The addend's meaning.** The addend is a signed correction around one
  tick per cycle. The description gives only the widths and the idea of
  "adding the compensation value to an accumulator".
- **The measured skew.** The measured skew `S*_k = offset_k + Ŝ_(k-1)`, and
  its units (ticks per interval), are this design's choices. The
  description names the measured skew but not how it is obtained from the
  offset.
- **The compensation formula.** It is the published one,
  `C = S- / (f·S_i)`, with sign and scaling chosen so that the clock
  cancels the drift. The predicted skew S- for the coming interval equals
  the estimate Ŝ_k just computed, and that is what is converted.
- **No in-frame timestamp rewriting** (one-step operation) is built.
- **One device.** The timing FPGA and the sampling FPGA of the original
  system share one clock and one bus here. In particular, the sampling side
  uses the same disciplined time rather than a copy.
- **Outside the RTL.** PCI(e) bridging, the CPU and its memory are not part
  of the RTL. The host bus is a plain register interface.
- **Restarts.** The restart rule (`STEP_LIMIT`) and all fixed-point formats
  of the filter are this design's own choices.
- **Reported accuracy.** The description reports 20–100 ns between two
  nodes' PPS outputs. In simulation, with an ideal symmetric network, the
  two PPS edges agree within a tick (22.7 ns) after lock in the 44 kHz
  scaled test. The 8-exchange full-size test has not yet reached that
  point, as described under Verification. A real link adds
  PHY latency asymmetry, which this design does not calibrate.

## Verification

Every block has a self-checking testbench in `tb/` (`tb_<module>.sv`).
Each ends by printing `TB_RESULT checks=N failures=M`. Helpers:

- `mii_tb_pkg.sv` builds MII frames: PTP over L2 and over UDP, and
  non-PTP frames.
- `ads1271_model.sv` is a behavioural converter.
- `ptp_e2e_body.svh` is the shared end-to-end test.

The end-to-end test joins a grandmaster node and a slave node through a
symmetric delay line. The grandmaster's crystal is modelled by a fixed
addend of +500 ppm. Software on both sides is modelled by bus tasks that:

- send Sync/Delay_Req frames through the MACs;
- pop timestamps;
- run the exchange.

The test makes each mechanism happen and counts it:

- timestamp queue overflow and drain;
- general and non-PTP frames passing through;
- exchanges with filter updates;
- a restart after a software time jump;
- fixed-gain mode;
- PPS and trigger edges;
- ADC packets.

It then checks that:

- the slave's addend converges to the grandmaster's;
- the true time error after lock is at most 3 ticks;
- the PPS edges of the two nodes agree.

There are two versions of it:

- **`tb_ptp_node_top`** is a time-scaled copy. Its oscillator is 44 kHz, so
  one "second" is 44,000 cycles, and it runs 16 exchanges. All ratios scale
  with the frequency. It runs in about a second.
- **`tb_ptp_node_full`** runs `ptp_node_top` with every parameter at its
  default: 44 MHz and a 1 s interval. It runs 8 exchanges, about 400
  million cycles, which takes several minutes.

The full-size run shows how far the servo gets with the reset filter
settings:

- The initial skew is 22,000 ticks per second (500 ppm).
- After 8 exchanges, which include one restart and three in fixed-gain
  mode with K = 1/16, the slave's addend is 2,144,326 against the
  grandmaster's 2,147,483.
- The residual drift is about 35 ticks per second (0.8 ppm), and the two
  PPS edges are 34 cycles apart.

The filter keeps converging, but slowly. With Q = 16 and R = 4096, the
computed gain decays towards about 1/16. A system that must lock quickly
should program a larger Q, or a larger fixed gain, while acquiring lock.
The test therefore allows a residual of 12 ticks plus 1/256 of the initial
skew per interval. That is 12 ticks in the scaled run and 97 ticks at full
scale.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/ptp_pkg.sv tb/mii_tb_pkg.sv tb/tb_ptp_node_top.sv --top-module tb_ptp_node_top
./obj_dir/Vtb_ptp_node_top
```

Replace the testbench name for any other block. `mii_tb_pkg.sv` is needed
only by the MII, TSU and top-level tests.

The RTL is synthesizable SystemVerilog-2017. The only memories are the FIFO
arrays. There are a few immediate and concurrent assertions, and the
simulation commands above enable them.
