# Distributed transverse feedback system

A transverse feedback system damps the betatron oscillation of a particle beam. Beam position monitors (BPMs) measure where the beam is. Their signals are delayed until the phase has advanced by a quarter turn, and a kicker then pushes the beam back. When the delayed signals of two or more BPMs are summed with suitable weights, any wanted phase can be rebuilt.

This RTL implements the digital part of such a system. It is distributed:

* **Acquisition in clusters.** The BPM signals are acquired by instruments (Libera devices) spread around the ring. The devices are grouped in clusters.
* **One link per cluster.** Each cluster shares a single serial link to a central unit.
* **Tagging instead of fixed timing.** The link's latency is not known exactly, so every sample is tagged with the time of a counter on its own side. A light-weight time protocol keeps the cluster counters equal to the central unit's counter to within one clock cycle.
* **Realignment by tag.** The central unit uses those tags to put all streams back on one time base. It applies the wanted delay, filters the signals and forms the kick as a weighted sum.

All of it is plain synthesizable SystemVerilog (IEEE 1800-2017), in one clock domain.

## Structure

```
libera_cluster (one per cluster; delta[c][d] in)
 ├ libera_acq ×NLIB        compress + tag with the slave time
 ├ round-robin merge of the devices onto one link
 ├ link_tx / link_rx       4-word frames with CRC
 └ tup_slave + time_counter (slave time)
        lib_tx_* / lib_rx_*   <══ link IP ══>   cu_rx_* / cu_tx_*
tfs_module (central unit)
 ├ aurora_core ×NCLUSTER       frame reception, CRC check, TUP master
 ├ frame_unpacker ×NCLUSTER
 ├ source_splitter ×NCLUSTER   one stream per device
 ├ preproc_unit ×(NCLUSTER·NLIB): interpolator → fir_filter → notch_filter
 ├ sync_unit: sync_switch, sync_ram_wrapper ×NSLOT, read and validity control
 ├ feedback_unit               kick fb_data to the DAC
 └ time_counter                master time
```

`tfs_system` is the top. It holds `NCLUSTER` clusters and the central unit. The serial links themselves are vendor IP, so each link's user-side streams are top-level ports:

* a cluster's transmit stream `lib_tx_*` goes to the central unit's receive stream `cu_rx_*`;
* `cu_tx_*` goes back to `lib_rx_*`.

The `tb_channel` model in `tb/` connects them with a fixed latency.

Default sizes:

| Parameter | Default | Notes |
|---|---|---|
| `NCLUSTER` | 2 | clusters |
| `NLIB` | 3 | devices per cluster |
| `NSLOT` | 6 | slots |
| `TAPS` | 32 | FIR taps |
| notch order | 3 | coefficients per polynomial |
| `SYNC_AW` | 10 | realignment RAM holds 1024 samples per slot |
| `NOTCH_AW` | 10 | notch history RAM holds 1024 samples |

The cluster count and size follow the system overview: two clusters, with three devices in one of them. The 32 FIR taps and the notch order of 3 are part of the design. The other sizes are choices of this implementation.

## Samples, frames and the link

Every value moving through the system is a tagged sample, `tfs_pkg::smp_t`. It holds:

* a source ID;
* the compression exponent `rate`;
* a 32-bit time tag;
* a signed 16-bit value.

On the link, a sample or a time-protocol message travels as a fixed frame of four 32-bit words:

| word | contents |
|---|---|
| 0 | `{type[31:28], src[27:24], rate[23:20], 4'b0, seq[15:0]}` — type 1 = data, 2 = time request (TR), 3 = time update (TU) |
| 1 | time tag (data frames), t1 (TR) or t3 (TU) |
| 2 | `{16'b0, value}` |
| 3 | `{16'b0, CRC-16}` over words 0–2 (polynomial 0x1021, initial value 0xFFFF, MSB first) |

`link_tx` is the transmit stack:

* It keeps a frame FIFO (16 frames in a cluster).
* It numbers data frames with `seq`.
* It appends the CRC.
* It respects `tx_ready` from the link IP. Frames can follow each other back to back.

`link_rx` reassembles frames and checks the CRC and the end-of-frame flag. It then sorts frames into data frames (`frm_valid`) and time-protocol frames (`tup_valid`), so the time protocol stays invisible to everything above it. Bad frames are dropped and counted. `frame_unpacker` also counts sequence-number gaps, i.e. frames that were lost.

Link budget: every sample costs 4 link words. Down-sampling by `2^rate` must therefore leave `2^rate ≥ 4·NLIB` cycles per block. With three devices that means `rate ≥ 4`. If the rate is lower, a device's holding register in the cluster is still occupied when its next sample arrives. That sample is dropped and counted in `lib_ovf_cnt`. The central unit sees this as a gap.

## Time Update Protocol (TUP)

This is the heart of the distributed design. The protocol is a cut-down NTP:

1. The slave (`tup_slave`, in the cluster) sends a time request TR and notes its own time t1.
2. The master (`tup_master`, in `aurora_core`) answers with a time update TU that carries its time t3.
3. The slave notes the arrival time t4. The round trip is `RTT = t4 − t1`.

Two rules make this exact to a cycle:

* **The master answers in the same cycle the TR arrives**, so t2 = t3 and the master's turnaround adds nothing to the RTT. This works because the protocol lives inside the link stack rather than above it.
* **A TUP frame may only start when the stack is idle**:
  * the data FIFO is empty;
  * no frame is in flight;
  * the link IP is ready.

  Queueing delay is then zero, and both directions see the same pure link latency. `link_tx` gives a TUP message priority and starts it in the very cycle `tup_valid` and `idle` are both high. It answers with `tup_fire`. The assertion `a_tup_idle` guards this rule.

With equal latency L each way (measured from frame start to frame received), RTT = 2L. At t4 the master's counter reads t3 + RTT/2. The slave therefore loads `t3 + RTT/2 + 1`, because the load takes effect one edge later. After that, `slave_time` equals `master_time`. If RTT is odd the halving truncates, which leaves the one-cycle error the scheme accepts.

How the two sides handle the idle rule:

* **Slave side.** The slave holds its request until its own stack is idle. It sends a TR right after reset and then every `SYNC_PERIOD` cycles (default 4096).
* **Master side.** If the master is not idle when a TR arrives, it does not answer late, because a late answer would carry a wrong time. It suppresses the TU and raises `block`. `block` stops its transmit FIFO from accepting new frames until the next TR arrives. The slave notices the missing TU after `TIMEOUT` cycles (default 1024) and asks again.

Three limits apply:

* The latency must really be the same both ways, and constant during one exchange.
* `TIMEOUT` must be longer than the link's round trip. A TU does not say which TR it answers, so a TU that arrives after its TR timed out would be taken for the answer to the repeated request.
* Both counters tick at the same rate. In this RTL both sides share one clock. With independent oscillators, the periodic update bounds the drift.

In the cluster, all member devices tag with the cluster master's synchronized counter. The links inside a cluster are not modelled.

## Compression and its reversal

**Compression in the device.** `libera_acq` averages `2^rate` consecutive delta samples (accumulate and dump) and emits one sample per block. The tag is the time of the block's last input. `rate` (0–7) is taken at each block boundary, so changing it at run time is clean. The first block after reset is one sample long.

**Reversal in the central unit.** `interpolator` rebuilds one sample per clock by linear interpolation between successive compressed samples (t(k−1), x(k−1)) and (t(k), x(k)):

```
for j = 0 .. 2^r − 1:   time t(k−1)+j,   value x(k−1) + ((x(k) − x(k−1)) · j) >>> r
```

* Because the factor is a power of two, the division is a shift.
* A 4-entry input FIFO absorbs link jitter.
* Segments follow each other without a bubble.
* If two samples are not `2^r` apart (a frame was lost), nothing is invented for the gap. Interpolation restarts at the new sample and `gap_cnt` counts the event. The empty stretch is later seen as invalid data.

Interpolation needs the next sample before it can start a segment. The output therefore trails the newest sample by one block. A step at a device input also starts to show up to one block early, relative to its true time, because the ramp toward the new value begins at the previous compressed sample.

## Filters (per device stream)

**FIR (`fir_filter`).**

* It has `TAPS` = 32 taps in direct form, and is registered with one cycle of latency.
* Coefficients are signed 18-bit Q1.16, written one at a time while the filter runs (`fir_we`, `fir_addr`, `fir_data`). The same set is used for all streams.
* Zeros in the upper taps make it a shorter filter.
* After reset the filter passes its input through: c[0] = 1.0 and all other taps are 0.

**Notch (`notch_filter`).** This is an IIR filter of order 3 that looks only at every n-th sample, where n is the number of samples per revolution:

```
y[t]   = b0·x[t] + b1·x[t−n] + b2·x[t−2n] − a1·y[t−n] − a2·y[t−2n]
out[t] = x[t] − y[t]
```

* Its response repeats at every revolution harmonic.
* It is used "contrary": the filter tracks the slowly varying offset and harmonics, and that estimate is subtracted from the live sample. This adds only two cycles of latency.
* The history sits in dual-port RAMs indexed by a sample counter, so `notch_n` can change at run time. Keep 2 ≤ n < 512 with the default `NOTCH_AW`.
* History that does not exist yet counts as zero.
* Coefficients are Q2.15 (`notch_coef` = b0, b1, b2, a1, a2). With all zeros the filter passes its input through.
* A simple DC remover is b0 = 2^−6, a1 = −(1 − 2^−6).

## Realignment (`sync_unit`)

1. **Slot assignment.** `sync_switch` assigns device streams to `NSLOT` slots (`slot_sel`). A device may feed several slots, each with its own delay.
2. **Storage by time tag.** Each slot has a `sync_ram_wrapper`, a RAM written at address `tag[9:0]`. Each entry stores the value, a valid bit, and the upper 22 tag bits as a "wraparound tag".
3. **Read control.** Every cycle, slot *s* is read at `t_read = master_time − slot_delay[s]`.
4. **Validity check.** A read is valid only if the entry's wraparound tag equals the upper bits of `t_read`. This rejects two kinds of stale data:
   * addresses skipped by a gap, which still hold data from an earlier pass;
   * entries that have not been written since reset. A clearing sweep of 1024 cycles after reset removes these.
5. **Arrival check.** Each wrapper also reports `t_newest`, the newest tag it has stored. A read whose `t_read` is newer than that is for data that has not arrived: either the slot delay is shorter than the transport time or the stream has stopped. Such a read is invalid too, and `late_cnt` counts the cycles in which one occurred, which tells a wrong delay setting apart from a gap.
6. **Validity control.** If any activated slot (`slots_activated`) lacks valid data, the whole vector is zeroed and `data_is_valid` goes low, so the kicker does nothing. `invalid_cnt` counts such cycles.

The sync register presents the vector two cycles after the read time. `slot_delay` therefore does two jobs: it must cover the worst-case transport (compression block, link, interpolation segment and filters), and anything beyond that is the wanted phase delay. In the end-to-end test, 200 cycles is ample for 40-cycle links. When a slot is reassigned to another stream, its old data stays readable until the new stream has filled `slot_delay` cycles of history.

## Feedback (`feedback_unit`)

```
kick = sat16( Σ_s fb_coef[s] · data_slot[s]  >>> 15 )
```

* It is registered, one cycle after the vector.
* `fb_active` marks kicks computed from a valid vector.
* `fb_data`/`fb_valid` is the sample stream for the DAC.

## Configuration and status

The design's configuration interface (Ethernet/UDP in the original system) is not part of this RTL. Everything it would set is a plain input of `tfs_system`:

* `rate_log2`;
* FIR coefficient writes;
* `notch_n` and `notch_coef`;
* `slot_sel`, `slot_delay`, `slots_activated`;
* `fb_coef`.

The analysis and status values are outputs:

* master and slave times, and `synced`;
* CRC errors, lost frames, TUs sent and TUs suppressed per link;
* per cluster: CRC errors on its return link, the last measured round-trip time and the number of retried time requests;
* interpolation gaps per stream;
* cluster overflows;
* invalid cycles;
* late reads (`late_cnt`);
* the synchronized slot vector;
* the timestamp of each kick (`fb_ts`): the master time at which its vector was read, 3 cycles before the kick appears.

## Latency

From a compressed sample arriving at the central unit to its value entering the realignment RAM takes:

* the link receive stage and unpack/split: 3 cycles;
* the interpolation segment: `2^rate` + 2 cycles;
* FIR 1, notch 2 and switch 1 cycles.

The vector and kick then follow at `slot_delay` + 3 cycles behind the sample's tag. The end-to-end test measures about 190 cycles (189 to 193, depending on where the step falls within a compression block) from a step at the device inputs to a change of the kick, with a slot delay of 200 and compression 16. This agrees with the early start described under compression. The clock frequency is not fixed by this RTL, so the cycle counts are the figures to use.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=N failures=M` line. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tfs_system \
  rtl/tfs_pkg.sv tb/tb_link_pkg.sv $(ls rtl/*.sv | grep -v tfs_pkg) \
  tb/tb_channel.sv tb/tb_tfs_system.sv
./obj_dir/Vtb_tfs_system
```

The packages must come first.

Unit testbenches are named `tb_<module>` and need `tb_link_pkg.sv`. `tb_libera_cluster`, `tb_tfs_module` and `tb_tfs_system` also need `tb_channel.sv`.

`tb_tfs_system` runs the top at its default parameters for about 19,000 cycles, which takes well under a second once built. It goes through:

* synchronization, with every slot value and kick checked every cycle;
* a run-time FIR update and a step (latency measured);
* a link bit error: CRC error, lost frame, gap and invalid vector;
* a suppressed time update with retry;
* compression switches, including one too low for the link (overflow);
* a slot delay shorter than the transport time (late reads);
* the notch removing the offsets.

It counts each of these and fails if one never happened.

## Where this RTL goes beyond the source design

The following are this implementation's own choices, not taken from the design description:

* all data formats and widths:
  * 16-bit samples and 32-bit time;
  * the frame layout and CRC polynomial;
  * the coefficient formats (Q1.16 for the FIR, Q2.15 for the notch and the feedback);
* the compression filter (block average) and power-of-two rates;
* the cluster merge (round-robin holding registers);
* sequence numbers;
* the resync period and timeout;
* the realignment read rule (`master_time − slot_delay`);
* the wraparound-tag invalidation and the arrival check against `t_newest`;
* the clearing sweep;
* FIFO depths and RAM depths;
* one preprocessing chain per device stream, with the slot assignment after it in the realignment unit. The source design also calls the per-device paths "slots", and a device used in two slots is preprocessed once here. At the defaults, six streams and six slots, the count is the same.

The source design's synchronization parameters also include a revolution time, a sync frequency and further settings whose use is not specified. They have no counterpart here.

The following are not built:

* the serial link IP;
* the Ethernet/UDP configuration stack;
* the DAC interface;
* the analog front end of the acquisition devices, which compute the delta signal;
* board I/O.
