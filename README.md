# Low-power spike detection and packetising for an implanted neural recorder

An implanted 100-electrode recorder cannot send every digitised waveform over
its radio: the link carries roughly 330 kbit/s, and the radio draws about half
the implant's power. This design sits between one channel's ADC and the radio.
It finds action potentials (spikes) in the sample stream, cuts out a short
window around each one, and queues the windows for transmission. The radio
stays off while the queue fills. Each algorithm is chosen to be cheap in
hardware:

* The **threshold** is K times the *mean absolute deviation* of the signal,
  not a multiple of the RMS. No squaring or square root is needed. The window
  is a power of two, so dividing by N is a shift, and K = 8 is a shift too.
* The threshold is updated **once per window**, not once per sample. That
  removes the sliding-window sample buffer entirely. The only storage is one
  accumulator and one threshold register.
* **Detection** is a single comparison of |x - mean| against the threshold.

All logic runs at one 10-bit sample per clock. The intended clock is the
15 kSamples/s sample rate. The blocks were sized for at most 2 MHz, so that
one set could later be time-shared by many channels.

## Data path

```
data_in ──► compute_mean ──► auto_threshold ──► threshold_select ──► spike_detect ──► feature_extract
            (or mean_in)      (generated thr)    (or programmed thr)                        │   ▲
                                                                                            │   │ overflow
                                                                                            ▼   │
symbols ◄── conv_encoder ◄── packet_format (rf_on) ◄───────────── event_fifo ◄────── time_stamp
```

| Module | Role |
|---|---|
| `compute_mean` | Offset estimate: the block average of the previous 2^14 samples. The value is 512 until the first block completes. |
| `auto_threshold` | Subtracts the mean, takes the absolute value, accumulates it and produces the per-window threshold. Passes the sample and its deviation on, time-aligned with the threshold. |
| `threshold_select` | Register for a user-programmed threshold, and the choice between it and the generated one. |
| `spike_detect` | Comparison, a 4-sample pre-trigger buffer and the 16-sample output window (`data_valid`, `count_out`). |
| `feature_extract` | Collects a window into a record. When the queue is overflowing, it keeps only the window's maximum and minimum. |
| `time_stamp` | Adds a 16-bit sample-clock time stamp and the 7-bit electrode ID. |
| `event_fifo` | Transmit queue of whole records, with an overflow flag and a drop counter. |
| `packet_format` | Serialises records into packets and switches the radio enable `rf_on`. |
| `conv_encoder` | Rate-1/2, K = 7 convolutional code, generators 171 and 133 (octal). |
| `neural_dsp_top` | Wires the chain together and brings out the test pins. |

`neural_dsp_pkg` holds the shared widths and the record types (`spike_rec_t`, `event_rec_t`).

## Threshold generation (`auto_threshold`)

For window w of N = 2^LOG2N samples:

    threshold(w+1) = K * floor( sum over window w of |x - mean|  /  N )

The division is a right shift by LOG2N. It is applied before the multiply by K,
so the low three bits of the threshold are always zero. In the first window
after reset there are no statistics yet, so the threshold is the fixed
`INIT_THRESHOLD` = 80 codes above the mean. This value is high on purpose:
it keeps noise from flooding the queue at start-up. On typical recordings the
generated threshold later settles lower, around 40 codes.

The timing matters for anyone who changes the block:

* `cnt` counts samples within the window. On the sample with `cnt` = N-1, that
  sample's deviation is still added, and the flag `full` is set.
* On the next sample (the first of the new window), the threshold is loaded
  from `acc >> LOG2N` times K. In the same clock, the accumulator restarts with
  that sample's deviation.
* The sample and its deviation are registered in the same clock. So the
  outputs `data_out`, `abs_out` and `threshold` always belong together. The
  new threshold appears exactly with the first sample of the window it governs.

Widths: the accumulator is 10 + LOG2N = 24 bits, enough for 16384 × 1023. The
threshold is 14 bits. The largest value K = 8 can produce is 8184.

## Spike detection and the output window (`spike_detect`)

A sample whose deviation is strictly greater than the threshold starts a
window. The window is 16 samples: the 4 samples before the crossing (held in a
shift register that is always running), the crossing sample, and 11 samples
after it. During the window `data_valid` is high and `count_out` runs from 0
to 15. Outside a window, `data_out` still carries the stream, delayed by the
buffer.

Two rules cover crossings that happen close together:

* A crossing **inside** a running window belongs to that window and starts
  nothing.
* A crossing on the window's **last** sample (`count_out` = 15) starts the
  next window on the very next clock. There is no idle clock, so spikes that
  follow each other directly are not lost. The two windows are contiguous in
  the sample stream.

The 16-sample window is the design's nominal 1 ms. At 15 kSamples/s this is
really 15 samples. The 4-bit count sets the length to 16.

## Overflow, queue and radio bursts

`feature_extract` samples the queue's `overflow` flag on a window's last
sample:

* If the flag is low, the record holds all 16 samples.
* If it is high (queue at `OVF_LEVEL` = 6 of 8 records or more), the record
  is marked `minmax`. It carries only the window maximum in `samples[0]` and
  the minimum in `samples[1]`.

A min/max packet is 52 bits instead of 192. At worst-case spike rates this is
what keeps a 330 kbit/s link from falling behind:

* Back-to-back full packets, after coding, need about 360 kbit/s.
* Back-to-back min/max packets need about 98 kbit/s.

If records still arrive while the queue is full, they are dropped and counted
in `drop_count`.

The queue stores whole records (184 bits each). `packet_format` keeps `rf_on`
low while records accumulate. It raises `rf_on` when `TX_START` = 4 records
are queued, sends packets until the queue is empty, then drops `rf_on` again.
The radio therefore runs in bursts. Records below the watermark wait until
more spikes arrive.

Packet format, sent most significant bit first:

| Field | Bits |
|---|---|
| sync `8'h7E` | 8 |
| minmax | 1 |
| electrode ID | 7 |
| time stamp | 16 |
| samples, oldest first (or max, min) | 16 × 10 (or 2 × 10) |

The encoder codes every bit into two symbol bits, `{c0, c1}`:

* c0 = u[n] ^ u[n-1] ^ u[n-2] ^ u[n-3] ^ u[n-6]
* c1 = u[n] ^ u[n-2] ^ u[n-3] ^ u[n-5] ^ u[n-6]

The encoder memory runs on across packet boundaries, and no tail bits are
added. A receiver must decode the stream continuously from reset. `sym_sop`
marks the symbol of each packet's first bit. The transmitter takes symbols
with `sym_ready`. Holding `sym_ready` low back-pressures the whole output side.

## Time stamps and latency

Let edge d be the clock edge that takes in the crossing sample on `data_in`:

| Edge | What happens |
|---|---|
| d + 1 | `data_valid` rises, `count_out` = 0, and `data_out` shows the sample from edge d-4. |
| d + 16 | `count_out` = 15, the window's last sample. |
| d + 17 | The record leaves `feature_extract`. |
| d + 18 | The record is stamped and pushed into the queue. |

The time stamp is the number of clock edges since reset was released,
modulo 2^16. It equals d + 18, so a receiver subtracts 18 to recover the
crossing sample. The counter wraps every 4.4 s at 15 kSamples/s.

## Test access

* **Scan.** Every flip-flop of `auto_threshold` and `spike_detect` is on one
  scan chain: `scan_in` → `auto_threshold` (73 bits) → `spike_detect`
  (55 bits) → `scan_out`. While `scan_shift` is high, both blocks shift one
  bit per clock and stop their normal work.
  * Within a block, the chain order is the field order of its `state_t`
    struct, most significant field nearest `scan_out`.
  * In `auto_threshold` the order is: accumulator, counter, `full` flag,
    threshold, sample, deviation.
  * The threshold and the accumulator can therefore be read out through the
    chain.
* **External mean.** `use_ext_mean` with `mean_in` replaces the internal
  estimate.
* **Programmed threshold.** `ext_thr_wr` and `ext_thr_value` load the
  programmed threshold, and `use_ext_thr` selects it. The register resets to
  all ones, so nothing is detected until it is programmed.
* **Clock and reset.** Reset is asynchronous and active high everywhere.

## Parameters (top level)

| Parameter | Default | Meaning |
|---|---|---|
| `LOG2N` | 14 | threshold window, 16384 samples ≈ 1.1 s |
| `K` | 8 | threshold multiplier |
| `INIT_THRESHOLD` | 80 | threshold in the first window |
| `MEAN_LOG2N` | 14 | mean-estimate window |
| `FIFO_DEPTH` | 8 | queue depth, in records |
| `OVF_LEVEL` | 6 | level at which records shrink to max/min |
| `TX_START` | 4 | queued records that wake the radio |

The window length (16), the pre-trigger depth (4) and the field widths are set
in `neural_dsp_pkg`.

## What is specified and what is chosen here

These points follow the reference description of the design:

* the block order
* the mean-absolute-deviation threshold with N = 16384, K = 8 and 80 in the
  first window
* once-per-window updates
* absolute-value detection
* the 4-sample pre-trigger buffer and the 16-sample window with valid flag and
  4-bit count
* back-to-back detection without a dead cycle
* max/min extraction on queue overflow
* the programmable threshold
* time stamp plus electrode ID
* a convolutional channel code
* radio power-down while the queue fills
* full-scan test of the two signal-processing blocks
* the test pins

These are choices of this implementation:

* how the mean is estimated
* the strict ">" comparison
* the reset style
* queue depth, overflow level, drop policy and radio watermark
* the record and packet layout
* the time-stamp width and reference point
* the specific convolutional code
* the handshakes

Not included:

* the amplifiers, the ADC and the RF transmitter, which are analog
* the proposed extension that multiplexes one processor over 100 channels,
  with per-channel state

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` at the end. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/neural_dsp_pkg.sv \
    tb/tb_neural_dsp_top.sv --top-module tb_neural_dsp_top -Mdir obj -o sim
./obj/sim
```

`tb_neural_dsp_top` runs the whole chain at the default sizes, about 51,000
samples or three threshold windows, in a few seconds. Its checks:

* It keeps its own model of the mean, the thresholds and the detections.
* It decodes the convolutional code back to bits by inverting its taps, and
  cuts the bit stream into packets.
* For every packet it checks the sync word, ID, time stamp, mode and samples.
* It checks drop and packet counts and the radio bursts.
* It shifts a pattern through the scan chain.
* It counts each mechanism and fails if one never happens. The mechanisms are:
  first-window threshold, generated threshold, programmed threshold (which
  rejects the smaller spikes), external mean, back-to-back windows, crossings
  inside a window, full and min/max records, drops, radio wake and sleep, and
  transmitter back-pressure.

`tb_fig3_spikes` runs a short four-spike synthetic stream through the full-size
chain. All of it falls in the start-up window, where the threshold is 80. The
test checks the four 16-sample windows, their contents and the four packets
that leave once the fourth record wakes the radio.

The block testbenches use short windows, for example N = 16, so that many
window boundaries are crossed.
