# Readout driver for a liquid-argon calorimeter

A calorimeter front-end board digitises every channel five times per level-1
trigger, at 12 bits with one of three gain scales. Most of those samples belong
to cells with no real energy deposit. Sending them all to the data acquisition
would mean 25 kbit per board per trigger at up to 100 kHz.

The readout driver (ROD) sits between the front end and the readout buffers
and reduces each channel's five samples to a few numbers:

* the energy `E`;
* for cells above a threshold, the pulse time `T` and a quality factor `Q`.

`E` and `T` come from *optimal filtering*, a weighted sum of the samples with
per-channel constants. `Q` is the chi-square of the measured pulse against the
expected shape.

This repository is synthesizable SystemVerilog for one ROD module:

* It serves 256 channels: two front-end boards (FEBs) of 128 channels each.
* It has four processing units (PUs) of 64 channels each.
* Each PU has a derandomising input buffer that holds 101 events.
* It keeps histograms of `E`, `T` and `Q`, plus monitoring histograms of
  selected channels.
* In calibration mode, each PU averages the samples over a number of events.
* It builds full events and sends them over a 32-bit readout link.

In the original architecture each PU is a commercial integer DSP running the
filter program. Here that program is replaced by a dedicated two-stage engine
(`of_engine`). It processes a 64-channel event in 330 clock cycles (8.25 µs at
40 MHz) as long as up to about 25 channels are above threshold. The
100 kHz trigger rate allows 400 cycles per event.

## Data path

```
FEB link 0 (32b) --+                 +-- PU 0 (link 0, bits 15:0)  --+
FEB link 1 (32b) --+- data_distributor -- PU 1 (link 0, bits 31:16) --+-- output_controller -- ROB link (32b + ctrl)
VME test data -----+                 +-- PU 2 (link 1, bits 15:0)  --+      (output buffer of full events)
                                     +-- PU 3 (link 1, bits 31:16) --+
L1A/BCR/ECR/type -- ttc_rx -- trigger record to all PUs
PU busy x4 -- busy_or -- Busy
```

Inside each PU (`processing_unit`):

```
16 link bits -> input_fpga -> dpram 32K x 32 -> of_engine -> output_fpga -> sync_fifo 32K x 32 -> output_controller
trigger rec  -/                                 |   |
                                    histogrammer <- |  (E, T, Q, monitored cells)
                                  calib_averager <--   (raw samples)
```

Everything runs on one 40 MHz clock, with a synchronous, active-high `rst`.

| File | Role |
|---|---|
| `rod_pkg.sv` | constants, record structs, word layouts |
| `rod_top.sv` | the ROD module |
| `data_distributor.sv` | link split into 16-bit halves; VME source select |
| `ttc_rx.sv` | bunch and event counters, trigger records |
| `busy_or.sv` | registered OR of the PU busy lines |
| `processing_unit.sv` | one 64-channel PU |
| `input_fpga.sv` | deserialiser, parity check, record builder, derandomiser bookkeeping |
| `dpram.sv` | input buffer memory |
| `of_engine.sv` | `of_reader` + 64-entry record queue + `of_finisher` |
| `of_reader.sv` | reads an event in place and accumulates `E` and `E·T` |
| `of_finisher.sv` | threshold, `T` by reciprocal table, `Q` |
| `recip_table.sv` | `floor(2^24/m)` for `m` = 128…255, computed at elaboration |
| `histogrammer.sv` | general and monitoring histograms |
| `calib_averager.sv` | calibration signal averaging |
| `output_fpga.sv` | fragment formatter |
| `sync_fifo.sv` | show-ahead FIFO, used for the output FIFO, the output buffer and small queues |
| `output_controller.sv` | event builder and ROB link driver |

## From the link to an event record

**Link coding.**

* Each FEB link word is 32 bits every 25 ns: 2 bits for each of the board's
  16 ADCs.
* One ADC therefore has a 2-bit *lane*, and each PU gets 8 lanes.
* On its lane, an ADC sends 16-bit words as 8 symbols, most significant
  first.
* Word layout:
  * bit 15: even parity over the whole word;
  * bit 14: zero;
  * bits 13:12: the gain code;
  * bits 11:0: the ADC value.
* An event is 40 words per lane, sample-major: word `s*8 + c` is sample `s`
  of channel `c` of that ADC. That is 320 link cycles, or 8 µs.
* `feb_valid` is high during the event.
* The link must idle at least 3 cycles between events. `input_fpga` uses
  those cycles to write the record header and trailer.

**Record.** `input_fpga` joins the FEB data with the oldest trigger record
waiting in its queue. The trigger record holds the 24-bit event number, the
12-bit bunch crossing and the 8-bit type. The joined data is one 323-word
record in the PU's input memory:

| word | content |
|---|---|
| 0 | `{8'hEE, l1id}` |
| 1 | `{ttype, 12'b0, bcid}` |
| 2 + s·64 + c·8 + lane | `{par_err, sample, channel, 8'b0, gain, adc}` |
| 322 | `{8'hEF, 7'b0, trigger_missing, parity_error_count}` |

A 32K-word memory holds 101 records. The memory is a circular buffer:

* `input_fpga` counts complete records in `ev_count`.
* The engine frees the oldest record with `ev_release`, after it has read
  the record.
* `busy` goes high when two or fewer record slots are free, or when the
  trigger queue is almost full.
* An event that arrives with no free slot is dropped and counted in
  `drop_cnt`.

`ttc_rx` keeps two counters: bunch crossings, which `bcr` resets, and level-1
accepts, which `ecr` resets.
Each `l1a` produces one record that goes to all four PUs.

## The processing engine

This is the part that differs most from the original design.

### Arithmetic

The constants are 16-bit signed with 12 fractional bits. Each channel has a
separate set `{a, b, g, g'}` for every gain and sample: 64 × 4 × 8 entries,
addressed `{channel, gain, sample}`. The engine computes, with `S_i` the raw
12-bit samples:

```
E   = (Σ a_i·S_i) >>> 12                          20 bits, every channel
ET  = (Σ b_i·S_i) >>> 12                          20 bits, every channel
if E > Eth and E > 0:
  E = m · 2^(p-7), m in 128..255                  normalise to an 8-bit mantissa
  T = ET · floor(2^24 / m) >>> (p + 17)           16 bits, saturated
  Q = Σ (S_i − (E·(g_i + (g'_i·T >>> 12)) >>> 12))²   32 bits, saturated
```

The reciprocal table gives `T` to about 1/128 relative accuracy.

* There is no pedestal subtraction, so the constants must absorb it.
* Each sample uses the constants of its own gain code.
* The channel reports the gain of its first sample.
* If a channel's five samples do not all carry the same gain code, the
  channel is flagged (`gain_mm`).

### Schedule

`of_reader` reads the record in place:

* It reads the header, the trailer, then the 5 samples of each channel in
  turn, one memory word per cycle.
* Memory address, coefficient fetch and multiply-accumulate form a 3-stage
  pipeline with two multipliers.
* It pushes one record per channel into a 64-entry queue. The record holds
  `E`, `ET`, the samples and the `g`, `g'` constants.

`of_finisher` takes the records from the queue:

* A channel below threshold takes 2 cycles.
* A channel above threshold takes about 9–10 cycles: reciprocal lookup, one
  multiply for `T`, then one `Q` term per cycle.

The queue holds a whole event. The finisher's work is therefore hidden behind
the reading, however the active channels are placed in the event.

Measured processing time per event, from start of reading to the end record
(`tb_pu_timing`):

| channels above threshold | cycles | µs at 40 MHz |
|---|---|---|
| 0, 1, 10, 20 | 330 | 8.25 |
| 64 | 653 | 16.3 |

Turning monitoring on does not change these numbers. The histogram update
runs alongside the formatter and takes 2 cycles per channel.

At 100 kHz the average budget is 400 cycles per event:

* An event with every channel above threshold exceeds it.
* The 101-event buffer absorbs such events while they are rare.
* A run of them raises Busy.

The DSP program of the original design took 1.6, 2.8, 6.2, 10.0 and 26.4 µs
for 0, 1, 10, 20 and 64 active channels. With monitoring, those times were up
to 37 µs.

## Histograms and calibration

`histogrammer` holds 256-bin, 32-bit histograms:

| histogram | bin |
|---|---|
| `E`, every channel | `E >>> 4` |
| `T`, channels above threshold | `(T >>> 2) + 128` |
| `Q`, channels above threshold | `Q >> 8` |

All bins are clamped to the range.

With `mon_en` set, up to four selected channels (`mon_sel`, `mon_ch`) also
fill their own `E` histogram.

* Every update is a 2-cycle read-modify-write.
* `hist_clear` zeroes everything in 1024 cycles.
* A separate read port (`hist_rd_*`) reads a bin one cycle after the address.

`calib_averager` works while `calib_en` is set:

* It sums every channel's five samples over `2^calib_navg_log2` events.
* `calib_done` then goes high, and `calib_rd_avg` gives each average.

## Output

**Fragment.** Each PU writes one fragment per event into its 32K × 32 output
FIFO:

```
{8'hB0, l1id}
{err[7:0], ttype, pu_id[3:0], bcid}
per channel: {above, gain_mismatch, gain, channel, 2'b0, E[19:0]}
             followed, if above, by {T[15:0], min(Q, 65535)}
{8'hE0, n_above, word_count}
```

Error bits in `err`:

| bit | meaning |
|---|---|
| 0 | bad record header marker |
| 1 | bad record trailer marker |
| 2 | parity error |
| 3 | no trigger record |

The raw samples are not forwarded.

**Full event.** `output_controller` builds the full event in the output
buffer, `OB_DEPTH` × 33 bits. The event is:

1. `{8'hA0, l1id}`;
2. the four fragments in PU order;
3. `{8'hF0, 4'b0, l1id_mismatch[3:0], word_count}`.

Bit 32 marks the event header and trailer. The controller parses each fragment
as it copies it: bit 31 of a channel word announces a `{T,Q}` word. It then
sends the buffer over the ROB link:

* one word per cycle while `rob_xoff` is low;
* `rob_ctrl` carries bit 32.

With `out_vme` set, the ROB link stays silent and the host reads the buffer
instead. `vme_ob_data` is the 33-bit word at the head, `vme_ob_empty` says the
buffer is empty, and `vme_ob_rd` pops the word. Both paths carry the same
stream, so the mode can change at any time without losing or repeating a
word.

## Configuration (in place of VME)

The original module is configured and read out over VME. Here the same
functions are plain ports of `rod_top`:

* `cfg_pu` selects the PU that receives `coef_we/coef_waddr/coef_wdata`.
* `cfg_pu` also selects the PU whose histogram and calibration read ports
  drive `hist_rd_data` and `calib_rd_avg`.
* `eth`, the monitoring selection and the modes are common to all PUs.
* `src_vme` takes the input from `vme_data`/`vme_valid` instead of the FEB
  links, for tests.
* `out_vme` sends the output to the VME read port instead of the ROB link.

## Where this design departs from the original

These parts are this design's own:

* The DSP, its program and its external memory bus are replaced by `of_engine`.
* The formats and markers of the link, record, fragment and event are this
  design's own. So are the fixed-point widths, the reciprocal table and the
  histogram binning.
* The busy rule:
  * at most 2 free record slots;
  * or less than 131 free words in the output FIFO;
  * or a nearly full trigger queue.
* Other choices of this design:
  * the drop policy;
  * the 3-cycle gap between events;
  * the single clock;
  * the output buffer depth of 8192;
  * four monitoring slots;
  * `xoff` flow control on the ROB link.
* There is no mode that forwards the raw samples. The original design
  drops them as a rule, but does not say when or in what form it keeps them.
* These parts are not built: the VME interface, the optical link receivers
  (the design starts at their 32-bit parallel output), the FEBs, the ROB and
  the TTC receiver chip (`ttc_rx` takes decoded `l1a/bcr/ecr/ttype`).
* The full event is written only after every PU has delivered its fragment.
  A PU that never delivers one stalls the event builder.
* `Q` in the fragment is saturated to 16 bits. The 32-bit value goes to the
  histogram.

The sizes that follow the original design are:

* 5 samples of 12 bits and 3 gains;
* 8 channels per ADC and 16 ADCs per board;
* 2 link bits per ADC per 25 ns;
* 4 PUs of 64 channels;
* 16-bit filter constants;
* 32K × 32 input memory and output FIFO per PU;
* a 32-bit, 40 MHz readout link.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The stimulus and the reference arithmetic are
in `tb/tb_pkg.sv`:

* test data comes from a hash of event, channel and sample;
* the reference computes `E`, `T` and `Q` independently of the RTL;
* the package also builds the expected fragment word by word.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rod_top \
    rtl/rod_pkg.sv tb/tb_pkg.sv tb/tb_rod_top.sv -y rtl -y tb +libext+.sv
./obj_dir/Vtb_rod_top
```

Replace `tb_rod_top` with any other testbench name.

`tb_rod_top` runs the whole module at its default sizes:

* It sends hundreds of events on both links.
* It compares every word on the ROB link with the reference.
* It makes each of these happen at least once and counts them:
  * channels above and below threshold;
  * a parity error;
  * an event without a trigger record;
  * the VME source;
  * ROB `xoff` stalls;
  * output read over VME;
  * Busy;
  * monitoring updates;
  * a completed calibration average.
* It runs in about a second.

`tb_pu_timing` measures the processing times in the table above.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `rod_top` | `MEM_DEPTH` | 32768 | input memory words per PU |
| `rod_top` | `OUT_DEPTH` | 32768 | output FIFO words per PU |
| `rod_top` | `OB_DEPTH` | 8192 | output buffer words |
| `rod_top` | `N_MON` | 4 | monitored-channel slots |
| `input_fpga` | `BUSY_FREE` | 2 | free record slots at which busy rises |
| `histogrammer` | `NBINS`, `E_SHIFT`, `T_SHIFT`, `Q_SHIFT` | 256, 4, 2, 8 | binning |
| `rod_pkg` | `COEF_FRAC` | 12 | fractional bits of the constants |
