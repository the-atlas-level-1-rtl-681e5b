# ATLAS Level-1 Calorimeter Trigger Pre-Processor — SystemVerilog model

The first stage of the ATLAS Level-1 calorimeter trigger gets about 7200
analogue "trigger-tower" pulses, one per 0.1 × 0.1 patch of calorimeter in
η–φ. Every 25 ns (one LHC bunch crossing, BC) it has to turn them into
numbers the downstream Cluster Processor (CP) and Jet/Energy-Sum Processor
(JEP) can use. Each number is an 8-bit transverse energy (ET, 1 GeV per
count), assigned to the one bunch crossing the pulse came from. The
Pre-Processor also keeps its raw input for readout after a Level-1 accept,
and offers monitoring and test-data injection.

This RTL describes one **Pre-Processor Module (PPM)**: 64 towers on 16
Multi-Chip Modules (MCMs). Each MCM carries two Pre-Processor ASICs
(PPrAsics) of two channels each. One readout-merger ASIC collects the readout
of all 32 PPrAsics and places it on a ring bus. All logic runs on the 40 MHz
bunch-crossing clock. The analogue front end and the serialiser chips are
outside the RTL.

```
            one channel (ppr_channel)                      per pair          per MCM
 adc[10] ─┬─► sync_fifo ─► bcid ─► lut ─┬─► et[8] ──────► bcmux ─► slot[10] ─┐
 playback ┘   0..15 BC    FIR+peak 1024x8│                                    ├─► cp_link[21]
          ▲                              ├──► jet_adder (4 towers) ─► jet[9] ─┴─► jep_link[10]
          │                              │
      histo_playback ◄── raw, et ────────┴──► readout_pipeline (raw + ET rings)
      (rate / spectrum / playback)              │ on L1A: n slices
                                                ▼
                                     rem_asic (32 ASICs) ─► pipeline_bus_node ─► ring
```

## The path of one trigger tower

| step | module | what it does | latency |
|---|---|---|---|
| FADC sample | (outside) | 10-bit sample per BC, phase-adjusted | – |
| synchronisation | `sync_fifo` | delays the channel by 0–15 whole BCs to make up for time of flight and cable length (16 BCs ≈ 80 m of cable at 5 ns/m) | 1 + delay |
| BCID | `bcid` | reduces a pulse spread over several BCs to one non-zero value in its own BC | 5 |
| calibration | `lut` | 1024 × 8 table: 10-bit BCID output → 8-bit ET; pedestal and noise threshold live in the table contents | 1 |
| BC-mux | `bcmux` | packs a tower pair into one 10-bit link slot | 1 |
| jet element | `jet_adder` | adds the four towers of an MCM (one 0.2 × 0.2 jet element), saturates at 511 | 1 |
| link word | `mcm` | adds a parity bit, registers the words for the serialisers | 1 |

From a sample at the ADC port to its CP link word takes 9 + delay clocks. The
jet link word takes the same. `ppr_channel` also delays the raw sample by 7
clocks, so the readout stores each raw sample next to its own ET.

## Bunch-crossing identification

A calorimeter pulse is several BCs wide. Downstream logic needs exactly one
non-zero value, in the right BC. `bcid` uses two rules:

* **Pulses within the FADC range:** a 5-tap FIR filter
  `f(t) = Σ c_i · s(t+2−i)`, i = 0…4, with 4-bit unsigned coefficients
  (`c0` weighs the newest sample). Sample `t` is the pulse's BC when
  `f(t) > f(t−1)` and `f(t) ≥ f(t+1)`. The output is then `f(t) >> drop`,
  clipped to 1023. Otherwise it is 0.
* **Saturated pulses:** when any sample in the filter window reaches
  `sat_level`, the filter result is discarded. The first sample at or above
  `sat_level` after one below it is taken as the pulse's BC. Its output is
  1023, and `sat_flag` is set.

Both rules guarantee that **every non-zero output is followed by a zero**.
The BC-mux scheme relies on that. The filter length, the coefficient width
and the exact saturated-pulse rule are choices of this implementation: the
source description names the pair of algorithms ("FIR + peak finder" and a
saturated-pulse algorithm) but does not define them. The default
coefficients after reset are 0,1,2,1,0.

## BC-mux and the link words

Because of the rule above, two towers can share one 8-bit slot per BC and
lose nothing, which doubles the useful bandwidth of the CP links. The slot is
`{code[1:0], data[7:0]}`:

| code | meaning |
|---|---|
| `00` A_NOW | data is tower A of this BC (data 0 = empty slot) |
| `01` B_NOW | data is tower B of this BC |
| `11` B_PREV | data is tower B of the previous BC |

If both towers are non-zero in the same BC, A goes out at once and B one BC
later as B_PREV. Both towers are then zero in that next BC, so the slot is
free. If the input breaks the rule, `collision` pulses and the new values are
dropped. The PPM counts such events in a register.

Each MCM sends one CP link word per BC: `{parity, slot of ASIC 1, slot of
ASIC 0}`, 21 bits holding four towers. It also sends one JEP word:
`{parity, jet[8:0]}`. Parity is even over the whole word. The source
specifies "an error-detection code" but does not give it. The source's serial
links carry 800 Mbit/s, i.e. 20 bits per BC. Because of its 2-bit code and
the parity bit, this word is one bit wider than that.

## Readout after a Level-1 accept

Each PPrAsic has two pipeline memories in `readout_pipeline`, both 256-entry
rings written every BC: raw samples and ET values of its two channels. An
accept (`l1a`) selects the event `latency` BCs earlier; the reset value is 80
BCs = 2 µs. The block then reads `n_slices` consecutive slices centred on that
event, from event − n_slices/2 onward. n_slices runs from 1 to 128, reset 3.
Each slice gives one 36-bit word `{ET ch1, raw ch1, ET ch0, raw ch0}`.

* Accepts wait in an 8-deep queue. One that arrives while the queue is full is
  dropped and counted (PPM register 2).
* Slices are copied out of the ring at one per clock into a 128-word
  derandomiser. This lets a whole 128-slice event, or a burst of 3-slice
  events, leave the ring before it is overwritten, even while the merger is
  busy with other ASICs.
* The data are safe as long as a slice is copied within
  256 − latency − n_slices/2 BCs of its accept.

`rem_asic` builds one fragment per accept: a header word, then n_slices words
from ASIC 0, ASIC 1, … ASIC 31. Bus words are 44 bits, `{type[1:0], asic[5:0],
payload[35:0]}`. Type `01` is a header and carries the event number; type
`10` is data. `pipeline_bus_node` is one station of the ring. A word from
upstream always passes, one clock later. An empty slot takes the station's own
next word. The ring never stalls, and upstream traffic has priority.

## Monitoring and playback

Each channel's `histo_playback` memory has 256 words of 16 bits. Its mode is
set per channel:

* **playback:** the words replace the FADC input, one per BC, cyclically
  (low 10 bits). This injects test data into the trigger chain.
* **rate:** counts samples above `thresh` (raw or ET) over `rate_dur` BCs.
  Each count goes into the next memory word, so the memory holds a rate
  history.
* **spectrum:** histograms `raw[9:2]` or `et[7:0]`, counting only BCs whose
  bunch number lies in `[win_lo, win_hi]`. The PPM's bunch counter is reset
  by `bcr` and wraps after 2961 BCs, the turn length used in the source.

Counters saturate at 65535. A slow-control write to the memory takes
priority over a histogram update in the same clock; that update is lost.

## Slow control

The bus has a 21-bit address, 32-bit data and one clock of read latency
(`sc_rdata` is valid the clock after the address).

| address | meaning |
|---|---|
| `[20]=1`, `[3:0]=0` | L1A latency in BCs (reset 80) |
| `[20]=1`, `[3:0]=1` | readout slices (reset 3) |
| `[20]=1`, `[3:0]=2` | accepts dropped (read only) |
| `[20]=1`, `[3:0]=3` | BC-mux collisions (read only) |
| `[20]=0` | `[19:15]` PPrAsic (MCM = index/2), `[14]` channel, `[13:12]` space, `[11:0]` offset |

The spaces inside a PPrAsic are: 0 = channel registers, 1 = LUT entry,
2 = histogram/playback word. The channel registers, at offset `[3:0]`, are
listed in `ppr_pkg` (`R_*`). In order: FIFO delay, FIR coefficients
(`c0` in bits 3:0), FIR drop, saturation level, histogram mode (bits 1:0) and
source (bit 2), threshold, bunch window (lo 11:0, hi 27:16), rate duration.
Channel *g* of the PPM is channel `g % 2` of PPrAsic `g / 2`; its ADC input is
`adc[g]`.

## Modules

| file | role |
|---|---|
| `ppr_pkg.sv` | widths, encodings, configuration struct, register map |
| `ppm.sv` | top: 16 MCMs, merger, bus station, bunch counter, PPM registers |
| `mcm.sv` | two PPrAsics, link words with parity |
| `pprasic.sv` | two channels, registers, BC-mux, jet adder (ASIC 0 of each MCM), readout |
| `ppr_channel.sv` | FIFO → BCID → LUT, histogram/playback, raw alignment |
| `sync_fifo.sv`, `bcid.sv`, `lut.sv`, `jet_adder.sv`, `bcmux.sv` | real-time steps |
| `readout_pipeline.sv`, `ppr_fifo.sv` | pipelines, accept queue, derandomiser |
| `histo_playback.sv` | monitoring and playback memory |
| `rem_asic.sv`, `pipeline_bus_node.sv` | readout merger, ring station |

The top parameter `N_MCM` defaults to 16. The package constants give the
numbers taken from the source: 10-bit ADC, 8-bit ET, 9-bit jets, 16-BC FIFO,
128 slices, 2961 bunches. The LUT and the pipeline memories are not reset and
must be loaded or written before use. Everything else resets asynchronously
on `rst_n` low.

## Not in the RTL

These parts have no logic to write, or are bought-in chips. Their digital
sides are the top's ports.

* the differential line receiver, summing amplifier and 10-bit baseline DAC
* the 10-bit flash ADC
* the Phos4 strobe-delay chip (1 ns steps over 25 ns)
* the G-link / LVDS serialisers
* the readout driver board at the end of the ring
* the fan-out of link outputs to cable drivers, which duplicates links at
  the quadrant boundaries of the downstream processors

The 8-bit demonstrator MCM (FeAsic, Finco level converter) is an earlier
prototype and is not modelled.

## How far to trust it

The module counts, the widths, the FIFO depth, the slice limit, the
four-tower jet sum with 9-bit result and the order of the processing steps
follow the published description of the Pre-Processor. The following are this
implementation's own choices and may differ from the real ASICs:

* the BCID filter and both identification rules
* the BC-mux encoding and the parity code
* two channels per PPrAsic
* the register map and slow-control bus
* the raw readout tap after the synchronisation FIFO, so that a raw sample
  and its ET share a pipeline address
* the pipeline depth (256) and the queue and derandomiser sizes
* the rate-history layout of the monitoring memory
* the fragment format and the ring insertion rule

## Simulating

Every testbench in `tb/` checks itself. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. The
channel-level benches share a reference model, `tb/ppr_model_pkg.sv`. It
computes FIR, peak finding, the saturated rule and calibration over whole
arrays, independently of the RTL. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ppr_pkg.sv tb/ppr_model_pkg.sv tb/tb_ppm.sv --top-module tb_ppm
./obj_dir/Vtb_ppm
```

Replace `tb_ppm` with any other bench (`tb_bcid`, `tb_bcmux`, `tb_pprasic`,
`tb_mcm`, `tb_readout_pipeline`, …).

`tb_ppm` runs the full 64-channel module at its default parameters in about a
second. It checks:

* every BC-mux slot and jet word of all 16 MCMs, against the model
* the readout fragments on the ring
* foreign ring traffic
* the histogram and rate contents
* the dropped-accept count

It also requires each of these mechanisms to occur at least once: FIFO delay
in use, BCID peak, saturated pulse, deferred BC-mux tower, jet saturation,
readout event, accept dropped on overflow, foreign bus word passed, playback,
spectrum and rate monitoring.

`tb_ppm_l1a_rate` runs the readout at the Level-1 accept rate of 75 kHz. Accepts
arrive at random, one BC in 533 on average with no minimum spacing, for 60000
BCs. All 64 channels carry pulses, and the ring carries foreign traffic in half
of its slots. The bench checks every fragment against the model, checks that
no accept is dropped, and reports the ring occupancy and the longest time from
an accept to the end of its fragment. In a typical run that is 19% of the
slots and about 740 BCs.
