# FPGA-only time and voltage sampling of PET detector pulses

Time-of-flight PET needs the arrival time of each detector pulse to a few tens
of picoseconds, and its charge. The usual way uses analog discriminators and a
dedicated time-to-digital converter (TDC) chip. This design does both jobs with
FPGA resources only:

* an **LVDS input buffer** of the FPGA is the comparator. The pulse goes to
  one input and a threshold voltage to the other.
* the **carry chain** of the FPGA's adders is a delay line with about 15 ps
  per element. The FPGA's own flip-flops save the state of every element at
  each clock edge.

Four copies of the pulse are compared against four thresholds. Each
threshold crossing, rising and falling, is timestamped, so the pulse is
sampled in the *voltage* domain: at four known voltages the design knows the
time. A fit of the pulse shape to these points gives the pulse start. The
time spent above each threshold measures the charge. A fifth channel times a
reference signal.

The design follows the article *"A novel method based solely on field
programmable gate array (FPGA) units enabling measurement of time and charge
of analog signals in positron emission tomography (PET)"*. The article gives
the method, the 15 ps delay element, the four-threshold arrangement and the
reference channel. It does not give the digital details. Clock rate, widths,
the decoder, the pairing of edges and the readout are this design's own
choices, and are marked as such below and in each file's header.

## Signal path

```
            +-------------------+   +-----------------------+   +-------------+
 sig_i ---->| lvds_discriminator|-->| carry_chain_delay_line|-->| tdc_channel |--+--> tot_meter --> tot_*[k]
 vth_i[k]-->|  (k = 0..3: A..D) |   |   336 taps x 15 ps    |   | capture +   |  |
            +-------------------+   +-----------------------+   | decoder     |  |
 ref_p_i -->| lvds_discriminator|-->| carry_chain_delay_line|-->| tdc_channel |--+
 ref_n_i -->|   (channel 4)     |   +-----------------------+   +-------------+  |
            +-------------------+          coarse_counter ----------^            v
                                                                        hit_readout --> hit_o
```

`pet_adc_tdc_top` holds `N_THRESH` (default 4) threshold channels, numbered
0 to 3 in the order of `vth_i`, and a reference channel, number 4. One
`coarse_counter` is shared by all channels. The comparators and delay lines are
behavioural models of FPGA resources: an analog input buffer and a placed
carry chain. Everything behind them is synthesizable RTL.

## How a carry-chain TDC reads time

The comparator output enters the delay line. The output of element `j` is
tap `j`, so tap `j` follows the input after `(j+1) x 15 ps`. A transition
therefore travels up the taps at one element per 15 ps. At every rising clock
edge `tdc_capture_reg` saves all taps at once. Walking up the saved vector
walks back in time:

```
 bit:      0  1  2  ...  i  i+1 ...          (bit j = input (j+1) elements ago)
 rising:   1  1  1  ...  1   0   0  0        leading edge, fine = i+1
 falling:  0  0  0  ...  0   1   1  1        trailing edge, fine = i+1
```

The **fine code** is the number of elements the edge has passed. The edge
happened between `fine` and `fine+1` element delays before the clock edge. The
**coarse code** is the `coarse_counter` value saved with the vector. With the
nominal delays:

```
t_edge  in  ( coarse*CLK_PS - (fine+1)*15 ps ,  coarse*CLK_PS - fine*15 ps ]
CLK_PS = WIN * 15 ps = 334 * 15 ps = 5010 ps      (about 200 MHz)
```

**The window.** An edge stays in the delay line after the next clock edge,
where it shows up again about 334 taps further on. The decoder searches only
the first `WIN` = 334 taps. That is exactly one clock period of delay, so
every edge is reported once, at the first capture in which it lies inside the
window. An edge younger than one element misses its own capture and is
reported by the next one, at fine code 334. This is why the clock period must
equal `WIN` element delays. On real silicon, a calibration would find the
number of taps per clock period and set `WIN` to it.

The chain is `WIN + 2` = 336 taps long. The extra two taps are neighbours for
the bubble filter.

## Bubbles

A flip-flop that samples a tap just as it changes can go metastable. Taps
also reach their flip-flops over routes of different length. Either way, the
saved vector may not be a clean run of ones and then zeros, for example
`...0000000100101111111...`. `thermo_decoder` first replaces every bit by the
majority of itself and its two neighbours. This removes every isolated wrong
bit. A wrong bit right beside the boundary can move the result by one
element. The decoder then takes the lowest boundary of each polarity within
the window.

Per clock period, a channel reports at most one leading and one trailing
edge. If one polarity appears twice, the decoder reports the most recent one.
Pulses of ~2 ns, the typical width of TOF-PET detector pulses, fit inside one
period with both their edges, and both are reported. Two edges of the same
polarity less than 5 ns apart are not resolved.

## Leading and trailing edges, time over threshold

`tdc_channel` registers the decoded edges as hits, two clock edges after the
capture. The strobes `rise_valid` and `fall_valid` may fire together.

`tot_meter` pairs each trailing edge with the leading edge before it. It
outputs the interval in picoseconds, using the nominal 15 ps and 5010 ps.
When both edges come from one saved vector, the edge with the larger fine
code is the older one. That is how the block tells a whole short pulse from
"the end of the last pulse plus the start of a new one". A trailing edge with
no leading edge before it is dropped. Results saturate at 2^20 - 1 ps.

The four intervals, one per threshold, describe the pulse amplitude and
charge. Turning them into charge needs a model of the detector pulse and is
left to the consumer of the data.

## Readout stream

Each channel has two hit sources, one per polarity, so the default top has
ten. Source `2c+1` is the leading edge of channel `c` and `2c` its trailing
edge. `hit_readout` gives every source a 4-deep FIFO. A round-robin arbiter
moves one hit per clock into the output register. The output follows a
valid/ready handshake: a hit is held until `hit_ready_i` takes it, and an
assertion checks this rule.

A hit that meets a full FIFO is dropped and counted in `lost_o`. One pulse
produces 10 hits. The expected detector rate is tens of thousands of pulses
per second, against 2x10^8 hits/s of readout, so the FIFOs only need to hold
the hits of one pulse.

Hit word (`tdc_pkg::hit_t`, 37 bits): `channel[2:0]`, `pol` (1 = leading),
`coarse[23:0]`, `fine[8:0]`.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_THRESH` | 4 | four-threshold scheme of the method |
| `TAP_DELAY` / `TAP_PS` | 15 ps | carry-chain element delay of the method |
| `WIN` | 334 | choice: taps per clock period, sets the clock to 5010 ps |
| `FIFO_DEPTH` | 4 | choice |
| `COARSE_W`, `FINE_W`, `TOT_W` | 24, 9, 20 | choice (`tdc_pkg`) |
| `PROP_PS` (comparator) | 0 | choice: the buffer delay is unknown, and a constant delay cancels in time differences |

## What the models leave out, and other departures

* **No calibration.** Real carry-chain elements differ from each other
  (integral nonlinearity) and drift with temperature and supply voltage. The
  method allows those corrections to be applied offline or in real time, but
  gives no form for them, and its test results were taken without any. The
  RTL outputs raw codes, and the delay-line model uses equal elements.
* **Ideal comparator.** The model has no hysteresis, no noise and no
  amplitude-dependent delay. Measured LVDS buffers show worse timing at low
  amplitudes, and the model does not reproduce that.
* **Outside the FPGA and not built:** the DAC that sets the thresholds, the
  passive splitter and level shift of the detector signal into the 0 to 2 V
  input range, and the level converter of the reference signal. The top takes
  their outputs as `real` voltage inputs.
* **Not built:** the readout board that carries the FPGAs. Its central
  data-flow FPGA and optical links are not described. `hit_readout` is only a
  local merge of the hits into one stream.
* The top has `real` ports, because it contains the analog models. Synthesis
  tools take the blocks below it: `tdc_channel`, `tot_meter`, `hit_readout`
  and `coarse_counter`. A single `tdc_channel` at the defaults is about 400
  flip-flops plus the decoder logic.
* The tap capture path is asynchronous by design, so lint reports the taps as
  both clocked and unclocked (SYNCASYNCNET). This is expected.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_lvds_discriminator` | decision at ±1 mV around the 0.4 to 1.6 V levels, ramp crossing at the right picosecond |
| `tb_carry_chain_delay_line` | thermometer code at random ages after rising and falling steps |
| `tb_tdc_capture_reg` | vector and coarse count saved at the edge, later changes ignored |
| `tb_coarse_counter` | reset, count, wrap-around |
| `tb_thermo_decoder` | every window position of both polarities, pulses inside a window, edges from the previous period ignored, isolated and clustered bubbles |
| `tb_tdc_channel` | hit polarity, coarse and fine, 2-cycle latency |
| `tb_tot_meter` | intervals across periods and inside one vector, end-of-pulse plus new pulse, orphan edge, saturation |
| `tb_hit_readout` | no loss under random back-pressure, per-source order, round-robin rotation, overflow count |
| `tb_pet_adc_tdc_top` | whole design at default parameters |
| `tb_table1_levels` | ramp measurement at 400/800/1200/1600 mV, whole design at defaults |

In `tb_pet_adc_tdc_top` the testbench makes random triangular pulses in 1 ps
steps and notes every true threshold crossing itself. It then checks that
every hit converts back to a time less than one element after the true
crossing, and that every time-over-threshold result is within one element of
the true interval. It also checks that every hit is either delivered or
counted lost when the readout is blocked. The run must see each of these at
least once: leading and trailing hits on each channel, a pulse inside one
clock period, a pulse across periods, back-pressure, overflow, and
time-over-threshold results.

`tb_table1_levels` repeats the laboratory measurement of the method. A 0 to
2 V ramp over 2.5 ns is measured against a reference edge at four levels:

| level | measured here | ideal | laboratory (includes a fixed offset) |
|---|---|---|---|
| 400 mV | 501 ps | 500 ps | 2551 ps |
| 800 mV | 1002 ps | 1000 ps | 3034 ps |
| 1200 mV | 1501 ps | 1500 ps | 3535 ps |
| 1600 mV | 2001 ps | 2000 ps | 4125 ps |

The steps per 400 mV are ~500 ps here and 483, 501 and 590 ps in the
laboratory. The laboratory values also carry the buffer's amplitude-dependent
delay and 15 to 50 ps of jitter, which the model does not contain.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
          rtl/tdc_pkg.sv tb/tb_pet_adc_tdc_top.sv --top-module tb_pet_adc_tdc_top
./obj_dir/Vtb_pet_adc_tdc_top
```

Replace the testbench name to run any other bench. All files use
`` `timescale 1ps/1fs ``. The end-to-end benches run the clock half a
picosecond off the signal steps, so a tap never switches exactly at a clock
edge. At the defaults the whole-design bench takes about 30 s to build and
10 s to run.

To change the number of thresholds, set `N_THRESH` on the top. To change the
element delay or the clock, set `TAP_DELAY` and `WIN`, and keep the clock
period equal to `WIN x TAP_DELAY`. `FINE_W` limits `WIN` to 511.
