# TDC130: a 32-channel, 24.4 ps time-to-digital converter in SystemVerilog

A time-to-digital converter (TDC) measures when an edge arrives on a hit
input. This design records the arrival time of leading and trailing edges on
32 channels. Each timestamp has 27 bits and the bin is 24.414 ps, so the range
is 3.28 ms. Hits are stored per channel until an external trigger says which
of them belong to an interesting event. Only those leave the chip.

The clock comes from a single 40 MHz reference, the bunch-crossing frequency
of the LHC. A PLL multiplies it to 1.28 GHz. A 32-element delay-locked loop
(DLL) then divides each 781.25 ps period into 32 bins.

The repository holds two designs that share the time base:

* `tdc130`: the full 32-channel chip. It has hit capture, per-channel
  level-1 buffers, trigger matching, channel merging and a readout buffer.
* `tdc130_0820`: the 44-channel prototype built to measure the time base. It
  captures the raw DLL pattern of each channel and shifts everything out
  serially.

`tdc130_top` places both side by side. Its ports carry the prefixes `t_` and
`p_`, and nothing connects the two designs.

## The time base

```
40 MHz ref ─► PFD ─► charge pump/filter ─► VCO 1.28 GHz ─┬─► coarse counter (22-bit Gray)
               ▲                                         │
               └────────── ÷32 (clock_divider) ◄─────────┤
                                                         ▼
                             DLL: 32 delay elements, taps[0..31], 24.4 ps apart
                               ▲ bang-bang phase detector + charge pump
                               └ start-up state machine (dll_startup_fsm)
```

* **PLL** (`pll_model`, behavioural, with the synthesizable `pfd` and
  `clock_divider`).
  * `pfd` uses two flip-flops. The reference edge sets `late` and the divided
    clock sets `early`. When both are high, both are cleared.
  * The charge pump, the RC filter and the ring VCO are modelled with real
    numbers: VCO gain 5.71 GHz/V, centred on 1.28 GHz at 0.6 V.
  * The model locks in about 2 µs and then holds the divided clock within a
    few ps of the reference.
* **DLL** (`dll_model`, behavioural).
  * The line has 32 voltage-controlled delay elements of nominally 24.4 ps,
    with a gain of −87.9 ps/V.
  * A flip-flop samples the line input on the line output's rising edge. This
    tells whether the delay is shorter or longer than one period, and each
    output edge pumps the control voltage one step up or down. The step is
    2 mV × 2^`icp_sel`.
  * Three calibration bits per element speed that element up.
* **Start-up** (`dll_startup_fsm`). A bang-bang DLL can lock to two or more
  periods, so it is forced to start from the shortest delay:
  1. The control voltage is precharged to the supply.
  2. The machine waits for the line to settle.
  3. If the detector still says "late", it pumps down until "early" has been
     seen for 8 consecutive cycles.
  4. From then on the detector drives the pump (`tracking`).

  A configuration override can force the pump.
* **Coarse time** (`coarse_counter`). A 22-bit counter of 1.28 GHz periods,
  kept in Gray code so that a hit can never sample a half-changed value.

## Capturing a hit

The fine time is where the clock's rising edge sits in the delay line at the
moment of the hit. The rule is: find the tap `k` with `tap[k] = 1` and
`tap[k+1] = 0`. The coarse time is the Gray count. Each channel
(`tdc_channel`) runs through these stages:

1. **`hit_controller`**
   * On a selected edge it raises `ctrl`. Edge selection is leading,
     trailing, both or none, and each channel has an enable.
   * The flag is an asynchronous set flip-flop. The transfer logic clears it
     with `ack`. Further edges are ignored until then.
2. **`hit_register_bank`**: 54 flip-flops clocked by `ctrl`. They store the
   32 taps and the 22-bit Gray count.
3. **`hit_transfer`**
   * Synchronises `ctrl` to the 40 MHz logic clock and copies the registers.
     They have been stable since `ctrl` rose.
   * Releases the controller.
   * Encodes the copy: fine code as above, Gray to binary, and one even
     parity bit.
   * Writes the 27-bit timestamp `{coarse, fine}` to the level-1 buffer
     4 cycles after the hit.

The channel's **dead time** is about 6 logic cycles (150 ns). A second edge
in that time is lost. In particular, a pulse shorter than that loses its
trailing edge.

## Level-1 buffer and trigger matching

Every channel has its own `l1_buffer` of 32 words. Because of that, its words
are always in time order. `trigger_fsm` exploits this: it scans from the
oldest word and needs no search.

A trigger reaches the chip a fixed **latency** after its event.
`trigger_gen` synchronises the trigger input and gives each trigger an event
number. It computes the window start = now − latency, in coarse counts.
`coarse_sync` supplies the synchronised coarse time "now". Up to 4 triggers
wait in a queue. For the oldest one, with window `[start, start + window)`,
the machine looks at the oldest unread word:

| word is …                                         | action                                   |
|---------------------------------------------------|------------------------------------------|
| older than the window start                       | dropped (no later trigger can want it)   |
| inside the window                                 | sent; stays in the buffer (scan offset moves) |
| at or after the window end, or buffer empty after the window | trigger done; next trigger rescans from the oldest word |
| (no trigger pending) older than the latency       | dropped                                  |
| out of time order with its successor, or bad parity | both / it skipped, counted as corrupt  |

Because a sent word stays in the buffer, **overlapping triggers** read the
same hit again, each under its own event number.

Options in `trig_cfg_t`:

* **Relative time** sends timestamps relative to the window start.
* In **pairing** mode, a selected leading edge is sent together with the
  trailing edge that follows it, even when that edge lies outside the window.
* With `triggered = 0`, every word is sent.

**Losses.** A write into a full buffer, or a trigger that finds the queue
full, sets a flag. The next event then carries a **loss word**, so that the
loss is visible downstream.

All time comparisons are modulo 2^27. The counter may wrap, as long as the
latency stays below half the range (1.64 ms).

## Merging and readout

* `channel_merger` passes a token round-robin over the 32 channels. It keeps
  the token on a channel between the two words of a pair.
* `readout_buffer` is a 64-word FIFO. On the way in, it turns a
  leading/trailing pair into one word: the leading timestamp plus the width
  in bins, saturated at 16 bits, which covers 1.6 µs.
* The output is a valid/ready stream of `ro_word_t` with these fields:
  * `kind`: hit, pair or loss;
  * `ch`: channel number;
  * `evt`: event number;
  * `trailing`: edge type;
  * `ts`: timestamp;
  * `width`: pulse width in bins, for pairs.

## The prototype, TDC130-0820

The prototype has the same PLL, DLL and start-up machine.

* **Hit registers.** Each of its 44 channels has a bank of 32 hit registers.
  The bank stores the raw tap pattern on the rising edge of its hit input.
  There are only 8 hit inputs, and channel `c` listens to group `c mod 8`.
* **Readout.** A `ro_load` pulse copies all 1408 register bits into
  `readout_shift_register`. They come out on `ro_dout`, channel 0 bit 0
  first. The serial input is shared with `cfg_din`.
* **Configuration.** `config_shift_register` has two stages. A word is
  shifted in on `cfg_clk` and becomes active on `cfg_upd_clk`. With
  `cfg_upd_shift` high, the update clock instead shifts the active word out
  on `cfg_dout`. This read-back destroys the active word.
  * The 102-bit word (`proto_cfg_t`, bit 0 shifted in first) holds the
    test-output select, the pump override, `icp_sel` and the 96 calibration
    bits.
  * Reset loads a working default (all zero).
* **Test output.** Selects the reference clock, the divided PLL clock, the
  DLL phase detector or `tracking`.

## Files

| file | content |
|------|---------|
| `rtl/tdc_pkg.sv` | widths, word types, configuration structs, Gray and parity functions |
| `rtl/tdc130_top.sv` | both chips side by side |
| `rtl/tdc130.sv`, `rtl/tdc_channel.sv` | target chip and one channel |
| `rtl/hit_controller.sv`, `hit_register_bank.sv`, `hit_transfer.sv` | hit capture |
| `rtl/l1_buffer.sv`, `trigger_fsm.sv`, `trigger_gen.sv`, `coarse_sync.sv`, `coarse_counter.sv` | buffering and triggering |
| `rtl/channel_merger.sv`, `readout_buffer.sv` | readout path |
| `rtl/pll_model.sv`, `pfd.sv`, `clock_divider.sv` | PLL (VCO and filter behavioural) |
| `rtl/dll_model.sv`, `dll_startup_fsm.sv` | DLL (delay line behavioural) |
| `rtl/tdc130_0820.sv`, `readout_shift_register.sv`, `config_shift_register.sv` | prototype |
| `tb/tb_<module>.sv` | self-checking testbench per module |

`pll_model` and `dll_model` are behavioural. They use real numbers and
delays, so they simulate but do not synthesize. Everything else is
synthesizable.

## Simulating

The testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. Use Verilator 5
with timing support, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/tdc_pkg.sv tb/tb_trigger_fsm.sv --top-module tb_trigger_fsm
./obj_dir/Vtb_trigger_fsm
```

* `tb_tdc130_top` is the end-to-end test. It runs both chips at their
  default sizes through a full operation: lock, all 32 channels, triggers,
  pairing, overflow, and prototype readout and configuration. It counts each
  mechanism and fails if one never happened. It takes about 3 minutes.
* `tb_tdc_channel` checks timestamps against an ideal time base to within
  one bin.
* `tb_trigger_fsm` compares the trigger matching with a reference model
  over a coarse-counter wrap.

The simulator has two states only, so every testbench applies a reset edge
explicitly.

## Limits and departures

* **Double pulse resolution.** A channel has one hit register stage, emptied
  through a synchroniser at the 40 MHz logic clock. It therefore needs about
  150 ns between edges, where a requirement of about 2 ns is usual for this
  class of TDC. Short pulses lose their trailing edge. A derandomising second
  stage would fix this.
* **Low-power hit capture** is not implemented. In that mode the hit
  registers follow the line only for a fixed short time after the hit.
  `hit_controller` implements only the high-accuracy mode.
* **Analog parts are models.** The differential delay elements, the charge
  pumps and filter, the VCO, the LVDS inputs and the bias circuits exist here
  only as the behaviour of `pll_model` and `dll_model`. Their loop constants
  are chosen for stable, quick locking and are not circuit values.
* **This design's choices.** The readout word layout, the 64-word readout
  FIFO, the trigger queue of 4 and the parity bit are this design's own. So
  are the margins used to decide that a trigger is done, and the
  configuration word layout of the prototype. The link to the optical
  readout is not part of the design.
* **Range.** The 27-bit timestamp wraps every 3.28 ms. Trigger latencies must
  stay below 1.64 ms, so holding data for several milliseconds before readout
  would need a wider timestamp.
* The trigger window is defined on the synchronised coarse time. The window
  start therefore sits a fixed 2–3 logic cycles earlier in real time than
  "trigger arrival − latency". The testbenches compute it from the chip's own
  trigger timestamp.
