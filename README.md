# Frame-synchronous automatic gain control for an LPC vocoder

A vocoder built from fixed-point parts (an 8-bit mu-255 codec, 16-bit signal
processors) works well only over a narrow range of input loudness. This design
keeps the speech inside that range. It does not use an analog AGC. A digitally
controlled attenuator sits in front of the codec, and a small controller
watches the PCM words coming out of the codec and sets the attenuator. The
controller does three things:

* **Fast attack.** If the codec clipped during a frame, the attenuation goes up
  1.5 dB at the next frame boundary. If several samples clipped, it goes up 3 dB.
* **Slow decay.** If the frame peak stays more than 6 dB under full scale for
  25 frames in a row (about half a second at 22.5 ms per frame), the
  attenuation goes down 1.5 dB. Pauses and intonation in normal speech do not
  trigger it.
* **Frame-synchronous changes.** The attenuation code changes only at
  vocoder frame boundaries, so no analysis frame sees a change of gain
  in the middle of it.

Frames whose peak is more than 30 dB under full scale count as silence. They
change nothing, and they do not break a run of quiet frames. A push-to-talk
input has the same effect as silence, for half-duplex use.

The RTL models the original controller chip: an 8-bit, strictly sequential
machine with one polling loop, a four-statement per-sample task and a short
per-frame task. It also includes the serial-to-parallel PCM latch that fed
the chip on its board.

## The loop around the chip

```
speech -> pre-emphasis -> attenuator (6-bit code, 1.5 dB/step, 0..88.5 dB)
       -> codec (anti-alias filter, mu-255 a-d) --serial PCM--> vocoder analysis
                                                 \-> serial-to-parallel latch
                                                     -> AGC chip -> attenuate_out
```

The vocoder's timing chain sends the chip a **sample strobe** every 125 us
(8 kHz) and a **frame strobe** every 22.5 ms (180 samples). The two strobes
only need to be loosely aligned. When both rise together, the sample is served
first, so the sample that arrives with the frame strobe still counts in the
frame that is closing.

## Per-frame decision

At each frame strobe, the controller looks at the largest code seen in the
frame (`maximum`) and at the number of clipped samples (`saturation-count`).
It applies the first row that matches:

| condition (in order)                                   | attenuation       | decay count |
|--------------------------------------------------------|-------------------|-------------|
| push-to-talk asserted                                  | unchanged         | unchanged   |
| `maximum > SATURATION` and `saturation-count > SEVERAL_SAT` | +2 steps (3 dB)   | cleared     |
| `maximum > SATURATION`                                 | +1 step (1.5 dB)  | cleared     |
| `maximum < SILENCE_LEVEL` (more than 30 dB down)       | unchanged         | unchanged   |
| `maximum < LOW_LEVEL` (more than 6 dB down)            | -1 step once the count reaches `DECAY_FRAMES`, then the count restarts | +1 |
| otherwise (normal level)                               | unchanged         | cleared     |

After any of these rows, `maximum` and `saturation-count` are cleared. The new
attenuation is copied to the `attenuate_out` pins. This copy is the only place
where the pins change. The attenuation stops at 59 (88.5 dB) going up and at 0
going down. It does not wrap.

## Working on mu-255 codes

All comparisons work on the bitwise complement of the received PCM byte
(`~mucode`). Standard mu-255 transmits sign, segment and step inverted, so
inverting the byte gives a value that grows with loudness. Full scale is `8'hFF`.
Each 3-bit segment covers about 6 dB. That fixes the default thresholds:

* `SATURATION = 8'hFE`: only the full-scale code counts as a clipped sample.
* `LOW_LEVEL = 8'hEF`: one segment (16 codes, about 6 dB) under full scale.
* `SILENCE_LEVEL = 8'hAF`: five segments (80 codes, about 30 dB) under full scale.

**Caveat, inherited deliberately.** The comparison uses the whole 8-bit
word, sign bit included, as the original program does. With standard coding
the complemented sign bit is 1 for negative samples. Any negative sample
therefore ranks above any positive one, and only negative full-scale samples
count as clipped. For speech, which swings both ways, the peak detector
effectively follows the negative half-wave. If your codec uses another sign
convention, adjust the thresholds or add a magnitude stage in front.

## Inside the chip (`agc_ic`)

The chip has three parts, like the floor plan of the original:

1. **Strobe flags** (`agc_strobe_capture`). Each strobe and push-to-talk
   goes through a 2-flop synchroniser. A rising strobe edge sets a pending flag,
   which stays set until the sequencer acknowledges it. If an edge arrives in the
   same clock as the acknowledge, the flag stays set, so no strobe is lost.
2. **Sequencer** (`agc_control`). One state machine, one operation per clock.
   In `ST_WAIT` ("interrupt-wait") it polls the flags, samples first. The sample task is four
   statements, one per clock:
   * `S1`: `maximum <= ~mucode` if `~mucode > maximum`.
   * `S2`: return to `ST_WAIT` if `saturation-count > 126`. The count never exceeds 127.
   * `S3`: `saturation-count + 1` if `~mucode > SATURATION`.
   * `S4`: return to `ST_WAIT`.

   The frame task runs through `F_PTT`, `F_SAT`, `F_SIL`, `F_LOW`, then
   `F_DEC` or `F_INC2`/`F_INC1`, and always ends in `F_CLR`. `F_CLR` publishes
   the attenuation and clears the per-frame registers. The data path has a
   single incrementer, so a 3 dB attack takes two increment clocks.
3. **Data path** (`agc_datapath`). 8-bit. It holds the registers `mucode`,
   `maximum`, `saturation-count` (7 bits), `attenuation` (6 bits),
   `decay-count` and the `attenuate_out` port register. It also has the
   complement unit, the comparators and the +/-1 units. It returns a struct
   of comparison results (`agc_stat_t`) and takes a struct of operations
   (`agc_ctrl_t`). Both types are defined in `agc_pkg`.

### Timing

Clock counts start at the clock in which the sequencer takes the task from the
flag and end on its return to `ST_WAIT`:

| task                               | clocks |
|------------------------------------|--------|
| sample                             | 5      |
| sample, saturation count full      | 3      |
| frame, push-to-talk                | 3      |
| frame, saturated                   | 5 or 6 |
| frame, silent                      | 5      |
| frame, normal                      | 6      |
| frame, quiet                       | 7      |

A strobe edge reaches its flag 3 clocks after the edge, and the task is taken
one clock later. In the worst case a sample and a frame land together, which
takes 3 + 1 + 5 + 7 = 16 clocks. Any clock faster than 16 clocks per 125 us
(128 kHz) therefore keeps up. The tests run at 24 to 32 clocks per sample.

`MUCODE` is sampled when the sample task is taken, `SYNC_STAGES + 2` clocks
after the strobe edge. The external latch must hold it at least that long.

### Pins

| port            | width | meaning |
|-----------------|-------|---------|
| `clk`           | 1     | single rising-edge clock. The original used a three-phase clock. |
| `rst`           | 1     | asynchronous, active high. Clears everything; attenuation starts at 0. |
| `mucode`        | 8     | mu-255 PCM word |
| `sample_strobe`, `frame_strobe`, `push_to_talk` | 1 each | from the vocoder timing chain, asynchronous |
| `attenuate_out` | 6     | attenuator code, 1.5 dB per step |
| `test_out`      | 12    | `{state[3:0], maximum[7:0]}` |

## The system top (`agc_system`)

`agc_system` joins `pcm_serial_to_parallel` and `agc_ic`. The serial PCM comes
in MSB first: one bit per clock with `pcm_bit_en`, and `pcm_sync` marks the
first bit of a word. After the eighth bit, the word is copied to a holding
latch that drives `mucode`. Shift a word in completely before its sample
strobe, and do not complete the next word until the chip has read the
current one.

On the board, a TTL-to-CMOS level converter sat between `attenuate_out` and
the attenuator. It has no logic function and is not included here.

## Parameters (`agc_ic`, `agc_datapath`)

| parameter       | default | origin |
|-----------------|---------|--------|
| `DECAY_FRAMES`  | 25      | original design ("about half a second") |
| `SAT_LIMIT`     | 126     | original design (count stops at 127) |
| `ATTEN_MAX`     | 59      | 88.5 dB / 1.5 dB of the attenuator |
| `SATURATION`    | `8'hFE` | chosen |
| `LOW_LEVEL`     | `8'hEF` | chosen, 6 dB = one segment |
| `SILENCE_LEVEL` | `8'hAF` | chosen, 30 dB = five segments |
| `SEVERAL_SAT`   | 2       | chosen ("several" = 3 or more clipped samples) |
| `ATTEN_RESET`   | 0       | chosen |
| `SYNC_STAGES`   | 2       | chosen, must be at least 2 |

## What follows the original and what does not

These parts follow the original: the algorithm and its constants (1.5/3 dB attack,
-1.5 dB decay after 25 quiet frames, 6 dB and 30 dB thresholds, silence and
push-to-talk behaviour, clearing of the per-frame registers in every frame).
The sample task follows the original statement for statement, including its
timing of one statement per clock and the cap of the count at 127. So do the
flag-and-poll arbitration of the strobes, the 8-bit data path, and the pin list.

These are choices of this design:

* the threshold codes and "several";
* the frame task's states;
* the synchronisers;
* the single clock;
* reset values and clamping at the ends of the range;
* the choice of test outputs;
* the serial format of the latch.

The original data path is said to have four registers. This design uses six,
because attenuation and the decay count need their own state. The original
probably shared or merged registers in a way that is not recorded. The
comparisons are plain comparators, not shared subtractors.

## Simulation

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/agc_pkg.sv tb/agc_ref_pkg.sv \
          tb/tb_agc_system.sv --top-module tb_agc_system -o sim && obj_dir/sim
```

Change the testbench name to run another one. `agc_ref_pkg` is needed only by
`tb_agc_ic` and `tb_agc_system`.

| testbench | what it shows |
|-----------|---------------|
| `tb_agc_strobe_capture` | 3-clock flag latency, one flag per edge, an edge that coincides with its clear is kept, push-to-talk sync |
| `tb_agc_datapath` | threshold boundaries exactly; 20,000 clocks of random operations against a register model |
| `tb_agc_control` | every branch of both tasks: the operations issued and the clock counts in the table above |
| `tb_pcm_serial_to_parallel` | 300 random words with gaps and stray bits; latch holds, one `word_valid` per word |
| `tb_agc_ic` | about 230 frames of 180 samples of generated frame types against a frame-level reference model; `attenuate_out` may change only after `F_CLR`; every decision row, the floor, the ceiling, the count cap and the decay-count restart must each occur |
| `tb_agc_system` | closed loop at the default sizes, with behavioural attenuator and mu-255 encoder |

`tb_agc_system` runs these phases:

1. A quiet tone at attenuation 0 (decay at the floor).
2. A tone 12 dB over full scale. The loop must settle 7 to 10 steps up and stop clipping.
3. A tone 12 dB quieter. Exactly two decay steps follow in 60 frames.
4. A single click, which gives one 1.5 dB step.
5. Silence, and then push-to-talk with a loud tone. The attenuation must not move in either.
6. A gross overload. The count caps and the attenuation reaches 88.5 dB.

Every frame is also compared with the reference model.
