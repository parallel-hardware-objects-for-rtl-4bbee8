# Parallel Hardware Objects with dynamic partial reconfiguration

This RTL models a system in which software-style *objects* become hardware
components that run in parallel. Objects are created and removed while the
system runs. On an FPGA with dynamic partial reconfiguration, "creating" an
object means writing its partial bitstream into a free *dynamic area*, and
"removing" it frees that area again. Three ideas carry the design:

* **Hardware Objects.** Each object's `set` methods become input ports and its
  `get` methods become output ports. Its `calc()` method becomes logic that
  runs on every clock.
* **A communication matrix instead of a bus.** Objects exchange data through
  a pool of FIFOs. Each FIFO is addressed by the *object number* of the
  receiving object. Write multiplexers and read multiplexers let every
  object send and receive in the same cycle, so parallel objects are not
  serialised on a shared bus. A FIFO also keeps the data for an object that
  is not configured at the moment.
* **A Hardware Scheduler.** If more objects are active than there are
  dynamic areas, the scheduler loads them in turn. The outgoing object first
  saves its *context* (its internal state) into the matrix, and it restores
  that context when it is loaded again.

The repository contains four example designs built on these ideas. They
stand side by side in `hwo_top`:

| design | what it shows | modules |
|---|---|---|
| simple dataflow | P1 = (X1+Y1)·(X2+Y2) from two adder objects and one multiplier object | `simple_dataflow`, `po_adder`, `po_multiplier` |
| Pong | objects created at run time (balls) and removed by themselves | `pong_game`, `pong_ball`, `pong_bar` |
| video pipeline | gamma-correction and edge-detection objects on a 352×288 RGB pixel stream | `video_dsp`, `video_gamma`, `video_edge` |
| audio DSP | four effect objects sharing **one** dynamic area, loaded in turn, with an uninterrupted 48 kHz stereo stream | `audio_dsp`, `hw_scheduler`, `dyn_area`, `hw_object`, `fx_*`, `comm_matrix`, `hw_fifo` |

The audio DSP is the part that holds the system's mechanisms together. Most
of this document is about it.

## The audio DSP

```
             +-------------------- comm_matrix ----------------------+
 in_* ------>| wr0  FIFO0 (obj 1 HP data)   FIFO4 (obj 1 context)    |
             |      FIFO1 (obj 2 LP data)   FIFO5 (obj 2 context)    |---> out_*  (rd2: FIFO8, obj 5)
             |      FIFO2 (obj 3 DIST data) FIFO6 (obj 3 context)    |
             |      FIFO3 (obj 4 ECHO data) FIFO7 (obj 4 context)    |
             | wr1 <---+        rd0 (data) ---+   rd1 (context) --+ |
             +---------|----------------------|-------------------|-+
                       |                      v                   v
                    dyn_area: holds ONE of {HP, LP, DIST, ECHO} (hw_object + fx core)
                       ^ load/unload/stop/stopped
                    hw_scheduler <--- instantiation bus (create / finish object n)
                       |  icap_start/icap_obj -> device configuration port -> icap_done
```

A stereo sample is 32 bits: left channel in bits 31:16 and right channel in
bits 15:0, each 16-bit two's complement. Samples go through the *instantiated*
effects in the fixed order high pass → low pass → distortion → echo.
Effects that are not instantiated are skipped. The target address of the
input, and of every effect, is the next instantiated effect, or the output
(object 5) if there is none. `audio_dsp` computes these targets from the
scheduler's `active` mask, which is the job the system's compiler does in the
original flow.

### Object numbers and addresses

| number | meaning |
|---|---|
| 0 | none |
| 1, 2, 3, 4 | high pass, low pass, distortion, echo |
| 5 | the outer world (output stream) |
| 8 | Object Vector "all effects": a word sent here goes into every effect's data FIFO |

A matrix address is `{ctx, number}`, 5 bits. With `ctx = 0` the address
selects the object's data FIFO, and with `ctx = 1` its context FIFO.

### Life of an effect object (`hw_object`)

When the area releases an object's reset, it is in the state the new
configuration gives it:

1. **RESTORE.** If its context FIFO holds a saved context, it reads the
   words back into the effect core: 1 word for the filters, `DELAY` words for
   the echo, none for the distortion. If the FIFO is empty, it starts from
   zero.
2. **RUN.** It handles one sample per clock: it pops from its data FIFO,
   computes, and pushes to its target. It stalls when either side cannot move.
3. **SAVE.** When `stop` is raised, it writes its context to its own context
   FIFO, one word per clock.
4. **STOPPED.** `stopped` goes high, and the scheduler may now reconfigure
   the area.

Because the context survives the reconfiguration, the output of the chain is
bit-exact with a chain that never stops. The testbenches check this sample
by sample.

### Scheduling (`hw_scheduler`)

* With no object active, the area stays empty.
* With one object active, it is loaded once and stays loaded. There is no
  reconfiguration traffic in that case.
* With several objects active, they are loaded round robin by object number.
  Each keeps the area for `SLICE` cycles (counted from its load pulse). Then
  `area_stop` is held until `area_stopped`. Then `icap_start`/`icap_obj`
  request the next object's bitstream, and on `icap_done` an `area_load`
  pulse announces it.
* A finished object is dropped from the rotation at the end of its slice. The
  area is emptied (`area_unload`) when nothing is left.

The scheduler does not time the reconfiguration. The configuration port
takes as long as it takes, and reports `icap_done`.

The scheduler also handles several areas (`N_AREA`; the audio DSP uses 1).
The area signals then become vectors, `area_obj` is a packed array of object
numbers, and `icap_area` says which area the port is writing.

* All areas share the one configuration port. Only one reconfiguration runs
  at a time, and the lowest-numbered area that wants the port gets it.
* An empty area takes the next object that no area holds.
* While there are at least as many areas as active objects, every object
  stays loaded.
* A loaded object is stopped after its slice only if another object is
  waiting or it was finished.
* If the waiting object has meanwhile been taken by another area, a stopped
  object that is still active is restarted in place. It gets an
  `area_load` pulse without reconfiguration and restores its own context.

### Sizing

The defaults reproduce the numbers of the reference audio setup:

* a 100 MHz clock;
* 48 kHz samples, one every 2083 cycles;
* a 0.2 ms reconfiguration (20 000 cycles);
* a 1 µs slice (`SLICE = 100`);
* FIFOs of 128 × 32 bit = 512 bytes (`DEPTH = 128`).

One turn through four effects lasts 4 × (20 000 + 100 + a few) ≈ 80 500
cycles ≈ 0.8 ms. In that time about 39 samples arrive, which fits the
128-word FIFOs. The 100-cycle slice is enough to process them at one sample
per cycle. In the full-size simulation the output never starves, and the
longest time from input to the output FIFO is 1.40 ms. The reference
setup reports a latency of 2.8 ms; the exact measuring points behind that
figure are not known, so it is not reproduced as a check. Reconfiguration
dominates the turn: 800 µs of 804 µs. Where the FIFO fills up (a burst above
the sample rate), the writer is simply held back by `in_ready`. This is the
"blocked" case that limits how long an object may stay removed.

The FIFO count follows the rule that n object areas need at least n + 2
FIFOs: one output FIFO per object plus an input and an output towards the
outside. Here one area is served by nine FIFOs. There is a data FIFO and a
context FIFO for each of the four effects, so that a removed effect keeps
its input, plus the output FIFO.

## Communication matrix (`comm_matrix`)

The matrix is generic: `N_WR` writer ports, `N_RD` reader ports and
`N_FIFO` FIFOs (`hw_fifo`, first-word-fall-through). The FIFO table
(`fifo_owner`, `fifo_vec`) is an input, set by the enclosing system.

* **Writes.** For each FIFO, the lowest-numbered port that addresses it
  (directly or through its vector number) is granted. A port's `wr_ready`
  is high only if *every* FIFO it addresses has granted it and has room. So
  a vector broadcast is stored in all members in the same cycle, or in none.
  A word whose address no FIFO owns is accepted and dropped, and `wr_miss`
  flags it. `audio_dsp` brings this out as `route_miss`.
* **Reads.** A reader names an address and sees the head of the first FIFO
  with that owner.
* **Timing.** `wr_ready` depends combinationally on `wr_valid`/`wr_addr`.
  `rd_valid`/`rd_data` depend only on `rd_addr` and FIFO state. All ports can
  transfer in the same cycle.

## Dynamic area (`dyn_area`)

Partial reconfiguration cannot be written as RTL. `dyn_area` therefore
contains all four effect objects, and it models "which bitstream is loaded"
with their resets: only the loaded object is out of reset. The object leaves
reset one clock after the `load` pulse, with fresh state, just as a newly
configured area would. The signals on the area's ports are those that would
cross the bus macros of an FPGA floorplan.

## Pong

`pong_game` decodes button commands as follows:

| command | action |
|---|---|
| 1 / 2 | bar 0 up / down |
| 3 / 4 | bar 1 up / down |
| 5 | new ball at (`new_x`, `new_y`) |

Ball slots stand for the dynamic areas. A new ball takes the lowest free
slot, and a finished ball frees its slot. A request with every slot taken is
dropped and flagged on `add_rejected`. On every `tick`, each live ball
(`pong_ball`) steps:

1. It moves by (dirx, diry).
2. It turns downwards at row 0 and upwards at row `MAX_Y`.
3. It reverses dirx when its new position equals a bar's position (the bar
   is a single point).
4. It finishes when x leaves 0…`MAX_X`.

The bars stand in columns 0 and `MAX_X` = 40. The video and serial outputs
that display the game are not part of this RTL: positions are outputs.

## Simple dataflow

`po_adder` and `po_multiplier` register their results. The product therefore
follows the operands after two clocks, and new operands can be applied every
clock. Arithmetic wraps at 32 bits, like a Java `int`.

## Where this RTL departs from, or adds to, the reference system

* **Context FIFOs.** A removed object stores its context under its own object
  number. Here the address has an extra context bit, so that context and
  queued data live in separate FIFOs. The audio system thus has 4 data + 4
  context + 1 output FIFOs.
* **Effect algorithms.** The four effects are only named in the reference.
  This RTL chooses the following:

  | effect | computation (per channel) |
  |---|---|
  | low pass | one-pole filter, s += (x−s)>>>3 |
  | high pass | x − that low pass |
  | distortion | ×4, then clip to ±12000 |
  | echo | x + x[n−16]/2 |

  The echo delay is short because the echo's whole delay line is its
  context. `DELAY` must be a power of two.
* **Arbitration and handshakes.** Fixed priority, valid/ready everywhere,
  and the stop/stopped and icap handshakes are this design's own.
* **Scheduler scope.** The audio DSP has one dynamic area, which is the
  configuration the reference alternates objects in. The scheduler's
  multi-area mode is tested on its own, with two areas, in `tb_hw_scheduler`.
  Pong's ball slots are enabled directly, without the scheduler. This is the
  case where there are always enough areas.
* **Not modelled.** The following are outside the RTL; their signals are
  ports:
  * the device configuration port (ICAP);
  * bus-macro placement;
  * the video output, serial port and push buttons of Pong;
  * the audio codec.

  The video objects are not swapped in turn. Alternating them would need
  4 FIFOs of 2.3 MB each, against 512 B here, so both stay configured (see
  "The video pipeline").
* **Widths and field size.** Pong's coordinates are 8-bit signed. `MAX_Y` =
  40 and 16 ball slots are choices. The clamp range of the bars (0…`MAX_Y`)
  is also a choice.

## The video pipeline

`video_dsp` runs a raster-order stream of 24-bit `{R,G,B}` pixels, one pixel
per clock when `in_valid` is high, through two objects:

```
in_pixel -> video_gamma -> video_edge -> out_pixel     (2 clocks)
               |  bypass      |  bypass
            gamma_en        edge_en
```

* `video_gamma` maps each channel through a 256-entry table computed at
  elaboration: out = round(255·(in/255)^(1/`GAMMA`)), `GAMMA` = 2.2.
* `video_edge` takes the luminance (77R+150G+29B)>>8 and keeps two line
  buffers of `WIDTH` bytes. It applies the 3×3 Sobel operator and outputs
  min(255, |Gx|+|Gy|) as a grey pixel. The window is centred one row and one
  column behind the incoming pixel. The first two rows and columns of a
  frame give 0. Position counters wrap at `WIDTH`×`HEIGHT`, so the stream has
  to start at a frame boundary after reset.
* A disabled object is replaced by a register, so the latency stays at 2
  clocks. Change the enables only between frames.

The frame size 352×288 and the 3-byte pixel follow the reference. It names
the two operations but does not define them. The Sobel operator, the
luminance weights, the gamma curve and the order (gamma first) are this
design's own choices. At 25 frames/s the stream needs 2.5 Mpixel/s. One
pixel per clock at 100 MHz leaves plenty of margin.

## Files

`rtl/` holds one module or package per file.

* `hwo_pkg.sv` contains the shared types: `stereo_t`, `obj_t`, `addr_t`, the
  effect enum and the object numbers.
* `hwo_top` is the top level.

`tb/` holds one self-checking testbench per block. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | covers |
|---|---|
| `tb_hw_fifo` | `hw_fifo` |
| `tb_comm_matrix` | `comm_matrix` |
| `tb_hw_scheduler` | `hw_scheduler` |
| `tb_hw_object` | `hw_object` |
| `tb_fx_effects` | all four `fx_*` cores |
| `tb_dyn_area` | `dyn_area` |
| `tb_audio_dsp` | `audio_dsp` |
| `tb_simple_dataflow` | `simple_dataflow`, `po_adder`, `po_multiplier` |
| `tb_pong` | `pong_game`, `pong_ball`, `pong_bar` |
| `tb_video` | `video_gamma`, `video_edge`, `video_dsp` |
| `tb_hwo_top` | `hwo_top` end to end, reduced sizes |
| `tb_hwo_full` | `hwo_top` at every default parameter |

The testbenches share two helpers:

* `icap_model.sv` is a behavioural configuration port: done a fixed number of
  cycles after start.
* `tb_audio_ref_pkg.sv` is the reference effect chain.

Both end-to-end testbenches count every mechanism and fail if one never
occurred:

* reconfiguration, context save and context restore;
* turn switch, and a single object kept loaded;
* data held for an unloaded object, and a blocked source;
* bar hit, wall bounce, finished ball and full slots;
* video frames through both objects.

### Running a testbench

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hwo_pkg.sv tb/tb_audio_ref_pkg.sv tb/icap_model.sv tb/tb_hwo_full.sv \
  --top-module tb_hwo_full -o sim
./obj_dir/sim
```

For another testbench, swap the last file and `--top-module`. Verilator finds
the RTL modules through `-Irtl`. `tb_hwo_full` simulates about 1.4 million
cycles in a few seconds.

### Changing sizes

`hwo_top` exposes these parameters:

| parameter | meaning |
|---|---|
| `N_BALLS` | Pong ball slots |
| `SLICE` | cycles per object per turn |
| `DEPTH` | FIFO words |
| `DELAY` | echo delay, a power of two |
| `VID_W`, `VID_H` | video frame size |

Change `SLICE` or the reconfiguration time and you change how many samples
pile up per turn. Keep `DEPTH` above (reconfiguration time + `SLICE`) × number
of active effects ÷ sample period. Otherwise the source is blocked and the
stream has gaps.
