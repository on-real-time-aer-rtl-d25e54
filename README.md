# Event-driven 2-D convolution chip (AER, 16x16)

This is a convolution processor for spike-based vision. It does not receive frames. Its input is a
stream of address events: each event is one signed spike `(sign, x, y)` from a sensor or from
another convolution stage. For every event it adds a stored kernel, centred at `(x, y)`, onto an
array of integrate-and-fire pixels. A pixel whose integrated value crosses a positive or negative
threshold emits its own signed event. The output stream is therefore the convolution of the input
with the kernel, coded as spike rates. Work is done only where and when events arrive, so the
latency is one event-processing time: there is no frame period.

The RTL models the whole digital part of such a chip at its prototype size:

- a 16x16 pixel array;
- a 16x16 kernel RAM of 6-bit signed words;
- a 4-entry input queue;
- a synchronous output arbiter;
- the serial bias-programming chain.

Next to the chip sits a synthetic event generator. It turns a stored 64x64 grey-level image into a
Poisson-like event stream and is used to exercise the chip.

All files are SystemVerilog (IEEE 1800-2017). Shared types and constants are in `rtl/conv_pkg.sv`.

## How an event is processed

```
AER in ─► aer_in_io (handshake + 4-entry queue) ─► conv_controller ─┬─► kernel_sram (row read)
                                                                    │        │ 16 words
                                                                    │        ▼
                                                                    ├─► x_neighbourhood (shift by dx)
                                                                    │        │ column lines
                                                                    ├─► y_decoder ─► pixel_array ◄── monostable
                                                                    └─► monostable       │ row_req / col lines
                                                                                         ▼
                                                                                   aer_out ─► AER out
```

1. **Input.** `aer_in_io` samples `in_rqst` every clock. When it sees a request and the queue has
   room, it stores the address and raises `in_ack`. It drops `in_ack` once the sender drops
   `in_rqst` (four-phase handshake). The sender is freed as soon as its event is queued, so
   short bursts are absorbed. When the queue is full, the acknowledge is simply withheld and the
   sender waits. The fastest accepted rate is one event per 2 cycles (50 Meps at 100 MHz).
2. **Decode.** The controller pops the oldest event. It works out which kernel rows and columns
   land on this chip (see the next section).
3. **Row copy.** For each kernel row that lands on the array, the controller:
   - reads that row of `kernel_sram` (all 16 words at once);
   - shifts it sideways in `x_neighbourhood` by the event's column offset;
   - strobes it into one row of pixel weight registers through `y_decoder`.

   This takes two cycles per row.
4. **Integrate.** One trigger to the `monostable` produces a global pulse of programmable width,
   on `pulse_pos` or `pulse_neg` according to the event sign. During the pulse every loaded pixel
   integrates its weight.
5. **Erase.** One cycle clears all weight registers. In that same cycle the next decoded event
   starts its row copy.

With the default 2-cycle pulse, an event that touches `q` array rows takes `4 + 2q` cycles. At
100 MHz that is `40 + 20q` ns, the delay measured on the silicon prototype this design follows.
Decoding the next event overlaps the current one, so this is also the steady-state throughput.

## Window arithmetic

Several chips can share one large input address space. Each chip watches a window of it, set in
its configuration registers: `x_min..x_max` and `y_min..y_max`, with 8-bit coordinates, enough for
a 256x256 space. The kernel is stored as `(2s+1)` rows by `(2r+1)` columns, and `s` and `r` are
also configuration registers.

- Kernel RAM row `i` holds kernel offset `dy = i - s`.
- Kernel RAM column `c` holds offset `dx = c - r`.
- RAM columns past `2r` should be loaded with zero.

For an event at `(x_o, y_o)`:

- The rows that land in the array are `lo = max(y_o - s, y_min)` to `hi = min(y_o + s, y_max)`,
  so `q = hi - lo + 1` rows. If `hi < lo`, the event is dropped.
- Row `j` (`j = 0 .. q-1`) is copied from RAM row `lo - y_o + s + j` to array row
  `lo - y_min + j`.
- The column offset is `dx = x_o - x_min - r`. Pixel column `p` receives RAM column `p - dx`, or
  zero when that column is outside the RAM. If the kernel columns miss `[x_min, x_max]`
  altogether, the event is dropped.

This one rule covers every position of the kernel against the window:

- entirely inside;
- cut at the bottom;
- cut at the top;
- cut at both ends, when the kernel is taller than the window;
- entirely outside.

The controller reports each taken event on `evt_taken` with its class on `evt_class`
(`WIN_NONE`, `WIN_BOTTOM`, `WIN_TOP`, `WIN_FULL`, `WIN_BOTH`).

The x-neighbourhood block is a connection matrix driven by two one-hot decoders, one for left
shifts and one for right shifts. Only one decoder output is active, so each pixel column is fed
by exactly one RAM column or by zero.

## The pixel

Each pixel (`conv_pixel`) holds:

- a 6-bit sign-magnitude weight register, written by the row copy and cleared by the erase;
- a signed 12-bit accumulator.

For every cycle of the integration pulse, the accumulator moves by `|w|`:

- upwards when the event sign and the weight sign agree;
- downwards when they differ.

One event therefore adds `w x pulse width`, signed by the event. When the accumulator reaches
`+fire_threshold` or `-fire_threshold`, it returns to zero and the pixel raises a positive or
negative request. The request is held until the output block acknowledges the pixel's row. A
second crossing of the same sign before that adds nothing. The accumulator saturates rather than
wraps.

The pixel is a digital stand-in for a charge-packet integrate-and-fire circuit:

| Analog circuit | Stand-in here |
|---|---|
| capacitor | accumulator |
| weighted current pulse | add of `\|w\|` per cycle |
| two comparators | digital threshold |

Analog mismatch, and the per-pixel calibration that corrects it, have no counterpart.

## Output arbitration

`pixel_array` ORs the pixel requests of each row onto `row_req`. The requests of the
acknowledged row drive two column lines per column, one positive and one negative. `aer_out` is a
synchronous version of the burst-mode scheme:

1. A round-robin arbiter picks one requesting row.
2. The row's column lines are copied into a row latch.
3. The row is acknowledged, which clears its pixel requests.
4. The latch is sent out one event at a time: lowest column first, positive before negative.
   Each event goes out as `(out_sign, out_x, out_y)` with a four-phase `out_rqst`/`out_ack`
   handshake.

A new row is picked only after the latch has emptied. With a receiver that acknowledges at once,
one event leaves every 2 cycles. An assertion checks that the address is stable while a request
is pending.

## Programming the chip

- **Configuration registers.** Write `cfg_data` to `cfg_addr` with `cfg_we`. The addresses are
  `CFG_X_MIN`, `CFG_X_MAX`, `CFG_Y_MIN`, `CFG_Y_MAX`, `CFG_S` and `CFG_R`. After reset the window
  is `0..15` and `s = r = 0`.
- **Kernel RAM.**
  1. Set `ram_state = 0`.
  2. Shift a 100-bit frame in on `ram_data_in`, one bit per clock with `ram_shift` high. The frame
     is 4 row-address bits followed by 16 words of 6 bits (`{sign, magnitude[4:0]}`), sent least
     significant bit first: column 15 first, the row number last.
  3. Pulse `ram_wr` to write the row.
  4. Repeat for each row, then set `ram_state = 1` for operation.

  While `ram_state = 0` the controller reads zeros, so nothing is integrated.
- **Pulse width and threshold.** `pulse_width` is the integration pulse length in cycles (0
  behaves as 1). `fire_threshold` is the firing level.
- **Bias chain (`ipot_chain`).** The chain has 31 cells of 12 bits. Each cell has:
  - a 3-bit range word A, decoded one-hot to `range_sel`;
  - an 8-bit DAC word B, on `dac_code`;
  - a test bit C, on `to_test`, with C nearest the input.

  The chain is shifted on its own serial clock `ipot_sclk`, with `ipot_shift` high, from
  `ipot_data_in`; `ipot_data_out` is the end of the chain. Only these register words are
  modelled; the current ladders and DACs they set are analog.

## Synthetic event generator

`aer_rand_gen` holds a 64x64 x 8-bit frame RAM (4 KiB), written through a plain host port
(`gen_host_we/addr/data`). While `gen_enable` is high, a control unit repeats the following loop:

1. Step a 20-bit LFSR (`x^20 + x^17 + 1`).
2. Use the low 12 bits as a pixel address and the top 8 bits as a random level.
3. If the stored pixel is greater than that level, send the pixel's address as an event.

Each step takes 3 cycles, plus the handshake when an event is sent. Over one LFSR period, a pixel
of value `I` sends exactly `I` events, scattered pseudo-randomly in time. The event rate is
therefore proportional to the grey level.

In `aer_conv_top`, the generator and the chip stand side by side with separate ports (`gen_*`).
The testbench connects the generator output to the chip input, as a bench set-up would.

## Where this design departs from the hardware it follows

- **Digital stand-ins for analog or self-timed circuits:**
  - the pixel integrator;
  - the monostable, here a down-counter in clock cycles rather than a capacitor charged by a
    programmable current;
  - the burst-mode output arbiter, here synchronous.
- **Clock.** The clock is an input. The original runs its digital part from an on-chip ring
  oscillator.
- **Not built:**
  - the pixel calibration circuits;
  - the analog bias generators behind the bias chain;
  - the PCI interface and clock manager of the generator board;
  - the splitters and mergers that join several chips into a multi-layer system.
- **Weights run from -31 to +31.** The original describes a weight range of -32 to +32 in a 6-bit
  register. Sign-magnitude in 6 bits cannot hold both ends.
- **Rows copied per event.** The design copies `q = hi - lo + 1` rows, which is every kernel row
  that lands on the array. For a kernel cut at the bottom, that is `y_o - y_min + s + 1` rows.
- **The designer's choices.** The following are not given by the original and are this design's
  own:
  - the input address layout `{sign, x[7:0], y[7:0]}`;
  - the output address layout `{sign, x[3:0], y[3:0]}`;
  - the kernel frame bit order;
  - the cycle split of the controller;
  - the widths of the bias words A and B;
  - the generator's comparison rule and LFSR polynomial;
  - the accumulator width.
- **Size.** Larger tilings need a larger array. A 256x256 input covered by a 4x4 array of 64x64
  chips needs `N_PIX = 64`; the address width already covers it.

## Files

| File | Contents |
|---|---|
| `rtl/conv_pkg.sv` | sizes, weight/event/configuration types |
| `rtl/aer_in_io.sv`, `rtl/event_queue.sv` | input handshake and circular queue |
| `rtl/config_regs.sv` | window and kernel-size registers |
| `rtl/conv_controller.sv` | decode and row-copy / pulse / erase sequencer |
| `rtl/kernel_sram.sv` | serially loaded kernel RAM |
| `rtl/x_neighbourhood.sv`, `rtl/y_decoder.sv` | column shift matrix, row select |
| `rtl/conv_pixel.sv`, `rtl/pixel_array.sv` | integrate-and-fire pixels and their array |
| `rtl/monostable.sv` | integration pulse generator |
| `rtl/aer_out.sv`, `rtl/rr_arbiter.sv` | output row arbiter, row latch, encoder |
| `rtl/ipot_chain.sv` | bias programming shift chain |
| `rtl/conv_chip.sv` | the convolution chip |
| `rtl/aer_rand_gen.sv` | synthetic event generator |
| `rtl/aer_conv_top.sv` | top: chip and generator side by side |

Each `tb/tb_<module>.sv` is a self-checking testbench that prints
`TB_RESULT checks=<n> failures=<m>`. The main ones:

- **`tb_conv_controller`** checks the row and shift sequence against the window rule above, and
  the `4 + 2q` cycle period.
- **`tb_conv_chip`** places the window at `x_min = 100`, `y_min = 50`. It checks exact per-pixel
  output counts against a model, under paced input and under bursts that fill the queue.
- **`tb_aer_conv_top`** runs at the default sizes:
  - a 64x64 frame (a bright square) is played through the generator into the chip, which is
    loaded with a 3x3 edge kernel;
  - it checks that the square's two edges produce events of opposite sign and that flat regions
    stay balanced;
  - it counts the queue stalls, the window classes and the shift directions it saw.

- **`tb_conv_chip_workloads`** runs the chip through three workloads at the default size:
  - the per-event delay for kernels of 1, 3, 5, 9 and 15 rows (60, 100, 140, 220 and 340 ns at
    100 MHz), with the 2-cycle peak input spacing while the queue fills;
  - a single-pixel sweep of every weight from -31 to +31;
  - a 15x15 Gabor-like kernel under random events, with exact per-pixel output counts.

- **`tb_conv_tiling`** builds a 2x2 tile of four chips over a 32x32 input space. Every event is
  broadcast to all four chips, and each chip is given its own window. The output over the whole
  space must equal that of a single 32x32 array, including kernels that straddle two or four
  tiles.

## Simulating

With Verilator 5, from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/conv_pkg.sv tb/tb_conv_chip.sv \
          --top-module tb_conv_chip -o sim
./obj_dir/sim
```

Replace `tb_conv_chip` with any other testbench name. The package file must come first; the
other modules are found through `-y rtl`. Every testbench has a watchdog and ends with
`$finish`. `tb_aer_conv_top` runs the full design at default parameters and takes about
20 seconds. The per-block testbenches take seconds.

Sizes are set through `conv_pkg` (`N_PIX`, `Q_DEPTH`, `ACC_W`, `PW_W`, `N_IPOT`, `IPOT_A_W`,
`IPOT_B_W`) and through the module parameters that default to them.
