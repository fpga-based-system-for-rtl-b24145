# Time-over-threshold energy histograms for 16 detector channels

A scintillation detector turns each gamma photon into a short light flash.
A silicon photomultiplier turns the flash into a current pulse. An analog
front end shapes that pulse and feeds it to a comparator. The comparator
output stays high for as long as the shaped pulse is above a fixed threshold.
That **time over threshold (ToT)** grows with the deposited energy. So an
energy spectrum can be built without an ADC: measure how long each
comparator pulse lasts, and count how often each duration occurs.

This RTL does that for 16 channels at once in one FPGA:

* It measures every comparator pulse in **2.5 ns steps** using only a
  **200 MHz** clock. It samples on both clock edges and corrects for the
  phase at which each edge arrived.
* It turns the width (1 … 511 steps) directly into a bin address. It then
  increments a **512-bin × 16-bit histogram** per channel, held in
  dual-port block RAM in a **50 MHz** domain.
* It lets a host (in the full instrument, a microcontroller) start, stop,
  clear and read the histograms over a **115200-baud UART**. The host can
  read while acquisition continues.

The design targets a Cyclone IV class FPGA (DE0-Nano board). It is written as
plain, vendor-neutral SystemVerilog, with no vendor primitives.

## Signal path

```
             clk_hf = 200 MHz                          clk_lf = 50 MHz
tot_in[c] ─► dual_edge_sampler ─► pulse_width_fsm ─► async_fifo ─► hist_update_fsm ─► hist_bram
            (3+3(+1) FF chains)   + pulse_width_counter (32 × 16)   (6-cycle RMW)      port A
                                   stall ◄── full                                       │
                                                                                port B ▼
   uart_rx ─► uart_rx ─► uart_controller ─► uart_tx ─► uart_tx     ◄── read mux of all 16 channels
                          │ run / clear (3-FF sync into clk_hf)
```

`podd_fpga_top` holds 16 `hist_channel` instances, one `uart_controller`
and two reset synchronizers. Each `hist_channel` holds everything from the
comparator input to the histogram memory for one input.

| File | Role |
|---|---|
| `rtl/podd_pkg.sv` | sizes, command codes (`cmd_e`), status bytes |
| `rtl/sync_chain.sv` | N-stage flip-flop synchronizer |
| `rtl/reset_sync.sv` | asynchronous-assert, synchronous-release reset |
| `rtl/dual_edge_sampler.sv` | double-edge sampling and edge/phase detection |
| `rtl/pulse_width_counter.sv` | the count-by-2 width counter |
| `rtl/pulse_width_fsm.sv` | pulse-width state machine, phase correction, clamp, stall |
| `rtl/async_fifo.sv` | 32 × 16 dual-clock FIFO, Gray pointers, 5 sync stages |
| `rtl/hist_update_fsm.sv` | zeroing and read-modify-write update of the histogram |
| `rtl/hist_bram.sv` | 512 × 16 memory: port A read/write, port B read only |
| `rtl/hist_channel.sv` | one complete channel |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | 8N1 serial receiver and transmitter |
| `rtl/uart_controller.sv` | host command interpreter and histogram upload |
| `rtl/podd_fpga_top.sv` | 16 channels, controller, clocks and resets |

## Measuring a pulse with both clock edges

This is the subtle part of the design. A 200 MHz clock has 5 ns
periods, but the histogram bins are 2.5 ns wide.

### Two sampling chains

`tot_in` is asynchronous to the clock. It enters two synchronizer chains:

* **positive chain:** three flip-flops clocked on the rising edge;
* **negative chain:** three flip-flops clocked on the falling edge, then one
  more flip-flop on the rising edge. That last stage moves the value into
  the rising-edge domain.

Counted from each chain's first sampling edge, both chains are equally long.
So after every rising edge the sampler holds two samples of the input taken
half a period apart: `n_q` (older) and `p_q` (newer). It also keeps `p_prev`,
the positive sample of the cycle before. The three values

```
p_prev  ──2.5 ns──►  n_q  ──2.5 ns──►  p_q
```

are three consecutive, time-ordered samples. The sampler reports what
happened in the window they span:

| p_prev n_q p_q | report |
|---|---|
| 0 1 1 | `rise`, `rise_neg=1` (first seen by the negative-edge sample) |
| 0 0 1 | `rise`, `rise_neg=0` (first seen by the positive-edge sample) |
| 1 0 0 | `fall`, `fall_neg=1` |
| 1 1 0 | `fall`, `fall_neg=0` |
| 0 1 0 | `rise` and `fall` in the same window, `rise_neg=1`, `fall_neg=0`: a pulse shorter than one period |
| 1 0 1 | `fall` and `rise` in the same window: a gap shorter than one period |

The reports are registered. An input edge shows up on the outputs 4 to 5
cycles later.

### Width and phase correction

`pulse_width_fsm` starts `pulse_width_counter` on `rise`. The counter loads
2 and then adds 2 each 5 ns cycle. Its value is therefore the width in
2.5 ns units if both edges were seen by the same phase. On `fall` the FSM
computes

```
width = count + rise_neg − fall_neg        (in 2.5 ns units)
```

* A rise first seen by the negative sample arrived half a period earlier
  than the clock edge that counted it. So the pulse is one unit longer.
* A fall first seen by the negative sample ended half a period earlier. So
  the pulse is one unit shorter.

For example, a pulse lasting 7 half-periods (17.5 ns) with a rise on the
negative phase and a fall on the positive phase gives `count = 6` and
`width = 7`. The same pulse, starting a quarter period later, instead gives
`count = 8`, `rise_neg = 0`, `fall_neg = 1` and again `width = 7`. A pulse
seen by exactly one sample gives `width = 1`, the smallest value. A pulse
shorter than a sample spacing may be missed entirely; that is inherent to
sampling.

Widths above 511 (1277.5 ns) are **clamped to 511**, the largest bin address.
So overlong pulses collect in the last bin and never wrap to low bins.

### Throughput and the stall state

The FSM runs on the rising edge and needs at least one cycle to see the
rise and one to see the fall. So the fastest input it keeps up with is one
pulse per 10 ns. A 2.5 ns pulse must be followed by at least 7.5 ns of gap.
States:

* `IDLE`: waits for `rise` while acquisition is enabled.
* `COUNT`: the counter runs until `fall`.
* `FALL`: the second cycle of a pulse that rose and fell in one window.
* `STALL`: the FIFO was full when a width was ready. The word is held
  until a slot frees. Pulses arriving meanwhile are not measured.

An assertion in the FSM checks that it never writes into a full FIFO.

## Crossing to the histogram clock

Each channel has its own **32-entry × 16-bit dual-clock FIFO** (`async_fifo`).
It is written at 200 MHz and read at 50 MHz. Each side keeps a binary pointer
and a Gray-coded copy. The Gray pointer crosses to the other side through
**five** flip-flop stages. `full` and `empty` are computed on their own side,
so both are conservative. Read data is registered.

The consumer is slower than the producer. One histogram update takes
6 × 20 ns = 120 ns, so a channel drains 8.3 million events per second.
A burst of back-to-back minimum-width pulses (one per 10 ns) fills the FIFO
after roughly 35 pulses. The channel then stalls and raises its `stalled`
status bit until the FIFO has room again. Radioactive decay is a Poisson
process, and expected clinical rates are kilocounts per second. So a stall
essentially never happens in use; the testbenches force one on purpose.

Control crosses the other way through 3-FF synchronizers.
`run && init_done` goes from 50 MHz to 200 MHz, and the stall flag comes
back. So a channel never measures while its histogram is being zeroed.

## Histogram update and clearing

`hist_update_fsm` owns port A of the channel's `hist_bram`:

| state | cycles | action |
|---|---|---|
| `INIT` | 512 | write 0 to each bin in turn |
| `INIT_END` | 1 | leave zeroing (513 cycles ≈ 10.3 µs in all) |
| `IDLE` | 1 | FIFO not empty: assert the read request |
| `WAIT` | 3 | let the FIFO read data settle |
| `READ` | 1 | read the bin addressed by the low 9 bits of the word |
| `WRITE` | 1 | write count + 1 back (saturating at 65535) |

Zeroing runs after reset and after every `CLEAR_RESULTS`. A clear that
arrives in the middle of an update waits until that update has been
written, so no stray count survives a clear. Port B is read-only and
serves the UART upload, one cycle of read latency, without disturbing
updates.

## Host protocol

The UART runs at 115200 baud, 8 data bits, no parity, 1 stop bit. The baud
divisor is `CLK_HZ / BAUD`, which is 434 at 50 MHz. Every command is a
command byte, then two value bytes (least significant first) if the command
takes a value, then the end byte **0xFF**. Nothing happens until the 0xFF
arrives. Every answer also ends with 0xFF.

| code | command | value | answer |
|---|---|---|---|
| 0x01 | `FPGA_VERSION` | – | version byte (0x01), 0xFF |
| 0x02 | `START_HISTOGRAM` | – | 0xFF |
| 0x03 | `STOP_HISTOGRAM` | – | 0xFF (histograms are kept) |
| 0x04 | `CLEAR_RESULTS` | – | 0xFF, once every channel has finished zeroing |
| 0x05 | `START_UPLOAD` | – | bin data, then 0xFF |
| 0x06 | `SET_BIN_ADDRESS` | 0 … 511 | 0xFF |
| 0x07 | `SET_NUM_BINS` | 1 … 512 | 0xFF |
| 0x08 | `SET_CHANNEL` | 0 … 15 one channel, 16 all | 0xFF |
| 0x09 | `IS_HIST_RUNNING` | – | 0xF0 running / 0xF1 idle, 0xFF |

After reset the settings are start bin 0, 512 bins, all channels, stopped.
Example: address 283 is sent as `06 1B 01 FF`.

**Upload format.** For each selected channel in turn, and for each bin from
the start bin on, two bytes are sent:

```
byte 0: count[7:0]
byte 1: {channel[3:0], count[11:8]}
```

The whole upload ends with 0xFF. The channel nibble lets the receiver check
that the bytes belong to the channel it expects. One full channel is
1025 bytes, about 89 ms at 115200 baud. All 16 channels take about 1.4 s.
Acquisition continues during an upload.

Error handling:

* Bytes that are not command codes are ignored while a command is expected.
* If the byte in the 0xFF position is anything else, the command is dropped
  silently.
* Values out of range are clamped.
* A range that runs past bin 511 wraps to bin 0.

## Clocks and reset

`clk_lf` is the 50 MHz board clock. `clk_hf` must be a 200 MHz clock
derived from it. On the FPGA that means a PLL, which this RTL does not
contain: `clk_hf` is a top-level input. No fixed phase between the two
clocks is assumed, because every crossing is synchronized. `rst_n` is
asynchronous and active low. Each domain releases it through its own
`reset_sync`.

Status outputs in the `clk_lf` domain:

* `running`;
* `init_done`, low while any histogram is being zeroed;
* `stalled[c]`, high while channel c holds a width because its FIFO is full.

## Where this design departs from, or fills in, the original

The original system specifies the architecture, clock plan, sizes, state
sequence and command set used here. The following points are this
implementation's own reading or choice:

* **Clamp value.** The original says the width ranges up to 512 and is
  clamped to the maximum bin address. With 9-bit addresses that address
  is 511, so widths are clamped to 511.
* **Upload count width.** Bins hold 16-bit counts, but the second upload
  byte carries the channel in its upper nibble. Only 12 count bits fit
  into the two bytes, so counts above 4095 are sent modulo 4096. The
  memory itself still counts to 65535 (saturating).
* **SET_CHANNEL** takes two value bytes like the other setters, for a
  uniform format. The original only says the value is 0 … 16.
* **FPGA_VERSION** returns the version byte 0x01 (a parameter).
  `IS_HIST_RUNNING` returns 0xF0/0xF1 before the 0xFF.
* **CLEAR_RESULTS** is acknowledged only after zeroing has finished. A
  clear during an update is deferred, and acquisition is disabled while
  zeroing.
* **Pulses during a stall** are not measured. Stopping acquisition in the
  middle of a pulse discards that pulse.
* **The FIFO** is a generic Gray-pointer design with the original's size
  and synchronizer depth, instead of a vendor megafunction.
* **Memory size.** The original's resource table gives fewer memory bits
  than its own 16 × 512 × 16 histograms need. This design uses the full
  131,072 bits for histograms plus 8,192 bits of FIFO storage.
* **Not included:** the PLL (an input here), the analog front end, the
  detectors, the microcontroller, and the FPGA test-pattern generator used
  in the original's hardware-in-the-loop test. The original gives no
  internals for that generator. Temperature-based gain correction is only
  mentioned as future work and is not implemented.

## Simulating

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. With Verilator 5:

```sh
T=tb_podd_fpga_top            # any file name from tb/ without .sv
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb rtl/podd_pkg.sv tb/$T.sv --top-module $T -j 8
./obj_dir/V$T
```

The package must come first on the command line. All other modules are
found through `-y`. `-Wno-fatal` is needed because Verilator warns
(ZERODLY) about the testbenches' computed delays such as `#(width_ps)`;
the RTL builds without warnings.

| testbench | what it covers | run time |
|---|---|---|
| `tb_sync_chain` | latency of the synchronizer | < 1 s |
| `tb_pulse_width_counter` | load 2, +2 per cycle, saturation | < 1 s |
| `tb_dual_edge_sampler` | random pulses and gaps of 1 … 24 half-periods with edges at random sub-cycle offsets; every transition and its phase flag checked against the testbench's own sampling | < 1 s |
| `tb_pulse_width_fsm` | one-window pulses, both phase corrections, clamp, back-to-back pulses at one per two cycles, stall and release, stop mid-pulse | < 1 s |
| `tb_async_fifo` | order, full/empty, random rates on unrelated clocks | < 1 s |
| `tb_hist_bram` | both ports against a model | < 1 s |
| `tb_hist_update_fsm` | 513-cycle zeroing, 6-cycle update, saturation, deferred clear | < 1 s |
| `tb_hist_channel` | random pulses 1 ns … 1.4 µs against a reference histogram, run low, a burst that stalls the FIFO, clear | seconds |
| `tb_uart_controller` | every command, framing errors, clamping, upload format | seconds |
| `tb_podd_fpga_top` | whole system at 2.5 Mbaud: 16 channels, start/stop, clear during acquisition, a forced FIFO stall, uploads with wrap-around; counts that each mechanism happened | ~30 s |
| `tb_podd_full` | whole system with every parameter at its default (115200 baud) | ~1 min |
| `tb_fil_workload` | default parameters: 800 pulses of known widths on one channel, then a 512-bin upload (1025 bytes, 89 ms of UART time) compared bin by bin | ~30 s |

`tb/uart_host.sv` is a behavioural serial host (send byte, receive byte
with timeout, framing-error count) shared by the system-level testbenches.

## Changing the design

* `podd_fpga_top` parameters:
  * `N_CH`: channel count;
  * `N_BINS`: bins per channel, a power of two;
  * `CLK_HZ` and `BAUD`: the UART rate.
* `hist_channel` adds the FIFO depth (`FIFO_D`) and the synchronizer depths.
* `pulse_width_fsm.MAX_WIDTH` sets the clamp.
* The histogram counter width is `COUNT_W` in `podd_pkg`.
* Command codes and status bytes live in `podd_pkg` as well.
* If `N_BINS` changes, the upload field layout stays the same: the low
  count bits, then the channel nibble with count bits [11:8].
