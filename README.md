# Four-point FFT processor, clocked and handshake versions

A four-point discrete Fourier transform needs no multiplier. The twiddle
factors of a 4-point DFT are 1, -j, -1 and j. Multiplying by ±j only swaps
the real and imaginary parts and changes a sign. So the whole transform is 16
real additions or subtractions in two stages. This RTL builds a streaming
processor around that arithmetic, in two versions:

* **`fft4_sync`**: a clocked pipeline. It takes one complex sample per clock
  and gathers the samples into groups of four. It transforms each group at a
  quarter of the clock rate and sends the four results out one per clock, at
  a fixed latency.
* **`fft4_async_top`**: the same data path with no shared rate. Each block
  talks to its neighbours with request/acknowledge handshakes. The input is
  split over four channels by a tree of "decimators", and the results are
  merged back by an "expander". The transform runs once per group, only when
  a whole group is present.

`fft4_top` places both side by side. They share only `clk` and `reset`.

All data is two's complement. A sample is 16-bit real plus 16-bit imaginary
(`fft4_pkg::cplx_t`). The arithmetic is done at 20 bits, and the results are
cut back to 16 bits.

## The arithmetic

For one group x(0..3):

```
stage 1 (fft4_stage1)          stage 2 (fft4_stage2)
a = x(0) + x(2)                X(0) = a + b
b = x(1) + x(3)                X(1) = (Re c + Im d) + j(Im c - Re d)    = c - j·d
c = x(0) - x(2)                X(2) = a - b
d = x(1) - x(3)                X(3) = (Re c - Im d) + j(Im c + Re d)    = c + j·d
```

Each stage is eight real adders. Both stages are combinational modules, so
the two processors can place registers or handshake latches between them.

Widths:

* The inputs are sign-extended to 20 bits (`IW`).
* Two stages of addition need at most 18 bits, so nothing overflows inside.
* The output keeps the low 16 bits of each sum (`DW`). There is no rounding,
  no scaling and no saturation. A result outside ±32767 therefore wraps.
* This behaviour reproduces the reference vectors below exactly.

Reference vectors, used by the testbenches:

| input x(0..3) | output X(0..3) |
|---|---|
| 127+255i, 511+439i, 21+21i, 341+53i | 1000+768i, 492+64i, −704−216i, −280+404i |
| 127+255i, 51+439i, 21+21i, 341+53i | 540+768i, 492+524i, −244−216i, −280−56i |

## Synchronous processor (`fft4_sync`)

```
in ──► [reg 3]─►[reg 2]─►[reg 1]─►[reg 0]      (sync_input_sr, every clock)
          │x3     │x2     │x1     │x0
          └───────┴───┬───┴───────┘
                 stage1 ─► R ─► stage2 ─► R ─► R ─► R ─► R      (fft4_sync_core,
                                                                   enabled 1 clock in 4)
                                                      │X0..X3
                      div4_counter ── cnt ──────► output_mux ─► R ─► out
```

**Input.** Samples enter register 3 and move down one register per clock.
After four clocks, register k holds x(k).

**Counter and enable.** `div4_counter` counts modulo 4. It resets to 3, so
the first sample after reset is x(0) of the first group. When the count is 3
it raises `en_div4`. That clock edge is the one at which registers 0..3 hold a
complete group.

**Quarter-rate core.** All registers of the FFT core update only on
`en_div4`:

* the stage-1 result register;
* the stage-2 result register;
* `BUF_STAGES` plain buffer registers.

The buffer registers hold no logic. A retiming synthesis run can move adder
logic into them, which relaxes the path through the adders. A divided clock
would give the same update rate, but a clock enable keeps the design in one
clock domain.

**Output.** `output_mux` registers `X[cnt]` every clock. The results leave in
the order X(0), X(1), X(2), X(3).

**Timing.** Latency is measured from the clock in which x(k) is on `in_r`/`in_i`
to the clock in which X(k) is on `out_r`/`out_i`. It is fixed:

    latency = 10 + 4·BUF_STAGES clocks     (22 with the default BUF_STAGES = 3)

The 10 comes from three parts: 4 clocks to collect the group, 2 quarter-rate
stages of 4 clocks each, and the output register. Throughput is one sample
per clock, with no gaps.

## Handshake processor (`fft4_async_top`)

### Protocol

Every link uses a four-phase (return-to-zero) handshake:

1. The sender raises the request.
2. The receiver takes the data and raises the acknowledge.
3. The sender drops the request.
4. The receiver drops the acknowledge.

Data must be stable from request-up until acknowledge-up. The outside world
uses this protocol on `in_req`/`in_ack` and on `out_req`/`out_ack`.

### Structure

```
in_req ─► decimator 0 ─ro0─► decimator 1 ─r1o0 (x0), r1o1 (x2)─┐
   ▲            └──ro1─► decimator 2 ─r2o0 (x1), r2o1 (x3)─┤
in_ack                                                     ▼
                                                   input_ctrl
                                                          │ one request per re/im pair
in_r/in_i ─────────────────────► 8 × linear_async_block (x0re, x0im, … x3im)
                                                          │ 8 requests
                                           join_ctrl (AND) ─► fft4_async
                                                           [stage1]─latch─[stage2]─latch
                                                          │ rreq / rk
                                expander ◄─ rr / rack0 / done ─► output_ctrl ─► out_req, out_r/out_i
```

### Decimator (`decimator`)

A decimator passes its first request to channel 0, the next to channel 1,
and so on, alternating. It follows a six-state burst-mode specification:

| state | waits for | then |
|---|---|---|
| 1 | li↑ | ro0↑ |
| 2 | ri0↑ | ro0↓, lo↑ |
| 3 | li↓ and ri0↓ | lo↓ |
| 4 | li↑ | ro1↑ |
| 5 | ri1↑ | ro1↓, lo↑ |
| 0 | li↓ and ri1↓ | lo↓ |

A state with two inputs waits for both, in any order. The input side is only
acknowledged once the chosen channel has taken the sample. Three decimators
in a tree send samples 0, 1, 2, 3 of each group to four distinct channels.
Each channel therefore sees a quarter of the input rate.

### Linear async block (`linear_async_block`)

This is a one-word pipeline stage. On a left request (`li`), and only when it
is empty, it latches `din`, raises `lo` and raises its right request `ro0`.
The two sides then finish their handshakes independently:

* `lo` falls after `li` falls.
* `ro0` falls after `ri0` rises.

"Empty" means that `lo`, `ro0` and `ri0` are all low. Because of this rule, a
word is never overwritten before the next stage has taken it. A full stage
simply does not acknowledge, and that stalls the stage before it.

### Join and FFT-4 (`input_ctrl`, `join_ctrl`, `fft4_async`)

**Input.** `input_ctrl` sends each channel's request to the pair of blocks
that latch the real and imaginary part of that sample. It acknowledges the
channel when both blocks of the pair have acknowledged.

**Join.** `join_ctrl` ANDs the eight block requests. The FFT-4 module is
therefore requested only when all four samples are present. Its acknowledge
goes back to all eight blocks, which frees them for the next group.

**FFT-4.** `fft4_async` has a handshake latch after each arithmetic stage:

* a 160-bit latch for a..d;
* a 128-bit latch for X(0..3).

The latches form a two-deep pipeline. One group can be in the intermediate
latch while the previous result is still being sent out.

### Expander and output (`expander`, `output_ctrl`)

When the FFT-4 result is ready (`rreq`), the expander runs one `rr`/`rack0`
handshake per output word. It keeps doing so until `output_ctrl` reports
`done`. Only then does it acknowledge the FFT-4 module (`rk`), which frees the
result latch.

`output_ctrl` does the following:

* It forwards `rr` to `out_req` and `out_ack` to `rack0`.
* It puts X(index) on `out_r`/`out_i`. The word index advances on each rising
  `out_ack`.
* It raises `done` with the acknowledge of X(3).
* It clears `done` at the next group's first request.

### Flow control

No block has a fixed rate. A slow consumer on the output first fills the
result latch, then the intermediate latch, then the eight input blocks. The
decimators then stop acknowledging, and `in_ack` is delayed. That stall is
the only form of back-pressure, and it loses no data.

If the pipeline is empty, a sample is acknowledged 5 clocks after `in_req`
rises in this realisation: two decimator levels down, one latch, two levels
back. A group's first result word is requested a few clocks after its fourth
sample is latched.

### How the controllers are realised

The handshake controllers (decimator, linear async block, expander, output
control) are written as **clocked** state machines. Each samples its
handshake inputs on `clk` and drives its outputs from flip-flops, so every
handshake transition takes one clock.

* The logic follows the handshake specifications, with the same states,
  signal names and orderings.
* The behaviour at the ports is a valid four-phase handshake for any
  environment that holds its signals for at least one clock.
* A true clockless implementation would instead use gates with state feedback
  that are hazard-free under burst-mode assumptions. It would have no clock
  and would use power only when tokens move. This RTL does not reproduce that.
* Treat `clk` here as a sampling clock. It must be fast compared with the
  handshake traffic.

Any power or speed comparison between the two versions therefore needs a
clockless implementation of these four controllers. The data path, the
latching structure and the protocol stay as they are.

## Choices made in this RTL

Where the design's description leaves a detail open, the RTL chooses as
follows:

* **Reset.** Active high and synchronous in every module. It clears all data
  registers and puts every handshake controller into its idle state.
* **Latency.** `BUF_STAGES = 3` is chosen so that the clocked version has a
  latency of 22 clocks. With `BUF_STAGES = 0` the latency is 10 clocks, the
  minimum for this structure.
* **Output register.** The clocked output multiplexer is followed by a
  register.
* **Truncation.** The low 16 bits are kept (see above). The handshake version
  uses the same 20-bit internal width and truncation.
* **Sample order over the channels.** The decimator tree gives x(0)→r1o0,
  x(1)→r2o0, x(2)→r1o1, x(3)→r2o1.
* **Joining acknowledges.** A re/im pair's acknowledges are joined by an AND.
  The eight requests into the FFT-4 module are also joined by a plain AND. In
  this clocked realisation all blocks of a group move in the same clock, so an
  AND is safe. A clockless version should use a C-element so that the falling
  edges are joined correctly too.
* **Expander handshake.** The expander's state sequence and the `done`
  handshake with `output_ctrl` are this design's own.
* **Wide latches.** The FFT-4 module uses one wide linear async block per
  stage rather than one per value.

## Files

`rtl/` holds one module per file:

| module | role |
|---|---|
| `fft4_pkg` | widths (`DW`=16, `IW`=20, `NPT`=4), `cplx_t`, `cplx_w_t`, widen/truncate helpers |
| `fft4_top` | both processors side by side (parameter `BUF_STAGES`) |
| `fft4_sync` | clocked processor: `sync_input_sr`, `div4_counter`, `fft4_sync_core`, `output_mux` |
| `fft4_async_top` | handshake processor: 3 × `decimator`, `input_ctrl`, 8 × `linear_async_block`, `join_ctrl`, `fft4_async`, `expander`, `output_ctrl` |
| `fft4_stage1`, `fft4_stage2` | the two add/subtract stages, shared by both versions |

`tb/` has a self-checking testbench `tb_<module>.sv` for every module. It also
holds `tb_fft4_ref_pkg.sv`, a reference model that computes the DFT directly
from its definition with integer arithmetic.

What the testbenches check:

* **Clocked path.** Every output sample is checked in the exact clock in
  which it is due (latency 22).
* **Handshake path.** Random producer and consumer delays are used, with slow
  phases that fill the pipeline. Every output is checked in order.
* **Shortest pipeline.** `tb_fft4_sync_min_latency` builds the clocked
  processor with `BUF_STAGES = 0` and checks its 10-clock latency.
* **Mechanisms.** `tb_fft4_top` runs both processors at the default
  parameters. It fails if any of the following never happens: results at the
  22-clock latency, stalled input handshakes, unstalled ones, and complete
  output groups.
* **Assertions.** The handshake controllers carry assertions for the
  protocol:
  * no two decimator channels are requested at once;
  * a request is held until it is acknowledged;
  * latched data is stable while it is requested.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fft4_top \
    rtl/fft4_pkg.sv tb/tb_fft4_ref_pkg.sv tb/tb_fft4_top.sv -o sim
./obj_dir/sim
```

Replace `tb_fft4_top` with any other testbench name. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. Each has a watchdog that reports a
failure if the simulation hangs. Every run takes well under a second.

For lint:

```
verilator --lint-only -Wall -Irtl rtl/fft4_pkg.sv rtl/fft4_top.sv
```

Lint reports two harmless warnings, both from the shared package:

* The upper four bits of the truncation helper's argument are unused. They
  are dropped on purpose.
* Modules that do not handle sample groups leave the `NPT` constant unused.
  This one appears only when such a module is linted on its own.

To change the latency of the clocked version, set `BUF_STAGES` on `fft4_top`
or `fft4_sync`. The testbenches assume the default of 22 clocks
(`LATENCY` in `tb_fft4_sync.sv` and `tb_fft4_top.sv`).
