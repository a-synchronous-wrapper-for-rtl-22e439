# Synchronous wrapper for an asynchronous pipeline: a five-tap FIR example

A slow block can set the clock rate of a whole synchronous system. This design
runs that block as a self-timed (asynchronous) pipeline instead, and wraps the
pipeline so that it looks like an ordinary synchronous module to the blocks
around it. That style is called "globally synchronous, locally asynchronous".
The wrapper has two ports:

* An **input port** takes samples from a synchronous sender on a clock edge
  and turns each one into a request event for the pipeline.
* An **output port** turns the pipeline's result events back into clocked data
  for a synchronous receiver.

Inside, no clock reaches the pipeline. Each stage loads its registers when its
own controller decides that the data is ready and the next stage is free. The
two ports may run on one clock or on two unrelated clocks.

The wrapped block here is a 5-tap FIR filter, scheduled as a six-stage
bundled-data pipeline:

    y[t] = sum_{i=0..4} H[i] * x[t-i],   H = 489, 506, 512, 506, 489

```
 sender (clk1)             sync_wrapper_fir                       receiver (clk2)
 ─────────────   ┌───────────────────────────────────────────────┐ ───────────────
  x_in, valid ──►│ input reg ─► fir_async_pipeline ─► output reg │──► y_out, ro
          ai  ◄──│ input_port    6 stages, no clock  output_port │◄── ao
                 │ (clk1)      pipe_ctrl × 6, delay × 5   (clk2) │
                 └───────────────────────────────────────────────┘
```

## Handshakes: two-phase everywhere

Every request/acknowledge pair uses two-phase signalling. Each *toggle* of a
wire is one event, and there is no return to zero. Rising and falling edges
mean the same thing.

| pair | meaning of a toggle |
|---|---|
| `ai` (wrapper → sender) | the sample on `x_in` has been taken; the sender may show the next one from the next `clk1` edge on |
| `valid` (sender → wrapper) | a level, not a toggle: `x_in` holds a sample |
| `ro` (wrapper → receiver) | `y_out` holds a new result; it stays put until `ao` is toggled |
| `ao` (receiver → wrapper) | the receiver took `y_out` (it copies `ro` into `ao`) |
| pipeline `Ri`/`Ro`/`Ao` | one data token moved from one stage to the next |

The sender must hold `x_in` and `valid` until it sees `ai` toggle. The receiver
treats `ro != ao` as "result waiting". Both sides are plain synchronous logic.

## The pipeline stage controller (`pipe_ctrl`)

Each stage has one controller. Its output `L` clocks the stage's data
registers, and its output `Ro` is two things at once: the request to the next
stage and the acknowledge to the previous one. The controller follows this
event cycle:

    Ri+ → L+ → Ro+ → L- → {Ri-, Ao+} → L+ → Ro- → L- → {Ri+, Ao-} → …

In logic:

    L  = (Ri != Ro) and (Ao == Ro)        -- token waiting, next stage free
    Ro <= Ri  on the rising edge of L     -- accept: ends the pulse

A stage fires only after the next stage has taken the previous token. That is
what makes the stages stall and resume by themselves.

The request from stage *k* to stage *k+1* goes through a **matched delay**
(`delay_element`). It must be longer than the logic between the two stages'
registers, so that the data has settled before the next stage loads it. The
acknowledge goes back with no delay.

The original controller is a small gate circuit with `Ro` fed back into its
own gates. This implementation holds `Ro` in a flip-flop clocked by `L`
instead. The event order is the same, and no combinational loop is needed. The
`L` pulse is as wide as that flip-flop's clock-to-output delay.

## FIR schedule (`fir_async_pipeline`)

The schedule uses at most two multipliers and one adder per stage. It has 20
registers:

| stage | registers loaded by its `L` | logic after them |
|---|---|---|
| 1 | R1..R5 = x(t) .. x(t-4) (tap line: R1←x, R2←R1, …) | H0·R1, H1·R2 |
| 2 | R6, R7 (products), R8=R3, R9=R4, R10=R5 | R6+R7, H3·R9, H4·R10 |
| 3 | R11 (sum), R12=R8, R13, R14 (products) | H2·R12, R13+R14 |
| 4 | R15=R11, R16 (product), R17 (sum) | R15+R16 |
| 5 | R18 (sum), R19=R17 | R18+R19 |
| 6 | R20 = y(t) | – |

Numbers are 14-bit unsigned. A product keeps bits [25:12] of the 28-bit
product, i.e. `(H*x) >> 12`. Sums wrap at 14 bits. With these rules, the
inputs 227, 309, 312, 413, 635, 807, 819 give the outputs 230, 299 and 363 for
the samples 635, 807 and 819. These published reference values are checked in
the end-to-end testbench.

## Input port (`input_port`, `input_port_controller`)

The input port is built from three parts:

* the input controller;
* two flip-flops that bring the pipeline's acknowledge `Ao` into the clock
  domain as `Aclk`;
* the input register.

The port is **idle** when `Aclk == Ro`. On a rising edge of `clk1` where the
port is idle and `valid` is 1, three things happen:

* the input register loads `x_in`;
* `Ro` toggles, which is a request into stage 1;
* `L` (= `Ro xor Ao`) rises.

`L` falls when stage 1 acknowledges. The port becomes idle again once the
acknowledge has passed the two synchronizer flip-flops. `ai` is `Ro`.

This is the port controller's 8-state burst-mode specification, written as one
rising-edge flip-flop plus two gates. At best it takes one sample every
**three** clock cycles: one edge to accept, then two edges for the
synchronizer.

## Output port (`output_port`, `output_port_controller`)

This part is the hardest to get right. The last stage's request `Ri` goes
through three things in turn:

1. A **2×1 mux whose output feeds back into its own input 1**, selected by
   the controller's `L`. While `L` is high the mux holds its value. While `L`
   is low it passes `Ri`.
2. Two synchronizer flip-flops, whose output is `Riclk`.
3. The controller:

       L    = not ((Ri != Ro) and (Ao == Ro))   -- high at rest
       load = (Riclk != Ro)                      -- on this rising clk2 edge:
                                                 --   output reg <= R20, Ro toggles

`L` falls only when a new token has arrived **and** the receiver has
acknowledged the previous word. Only then does the mux let the new request
through to the synchronizer. Three rising edges later (sample, synchronize,
load), the output register loads R20 and `Ro` toggles. `L` then rises and the
mux closes again.

`Ro` also goes back to stage 6 as its acknowledge. The pipeline can therefore
refill R20 at once, but a slow receiver can never lose a word: the new token
waits at the closed mux. The mux with feedback is a level-sensitive latch. It
is written as an `always_latch` on purpose, and the synthesis latch warning
for it is expected.

## Latency and rate

* **Pipeline:** an empty pipeline turns a request into a result after the sum
  of the five matched delays (30 ns at the defaults). No pipeline stage waits
  on a clock.
* **Whole wrapper, empty pipeline:** the time from the accepting `clk1` edge to
  the `ro` toggle is that sum plus 2 to 3 `clk2` periods.
* **Rate:** each port moves at most one word per three of its clock cycles.
  The pipeline moves at most one token per the longest delay. The slowest of
  these sets the steady rate.
* **Full rate with a registered receiver:** suppose the receiver copies `ro`
  into `ao` on the clock edge after `ro` toggles. The output port then opens
  its mux one edge after each load and needs three more edges for the next
  word, so results come out exactly every **4 receiver clock cycles**. At
  500 MHz and 385 MHz with the default 6 ns delays, this makes the output
  port the bottleneck (10.4 ns per result). The end-to-end testbench checks
  this period.

## How far it follows the original design, and where it departs

Taken from the original design:

* the wrapper structure;
* the stage controller's event cycle;
* both port controllers' burst-mode state graphs;
* the synchronizer flip-flops and the output hold mux;
* the FIR schedule, the 20 registers and the coefficients;
* the two-clock arrangement.

Choices made here:

* **Controllers are written by function, not as gates.** The original port
  controllers are hazard-free asynchronous circuits from a burst-mode
  synthesis tool. Here they are rising-edge flip-flops plus gates. Their
  events follow the same state graphs, but this is not the same netlist.
* **`L` is a clock enable at the ports.** The input and output registers load
  on the clock edge where their controller raises `L`, rather than being
  clocked by `L`. Clocking the input register by `L` would race stage 1,
  which fires on the same event.
* **Stage 1 is a tap line.** R1..R5 shift, so only one new sample enters per
  token.
* **Derived sizes.** The 14-bit width and the `>> 12` product scaling are
  inferred from the published flip-flop count and output values.
* **Delays are assumed.** The five delay values are assumptions (6 ns each).
  On an FPGA they would be LUT chains sized after place and route.
  `delay_element` is a behavioural model and does not synthesize to a delay.
* **Reset.** One asynchronous active-low reset clears every handshake wire and
  register in both clock domains.
* **Metastability is not modelled.** The two-flip-flop synchronizers are
  present, but a two-state simulator cannot show metastability.
* **No timing claims.** Nothing in the RTL establishes the 500 MHz port rate
  reported for the original FPGA implementation. The testbenches only run the
  ports at 500 MHz functionally.

## Files

| file | content |
|---|---|
| `rtl/gsla_pkg.sv` | `DATA_W`=14, `TAPS`=5, `PROD_SHIFT`=12, default coefficients, `scaled_mul` |
| `rtl/pipe_ctrl.sv` | stage controller |
| `rtl/delay_element.sv` | matched delay, behavioural model (`DELAY_PS`) |
| `rtl/fir_async_pipeline.sv` | six-stage FIR pipeline (`DELAY1_PS`..`DELAY5_PS`, `H`) |
| `rtl/sync2.sv` | two-flip-flop synchronizer |
| `rtl/input_port_controller.sv`, `rtl/input_port.sv` | input port |
| `rtl/output_port_controller.sv`, `rtl/output_port.sv` | output port with hold mux |
| `rtl/sync_wrapper_fir.sv` | top: the wrapper (`clk1`, `clk2`, `rst_n`, `valid`, `x_in`, `ai`, `y_out`, `ro`, `ao`, `l_in`, `l_out`) |
| `tb/tb_*.sv` | one self-checking testbench per module |

`tb/tb_sync_wrapper_fir.sv` runs the wrapper at its default parameters in
three phases:

1. a single 500 MHz clock, with the reference input sequence;
2. two unrelated clocks, 500 MHz and about 385 MHz, with random data and
   random pauses on both sides;
3. sparse traffic, which checks the latency window;
4. full rate, which checks the 4-cycle output period;
5. a slow receiver clock (9.4 ns), which backs the pipeline up until all six
   stages hold a token.

It counts each mechanism and fails if one never happens:

* sender pauses;
* the sender held back by a busy port;
* pipeline stalls;
* the output mux holding a token;
* receiver back-pressure;
* single-clock operation;
* dual-clock operation;
* a completely full pipeline.

## Simulating

The testbenches need Verilator 5 with timing support, because of the delays in
`delay_element` and in the testbenches. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/gsla_pkg.sv tb/tb_sync_wrapper_fir.sv \
  --top-module tb_sync_wrapper_fir -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`. The concurrent
assertions are:

* `ack_matches_request` in the input controller: the pipeline never
  acknowledges a request that was not made;
* `no_overwrite` in the output controller: no result is handed on before the
  receiver took the previous one.

Both stop the simulation when `--assert` is on.

To change the filter, edit the coefficients (`H`), the widths (`gsla_pkg`) and
the schedule in `fir_async_pipeline`. Then size each `DELAYk_PS` to the logic
between stages k and k+1.
