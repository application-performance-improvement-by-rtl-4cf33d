# Run-time frequency boosting from FPGA process variability

Chips from the same FPGA family are not equally fast. Within one die, and even
more from one die to the next, the transistors vary, and the maximum clock that
static timing analysis reports has to cover the slowest device of the family.
Most individual devices therefore run an application well below what they can
actually sustain.

This design has two parts that exploit that margin:

1. **A ring-oscillator sensing network.** 408 identical ring oscillators (ROs)
   are spread over the fabric. Each one drives its own 16-bit counter, so the
   count reached in a fixed window gives the local speed of the silicon. The
   counts read back from all 408 positions form a variability map of the die.
2. **A closed-loop frequency-boost framework.** The application's hardware (the
   "user IP", here a fully parallel FIR filter) gets a clock domain of its own,
   fed by a PLL that the CPU reprograms at run time. Software first records
   the IP's output at the rated frequency. It then raises the clock and re-runs
   the same input until the output differs from the recording. The last
   frequency that still gave correct output is the one the device keeps. On
   28 nm devices this approach measured 5–8 % speed spread within a die, up to
   17 % between dies, and 66–90 % more filter throughput than the rated clock.

The CPU, its DDR memory and the DMA engine are not part of this RTL. Their AXI
sides are the ports of the top module, and the testbenches play their role.

```
                 variability_top
 ┌──────────────────────────────────────────────────────────────────────┐
 │ ro_infrastructure                                                    │
 │   AXI-Lite ──► ro_axil_ctrl ──enable/activate/clr/sel──► ro_network  │
 │   (ro_axil_*)      ▲                                   408 × ro_sensor
 │                    └────────────── count[15:0] ◄──── result mux      │
 │                                                                      │
 │ boost_framework                       ┌──── IP clock domain ───────┐ │
 │   s_axis (10b) ──► async_fifo 16×10 ──┼─► fir_filter (64 taps) ──┐ │ │
 │   m_axis (26b) ◄── async_fifo 16×26 ◄─┼──────────────────────────┘ │ │
 │                                       └────────────▲───────────────┘ │
 │   AXI-Lite ──► clk_reconfig_regs ──M,D,O,load──► pll_model ─ ip_clk  │
 │   (clk_axil_*)        ▲ locked            ref = clk (100 MHz)        │
 └──────────────────────────────────────────────────────────────────────┘
```

## The ring-oscillator sensor

One sensor (`ro_sensor`) is a small macro with four parts:

* a 1-bit **activation register** on the system clock, whose D input is
  `activate` and whose clock enable is `enable`;
* the **ring** (`ring_oscillator`): an input gate that lets the activation
  signal start the loop, followed by three inverting stages. On the device
  each stage is a LUT followed by a transparent latch, so the loop has four
  delay elements;
* a **16-bit up-counter** (`ro_counter`) clocked by the ring's own output;
* a **16-bit output register**, also clocked by the ring. It loads the counter
  on each ring edge while the activation register is set.

When the activation drops, the ring stops and both registers freeze. The
output register then holds `c_ro`, and software computes `f_ro = c_ro / T`.
The output register samples the counter before each increment, so `c_ro` is
the number of rising ring edges minus one. That is an offset of one count in
about twelve thousand for the window below.

Clearing: `clr` is an asynchronous, active-high clear of the counter and the
output register. It is only raised while the ring is stopped.

The read-out crosses from the ring's clock to the system clock with no
synchronizer. This is safe only because the count is read after the ring has
stopped.

The ring is written as a behavioural model (`#` delays). A combinational loop
is not synthesizable logic. On the device the sensor's quality comes from
constraints, not from RTL:

* identical LUTs, latches and carry chains at fixed sites;
* fixed routing and fixed LUT pins;
* isolation from busy neighbouring logic.

Those constraints are not part of this repository. In the model, the half
period is four times `ELEMENT_DELAY_PS`. The default of 312 ps gives about
400 MHz, inside the 380–440 MHz that 28 nm devices show.

### Network and command word

`ro_network` instantiates `N_RO` = 408 sensors. They share the activation and
clear lines, so all of them measure over the same window. A combinational
multiplexer forwards the count of the sensor at address `sel`. An address past
the last sensor reads 0.

In simulation, each position gets its own ring delay:
`290 + ((7·i + i/17) mod 16)` ps per element. This stands in for process
variation and gives 410–431 MHz, a 5.2 % spread. On silicon these parameters
mean nothing.

`ro_axil_ctrl` is an AXI-Lite slave. Every write is one 32-bit command word:

| bits        | meaning |
|-------------|---------|
| 31 = 1      | control word: bit 1 `RST` clears all counters first; bit 0 `ACT` is loaded into every activation register (1 = run, 0 = stop) |
| 31 = 0      | bits 15:0 are the multiplexer address |
| any read    | returns `{16'b0, count of the addressed sensor}` |

A control word goes through a short pipeline:

* two cycles after the write is accepted, the clear is pulsed if `RST` is set;
* one cycle later, the activation registers' enable is pulsed.

Start and stop words take the same path, `RST` or not, so the rings run for
exactly the time between the two accepted writes.

The measurement procedure (what `tb_variability_top` does):

1. Write `0x8000_0003` (clear and start).
2. Wait T. On the original set-up, the CPU's 333 MHz private timer counts
   10,000 cycles, so T = 30.03 µs.
3. Write `0x8000_0000` (stop).
4. For i = 0 … 407, write `i`, then read the count.

At 476 MHz, the fastest ring observed, the count is about 14,300. That is well
inside the 16-bit counter.

## The frequency-boost framework

`boost_framework` has two clock domains:

* the fixed 100 MHz domain `clk` of the DMA and the PLL's register port;
* the IP domain `ip_clk`, produced by the clock manager.

Two dual-clock FIFOs (`async_fifo`, 16 words each) cross the data between the
domains. The input FIFO is 10 bits wide and carries samples. The output FIFO is
26 bits wide and carries results. Each FIFO uses Gray-coded pointers with
two-flop synchronizers, so the clock ratio can be anything: the IP can run far
above or below 100 MHz. Back-pressure works in both directions:

* a full input FIFO drops `s_axis_tready`;
* a full output FIFO stalls the filter.

### Clock manager and its registers

`clk_reconfig_regs` is the CPU's view of the PLL. Offsets are in bytes.

| offset | register | fields |
|--------|----------|--------|
| 0x00 | STATUS (read-only) | bit 0 = locked |
| 0x04 | FACTORS | bits 9:0 = multiplier M, bits 23:16 = input divider D |
| 0x08 | OUTDIV  | bits 7:0 = output divider O |
| 0x0C | CTRL    | write bit 0 = 1 to apply the factors |

The IP clock is `f_ip = 100 MHz · M / (D · O)`. The reset values M = 14,
D = 1, O = 10 give 140 MHz, the rated clock of the 64-tap filter. With D = 100
and O = 1, `f_ip` is simply M MHz, which gives the 1 MHz resolution the search
needs.

`pll_model` is a behavioural stand-in for the PLL. On each apply (and after
reset) it behaves as follows:

* it drops `locked` and holds its output low;
* after `LOCK_TIME_NS` (28 µs; the real reconfiguration took 27–30 µs) it
  restarts the clock at the new period and raises `locked`;
* it takes the reference period from its own input;
* it does not model the VCO range limits of a real PLL.

The IP domain leaves reset through `rst_sync`, once its clock is running. The
FIFOs keep their contents across a relock, but software only reprograms the
clock between runs.

### The search loop (software)

The CPU runs the loop, so it is not in the RTL. `tb_variability_top` carries it
out over the ports, with f_r = rated frequency:

1. Set f = f_r and f_step = 10 MHz.
2. Run the application and store its output as the reference D_c.
3. Raise f by f_step and reprogram the PLL.
4. Run the application again and store the output D.
5. Compare D with D_c.
6. If they are equal, go to 3. Otherwise set f = f − f_step.
7. If f_step is 10, set f_step = 1 and go to 3. Otherwise f is the result.

A simulated filter never violates timing, so the testbench stands in for the
silicon. Above `FMAX_EMU` (234 MHz, a figure measured for this filter on one
device), it corrupts one result word of each run. The search must then take
10 coarse steps and 5 fine steps and end at exactly 234 MHz.

## The user IP: `fir_filter`

The filter is a fully parallel direct-form FIR with one sample in and one
result out per clock. It has two published sizes:

| | TAPS | sample bits | internal/result bits | rated clock |
|---|---|---|---|---|
| IP1 (default) | 64 | 10 | 26 | 140 MHz |
| IP2 | 32 | 7 | 19 | 176 MHz |

The coefficient width equals the sample width. The product then has twice the
sample width, and the sum of TAPS products grows by log2(TAPS) bits. That
gives exactly 26 and 19 bits.

The coefficient values are this design's own, a reproducible set from
`fir_pkg::fir_coef`:

* `k = min(i, TAPS−1−i)`;
* `mag = (k+1)·(2^(W−1)−1) / ((TAPS+1)/2)`;
* the coefficient is `−mag` for taps with `i mod 5 = 2`, `+mag` otherwise.

With these values the sum can never overflow the accumulator.

The pipeline has three stages: delay line, products, sum. A sample's result
appears on the third clock edge after the sample is accepted. The whole
pipeline stalls while a result waits and `out_ready` is low.

## Where this RTL departs from, or adds to, the source design

* **Result width.** The filter outputs its full 26-bit (19-bit) sum. The
  filter was described with "10-bit I/O", but also with a 26-bit-wide output
  FIFO. The FIFO width was followed. Take bits [25:16] for a 10-bit output.
* **Own choices.** These are not given by the source design:
  * the coefficient values;
  * the pipeline split;
  * the AXI-Lite register maps and the command word layout;
  * the FIFO implementation;
  * all reset behaviour.
* **Behavioural models.** The ring and the PLL are behavioural models. The
  rest is synthesizable.
* **Placement and routing.** The sensor's placement, routing and LUT-pin
  constraints are not reproduced. Without them, a synthesized ring measures
  the tools as much as the silicon.
* **Configurations.** Both experiments sit side by side in one top. They
  share only `clk` and `rst_n`. The source design built one bitstream per
  experiment and per IP. IP2 is obtained by setting `TAPS=32, DIN_W=7,
  ACC_W=19` (and `RST_MULT=176, RST_DIVCLK=100, RST_OUTDIV=1` for its rated
  clock).
* **Outside this repository.** The DMA engine, the CPU and its software, the
  DDR memory and the host PC are outside. The testbenches stand in for them.
  Test vectors are 256 samples long, not 1 M; nothing on chip depends on the
  vector length.

## Files

| file | contents |
|---|---|
| `rtl/variability_top.sv` | top: both parts side by side |
| `rtl/ro_infrastructure.sv`, `ro_axil_ctrl.sv`, `ro_network.sv`, `ro_sensor.sv`, `ro_counter.sv` | sensing network |
| `rtl/ring_oscillator.sv` | behavioural ring model |
| `rtl/boost_framework.sv`, `async_fifo.sv`, `fir_filter.sv`, `clk_reconfig_regs.sv`, `rst_sync.sv` | boost framework |
| `rtl/pll_model.sv` | behavioural PLL model |
| `rtl/axil_pkg.sv`, `axil_reg_port.sv` | AXI-Lite structs and slave front end |
| `rtl/ro_pkg.sv`, `fir_pkg.sv` | constants, command bits, coefficient rule |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/axil_tasks.svh` | AXI-Lite master tasks used by the testbenches |

## Simulating

Every testbench checks its own results and ends by printing
`TB_RESULT checks=N failures=M`. It uses Verilator 5 with timing support.
From the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/axil_pkg.sv rtl/fir_pkg.sv rtl/ro_pkg.sv tb/tb_variability_top.sv \
    --top-module tb_variability_top -Mdir obj_top
./obj_top/Vtb_variability_top
```

Replace the testbench name to run another one. The end-to-end test
`tb_variability_top` runs at every default size: all 408 rings over the full
30.03 µs window, and the 64-tap filter through a complete frequency search.
It takes about 10 s. It prints the ring frequency range, the intra-die spread,
the frequency the search found, and how often each mechanism occurred:

* ring start, ring stop and reads;
* PLL relocks;
* coarse steps, fine steps and mismatches;
* input-FIFO back-pressure;
* output back-pressure;
* filter stalls.

A mechanism that never occurred counts as a failure.

`tb_boost_framework` runs the IP2 configuration at 176, 300 and 20 MHz.
`tb_ip2_search` runs the complete frequency search on the IP2 configuration,
with the real 28 µs relock time. It starts at the rated 176 MHz and must end
at an emulated limit of 298 MHz.
`tb_fir_filter` checks both filter sizes against a reference convolution,
including the three-cycle latency and one result per cycle.

The simulator has two states. Every register that is read has a reset, and the
testbenches apply reset with a real edge at start-up.

## Changing the design

* `N_RO` (top, `ro_infrastructure`, `ro_network`) sets the number of sensors.
  The select is 16 bits wide, so up to 65,536 sensors can be addressed.
* `COUNT_W` and `CNT_W` set the counter width. Size it for
  `f_max · T < 2^COUNT_W`.
* `TAPS`, `DIN_W` and `ACC_W` select the filter. Keep
  `ACC_W ≥ 2·DIN_W + log2(TAPS)`. Another user IP with a valid/ready stream
  interface can take the filter's place in `boost_framework`.
* `FIFO_DEPTH` must be a power of two, at least 4.
* `LOCK_TIME_NS` shortens the PLL relock time in simulation.
