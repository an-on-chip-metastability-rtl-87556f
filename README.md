# On-chip metastability measurement circuit

A synchronizer flip-flop that samples an asynchronous signal is sometimes
caught mid-transition. It then goes metastable and needs extra time to settle.
The chance that it is still unresolved after a time S falls as exp(-S/τ),
which gives the familiar failure rate

    MTBF = exp(S/τ) / (Tw · Fc · Fd)

Here Fc is the clock rate, Fd the data rate, Tw the width of the flip-flop's
vulnerable window and τ its resolution time constant. τ is the figure of merit
of a synchronizer. It sits in the exponent, so a small error in τ is a large
error in MTBF.

This RTL describes a small, fully digital test circuit that measures τ on
silicon. It uses only two steady clocks, a handful of control pins and one
output pin. The circuit was built in a 65 nm, 1.1 V bulk CMOS process to
compare four synchronizer flip-flop designs. In that process it measured
τ ≈ 101 ps for the regular library flip-flop, 148 ps for an XOR feedback
flip-flop, 168 ps for a delayed XOR feedback flip-flop and 210 ps for a
transmission-gate (TG) feedback flip-flop. The plain library cell came out
best.

## The measurement idea: two samples and an XOR

```
             rising edge                     falling edge
clk      ____|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|______________
clk + DL ______|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|____________
               ^ X samples q                   ^ Y samples q
q (normal)  _/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾   X = Y
q (late)    ________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾   X ≠ Y  -> one event
               |<-->| resolution later than DL
```

The flip-flop under test (FUT) is clocked at Fc and fed data at Fd, and the
two are unrelated. The measuring unit samples the FUT output q twice in each
clock cycle:

* **X** is sampled by the clock delayed by DL, taken from a programmable delay
  line.
* **Y** is sampled by the falling edge of the clock. At the 6.25 MHz used
  here, that is 80 ns later, long after any real metastability has resolved.

If q settled before DL, then X = Y. If it settled between DL and the falling
edge, then X ≠ Y: the flip-flop needed longer than S = DL. `X xor Y` is
sampled at the next rising clock edge by a 16-bit counter.

If the counter runs for a period T, then MTBF(DL) = T / count. Repeating the
run for several DL values gives counts N(DL) ∝ exp(−DL/τ), so τ is the
negative inverse slope of ln N against DL. For two settings:

    τ = (DL2 − DL1) / ln(N1 / N2)

The only high-resolution element is the delay line. It needs no fast or
variable clocks, which is what makes the method cheap to build on chip.

## Structure

```
            cfg_clk, cfg_din                       rd_en, cfg_clk
                  |                                     |
           +------v------------+                +-------v--------+
           | config shift reg  |--- out_sel --->|                |
           |     (90 bits)     |                | counter        |
           +--+------+-----+---+                | serializer     |
   clk_en,    |      |     | dl_code            +-------+--------+
   data_en,   |   dut_sel  |                            |serial
   fd_sel     |      |     |                            v
meas_clk -->+-v--+   |   +-v------------------+     +---------+
data_ref -->| ICG|-->DUT-->| measuring unit  |     | output  |--> out
            +----+  (4 FFs)| delay line, X, Y,|     |  mux    |
                     q     | XOR             |     +---------+
                           +--------+--------+         ^  ^
                              event |                  |  |
                           +--------v--------+ count   |  |
            cnt_en ------->| 16-bit counter  |---------+  |
                           +-----------------+ full ------+
```

| Module | Role |
|---|---|
| `meta_meas_top` | The whole circuit: six inputs, one output |
| `config_shift_register` | 90-bit serial configuration register |
| `icg` | Input and clock generation: gated FUT clock, FUT data at 1, 1/2, 1/4 or 1/8 of the reference rate |
| `dut_unit` | The four flip-flops under test and the one-hot selection between them |
| `sync_ff_model` | Behavioural model of one synchronizer flip-flop (see below) |
| `measuring_unit` | Delay line, the X and Y sample flip-flops and the XOR |
| `delay_line` | Behavioural model of the programmable delay line |
| `event_counter` | 16-bit event counter with an enable synchronizer (`bit_sync`), clear at the start of each period, and saturation |
| `counter_serializer` | Serial readout of the count, MSB first |
| `output_mux` | Selects what drives the output pin |
| `meas_pkg` | Configuration word layout, output-select encoding, default τ values |

### Pins

| Pin | Dir | Use |
|---|---|---|
| `meas_clk` | in | Measurement clock Fc (6.25 MHz in the reference setup) |
| `data_ref` | in | Data reference, not related to `meas_clk` (e.g. 6.245 MHz) |
| `cfg_clk` | in | Controller clock. It shifts the configuration while `rd_en` is low and shifts the readout while `rd_en` is high |
| `cfg_din` | in | Configuration data |
| `cnt_en` | in | Counter enable. Its high time is the measuring period T (seconds to hours) |
| `rd_en` | in | Serial readout of the count |
| `out` | out | Serial count, or a debug signal chosen by `out_sel` |

Six inputs and one output match the pin budget of the fabricated circuit. The
role given to each pin here is this design's own.

## Configuration word

The register is 90 bits long. The first bit shifted in ends up in bit 89. The
field layout is defined in `meas_pkg::cfg_t`:

| Bits | Field | Meaning |
|---|---|---|
| 89 | `clk_en` | Enables the FUT clock (latch-based clock gate in the ICG) |
| 88 | `data_en` | Enables toggling of the FUT data |
| 87:86 | `out_sel` | 0 serial count, 1 FUT output, 2 raw event flag, 3 counter full |
| 85:84 | `fd_sel` | FUT data makes one transition every 2^fd_sel rising edges of `data_ref` |
| 83:80 | `dut_sel` | One-hot: bit 0 regular FF, 1 TG feedback, 2 XOR feedback, 3 delayed XOR feedback |
| 79:0 | `dl_code` | Delay-line code. Each '1' adds one cell (thermometer code) |

The register has no shadow copy, so its outputs change while it shifts. Write
it only between measuring periods.

## A measurement, pin by pin

1. Shift in 90 configuration bits, MSB first, with `rd_en` low and one
   `cfg_clk` pulse per bit.
2. Raise `cnt_en`. The counter sees the enable two `meas_clk` edges later
   through a two-flip-flop synchronizer. On its first edge it clears to zero;
   after that it adds one on every rising edge where `X xor Y` is high.
3. After T, lower `cnt_en`. The count then holds.
4. Raise `rd_en`. The first `cfg_clk` pulse loads the count into the
   serializer, and `out` shows bit 15. Each further pulse shows the next lower
   bit, so 16 pulses read the whole count.
5. Lower `rd_en`, change DL (and the FUT or data rate if needed), and repeat.

The count saturates at 65,535 and raises a `full` flag, which can be routed
to `out`. Very short DL values with long periods can exceed 16 bits: the
published data contains counts above 100,000. Choose T so the count stays
below the limit.

## Behavioural models: what the simulation can and cannot show

Metastability is an analog effect. The four flip-flops differ only at
transistor level:

* The regular cell is built from tri-state inverters.
* The TG, XOR and delayed XOR variants add a feedback path. It conducts only
  while the master latch sits at mid-rail and pushes it toward the current
  output.

A two-state logic simulator cannot represent a mid-rail node. So
`sync_ff_model` models the failure statistics rather than the circuit:

* A clock edge less than `TW_PS` (20 ps) after a data transition starts a
  metastable capture. q keeps its old value and settles after
  `TCQ_PS + Exp(τ)` to a random 0 or 1.
* Otherwise q follows d after `TCQ_PS` (100 ps).

Each flip-flop type is the same model with its own τ. The defaults are the
measured values: 101, 210, 148 and 168 ps. The window, the clock-to-Q delay
and the 50/50 final value are assumptions, not measured data. Only the setup
side of the window is modelled.

`delay_line` is a transport delay of `BASE_PS + STEP_PS · ones(code)`, by
default 1.0 ns plus up to 80 × 15 ps, which gives 1.0 to 2.2 ns. That covers
the 1.3 to 2.15 ns range over which the regular flip-flop was characterised.
The cell count and step size are this design's choice.

The model has a single exponential. Real measurements of the regular cell
fit better with two regions: a shorter τ (about 79 ps) at short delays and a
longer one (about 103 ps) at long delays. The model does not reproduce that
bend.

Both models use `#` delays and `$urandom`/`$ln`. They need `--timing` in
Verilator, and they are not synthesizable. Everything else is ordinary
synthesizable RTL, except the clock-gate latch, which is deliberate.

## Timing details worth knowing

* **The event flag glitches by design.** Between DL and the falling edge,
  `X xor Y` also goes high after every ordinary transition of q: X has the new
  value and Y still the old. The counter samples only at the rising edge, when
  both hold values from the same cycle, so these pulses are never counted.
  They do appear on `out` when `out_sel` = 2.
* **Late resolutions are missed.** A resolution after the falling edge is not
  counted. At a 160 ns clock period this is negligible, but it sets a limit on
  how fast `meas_clk` can run.
* **One data edge per clock edge at most.** At `fd_sel` = 0 the FUT data
  toggles on every rising edge of `data_ref`. With `data_ref` close to
  `meas_clk`, the data edges slide slowly past the clock edges (128 ps per
  cycle at 6.245 against 6.25 MHz). They land inside the window about once
  per beat period.
* **The X sample flip-flop can itself go metastable** when q changes right at
  DL. The real circuit has the same exposure. It is not modelled, because the
  sample flip-flops are plain RTL.

## Assumptions beyond the published description

The published description gives:

* the measuring method (delay line, X/Y samples, XOR, counter);
* the 16-bit counter width and the 90-bit configuration register length;
* the four flip-flop types and their measured τ;
* the clock and data frequencies;
* the pin count.

The following are this design's own choices:

* the pin functions;
* the configuration bit map;
* the ICG internals: clock gate and data divider;
* one-hot FUT selection;
* clear-on-start, enable synchronization and saturation of the counter;
* the readout protocol;
* the inputs of the output mux;
* all delay-line and flip-flop model parameters other than τ.

The reference clock sources (four frequencies from a PLL) and the
software-driven controller are off chip. The testbenches act as the
controller.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build any of them like this:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/meas_pkg.sv tb/tb_meta_meas_top.sv --top-module tb_meta_meas_top -o sim
./obj_dir/sim
```

| Testbench | What it shows |
|---|---|
| `tb_meta_meas_top` | End to end, driven through the pins. The data reference is phase-locked 5 ps ahead of the clock, so every edge is metastable, and τ is scaled ×4 so events are frequent. It measures all four flip-flops at DL = 1.0 and 1.6 ns, extracts τ with the formula above (within 20 %, ranking regular < XOR < delayed XOR < TG), and compares every readout with an independent reference model. It also checks the clock gate, data enable, data divider, counter saturation and all four output selections. |
| `tb_meta_meas_full` | One complete measurement at the default parameters: 6.25 MHz clock, 6.245 MHz data, regular FF, DL = 1.3 ns, 300,000 cycles. About 40 metastable captures occur. With τ = 101 ps none lasts 1.2 ns, so the count is 0, as it would be on silicon in 48 ms. |
| `tb_workload_dl_sweep` | The characterisation run of the regular flip-flop, scaled: τ = 404 ps, 8 ns window. It uses an unlocked 6.245 MHz data reference at all four data rates (`fd_sel` 0 to 3) and sweeps DL over 1.0, 1.3 and 1.6 ns. At each rate it fits τ by least squares and checks that τ does not depend on the data rate and that the event count scales with Fd. It runs in about 30 s. |
| `tb_sync_ff_model` | 4,000 metastable captures. It estimates τ from the mean resolution time (within 10 %) and checks that about half change q. |
| `tb_measuring_unit` | Places q transitions just before and after DL and after the falling edge, at four DL settings. |
| others | One per block: shift register, ICG, DUT unit, delay line, counter, serializer, output mux. |

To look at a different flip-flop design, change its entry in `TAU_PS` (top or
`dut_unit`). To shorten a run or make events more frequent, raise τ or `TW_PS`
on the top. Both only change the behavioural models.
