# VLA-1 / VLA-2: a 3-level digital correlator and its integrator

A digital cross-correlator for radio astronomy multiplies two coarsely
quantized signals sample by sample and adds up the products over a long
integration. This RTL models a pair of small custom chips built for that job
in the Very Large Array correlator:

* **VLA-1**, a dual 3-level x 3-level correlator. Each of its two sections
  takes one sample from each of two signals per clock (100 MHz on the real
  part) and adds their product into a tiny 2-stage counter.
* **VLA-2**, a 12-stage integrator. It counts how often the VLA-1 counter
  overflows. A 12-bit shift register lets the result of one integration be
  read out serially while the next integration is already running.

The main idea is a division of labour. All per-sample arithmetic happens in
two fast flip-flops per section. Only every fourth count leaves the fast chip,
as one edge on one wire. The slow, wide counting is done by the cheap
integrator chip.

## The offset product

Each signal is quantized to three levels and carried on two wires, `+X` and
`-X`:

| `{+X,-X}` | meaning          | value |
|-----------|------------------|-------|
| `10`      | above `+v0`      | +1    |
| `00`      | between the two  | 0     |
| `01`      | below `-v0`      | -1    |
| `11`      | not used         | -     |

The product of two such samples is -1, 0 or +1. To keep the counters
up-only, the correlator adds **product + 1**, called the offset product here:

|            | y = `01` | y = `00` | y = `10` |
|------------|----------|----------|----------|
| x = `01`   | 2        | 1        | 0        |
| x = `00`   | 1        | 1        | 1        |
| x = `10`   | 0        | 1        | 2        |

Uncorrelated signals therefore add about 1 per sample. The correlation is
recovered later as (sum - N) / N.

### Adding it with two T flip-flops

Each section has a 2-bit counter made of toggle flip-flops: `QA` is the LSB
and `QB` the MSB. There are three cases:

* Adding 1 toggles `QA`, and toggles `QB` when `QA` was 1.
* Adding 2 toggles `QB` only.
* Adding 0 changes nothing.

From this the toggle inputs follow directly:

```
T_QA = NOR(+x, -x) | NOR(+y, -y)                 -- either sample is 0: add 1
T_QB = QA & T_QA | (+x & +y) | (-x & -y)         -- carry, or equal signs: add 2
```

`vla1_corr_section` implements exactly these two equations and two flip-flops.
The flip-flops have an asynchronous, active-high reset. The dual chip
`vla1_dual_correlator` has two sections:

* Section 1 correlates A with B. Its `QB` is output 1.
* Section 2 correlates B with C. Its second stage, `QD`, is output 2.

The two sections share the B inputs, the clock and the reset. The first
stages (`QA`, `QC`) have no pins.

## How the sum is split between the chips

Each VLA-1 output is bit 1 of its running sum. That bit falls once every four
counts, and the VLA-2 counts falling edges. So for one channel:

```
S = 4 * (VLA-2 count) + 2 * QB + QA
```

Consequences worth knowing:

* **Resolution.** Only `QB` is visible outside the chip. The readout
  therefore gives the sum in units of 4; the remainder is at most 3.
* **Capacity.** There are 2 + 12 = 14 stages, which hold sums up to 16383.
  This is 8191 products even if every one is the maximum of 2, and about
  16000 products of uncorrelated data. 8192 all-maximum products wrap to
  exactly 0.
* **Rate.** A section adds at most 2 per clock, so its output falls at most
  once every two clocks. At a 100 MHz sample clock the output is therefore a
  50 MHz square wave at worst, which is the integrator's specified counter
  clock.
* **Reset edge.** Resetting the VLA-1 while `QB` is 1 makes the output fall,
  and the VLA-2 counts that fall. The testbenches model this. A system would
  reset the correlator and then clear the integrators.

## The integrator and its readout

`vla2_integrator` holds three parts:

* `vla2_counter`, a 12-bit counter on the falling edge of `counter_clk`, with
  an asynchronous clear.
* `vla2_shift_register`, a 12-bit parallel-in serial-out register.
* Two AND gates that decode the `mode` pin against the shift clock.

| `mode` | `shift_clk` | action                                   |
|--------|-------------|------------------------------------------|
| 1      | 1           | parallel load: register <= counter       |
| 1      | 0           | clear the counter                        |
| 0      | rising edge | shift one place, MSB out first           |

A readout follows the timing diagram of the real part:

1. The counter goes idle after its last edge.
2. Raise `shift_clk`, then raise `mode`. This loads the register.
3. Drop `shift_clk`. This clears the counter.
4. Drop `mode`.

Steps 1 to 4 must take under 600 ns. The MSB is now on `register_out`. Each
of the next 11 rising shift-clock edges brings the next lower bit, at up to
5 MHz (4 MHz in the timing spec). Meanwhile the counter is free and
integrates the next period. Bits clocked into `serial_in` come out after the
word, so several chips can share one serial line.

`counter_out` is the counter MSB. It falls at every overflow (4096) and
whenever a count of 2048 or more is cleared.

## The socket: `vla_correlator_top`

The top is one VLA-1 with its two outputs each driving a chain of `CASCADE`
VLA-2 chips. The default is `CASCADE = 1`: one integrator per channel, which
is the chips' intended pairing of one dual correlator with one 16-pin socket
holding two VLA-2s. The following are this design's own choices, since the
chip specifications define only single chips:

* **Cascading.** Within a channel, the counter MSB of one VLA-2 clocks the
  next one. Each extra chip adds 12 bits to the count.
* **Serial chain.** Chip `i` of the list (channel 1 stages 0..CASCADE-1, then
  channel 2 stages 0..CASCADE-1) takes its serial input from chip `i-1`. The
  first chip takes it from the top's `serial_in`. The top's `serial_out` is
  the register of the last chip.
* **Readout order.** The bits arrive as one big MSB-first number:
  `{channel 2 count, channel 1 count}`, each `12*CASCADE` bits wide.
* **Shared controls.** `mode` and `shift_clk` are shared, so all chips load,
  clear and shift together.

Ports: `clk`, `reset` (VLA-1), `a`, `b`, `c` (`vla_pkg::tri_sample_t`, fields
`pos`/`neg`), `mode`, `shift_clk`, `serial_in`, `serial_out`, `corr_out[1:0]`
(the VLA-1 outputs), and `counter_out[1:0]` (the MSB of the last integrator of
each channel).

## Files

| file | contents |
|------|----------|
| `rtl/vla_pkg.sv` | sample struct and its three codes, `VLA2_BITS = 12` |
| `rtl/vla1_corr_section.sv` | one correlator section (T_QA/T_QB, QA, QB) |
| `rtl/vla1_dual_correlator.sv` | VLA-1: two sections, shared B, clock, reset |
| `rtl/vla2_counter.sv` | 12-bit falling-edge counter with asynchronous clear |
| `rtl/vla2_shift_register.sv` | 12-bit PISO register with asynchronous load |
| `rtl/vla2_integrator.sv` | VLA-2: counter, register, mode decode |
| `rtl/vla_correlator_top.sv` | one VLA-1 feeding `2*CASCADE` VLA-2 chips |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_vla_full_size` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. A watchdog ends any run that hangs. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl rtl/vla_pkg.sv \
    tb/tb_vla_correlator_top.sv --top-module tb_vla_correlator_top
./obj_dir/Vtb_vla_correlator_top
```

Replace the testbench name to run another. The package goes first; Verilator
finds the other modules through `-Irtl`. The RTL has no timescale of its own;
`--timescale` gives it the testbenches' 1 ns unit.

| testbench | what it checks |
|-----------|----------------|
| `tb_vla1_corr_section` | random samples; `{QB,QA}` = running offset-product sum mod 4 after each clock; asynchronous reset |
| `tb_vla1_dual_correlator` | both outputs against A x B and B x C sums; at full correlation each output toggles every clock (100 falls in 200 clocks) |
| `tb_vla2_counter` | no count on rising edges, +1 on falling edges, overflow at 4096 and MSB fall, asynchronous clear |
| `tb_vla2_shift_register` | loads from all-zeros, all-ones and arbitrary states; MSB-first output; serial input passes through |
| `tb_vla2_integrator` | integrations of up to 6000 pulses; spec readout sequence under 600 ns; 4 MHz shifting while counting; counter-output falls |
| `tb_vla_correlator_top` | end to end on two copies (CASCADE = 1 and 2); every readout bit against a reference built from sample values; counts increment 0/1/2, reset, overflow, cascade carry, load, clear, counting while shifting and serial pass-through, and fails if any never happens |
| `tb_vla_full_size` | default top: 8192 random products, 8191 maximum products (word 4095), 8192 maximum products (wraps to 0); integration takes exactly one clock per product |

All reference values come from the signed sample values (product + 1), not
from the gate equations. They are independent of the RTL.

## How far this follows the chips, and where it departs

Taken from the chip specifications:

* The 3-level encoding and the offset table.
* The T flip-flop equations and gate network.
* The asynchronous reset to LOW.
* The pairing of the inputs (A x B, B x C) and the output pins.
* The 12-bit counter that counts falling edges and overflows at 4096.
* The mode/shift-clock decode, and the MSB-first serial readout with a
  serial input.

Modelling choices and limits:

* **Electrical parts are not modelled.** This covers the ECL input
  receivers, the ECL-to-TTL output converters, supply voltages, setup and
  hold times, pulse widths and propagation delays. The logic of the level
  converters is the identity.
* **The ripple counter is modelled as a synchronous counter** on the
  falling edge. After the ripple settles, the values are the same.
  Intermediate ripple states and the ripple time are not modelled.
* **Parallel load.** The specification loads the register "from a known
  state" (all ones or all zeros), which suggests a set-only or clear-only
  load. This model loads every bit, which gives the same result.
* **Load in simulation vs. synthesis.** In simulation the load takes the
  counter value when `load` rises. A synthesized asynchronous-load
  flip-flop follows the counter while `load` is high. The two agree when the
  counter is idle during the load, which the readout timing requires anyway.
* **Input code `11`.** The chip table leaves it as "don't care". The RTL
  applies the same equations to it. An assertion in
  `vla1_corr_section` reports it in simulation, and no testbench drives it.
* **Clear and load** are treated as level-sensitive, asynchronous inputs.
* **Chip-level choices.** Cascading, the serial chain order and the
  `CASCADE` parameter belong to this design, not to the chips.
* **Not built.** The samplers in front of the correlator and the full
  telescope correlator (16 frequency channels on 351 baselines, 11,232
  correlators, recirculating) are not built. Only their size is known;
  5616 sockets of this kind would provide 11,232 correlators.

Lint notes: Verilator reports the three sample constants in `vla_pkg` as
unused in modules that do not reference them. They are used by the
testbenches. It also notes that `reset` drives both the asynchronous reset of
the correlator flip-flops and the `disable iff` of the input-code assertion;
that second use is simulation-only.

## Changing it

* `VLA2_BITS` in `vla_pkg` (or `WIDTH` on the VLA-2 modules) sets the
  integrator width.
* `CASCADE` on the top sets the number of integrators per channel. The
  serial word grows to `24 * CASCADE` bits.
* To build a wider system, instantiate several tops and chain their
  `serial_out` into the next top's `serial_in`. Drive all of them from one
  shared `mode` and `shift_clk`.
