# LPPN processor: noisy inner products from a deliberately mistimed sampling clock

Learning Parity with Noise (LPN) based authentication needs samples
`(x, <x,k> XOR e)`: the GF(2) inner product of a public challenge `x` with a
secret `k`, flipped with probability ε (here 0.25). A conventional design takes
`e` from a random number generator. An LPPN (Learning Parity with *Physical*
Noise) processor has no such generator. It samples the output of the
inner-product logic too early, while the output is still glitching, and the
wrong samples are the noise. The hardware's job is to hold that error rate at
the target while supply and temperature drift, and while an attacker pushes
the supply around.

This repository is SystemVerilog RTL for a 512-bit FPGA LPPN processor of this
kind, which was built on a Spartan-6. The logic is synthesizable. The parts
whose behaviour *is* their analog timing are behavioural models with
transport delays: the carry-chain delay line, the clock buffer, the
voltage-sensor delay line, and the settling of the XOR network. With those
models in place, the whole calibration loop can be simulated with Verilator.

## Block diagram

```
           x[511:0], k[511:0], dummy_in[127:0]        enable
                   |                                     |
        +----------v-----------------------------+       |
clk --->| inner_product                          |<------+
        |  x,k,dummy registers (load on enable)  |
        |  512 AND -> XOR1..XOR6 -> 8 partials   |
        |  dummy: 128-bit 7-layer parity d       |
        |  serial chain: d^x7^x6^...^x0^d = P    |
        |  P --FF(clk_del, en0_out)--> p_out ----+----------> p_out
        |  P --FF(clk_sk,  en1_out)--> p_out_corr|
        +----^------------^----------------------+
             |clk_del     |clk_sk
   +---------+--+   +-----+--------+        +-------------------------+
   | vdl        |   | clk_skew_buf |        | err_control_fsm         |
   | pre-delay  |   +--------------+        |  errors = p_out^corr    |
   | 64 taps    |<---- ctrl_err[5:0] -------|  7 batches x 1024       |--> locked
   | 64:1 mux   |                           |  SAR on CNTL, MSB first |--> p_valid
   +------------+                           +-----------^-------------+
                                                        | rst_v
 enable,vdd --> voltage_sensor --vt_sens[3:0]--> fault_detector (L, |diff|, > THRSH)
```

## The inner product and why its output glitches

`inner_product` registers `x`, `k` and the dummy string on the clock edge
where `enable` is high. `ip_parallel_stage` then computes the 512 products
`x & k` and folds them through six balanced layers of two-input XORs. This
leaves eight partial parities, where `s[i]` covers products `64i..64i+63`.
`serial_xor_chain` folds the eight partials in a deliberately unbalanced
chain: `s[7]^s[6]` first, then `s[5]` and so on, with `s[0]` last. The paths
to `P` therefore have very different lengths, and `P` toggles several times
before it settles. The parallel part keeps the error rate nearly independent
of the challenge's Hamming weight. The serial part supplies the glitches that
the early sampling clock catches. The most significant partial sums travel
the longest path.

The dummy circuit (`dummy_parity`, `USE_DUMMY = 1`, the default) is a
mitigation of *output* data dependence. The error rate of the base design
differs slightly depending on whether the correct result is 0 or 1. A 128-bit
parity tree has the same depth as the AND layer plus the six XOR layers, so
its output `d` arrives at the serial chain at the same time as the partials.
`d` is XORed in before the first serial gate and after the last one. The two
copies cancel, so the result is unchanged, but `d` adds glitches that do not
depend on the data. Set `USE_DUMMY = 0` for the base design.

`P` is sampled by two flip-flops:

* `p_out` is clocked by `clk_del`, the output of the variable delay line. It
  comes early and catches `P` while it glitches, so this is the noisy LPPN
  output.
* `p_out_corr` is clocked by `clk_sk`, a fixed buffered clock that comes
  after `P` has settled. It is used only during calibration. Once the
  processor is locked, its enable `en1_out` stays low, so the correct value
  is never captured again.

## Setting the error rate: delay line and calibration

This is the part that makes the design work. It needs the most care when
porting.

**Delay line (`vdl`, `vdl_tap_mux`).** `clk_del` is `clk` delayed by a
fixed pre-delay plus a programmable part:

* The pre-delay is 9 LUT buffers, about 6 ns. It covers the settling time of
  the parallel stage.
* The programmable part is a chain of 16 CARRY4 elements. Each element gives
  4 taps, so there are 64 taps about 30 ps apart, covering 0 to about 2 ns.
* The 6-bit word `CNTL` selects one tap through four multiplexer levels that
  map onto Xilinx slice resources:
  * a 4:1 LUT6 per carry element, on `CNTL[1:0]`;
  * MUXF7, on `CNTL[2]`;
  * MUXF8, on `CNTL[3]`;
  * a final 4:1 LUT6, on `CNTL[5:4]`.

The delay is `9*667 ps + (CNTL+1)*30 ps`. A larger `CNTL` samples later,
when `P` is closer to settled, and so gives fewer errors.

**Calibration (`err_control_fsm`).** After reset, or after a fault, `CNTL`
is 0 and `locked` is 0. The host sends requests with random challenges and
the real key. Each request is one evaluation. The controller XORs `p_out`
with `p_out_corr` and counts the errors in a 10-bit saturating counter.
Calibration runs 7 batches of 1024 evaluations:

| batch | CNTL used | decision at the end of the batch |
|---|---|---|
| 0 | 0 | none; set bit 5 (trial 32) |
| 1 | trial bit 5 | keep bit 5 if errors > 256; set bit 4 |
| 2..5 | trial bits 4..1 | keep the tried bit if errors > 256; set the next lower bit |
| 6 | trial bit 0 | keep bit 0 if errors > 256; **lock** |

This is a successive-approximation search. It finds the largest delay at
which the error rate is still above 1/4. In the end-to-end simulation with
the default models, the trials run 0, 32, 48, 40, 36, 34, 35 and the
processor locks at `CNTL` = 33 or 34, with a measured error rate of about
0.24.

**Locked operation.** Each request gives a new `p_out`. `p_valid` is high
for one cycle, on the clock cycle after the one in which `enable` was
sampled. One sample therefore takes two cycles: the request, then the
result. `enable` must be a single-cycle pulse followed by at least one low
cycle; an assertion checks this.

## Voltage sensor and fault detection

The calibrated delay holds only at the supply voltage it was calibrated at.
An attacker who lowers the supply slows the logic and changes the error
rate. The processor therefore measures the supply at every request:

* **`voltage_sensor`** is a time-to-digital converter:
  * The rising edge of `enable` runs down a 93-LUT delay line
    (`vs_delay_line`, behavioural).
  * Eight taps at uneven positions (31, 40, 49, 58, 66, 75, 84, 93) are
    captured on the clock edge that also loads `x` and `k`.
  * The thermometer code is turned into a count of ones, 0..8
    (`therm_encoder`).
  * One step is about 100 mV. In the model, tap `j` is reached when the
    supply is at least about `650 + 100*j` mV. At 1.2 V the count is 6.
* **`fault_detector`** latches the sensor value into register L when `locked`
  rises. For every later request it computes `|vt_sens - L|`. If that is more
  than `THRSH` = 1 step, it raises `rst_v` in the following cycle. `rst_v`
  clears the input registers and resets the controller: `locked` falls,
  `CNTL` returns to 0, and a new calibration is needed. The sample of the
  faulty request gets no `p_valid`.

With the default model, after calibrating at 1.2 V, a change to 1.25 V is
tolerated. A drop to 1.0 V (2 steps) or a rise to 1.4 V is detected.

## Behavioural models and what they assume

| module | stands for | model |
|---|---|---|
| `p_glitch_model` | propagation through AND/XOR network | `P` keeps its old value for 5.8 ns, then for 2.4 ns is redrawn every 30 ps, wrong with probability falling linearly from 1/2 to 0, then settles |
| `vdl` (delays only) | LUT buffers and CARRY4 chain | `assign #` delays of 667 ps and 30 ps |
| `clk_skew_buf` | clock buffer | 12 ns transport delay |
| `vs_delay_line` | 93-LUT sensor delay line | LUT delay = K / (VDD − 0.3 V), K set so the last tap is reached at 1.35 V in half a 13.56 MHz period |

These numbers are chosen, not measured. They are built so that the 64-tap
range spans error rates from about 0.45 down to about 0.05, with 0.25 near
the middle, like the prototype. In synthesis, `p_glitch_model` and the delays
disappear (wires), `vdl_tap_mux` remains, and the real delays come from
placement. On an FPGA, the delay line and sensor must be hand-placed (CARRY4
column, LUT chain), and the pre-delay must be tuned to the parallel stage's
real settling time.

The sensor model needs `enable` to rise half a clock period before the
sampling edge. The testbenches raise it on the falling clock edge. The
supply the sensor model sees is the top-level input `vdd_mv`, which exists
only for simulation.

## Masked configuration

Filtering attacks exploit the fact that the error rate depends slightly on
the correct output. Masking hides that output from the attacker. With
`SHARES = d` > 1, the secret is split into `d` random shares,
`k = k_1 ^ ... ^ k_d`:

* `k` carries `k_1`. Only this share goes through the noisy inner product,
  so calibration and the error rate are exactly as in the unmasked design.
* `k_mask` carries `k_2 .. k_d`. For each of them, `share_ip` computes the
  exact `<x, k_i>` from its own registered copy of `x` and the share.
* `p_out` is the noisy bit XORed with all the exact bits. This equals
  `<x,k>` plus the noise of the first share.

An attacker who filters on the output learns only the ephemeral, noisy
`<x,k_1>` through side channels. Producing and refreshing the shares is left
to the system around the processor. `tb_lppn_masked` runs this configuration
with three shares.

## Where this RTL departs from or goes beyond the prototype

* `rst_n` (asynchronous, active low) and `p_valid` are additions.
* The dummy string `dummy_in` is an input, registered with `x` and `k`. Its
  source, for example a fresh random string, is left to the integrator.
* "Reinitialise the inner product" on a fault is implemented as clearing the
  `x`, `k` and dummy registers.
* The sensor encoder counts ones. It is not a priority encoder.
* The comparison direction of the calibration ("keep the bit when errors >
  256") and the use of batch 0 as a measurement at `CNTL` = 0 with no
  decision are inferred. They reproduce the prototype's calibration trace.
* The prototype's throughput of 1.04 Mbit/s at 66.65 MHz corresponds to
  about 64 cycles per bit, which presumably includes loading `x` and `k`
  over a narrow interface. This core takes a request every 2 cycles. The
  loading interface is outside it.
* The prototype's sensor detects supplies below 0.8 V or above 1.3 V. With
  the assumed delay model, this one detects below about 0.95 V or above
  about 1.35 V after calibrating at 1.2 V. The tap positions of a real sensor
  must be set by measurement.
* Masked operation (`SHARES` > 1) is an option that the measured prototype
  did not have. The wiring of the extra shares is this design's own.

## Parameters (top level `lppn_processor`)

| parameter | default | meaning |
|---|---|---|
| `N` | 512 | secret / challenge width (multiple of 64) |
| `USE_DUMMY` | 1 | dummy parity bit in the serial chain |
| `DW` | 128 | dummy string width (2^7) |
| `NBATCH` | 1024 | evaluations per calibration batch |
| `NTARGET` | 256 | error count compared at the end of a batch |
| `THRSH` | 1 | tolerated sensor difference, in steps |
| `SHARES` | 1 | key shares; above 1 enables masking (see "Masked configuration") |

Shared constants are in `lppn_pkg`.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Example, the end-to-end test at full size
(about 15 s):

```
verilator --binary --timing --assert -Wno-fatal rtl/lppn_pkg.sv tb/tb_lppn_processor.sv \
    -y rtl --top-module tb_lppn_processor -o sim && ./obj_dir/sim
```

The same command with another `tb/tb_<module>.sv` runs one block's test.
`tb_lppn_processor` runs two complete calibrations and checks:

* each bit decision against its own count of wrong outputs;
* that lock comes after exactly 7168 requests;
* the locked error rate, which must be between 0.17 and 0.33;
* `p_valid` timing;
* that a small supply change is tolerated;
* fault detection on a supply drop and on the return to nominal;
* recalibration.

It prints how often each of these mechanisms happened.

## Files

* `rtl/lppn_processor.sv`: top level.
* `rtl/inner_product.sv`, `ip_parallel_stage.sv`, `serial_xor_chain.sv`,
  `dummy_parity.sv`: the inner product.
* `rtl/p_glitch_model.sv`: timing model of `P`.
* `rtl/vdl.sv`, `vdl_tap_mux.sv`, `clk_skew_buf.sv`: the sampling clocks.
* `rtl/voltage_sensor.sv`, `vs_delay_line.sv`, `therm_encoder.sv`,
  `fault_detector.sv`: supply monitoring.
* `rtl/err_control_fsm.sv`: calibration controller.
* `rtl/share_ip.sv`: exact inner product of one extra key share (masking).
* `rtl/lppn_pkg.sv`: shared constants and the controller state type.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_lppn_masked.sv`: end-to-end test of the masked configuration.
