# All-digital electromigration monitor based on bit-error-rate tracking

Electromigration (EM) slowly voids the copper of an interconnect under DC
current, and the wire's resistance rises, either in one abrupt step or
gradually. The usual way to follow this is to measure the resistance of each
stressed wire with four-wire Kelvin sensing. This design takes a different
route: it puts the wires inside a real signal path and measures how often that
path delivers a wrong bit. A rising wire resistance slows the path. Once a
transition needs more than one clock period, the receiving flip-flop catches
the old value and an error is counted. The bit-error rate (BER) against clock
frequency then shows the wire's degradation directly as lost transmission
capability, using nothing but digital circuits.

The RTL models a test chip with two arrays of 48 datapaths (96 in total). Each
datapath is five identical stages, each a tri-state buffer driving a
minimum-width M3 wire. A reference path (one buffer) carries the same bit
stream. Local samplers compare the two, and each array's counters collect the
errors of the selected path, with data '0' and data '1' errors counted
separately. Stress drivers at both ends of every wire push a DC current
through the wire. Metal heaters above the wires supply the stress temperature.

## How an error is produced and counted

Each array runs from its own ring VCO. The pattern generator is a 32-bit
circular shift register. It moves one position every **second** clock, so one
data bit lasts two clock periods and the data rate is half the clock rate.
During the first clock of each bit the generator raises a sample strobe.

```
clock edge     k (launch)      k+1 (sample)          k+2 (counter)
pattern bit    new bit out --> REF, DUT captured --> err strobe counted
```

* The bit launched at edge k goes through the reference buffer (20 ps) and
  through the five DUT stages.
* At edge k+1 the `ber_sampler` of every group captures both outputs as REF
  and DUT.
* For one clock it then drives `err1 = REF & ~DUT` (a '1' that arrived as '0')
  and `err0 = ~REF & DUT` (a '0' that arrived as '1'). Both are gated by the
  path's measure enable.
* The strobes of all 48 groups are OR-ed. At edge k+2 they increment the
  array's two 10-bit counters, but only while the error window is open.

A path is therefore error-free while its edge delay is below one clock period
(about 546 ps at the 800 mV default VCO supply). Between one and two periods,
every transition of that polarity is an error. The data '0' and data '1'
counts differ because the buffers pull up and pull down through different
transistors. The model gives each stage a separate rise and fall delay for
this reason.

The BER of a window of `W` seconds at VCO frequency `f` is

```
BER = (err0_cnt + err1_cnt) / (0.5 * f * W)
```

The factor 0.5 is the half-rate data. The denominator counts bits sent. For a
per-polarity rate, divide a single counter by the number of bits of that value
sent. The BER saturates at the fraction of bits that are transitions: 1 for
`0101...`, 0.5 for `0011...` and 0.25 for `00001111...`. Errors can only
happen where the data changes.

## Control: the scan chain

All static control sits in one scan chain through both arrays, array 0 first.
Each scan cell is a pair of flip-flops: a master on `scan_phi1` and a slave on
`scan_phi2`. One PHI1 pulse followed by one PHI2 pulse shifts the chain by one
cell. The phases never overlap, so the shift has no hold-time race, even when
the devices are slow at stress temperature. An assertion flags overlapping
phases. Within one array, counting from the array's scan input:

| cells               | content                                              |
|---------------------|------------------------------------------------------|
| 0 .. 31             | pattern bits 0..31 (bit 31 is sent first)            |
| 32                  | stress polarity (0: receiver end high, driver end low)|
| 33 .. 33+N-1        | stress select of path 0..N-1                         |
| 33+N .. 33+2N-1     | measure enable (MEAS_EN) of path 0..N-1              |

With N = 48 that is 129 cells per array and 258 in the chain. To leave word
`w` in the chain, shift `w[257]` first. Cell `a*129 + i` is cell `i` of array
`a`. The cells have no shadow latches, so the controls change during the
shift. Shift with the VCOs off or the window closed. `em_ber_pkg` has the
index functions (`pat_idx`, `pol_idx`, `stress_idx`, `meas_idx`).

* **Measure enable**: selects the path whose errors reach the counters. Only
  one path per array may be enabled while the window is open. The OR of the
  error strobes would otherwise mix two paths, and an assertion in `mon_array`
  checks this.
* **Stress select**: turns the path's functional tri-state drivers off and the
  stress drivers on. Any number of paths can be stressed together. A stressed
  path never reports errors, even with its measure enable set.
* **Pattern load**: `pat_load` copies cells 0..31 into the pattern register.
  It is synchronised to the VCO clock, so hold it for a few clocks. Playback
  starts when it is released.

## Bench sequence

A stress/measure cycle as the testbench drives it:

1. Scan in the patterns, MEAS_EN for one path per array, and no stress.
2. Enable the VCOs (`vco_en`) at the wanted supply (`vco_vdd_mv`), pulse
   `pat_load` and wait a few clocks.
3. For each measurement: pulse `cnt_clr`, raise `win_en` for the window, lower
   it, wait a few clocks for the synchroniser and the ripple counter to settle,
   then read `err0_cnt`/`err1_cnt`. Sweep the VCO supply to trace BER against
   frequency.
4. Stress: scan in the stress selects and polarity, and switch the VCOs off.
   The measurement side is powered down while wires are stressed.
5. Clear the stress selects, and measure again.

Windows must keep counts below 1024. The counters wrap, and nothing flags an
overflow. At 1.8 GHz and saturated BER that means windows up to about 1.1 µs.
Long windows (seconds) are only meaningful at low BER.

## Module map

| module           | kind        | role |
|------------------|-------------|------|
| `em_ber_pkg`     | package     | default sizes, `path_ctrl_t`, `err_pair_t`, scan layout functions |
| `em_ber_monitor` | RTL, top    | `N_ARRAYS` arrays on one scan chain |
| `mon_array`      | RTL         | scan segment, measurement circuit, `N_PATHS` DUT groups, error OR |
| `meas_circuit`   | RTL         | VCO, pattern generator, window/load synchronisers, two counters |
| `pattern_gen`    | RTL         | 32-bit circular register, half-rate, sample strobe |
| `err_counter`    | RTL         | 10-bit ripple counter, first stage enabled per clock |
| `scan_chain`     | RTL         | two-phase master/slave scan cells |
| `dut_group`      | RTL         | reference buffer, DUT path, sampler, stress/measure gating |
| `ber_sampler`    | RTL         | REF/DUT capture and the two error strobes |
| `ring_vco`       | model       | 7-stage ring, delay `K/(Vdd-Vth)` per stage |
| `ic_datapath`    | model       | five buffer+wire stages with rise/fall delays, two-ended stress drivers |
| `ref_buffer`     | model       | reference buffer, fixed delay |

Default parameters: `N_ARRAYS=2`, `N_PATHS=48`, `N_STAGES=5`, `PAT_W=32`,
`CNT_W=10`, `VCO_STAGES=7`.

## Behavioural models and what they stand for

Three parts are analog and are written as behavioural models with `#` delays.
They simulate, but they do not synthesise to anything meaningful.

* `ring_vco`: a real ring of seven inverting stages, with a NAND enable in
  stage 0. The ring's supply is an integer in millivolts. The per-stage delay
  is `19841 / (Vdd - 300)` ps. This gives 1.83 GHz at 800 mV, near the
  1.8 GHz used for the measurements, and the ring stops below 300 mV. The
  real oscillator is cross-coupled; the model is single-ended. The delay law
  is a stand-in; fit it to your own VCO's characterisation. Synthesis reports
  the ring as a combinational loop, as expected.
* `ic_datapath`: the wire's resistance enters only as a delay. The ports
  `rise_ps`/`fall_ps` (per path, at the top level) give the delay of one stage
  for each edge. A testbench raises them over "stress time" to mimic EM. These
  ports are simulation hooks, not chip pins. In stress mode the output shows
  the receiver-end level set by the stress drivers. The stress current itself,
  and hence EM, is not modelled.
* `ref_buffer`: a 20 ps buffer.

The metal heaters are not in the RTL. They are three serpentine M6 resistors
driven and sensed from bare pads by external source-measure units. Neither is
the bench controller that regulates the heater temperature in software and
computes BER.

## Where this RTL makes its own choices

The chip's organisation, sizes, the half-rate pattern, the REF/DUT error
logic, the ripple counters, the two-phase scan and the stress/measure controls
follow the design described for the chip. The following are choices of this
implementation:

* 48 paths in each array. Only the chip total (96) and the two arrays are
  given.
* One scan chain, with the cell order in the table above. MEAS_EN and the
  stress select are one scan bit per path. Stress polarity is one bit per
  array.
* Each bit is sampled once, on the edge after launch. This keeps the count to
  at most one error per bit, which matches the half-rate BER formula.
* The counter's first stage is clocked by the VCO with an enable, and the
  higher bits ripple. The counter has an asynchronous clear and wraps with no
  overflow flag.
* Two-flop synchronisers on `win_en` and `pat_load`.
* An asynchronous power-on reset `rst_n` for all flip-flops.
* Stress blocks measurement of the same path.
* Each array has its own VCO, window, load and clear pins. The VCO clock is
  brought out directly for frequency characterisation; no divider is
  included.

## Simulating

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Example with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/em_ber_pkg.sv tb/tb_em_ber_monitor.sv --top-module tb_em_ber_monitor
./obj_dir/Vtb_em_ber_monitor
```

`tb_em_ber_monitor` runs the whole chip at default size in a few seconds. It:

* scans the control words and reads them back;
* measures a slow-rise path (data '1' errors, alternating pattern) and a
  slow-fall path (data '0' errors, `0011` pattern);
* wraps a counter;
* lowers the VCO supply until the slow path passes;
* stresses eight paths in both polarities with the VCOs off, and checks that
  a stressed path reports nothing;
* "degrades" a clean path and sees its BER jump.

It checks each expected count against the window length, and that every one
of these mechanisms actually occurred.

`tb_ber_workloads` runs the chip's three measurement workloads at default size
(about 80 s of simulation):

* **BER against frequency.** The VCO supply is swept over a 500 ps path.
  There are no errors while the period exceeds 500 ps, and every transition
  fails once it does not. A path with a slower rising edge fails for data '1'
  at a lower frequency than for data '0'.
* **Patterns.** On a slow path the BER saturates at 1, 1/2, 1/4 and 1/8 for
  the patterns with runs of 1, 2, 4 and 8 equal bits.
* **Stress cycles.** Eight paths are stressed in parallel with the VCOs off.
  Between cycles, four of them get abrupt or progressive delay increases.
  Each of the four is then re-characterised by searching for the highest
  error-free VCO supply. That operating point has to match the one predicted
  from the delay, and it must never rise.

The remaining testbenches each cover one module on its own
(`tb_<module>.sv`).

Each measurement line of the top-level test prints the BER by the formula
above. Example: 200 data '1' errors in an 800-clock window with the
alternating pattern is 200 errors in 400 bits, i.e. every rising transition
failed.
