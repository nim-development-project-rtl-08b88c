# NIM+ two-channel coincidence logic

Nuclear and particle physics experiments have long built their trigger logic
from NIM modules: discriminators, coincidence units, scalers, each a physical
box in a crate whose settings are made by hand. NIM+ replaces such modules
with logic in an FPGA, so that the function lives in a design file that can be
copied, changed and fixed without touching hardware. This repository holds the
first NIM+ function: a two-channel coincidence unit with an OR output and an
AND (coincidence) output, as programmed into a Zynq FPGA on a ZedBoard and
compared there against a LeCroy NIM coincidence module.

## Signal chain

The FPGA logic is the last stage of a chain that is mostly analog and outside
this RTL:

```
pulse generator --+-- delay --+
                  |           |
PMT 1 -- discriminator -------+--> NIM->TTL level adapters --> ch_in[1:0] --> nimplus_top --> or_out
PMT 2 -- discriminator -------+                                                           --> and_out
```

Either a square-pulse generator (with a delay generator producing a second,
shifted copy of each pulse) or a pair of scintillators with photomultipliers
and discriminators produces NIM pulses (-0.7 V). Level adapters turn them into
+3.0 V TTL levels, which reach the FPGA as the two channels. None of the
instruments, the discriminators or the level adapters is logic, and none is
modelled here; the testbench generates the TTL pulses directly.

## How the outputs behave

`nimplus_top` is purely combinational:

| output    | high while                     |
|-----------|--------------------------------|
| `or_out`  | channel 1 **or** channel 2 is high |
| `and_out` | channel 1 **and** channel 2 are high |

There is no clock, no sampling and no state. This is the part of the design
that matters most when using it, because it differs from a classic NIM
coincidence unit:

* **Output width follows the inputs.** An input pulse of width *x* gives an OR
  pulse of width *x*. The AND pulse lasts exactly as long as the two inputs
  overlap, so two scintillator pulses that barely overlap give a very narrow
  AND pulse. A NIM coincidence unit instead emits a pulse of fixed width
  whenever its inputs coincide within a window. A clocked, fixed-width version
  of AND and OR is a natural next step but is not implemented here.
* **No minimum overlap in logic.** Any overlap, however short, drives
  `and_out`. On the board the measured decision time (the smallest overlap
  that still produces an AND) was about 6 ns, set by the I/O buffers and
  routing, not by this logic.
* **No rate limit in logic.** Non-overlapping input pulses always give
  separate, non-overlapping OR pulses and no AND pulse, at any rate. On the
  board this held for the pulse rates that could be generated (MHz range) and
  for 5 ns pulses, the shortest available.
* **Zero logic latency.** The RTL output edges coincide with the input edges.
  The measured board latency of about 25 ns (against about 15 ns for the NIM
  module) comes from input/output buffers and cables and is not modelled.
* **Input threshold.** The board responded to TTL inputs attenuated to 80 %
  but not to 50 %, i.e. a threshold somewhere between roughly +1.5 V and
  +2.5 V. That is an I/O-standard property, outside the RTL.

## Interface

```systemverilog
module nimplus_top #(parameter int unsigned N_CH = 2) (
    input  logic [N_CH-1:0] ch_in,   // bit 0 = channel 1, bit 1 = channel 2, active high TTL
    output logic            or_out,  // |ch_in
    output logic            and_out  // &ch_in
);
```

`N_CH` defaults to the two channels of the unit described here. Making it a
parameter, so the same module gives an N-fold coincidence, is an extension of
this RTL; all testing is at two channels. An elaboration-time assertion rejects
fewer than two channels.

When mapping to an FPGA, constrain the two inputs and two outputs to the pins
the level adapters and output cables connect to, with an I/O standard whose
input threshold suits +3.0 V TTL (e.g. LVCMOS33). Keep in mind that the
synthesis tool will see a pure pin-to-pin combinational path; no timing
constraint is needed beyond an optional max-delay on that path.

## Files

| file | content |
|------|---------|
| `rtl/nimplus_top.sv` | the coincidence logic |
| `tb/tb_nimplus_top.sv` | self-checking end-to-end testbench |

## Verification

`tb_nimplus_top` drives the two channels with time-resolved pulses (1 ns
edges, 100 ps resolution) and computes the expected outputs independently
from the pulse intervals: the OR output must trace the union of the two
intervals and the AND output their intersection, with edges at exactly the
same times as the inputs. It covers

* single pulses on each channel, including 5 ns pulses;
* two delayed, non-overlapping pulses (two OR pulses, no AND);
* overlapping pulses, nested pulses and pulses that overlap by only a few
  nanoseconds (narrow AND);
* a train of 40 alternating 5 ns pulses with 2 ns gaps (one OR pulse per
  input pulse, no AND);
* 300 random pulse pairs.

It also compares the output levels with the reference after every input
change, counts how often each of the behaviours above occurred and fails if
any never did. It ends with a line `TB_RESULT checks=N failures=M`; a
watchdog stops it after 200,000 ticks of 1 ns if it hangs. It runs the module
at its default parameters.

Run it with plain Verilator:

```sh
verilator --binary --timing --assert -Wall -Wno-fatal \
    --top-module tb_nimplus_top -y rtl tb/tb_nimplus_top.sv
./obj_dir/Vtb_nimplus_top
```

## Limits of this model

* Only the digital function is modelled. Latency, decision time, minimum
  pulse width and input threshold of a real board depend on the FPGA family,
  I/O standard, placement and cabling.
* The measurements above were taken on one board with instruments of limited
  resolution (5 ns pulse generator, 25 ns oscilloscope grid in the latency
  measurement) and should be read as rough figures.
* The fixed-width, clocked coincidence of a classic NIM unit, and the scaler
  that counts coincidences in the reference set-up, are not part of this
  design.
