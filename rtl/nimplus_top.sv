// nimplus_top -- NIM+ two-channel coincidence logic (OR and AND outputs)
//
// A programmable replacement for a NIM coincidence module. Detector or pulse
// generator signals arrive as TTL levels (the NIM-to-TTL level adapters sit
// outside this logic) on ch_in. Two outputs are produced:
//   or_out  - high while at least one channel is high
//   and_out - high while every channel is high (coincidence)
//
// How it works: both outputs are continuous, i.e. pure combinational
// functions of the inputs with no clock, no sampling and no state. An input
// pulse of width x therefore yields an output pulse of width x, an AND output
// lasts exactly as long as the inputs overlap, and two inputs that do not
// overlap give two separate OR pulses and no AND pulse. This follows the
// document's description of the implemented design; the fixed-width, clocked
// coincidence window of a classic NIM coincidence unit is described there only
// as future work and is not part of this module.
//
// Interface:
//   ch_in[N_CH-1:0]  TTL input channels, bit 0 = channel 1, bit 1 = channel 2
//   or_out, and_out  TTL outputs
//
// Timing: zero logic latency in the RTL. The latency (about 25 ns), decision
// time (about 6 ns) and minimum input width (at most 5 ns) measured on the
// board come from I/O buffers, routing and cables, not from this logic, and are
// not modelled.
//
// The channel count N_CH defaults to the document's two channels; making it a
// parameter (for wider coincidences) is this design's own choice.
module nimplus_top #(
    parameter int unsigned N_CH = 2
) (
    input  logic [N_CH-1:0] ch_in,
    output logic            or_out,
    output logic            and_out
);

    always_comb begin
        or_out  = |ch_in;
        and_out = &ch_in;
    end

    initial begin
        assert (N_CH >= 2)
            else $error("nimplus_top: a coincidence needs at least two channels");
    end

endmodule
