// tb_nimplus_top -- end-to-end self-checking testbench for the NIM+ coincidence logic
//
// Drives the two TTL channels with the pulse patterns used to characterise
// the unit and checks the OR and AND outputs against values computed here
// from the pulse start and end times (union and intersection of intervals):
//   - two delayed, non-overlapping square pulses: two separate OR pulses of
//     the input widths, no AND pulse
//   - two overlapping square pulses: one OR pulse spanning both, one AND pulse
//     exactly as wide as the overlap
//   - two pulses that barely overlap (scintillator case): a narrow AND pulse
//   - 5 ns pulses on each channel: passed at full width
//   - a dense train of alternating, non-overlapping pulses: one OR pulse per
//     input pulse, never an AND
//   - random pulse pairs on integer-nanosecond edges
// Outputs are also compared with the reference after every input change, and
// output edges must coincide with the input edges that cause them (the logic
// adds no latency). Each mechanism is counted; one that never happened counts
// as a failure. The module runs at its default parameters (two channels).
// A free-running 1 ns tick drives the watchdog.
`timescale 1ns / 100ps
module tb_nimplus_top;

    logic [1:0] ch_in;
    logic       or_out;
    logic       and_out;

    nimplus_top dut (
        .ch_in  (ch_in),
        .or_out (or_out),
        .and_out(and_out)
    );

    int checks   = 0;
    int failures = 0;

    // mechanism counters
    int n_or_ch1_only   = 0;  // OR pulse caused by channel 1 alone
    int n_or_ch2_only   = 0;  // OR pulse caused by channel 2 alone
    int n_separate_or   = 0;  // disjoint inputs gave two separate OR pulses
    int n_coincidence   = 0;  // overlapping inputs gave an AND pulse
    int n_narrow_and    = 0;  // AND pulse narrower than 5 ns
    int n_no_and        = 0;  // disjoint inputs gave no AND pulse
    int n_min_width     = 0;  // a 5 ns input pulse passed at full width
    int n_high_rate     = 0;  // pulse train with one OR per input pulse

    task automatic check(input bit ok, input string what);
        checks++;
        if (!ok) begin
            failures++;
            $display("FAIL @%0t: %s", $realtime, what);
        end
    endtask

    // ---------------------------------------------------------------- tick
    logic tick = 1'b0;
    always #0.5 tick = ~tick;

    int unsigned cycles = 0;
    always @(posedge tick) cycles++;

    initial begin : watchdog
        repeat (200000) @(posedge tick);
        failures++;
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    // ------------------------------------------------------ output monitors
    realtime or_rise_t [$];
    realtime or_fall_t [$];
    realtime and_rise_t[$];
    realtime and_fall_t[$];

    always @(posedge or_out)  or_rise_t.push_back($realtime);
    always @(negedge or_out)  or_fall_t.push_back($realtime);
    always @(posedge and_out) and_rise_t.push_back($realtime);
    always @(negedge and_out) and_fall_t.push_back($realtime);

    // continuous comparison against the reference after every input change
    always @(ch_in) begin
        logic ref_or, ref_and;
        #0.1;
        ref_or  = (ch_in[0] == 1'b1) || (ch_in[1] == 1'b1);
        ref_and = (ch_in[0] == 1'b1) && (ch_in[1] == 1'b1);
        check(or_out == ref_or && and_out == ref_and,
              $sformatf("levels ch=%b or=%b and=%b", ch_in, or_out, and_out));
    end

    // ----------------------------------------------------- stimulus helpers
    // One pulse on a channel: rises `start` ns after the call, lasts `width` ns.
    task automatic pulse(input int ch, input int start, input int width);
        #(start);
        ch_in[ch] = 1'b1;
        #(width);
        ch_in[ch] = 1'b0;
    endtask

    // Applies one pulse per channel, relative to the same origin, then idles
    // and checks the recorded output pulses against the interval arithmetic.
    // Edges of the two channels never coincide (callers keep them apart).
    task automatic pulse_pair(input int s1, input int w1, input int s2, input int w2);
        realtime t0;
        int e1, e2, ov_lo, ov_hi, overlap;
        or_rise_t.delete();  or_fall_t.delete();
        and_rise_t.delete(); and_fall_t.delete();
        t0 = $realtime;
        fork
            pulse(0, s1, w1);
            pulse(1, s2, w2);
        join
        #20;
        e1      = s1 + w1;
        e2      = s2 + w2;
        ov_lo   = (s1 > s2) ? s1 : s2;
        ov_hi   = (e1 < e2) ? e1 : e2;
        overlap = ov_hi - ov_lo;
        if (overlap > 0) begin
            // one OR pulse over the union, one AND pulse over the intersection
            int u_lo = (s1 < s2) ? s1 : s2;
            int u_hi = (e1 > e2) ? e1 : e2;
            check(or_rise_t.size() == 1 && or_fall_t.size() == 1,
                  $sformatf("overlap: %0d OR pulses, expected 1", or_rise_t.size()));
            check(and_rise_t.size() == 1 && and_fall_t.size() == 1,
                  $sformatf("overlap: %0d AND pulses, expected 1", and_rise_t.size()));
            if (or_rise_t.size() == 1 && or_fall_t.size() == 1) begin
                check(or_rise_t[0] - t0 == u_lo, "OR rises with the first input edge");
                check(or_fall_t[0] - t0 == u_hi, "OR falls with the last input edge");
            end
            if (and_rise_t.size() == 1 && and_fall_t.size() == 1) begin
                check(and_rise_t[0] - t0 == ov_lo, "AND rises when the overlap starts");
                check(and_fall_t[0] - t0 == ov_hi, "AND falls when the overlap ends");
                check(and_fall_t[0] - and_rise_t[0] == overlap,
                      $sformatf("AND width %0t, expected %0d", and_fall_t[0] - and_rise_t[0], overlap));
                if (and_fall_t[0] - and_rise_t[0] == overlap) begin
                    n_coincidence++;
                    if (overlap < 5) n_narrow_and++;
                end
            end
        end else begin
            // two separate OR pulses with the input widths, no AND
            int f_s = (s1 < s2) ? s1 : s2;
            int f_w = (s1 < s2) ? w1 : w2;
            int l_s = (s1 < s2) ? s2 : s1;
            int l_w = (s1 < s2) ? w2 : w1;
            check(or_rise_t.size() == 2 && or_fall_t.size() == 2,
                  $sformatf("disjoint: %0d OR pulses, expected 2", or_rise_t.size()));
            check(and_rise_t.size() == 0,
                  $sformatf("disjoint: %0d AND pulses, expected 0", and_rise_t.size()));
            if (and_rise_t.size() == 0) n_no_and++;
            if (or_rise_t.size() == 2 && or_fall_t.size() == 2) begin
                check(or_rise_t[0] - t0 == f_s && or_fall_t[0] - or_rise_t[0] == f_w,
                      "first OR pulse position and width");
                check(or_rise_t[1] - t0 == l_s && or_fall_t[1] - or_rise_t[1] == l_w,
                      "second OR pulse position and width");
                if (or_fall_t[0] - or_rise_t[0] == f_w && or_fall_t[1] - or_rise_t[1] == l_w)
                    n_separate_or++;
            end
        end
    endtask

    // A single pulse on one channel only: OR follows it exactly, AND stays low.
    task automatic single(input int ch, input int width);
        realtime t0;
        or_rise_t.delete();  or_fall_t.delete();
        and_rise_t.delete(); and_fall_t.delete();
        t0 = $realtime;
        pulse(ch, 3, width);
        #10;
        check(or_rise_t.size() == 1 && or_fall_t.size() == 1,
              $sformatf("single ch%0d: %0d OR pulses", ch + 1, or_rise_t.size()));
        check(and_rise_t.size() == 0, "single channel must not give AND");
        if (or_rise_t.size() == 1 && or_fall_t.size() == 1) begin
            check(or_rise_t[0] - t0 == 3, "OR latency from input edge is zero");
            check(or_fall_t[0] - or_rise_t[0] == width,
                  $sformatf("OR width %0t, expected %0d", or_fall_t[0] - or_rise_t[0], width));
            if (or_fall_t[0] - or_rise_t[0] == width) begin
                if (ch == 0) n_or_ch1_only++; else n_or_ch2_only++;
                if (width == 5) n_min_width++;
            end
        end
    endtask

    // --------------------------------------------------------------- main
    initial begin : main
        int unsigned seed;
        ch_in = 2'b00;
        #10;
        check(or_out == 1'b0 && and_out == 1'b0, "outputs idle low");

        // single-channel pulses, including the 5 ns minimum width
        single(0, 25);
        single(1, 25);
        single(0, 5);
        single(1, 5);

        // delayed, non-overlapping square pulses: two ORs, no AND
        pulse_pair(0, 20, 45, 20);
        // overlapping square pulses: coincidence over the overlap
        pulse_pair(0, 40, 5, 45);
        pulse_pair(10, 30, 0, 30);
        // pulses that barely overlap: narrow AND
        pulse_pair(0, 30, 28, 30);
        pulse_pair(0, 6, 3, 6);
        // one pulse nested inside the other
        pulse_pair(0, 50, 10, 10);

        // dense train of alternating, non-overlapping 5 ns pulses
        begin
            int n_pulses;
            n_pulses = 40;
            or_rise_t.delete();  or_fall_t.delete();
            and_rise_t.delete(); and_fall_t.delete();
            for (int i = 0; i < n_pulses; i++) pulse(i % 2, 2, 5);
            #10;
            check(or_rise_t.size() == n_pulses && or_fall_t.size() == n_pulses,
                  $sformatf("train: %0d OR pulses for %0d inputs", or_rise_t.size(), n_pulses));
            check(and_rise_t.size() == 0, "train: no AND pulse");
            if (or_rise_t.size() == n_pulses && and_rise_t.size() == 0) n_high_rate++;
        end

        // random pulse pairs on integer-ns edges, edges of the two channels
        // kept at least 1 ns apart
        seed = 32'h1234_5678;
        void'($urandom(seed));
        for (int i = 0; i < 300; i++) begin
            int s1, w1, s2, w2;
            bit ok;
            do begin
                s1 = $urandom_range(0, 40);
                w1 = $urandom_range(1, 40);
                s2 = $urandom_range(0, 40);
                w2 = $urandom_range(1, 40);
                ok = (s1 != s2) && (s1 != s2 + w2) && (s1 + w1 != s2) && (s1 + w1 != s2 + w2);
            end while (!ok);
            pulse_pair(s1, w1, s2, w2);
        end

        // every mechanism must have been exercised
        check(n_or_ch1_only > 0, "mechanism: OR from channel 1 alone");
        check(n_or_ch2_only > 0, "mechanism: OR from channel 2 alone");
        check(n_separate_or > 0, "mechanism: separate ORs for disjoint inputs");
        check(n_coincidence > 0, "mechanism: AND coincidence");
        check(n_narrow_and  > 0, "mechanism: narrow AND from a small overlap");
        check(n_no_and      > 0, "mechanism: no AND for disjoint inputs");
        check(n_min_width   > 0, "mechanism: 5 ns pulse passed");
        check(n_high_rate   > 0, "mechanism: high-rate pulse train");
        $display("mechanisms: or_ch1=%0d or_ch2=%0d separate_or=%0d coincidence=%0d narrow_and=%0d no_and=%0d min_width=%0d high_rate=%0d",
                 n_or_ch1_only, n_or_ch2_only, n_separate_or, n_coincidence,
                 n_narrow_and, n_no_and, n_min_width, n_high_rate);
        $display("simulated %0d ns", cycles);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

endmodule
