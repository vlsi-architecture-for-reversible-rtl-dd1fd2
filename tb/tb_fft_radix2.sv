// tb_fft_radix2: end-to-end test of the FFT top at its default size
// (8 points, 8-bit inputs, DKG adder/subtractors).
//
// The default fft_radix2 sits inside fft_harness, which applies impulses
// at every position, DC, the extreme inputs and random complex vectors, and
// compares each transform with a recursive reference FFT (bit exact) and
// with the exact DFT (within rounding). Each mechanism of the design must
// occur at least once: non-trivial twiddle products that round, outputs
// that use the growth bits, and outputs that need the guard bit.
module tb_fft_radix2;
  logic start = 1'b0, done;
  int   checks, failures, n_rounded, n_grown, n_guard;
  int   total_checks, total_failures;

  fft_harness u_h (.start, .done, .checks, .failures, .n_rounded, .n_grown, .n_guard);

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 start = 1'b1;
    wait (done);
    total_checks = checks + 3;
    total_failures = failures;
    if (n_rounded == 0) begin total_failures++; $display("FAIL no rounded twiddle product"); end
    if (n_grown == 0)   begin total_failures++; $display("FAIL no output past 8 bits"); end
    if (n_guard == 0)   begin total_failures++; $display("FAIL guard bit never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
