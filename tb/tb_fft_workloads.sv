// tb_fft_workloads: the FFT at every size and with both gate methods.
//
// Runs fft_harness on the 16- and 32-point DKG builds and on the 8- and
// 32-point Peres/TR builds, one after the other. Each must pass every
// bit-exact and DFT-accuracy check and must hit the rounding, growth and
// guard-bit cases at least once.
module tb_fft_workloads;
  import fft_pkg::*;
  localparam int NH = 4;
  logic start [NH];
  logic done  [NH];
  int   checks [NH], failures [NH], n_rounded [NH], n_grown [NH], n_guard [NH];
  int   total_checks = 0, total_failures = 0;

  fft_harness #(.N(16), .METHOD(METHOD_DKG),      .NVEC(300)) u16  (
    .start(start[0]), .done(done[0]), .checks(checks[0]), .failures(failures[0]),
    .n_rounded(n_rounded[0]), .n_grown(n_grown[0]), .n_guard(n_guard[0]));
  fft_harness #(.N(32), .METHOD(METHOD_DKG),      .NVEC(200)) u32  (
    .start(start[1]), .done(done[1]), .checks(checks[1]), .failures(failures[1]),
    .n_rounded(n_rounded[1]), .n_grown(n_grown[1]), .n_guard(n_guard[1]));
  fft_harness #(.N(8),  .METHOD(METHOD_PERES_TR), .NVEC(300)) u8p  (
    .start(start[2]), .done(done[2]), .checks(checks[2]), .failures(failures[2]),
    .n_rounded(n_rounded[2]), .n_grown(n_grown[2]), .n_guard(n_guard[2]));
  fft_harness #(.N(32), .METHOD(METHOD_PERES_TR), .NVEC(200)) u32p (
    .start(start[3]), .done(done[3]), .checks(checks[3]), .failures(failures[3]),
    .n_rounded(n_rounded[3]), .n_grown(n_grown[3]), .n_guard(n_guard[3]));

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end

  initial begin
    foreach (start[i]) start[i] = 1'b0;
    for (int i = 0; i < NH; i++) begin
      #1 start[i] = 1'b1;
      wait (done[i]);
      total_checks += checks[i] + 3;
      total_failures += failures[i];
      if (n_rounded[i] == 0) begin total_failures++; $display("FAIL run %0d: no rounding", i); end
      if (n_grown[i] == 0)   begin total_failures++; $display("FAIL run %0d: no growth", i); end
      if (n_guard[i] == 0)   begin total_failures++; $display("FAIL run %0d: no guard bit", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
