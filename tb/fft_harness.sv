// fft_harness: drives one fft_radix2 instance of any size and gate method
// with a fixed set of test vectors and checks every output.
//
// On `start` it applies: an impulse at each position n (checks the
// bit-reversed input wiring: X(k) must equal W_N^(n*k)), a DC input, the
// all-minimum and all-maximum inputs, a vector that drives X(1) to its
// largest real part (uses the guard bit of the output word), and NVEC
// random complex vectors. Every output must match fft_ref_pkg::ref_fft bit
// for bit and lie within TOL of the exact DFT. It counts the events the
// design has to handle: twiddle products that needed rounding, outputs that
// grew past DATA_W bits, and outputs past DATA_W+log2(N) bits. `done` rises
// when finished; the counts stay on the outputs.
module fft_harness #(
  parameter int               N      = 8,
  parameter fft_pkg::method_e METHOD = fft_pkg::METHOD_DKG,
  parameter int               NVEC   = 500
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_rounded,
  output int   n_grown,
  output int   n_guard
);
  localparam int  DATA_W = 8, F = 8;
  localparam int  LOGN   = $clog2(N);
  localparam int  OUT_W  = DATA_W + LOGN + 1;
  // Rounding of each twiddle product plus the TW_FRAC quantisation of the
  // twiddle constants, which grows with the size of the outputs.
  localparam real TOL    = 0.75 * LOGN + 0.5 + (N * 256.0) / (2.0 ** (F + 2));

  logic signed [DATA_W-1:0] f_re [N], f_im [N];
  logic signed [OUT_W-1:0]  y_re [N], y_im [N];
  real worst_err;

  fft_radix2 #(.N(N), .METHOD(METHOD)) dut (.f_re, .f_im, .y_re, .y_im);

  task automatic apply_and_check(input string what);
    longint xr[$], xi[$], er[$], ei[$], gr[$], gi[$];
    real err;
    bit exact;
    for (int n = 0; n < N; n++) begin
      xr.push_back(longint'(f_re[n]));
      xi.push_back(longint'(f_im[n]));
    end
    #1;
    fft_ref_pkg::ref_fft(F, xr, xi, er, ei);
    exact = 1'b1;
    for (int k = 0; k < N; k++) begin
      gr.push_back(longint'(y_re[k]));
      gi.push_back(longint'(y_im[k]));
      checks++;
      if (gr[k] != er[k] || gi[k] != ei[k]) begin
        failures++;
        exact = 1'b0;
        $display("FAIL N=%0d %s: X(%0d) = (%0d,%0d), expected (%0d,%0d)",
                 N, what, k, gr[k], gi[k], er[k], ei[k]);
      end
      if (gr[k] > 127 || gr[k] < -128 || gi[k] > 127 || gi[k] < -128) n_grown++;
      if (gr[k] >= (1 <<< (OUT_W - 2)) || gr[k] < -(1 <<< (OUT_W - 2)) ||
          gi[k] >= (1 <<< (OUT_W - 2)) || gi[k] < -(1 <<< (OUT_W - 2))) n_guard++;
    end
    err = fft_ref_pkg::dft_max_err(xr, xi, gr, gi);
    if (err > worst_err) worst_err = err;
    if (err > 1.0e-6) n_rounded++;
    checks++;
    if (err > TOL) begin
      failures++;
      $display("FAIL N=%0d %s: error %0f against the exact DFT", N, what, err);
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    n_rounded = 0; n_grown = 0; n_guard = 0; worst_err = 0.0;
    foreach (f_re[i]) begin f_re[i] = '0; f_im[i] = '0; end
    wait (start);
    for (int p = 0; p < N; p++) begin
      foreach (f_re[i]) begin f_re[i] = (i == p) ? 8'sd100 : '0; f_im[i] = '0; end
      apply_and_check($sformatf("impulse at %0d", p));
    end
    foreach (f_re[i]) begin f_re[i] = 8'sd37; f_im[i] = -8'sd5; end
    apply_and_check("dc");
    foreach (f_re[i]) begin f_re[i] = -8'sd128; f_im[i] = -8'sd128; end
    apply_and_check("all minimum");
    foreach (f_re[i]) begin f_re[i] = 8'sd127; f_im[i] = 8'sd127; end
    apply_and_check("all maximum");
    foreach (f_re[i]) begin
      f_re[i] = ($cos(2.0 * fft_ref_pkg::PI * i / N) < -1.0e-9) ? -8'sd128 : 8'sd127;
      f_im[i] = ($sin(2.0 * fft_ref_pkg::PI * i / N) < -1.0e-9) ? -8'sd128 : 8'sd127;
    end
    apply_and_check("largest X(1)");
    for (int v = 0; v < NVEC; v++) begin
      foreach (f_re[i]) begin f_re[i] = DATA_W'($urandom); f_im[i] = DATA_W'($urandom); end
      apply_and_check($sformatf("random %0d", v));
    end
    $display("N=%0d method=%s: %0d checks, %0d failures, worst error %0f, rounded %0d, grown %0d, guard %0d",
             N, METHOD.name(), checks, failures, worst_err, n_rounded, n_grown, n_guard);
    done = 1'b1;
  end
endmodule
