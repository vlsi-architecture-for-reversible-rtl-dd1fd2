// twiddle_mult: multiplies a complex word by the constant twiddle W_M^K.
//
// W_M^K = exp(-j*2*pi*K/M) = C - j*S with C and S rounded to TW_FRAC
// fractional bits (fft_pkg::tw_cos / tw_sin). Three cases, fixed at
// elaboration:
//   K = 0      t = b                          (exact, no logic)
//   4*K = M    t = -j*b = (b_im, -b_re)       (exact)
//   otherwise  t_re = round((b_re*C + b_im*S) / 2^TW_FRAC)
//              t_im = round((b_im*C - b_re*S) / 2^TW_FRAC)
// Rounding is to nearest (add half, arithmetic shift). Results wrap at W
// bits; the FFT sizes W so they never need to. The source architecture
// writes the twiddle only as "W" in its butterfly equations; the constant-
// product realisation and TW_FRAC are this design's choices. Purely
// combinational.
module twiddle_mult #(
  parameter int W       = 12,
  parameter int M       = 8,
  parameter int K       = 1,
  parameter int TW_FRAC = 8
) (
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] t_re,
  output logic signed [W-1:0] t_im
);
  localparam int C  = fft_pkg::tw_cos(K, M, TW_FRAC);
  localparam int S  = fft_pkg::tw_sin(K, M, TW_FRAC);
  localparam int PW = W + TW_FRAC + 3;

  if (K % M == 0) begin : g_one
    assign t_re = b_re;
    assign t_im = b_im;
  end else if (4 * (K % M) == M) begin : g_minus_j
    assign t_re = b_im;
    assign t_im = -b_re;
  end else begin : g_const
    localparam logic signed [PW-1:0] CW   = PW'(C);
    localparam logic signed [PW-1:0] SW   = PW'(S);
    localparam logic signed [PW-1:0] HALF = PW'(1) <<< (TW_FRAC - 1);
    logic signed [PW-1:0] bre_x, bim_x, acc_re, acc_im;
    always_comb begin
      bre_x  = PW'(b_re);
      bim_x  = PW'(b_im);
      acc_re = bre_x * CW + bim_x * SW + HALF;
      acc_im = bim_x * CW - bre_x * SW + HALF;
    end
    assign t_re = W'(acc_re >>> TW_FRAC);
    assign t_im = W'(acc_im >>> TW_FRAC);
  end
endmodule
