// fft_radix2: N-point radix-2 decimation-in-time FFT built from reversible
// adder/subtractors (the top of the design).
//
// Inputs x(0..N-1) arrive on f_re/f_im in natural order, DATA_W-bit two's
// complement. They are sign-extended to OUT_W = DATA_W + log2(N) + 1 bits
// and wired in bit-reversed order into stage 1. Stage s (s = 1..log2 N)
// holds N/2^s butterfly_group blocks of size 2^s; each combines two half-
// size transforms. Stage 1 is the 2-point "butterfly2" layer, stage 2 the
// "butterfly_4input" layer, stage 3 the "butterfly_8in" layer, matching the
// source architecture's 8-point block diagram (16 and 32 points add layers).
// The last stage gives X(0..N-1) in natural order on y_re/y_im, unscaled:
//   X(k) = sum_n x(n) * exp(-j*2*pi*n*k/N)
// up to the rounding of the non-trivial twiddles. OUT_W is wide enough that
// nothing overflows. The whole transform is one combinational network with
// no clock, as the source architecture's FFT_8bit symbol has only data
// ports.
//
// From the source architecture: the radix-2 DIT structure, N = 8 (16, 32),
// 8-bit inputs, and DKG adder/subtractors (METHOD_DKG) or Peres/TR adders
// (METHOD_PERES_TR). This design's own choices: complex ports, the widened
// output word, and the twiddle constants with TW_FRAC fractional bits.
module fft_radix2 #(
  parameter int               N       = 8,
  parameter int               DATA_W  = 8,
  parameter int               TW_FRAC = 8,
  parameter fft_pkg::method_e METHOD  = fft_pkg::METHOD_DKG,
  localparam int              LOGN    = $clog2(N),
  localparam int              OUT_W   = DATA_W + LOGN + 1
) (
  input  logic signed [DATA_W-1:0] f_re [N],
  input  logic signed [DATA_W-1:0] f_im [N],
  output logic signed [OUT_W-1:0]  y_re [N],
  output logic signed [OUT_W-1:0]  y_im [N]
);
  // g_lvl[s].d_* is the data leaving stage s; g_lvl[0].d_* is the input.
  for (genvar s = 0; s <= LOGN; s++) begin : g_lvl
    logic signed [OUT_W-1:0] d_re [N];
    logic signed [OUT_W-1:0] d_im [N];

    if (s == 0) begin : g_in
      for (genvar i = 0; i < N; i++) begin : g_pt
        localparam int SRC = fft_pkg::bitrev(i, LOGN);
        assign d_re[i] = OUT_W'(f_re[SRC]);
        assign d_im[i] = OUT_W'(f_im[SRC]);
      end
    end else begin : g_stage
      localparam int M = 1 << s;
      for (genvar g = 0; g < N / M; g++) begin : g_grp
        logic signed [OUT_W-1:0] e_re [M/2];
        logic signed [OUT_W-1:0] e_im [M/2];
        logic signed [OUT_W-1:0] o_re [M/2];
        logic signed [OUT_W-1:0] o_im [M/2];
        logic signed [OUT_W-1:0] x_re [M];
        logic signed [OUT_W-1:0] x_im [M];

        for (genvar k = 0; k < M / 2; k++) begin : g_split
          assign e_re[k] = g_lvl[s-1].d_re[g*M + k];
          assign e_im[k] = g_lvl[s-1].d_im[g*M + k];
          assign o_re[k] = g_lvl[s-1].d_re[g*M + M/2 + k];
          assign o_im[k] = g_lvl[s-1].d_im[g*M + M/2 + k];
        end

        butterfly_group #(.W(OUT_W), .M(M), .TW_FRAC(TW_FRAC), .METHOD(METHOD)) u_grp (
          .e_re(e_re), .e_im(e_im), .o_re(o_re), .o_im(o_im), .x_re(x_re), .x_im(x_im)
        );

        for (genvar k = 0; k < M; k++) begin : g_join
          assign d_re[g*M + k] = x_re[k];
          assign d_im[g*M + k] = x_im[k];
        end
      end
    end
  end

  assign y_re = g_lvl[LOGN].d_re;
  assign y_im = g_lvl[LOGN].d_im;
endmodule
