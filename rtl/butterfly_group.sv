// butterfly_group: one decimation-in-time combining stage of size M.
//
// Given E = the M/2-point transform of the even-indexed samples and O = that
// of the odd-indexed samples, it forms the M-point transform
//   X[k]       = E[k] + W_M^k * O[k]
//   X[k + M/2] = E[k] - W_M^k * O[k],   k = 0 .. M/2-1
// with M/2 butterflies, butterfly k using twiddle W_M^k. The M=4 instance is
// the source architecture's "butterfly_4input" and M=8 its "butterfly_8in";
// the FFT nests them as its block diagram does. Purely combinational.
module butterfly_group #(
  parameter int               W       = 12,
  parameter int               M       = 4,
  parameter int               TW_FRAC = 8,
  parameter fft_pkg::method_e METHOD  = fft_pkg::METHOD_DKG
) (
  input  logic signed [W-1:0] e_re [M/2],
  input  logic signed [W-1:0] e_im [M/2],
  input  logic signed [W-1:0] o_re [M/2],
  input  logic signed [W-1:0] o_im [M/2],
  output logic signed [W-1:0] x_re [M],
  output logic signed [W-1:0] x_im [M]
);
  for (genvar k = 0; k < M / 2; k++) begin : g_bf
    butterfly #(.W(W), .M(M), .K(k), .TW_FRAC(TW_FRAC), .METHOD(METHOD)) u_bf (
      .a_re (e_re[k]),       .a_im (e_im[k]),
      .b_re (o_re[k]),       .b_im (o_im[k]),
      .x0_re(x_re[k]),       .x0_im(x_im[k]),
      .x1_re(x_re[k + M/2]), .x1_im(x_im[k + M/2])
    );
  end
endmodule
