// butterfly: radix-2 decimation-in-time butterfly with twiddle W_M^K.
//
//   x0 = a + W_M^K * b
//   x1 = a - W_M^K * b
// on complex W-bit two's complement words. The twiddle product comes from
// twiddle_mult; the four additions and subtractions are built from
// reversible gates chosen by METHOD:
//   METHOD_DKG       four dkg_addsub chains, the programmable DKG gate set
//                    to add (mode 0) for x0 and to subtract (mode 1) for x1;
//   METHOD_PERES_TR  peres_ripple_adder for x0, tr_ripple_subtractor for x1.
// Both give the same numbers; they differ only in the gates used, as the
// source architecture's two design methods do. Results wrap at W bits (the
// FFT sizes W so that they never need to). Purely combinational; the M=2,
// K=0 instance is the 2-point "butterfly2" block.
module butterfly #(
  parameter int              W       = 12,
  parameter int              M       = 2,
  parameter int              K       = 0,
  parameter int              TW_FRAC = 8,
  parameter fft_pkg::method_e METHOD = fft_pkg::METHOD_DKG
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] x0_re,
  output logic signed [W-1:0] x0_im,
  output logic signed [W-1:0] x1_re,
  output logic signed [W-1:0] x1_im
);
  logic signed [W-1:0] t_re, t_im;

  twiddle_mult #(.W(W), .M(M), .K(K), .TW_FRAC(TW_FRAC)) u_tw (
    .b_re(b_re), .b_im(b_im), .t_re(t_re), .t_im(t_im)
  );

  if (METHOD == fft_pkg::METHOD_DKG) begin : g_dkg
    dkg_addsub #(.WIDTH(W)) u_add_re (.mode(1'b0), .x(a_re), .y(t_re), .cin(1'b0),
                                      .sd(x0_re), .cout(), .garbage());
    dkg_addsub #(.WIDTH(W)) u_add_im (.mode(1'b0), .x(a_im), .y(t_im), .cin(1'b0),
                                      .sd(x0_im), .cout(), .garbage());
    dkg_addsub #(.WIDTH(W)) u_sub_re (.mode(1'b1), .x(a_re), .y(t_re), .cin(1'b0),
                                      .sd(x1_re), .cout(), .garbage());
    dkg_addsub #(.WIDTH(W)) u_sub_im (.mode(1'b1), .x(a_im), .y(t_im), .cin(1'b0),
                                      .sd(x1_im), .cout(), .garbage());
  end else begin : g_peres_tr
    peres_ripple_adder #(.WIDTH(W)) u_add_re (.a(a_re), .b(t_re), .cin(1'b0),
                                              .sum(x0_re), .cout());
    peres_ripple_adder #(.WIDTH(W)) u_add_im (.a(a_im), .b(t_im), .cin(1'b0),
                                              .sum(x0_im), .cout());
    tr_ripple_subtractor #(.WIDTH(W)) u_sub_re (.a(a_re), .b(t_re), .bin(1'b0),
                                                .diff(x1_re), .bout());
    tr_ripple_subtractor #(.WIDTH(W)) u_sub_im (.a(a_im), .b(t_im), .bin(1'b0),
                                                .diff(x1_im), .bout());
  end
endmodule
