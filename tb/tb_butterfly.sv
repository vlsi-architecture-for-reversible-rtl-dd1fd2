// tb_butterfly: radix-2 butterflies with both gate methods.
//
// Four instances on the same inputs: the 2-point butterfly (W_2^0) and
// W_8^1 with DKG adders, W_4^1 = -j and W_8^3 with Peres/TR adders. For
// corner and 3000 random inputs the outputs must equal a + W*b and a - W*b
// with W*b from fft_ref_pkg::ref_twiddle.
module tb_butterfly;
  import fft_pkg::*;
  localparam int W = 12, F = 8;
  localparam int NI = 4;
  localparam int MS [NI] = '{2, 8, 4, 8};
  localparam int KS [NI] = '{0, 1, 1, 3};
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic signed [W-1:0] x0_re [NI], x0_im [NI], x1_re [NI], x1_im [NI];
  int checks = 0, failures = 0;

  butterfly #(.W(W), .M(2), .K(0), .TW_FRAC(F), .METHOD(METHOD_DKG)) u0 (
    .a_re, .a_im, .b_re, .b_im,
    .x0_re(x0_re[0]), .x0_im(x0_im[0]), .x1_re(x1_re[0]), .x1_im(x1_im[0]));
  butterfly #(.W(W), .M(8), .K(1), .TW_FRAC(F), .METHOD(METHOD_DKG)) u1 (
    .a_re, .a_im, .b_re, .b_im,
    .x0_re(x0_re[1]), .x0_im(x0_im[1]), .x1_re(x1_re[1]), .x1_im(x1_im[1]));
  butterfly #(.W(W), .M(4), .K(1), .TW_FRAC(F), .METHOD(METHOD_PERES_TR)) u2 (
    .a_re, .a_im, .b_re, .b_im,
    .x0_re(x0_re[2]), .x0_im(x0_im[2]), .x1_re(x1_re[2]), .x1_im(x1_im[2]));
  butterfly #(.W(W), .M(8), .K(3), .TW_FRAC(F), .METHOD(METHOD_PERES_TR)) u3 (
    .a_re, .a_im, .b_re, .b_im,
    .x0_re(x0_re[3]), .x0_im(x0_im[3]), .x1_re(x1_re[3]), .x1_im(x1_im[3]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    longint tr, ti;
    for (int i = 0; i < NI; i++) begin
      fft_ref_pkg::ref_twiddle(longint'(b_re), longint'(b_im), KS[i], MS[i], F, tr, ti);
      checks++;
      if (longint'(x0_re[i]) != a_re + tr || longint'(x0_im[i]) != a_im + ti ||
          longint'(x1_re[i]) != a_re - tr || longint'(x1_im[i]) != a_im - ti) begin
        failures++;
        $display("FAIL W%0d^%0d a=(%0d,%0d) b=(%0d,%0d): x0=(%0d,%0d) x1=(%0d,%0d) Wb=(%0d,%0d)",
                 MS[i], KS[i], a_re, a_im, b_re, b_im,
                 x0_re[i], x0_im[i], x1_re[i], x1_im[i], tr, ti);
      end
    end
  endtask

  initial begin
    int corners [5] = '{0, 1, -1, 700, -700};
    foreach (corners[i]) foreach (corners[j]) begin
      a_re = W'(corners[i]); a_im = W'(corners[j]);
      b_re = W'(corners[j]); b_im = W'(corners[i]);
      #1 check_all();
    end
    for (int v = 0; v < 3000; v++) begin
      a_re = W'($signed($urandom_range(1400)) - 700);
      a_im = W'($signed($urandom_range(1400)) - 700);
      b_re = W'($signed($urandom_range(1400)) - 700);
      b_im = W'($signed($urandom_range(1400)) - 700);
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
