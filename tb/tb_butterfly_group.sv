// tb_butterfly_group: the 4-input and 8-input combining stages.
//
// An M=4 stage (DKG) and an M=8 stage (Peres/TR) get random half-size
// transforms E and O; every output must equal E[k] + W_M^k O[k] for
// k < M/2 and E[k] - W_M^k O[k] for the upper half, with the products from
// fft_ref_pkg::ref_twiddle.
module tb_butterfly_group;
  import fft_pkg::*;
  localparam int W = 12, F = 8;
  logic signed [W-1:0] e4_re [2], e4_im [2], o4_re [2], o4_im [2], x4_re [4], x4_im [4];
  logic signed [W-1:0] e8_re [4], e8_im [4], o8_re [4], o8_im [4], x8_re [8], x8_im [8];
  int checks = 0, failures = 0;

  butterfly_group #(.W(W), .M(4), .TW_FRAC(F), .METHOD(METHOD_DKG)) u4 (
    .e_re(e4_re), .e_im(e4_im), .o_re(o4_re), .o_im(o4_im), .x_re(x4_re), .x_im(x4_im));
  butterfly_group #(.W(W), .M(8), .TW_FRAC(F), .METHOD(METHOD_PERES_TR)) u8 (
    .e_re(e8_re), .e_im(e8_im), .o_re(o8_re), .o_im(o8_im), .x_re(x8_re), .x_im(x8_im));

  function automatic logic signed [W-1:0] rnd_word();
    return W'($signed($urandom_range(1400)) - 700);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint tr, ti;
    for (int v = 0; v < 2000; v++) begin
      foreach (e4_re[i]) begin
        e4_re[i] = rnd_word(); e4_im[i] = rnd_word(); o4_re[i] = rnd_word(); o4_im[i] = rnd_word();
      end
      foreach (e8_re[i]) begin
        e8_re[i] = rnd_word(); e8_im[i] = rnd_word(); o8_re[i] = rnd_word(); o8_im[i] = rnd_word();
      end
      #1;
      for (int k = 0; k < 2; k++) begin
        fft_ref_pkg::ref_twiddle(longint'(o4_re[k]), longint'(o4_im[k]), k, 4, F, tr, ti);
        checks++;
        if (longint'(x4_re[k]) != e4_re[k] + tr || longint'(x4_im[k]) != e4_im[k] + ti ||
            longint'(x4_re[k+2]) != e4_re[k] - tr || longint'(x4_im[k+2]) != e4_im[k] - ti) begin
          failures++;
          $display("FAIL M=4 k=%0d", k);
        end
      end
      for (int k = 0; k < 4; k++) begin
        fft_ref_pkg::ref_twiddle(longint'(o8_re[k]), longint'(o8_im[k]), k, 8, F, tr, ti);
        checks++;
        if (longint'(x8_re[k]) != e8_re[k] + tr || longint'(x8_im[k]) != e8_im[k] + ti ||
            longint'(x8_re[k+4]) != e8_re[k] - tr || longint'(x8_im[k+4]) != e8_im[k] - ti) begin
          failures++;
          $display("FAIL M=8 k=%0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
