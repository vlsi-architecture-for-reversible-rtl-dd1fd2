// tb_twiddle_mult: the constant twiddle multiplier for the three kinds of
// twiddle.
//
// Instances: W_8^0 (identity), W_8^2 = -j (swap and negate), W_8^1 and
// W_8^3 (constant products) and W_32^5 at 14 bits. Each gets the corner
// values and 3000 random words; the expected product comes from
// fft_ref_pkg::ref_twiddle. The constant products are also held against the
// exact complex product to within one LSB plus rounding.
module tb_twiddle_mult;
  localparam int W = 12, W32 = 14, F = 8;
  typedef logic signed [W-1:0] w_t;
  logic signed [W-1:0]   br, bi;
  logic signed [W-1:0]   tr [4], ti [4];
  logic signed [W32-1:0] br32, bi32, tr32, ti32;
  int checks = 0, failures = 0;

  twiddle_mult #(.W(W), .M(8), .K(0), .TW_FRAC(F)) u0 (.b_re(br), .b_im(bi), .t_re(tr[0]), .t_im(ti[0]));
  twiddle_mult #(.W(W), .M(8), .K(1), .TW_FRAC(F)) u1 (.b_re(br), .b_im(bi), .t_re(tr[1]), .t_im(ti[1]));
  twiddle_mult #(.W(W), .M(8), .K(2), .TW_FRAC(F)) u2 (.b_re(br), .b_im(bi), .t_re(tr[2]), .t_im(ti[2]));
  twiddle_mult #(.W(W), .M(8), .K(3), .TW_FRAC(F)) u3 (.b_re(br), .b_im(bi), .t_re(tr[3]), .t_im(ti[3]));
  twiddle_mult #(.W(W32), .M(32), .K(5), .TW_FRAC(F)) u32 (.b_re(br32), .b_im(bi32), .t_re(tr32), .t_im(ti32));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    longint er, ei;
    real xr, xi;
    for (int k = 0; k < 4; k++) begin
      fft_ref_pkg::ref_twiddle(longint'(br), longint'(bi), k, 8, F, er, ei);
      checks++;
      if (longint'(tr[k]) != er || longint'(ti[k]) != ei) begin
        failures++;
        $display("FAIL W8^%0d (%0d,%0d) -> (%0d,%0d) expected (%0d,%0d)",
                 k, br, bi, tr[k], ti[k], er, ei);
      end
      // Exact product, to catch a wrong sign or constant in both model and RTL.
      xr = br * $cos(2.0 * fft_ref_pkg::PI * k / 8) + bi * $sin(2.0 * fft_ref_pkg::PI * k / 8);
      xi = bi * $cos(2.0 * fft_ref_pkg::PI * k / 8) - br * $sin(2.0 * fft_ref_pkg::PI * k / 8);
      checks++;
      if (fft_ref_pkg::fabs(xr - tr[k]) > 2.5 || fft_ref_pkg::fabs(xi - ti[k]) > 2.5) begin
        failures++;
        $display("FAIL W8^%0d exact product (%0f,%0f) vs (%0d,%0d)", k, xr, xi, tr[k], ti[k]);
      end
    end
    fft_ref_pkg::ref_twiddle(longint'(br32), longint'(bi32), 5, 32, F, er, ei);
    checks++;
    if (longint'(tr32) != er || longint'(ti32) != ei) begin
      failures++;
      $display("FAIL W32^5 (%0d,%0d) -> (%0d,%0d) expected (%0d,%0d)", br32, bi32, tr32, ti32, er, ei);
    end
  endtask

  initial begin
    // Inputs limited to +-1400 so the rotated word still fits 12 bits.
    int corners [5] = '{0, 1, -1, 1400, -1400};
    foreach (corners[i]) foreach (corners[j]) begin
      br = w_t'(corners[i]); bi = w_t'(corners[j]);
      br32 = W32'(corners[i]) * 4; bi32 = W32'(corners[j]) * 4;
      #1 check_all();
    end
    for (int v = 0; v < 3000; v++) begin
      br = w_t'($signed($urandom_range(2800)) - 1400);
      bi = w_t'($signed($urandom_range(2800)) - 1400);
      br32 = W32'($signed($urandom_range(11200)) - 5600);
      bi32 = W32'($signed($urandom_range(11200)) - 5600);
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
