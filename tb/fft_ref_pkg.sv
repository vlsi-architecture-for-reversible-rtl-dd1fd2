// fft_ref_pkg: reference models for the FFT testbenches.
//
// ref_twiddle multiplies by W_m^k = cos(2*pi*k/m) - j*sin(2*pi*k/m) the way
// the hardware is specified to (exact for k = 0 and 4k = m, otherwise
// constants and product rounded to nearest at `frac` fractional bits), but
// computed on unbounded integers. ref_fft is a recursive even/odd
// decimation-in-time FFT built on it, so it shares no structure with the
// RTL's bit-reversed stage network. dft_max_err compares an FFT result with
// the exact floating-point DFT.
package fft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic longint rnd(real v);
    return longint'($floor(v + 0.5));
  endfunction

  function automatic void ref_twiddle(input longint br, input longint bi, input int k,
                                      input int m, input int frac,
                                      output longint tr, output longint ti);
    longint c, s, half;
    if (k % m == 0) begin
      tr = br; ti = bi;
    end else if (4 * (k % m) == m) begin
      tr = bi; ti = -br;
    end else begin
      c = rnd($cos(2.0 * PI * k / m) * (2.0 ** frac));
      s = rnd($sin(2.0 * PI * k / m) * (2.0 ** frac));
      half = longint'(1) << (frac - 1);
      tr = (br * c + bi * s + half) >>> frac;
      ti = (bi * c - br * s + half) >>> frac;
    end
  endfunction

  function automatic void ref_fft(input int frac, input longint xr[$], input longint xi[$],
                                  output longint yr[$], output longint yi[$]);
    longint er[$], ei[$], orr[$], oi[$];
    longint Er[$], Ei[$], Or[$], Oi[$];
    longint tr, ti;
    int n;
    n = xr.size();
    yr = {}; yi = {};
    if (n == 1) begin
      yr.push_back(xr[0]); yi.push_back(xi[0]);
      return;
    end
    for (int i = 0; i < n; i += 2) begin
      er.push_back(xr[i]);   ei.push_back(xi[i]);
      orr.push_back(xr[i+1]); oi.push_back(xi[i+1]);
    end
    ref_fft(frac, er, ei, Er, Ei);
    ref_fft(frac, orr, oi, Or, Oi);
    for (int i = 0; i < n; i++) begin yr.push_back(0); yi.push_back(0); end
    for (int k = 0; k < n / 2; k++) begin
      ref_twiddle(Or[k], Oi[k], k, n, frac, tr, ti);
      yr[k]       = Er[k] + tr;  yi[k]       = Ei[k] + ti;
      yr[k + n/2] = Er[k] - tr;  yi[k + n/2] = Ei[k] - ti;
    end
  endfunction

  // Largest |component error| of (yr, yi) against the exact DFT of (xr, xi).
  function automatic real dft_max_err(input longint xr[$], input longint xi[$],
                                      input longint yr[$], input longint yi[$]);
    real worst, sr, si, ang;
    int n;
    n = xr.size();
    worst = 0.0;
    for (int k = 0; k < n; k++) begin
      sr = 0.0; si = 0.0;
      for (int t = 0; t < n; t++) begin
        ang = 2.0 * PI * t * k / n;
        sr += xr[t] * $cos(ang) + xi[t] * $sin(ang);
        si += xi[t] * $cos(ang) - xr[t] * $sin(ang);
      end
      if (fabs(sr - yr[k]) > worst) worst = fabs(sr - yr[k]);
      if (fabs(si - yi[k]) > worst) worst = fabs(si - yi[k]);
    end
    return worst;
  endfunction

endpackage
