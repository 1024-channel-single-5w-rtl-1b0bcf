// bf_model_pkg: reference model of the beamformer arithmetic for testbenches.
//
// Written from the algorithm's definition with plain integer and real
// arithmetic, not from the RTL structure: integer square root by bisection,
// Hanning weights from $cos, delays as reference minus steering, rounding to
// the nearest sample, and the 5-tap envelope filter.
package bf_model_pkg;

  // floor(sqrt(v)) by bisection.
  function automatic longint unsigned isqrt(longint unsigned v);
    longint unsigned lo, hi, mid;
    lo = 0;
    hi = 64'd4294967296;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      if (mid * mid <= v) lo = mid;
      else hi = mid;
    end
    return lo;
  endfunction

  function automatic longint hann_q15(int n, int len);
    real h;
    h = 0.5 * (1.0 - $cos(2.0 * 3.14159265358979323846 * real'(n + 1) / real'(len + 1)));
    return longint'($rtoi(h * 32768.0 + 0.5));
  endfunction

  // Apodized sample of channel ch = j*nx + i, rounded like a Q1.15 product.
  function automatic int apodize(int x, int ch, int nx, int ny);
    longint w, p;
    w = (hann_q15(ch % nx, nx) * hann_q15(ch / nx, ny) + 16384) >>> 15;
    p = longint'(x) * w;
    return int'($signed(16'((p + 16384) >>> 15)));
  endfunction

  // Reference delay r + sqrt(r^2 + rho^2), Q.4; r Q.4, half pitch Q.8.
  function automatic longint ref_delay(longint r, longint pitch_h, int i, int j, int nx, int ny);
    longint ci, cj, rho2, rad, t;
    ci   = 2 * i - nx + 1;
    cj   = 2 * j - ny + 1;
    rho2 = (pitch_h * pitch_h * (ci * ci + cj * cj)) >>> 8;
    rad  = r * r + rho2;
    if (rad > 64'h0000_000F_FFFF_FFFF) rad = 64'h0000_000F_FFFF_FFFF;
    t = r + longint'(isqrt(longint'(rad)));
    if (t > 262143) t = 262143;
    return t;
  endfunction

  // Sample index of a channel: ref (Q.4) minus steering (Q.8), to nearest.
  function automatic longint sample_index(longint refd, longint a, longint b,
                                          int i, int j, int nx, int ny);
    longint d;
    d = refd * 16 - a * (2 * i - nx + 1) - b * (2 * j - ny + 1);
    return (d + 128) >>> 8;
  endfunction

  // Deterministic pseudo-random raw echo sample of channel ch, index s.
  function automatic int raw_sample(int ch, int s);
    int unsigned h;
    h = (ch * 32'd2654435761) ^ (s * 32'd40503) ^ 32'h5bd1e995;
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    h = h ^ (h >> 13);
    return int'($signed(16'(h)));
  endfunction

  localparam int FIR_H [5] = '{1, 4, 6, 4, 1};

endpackage
