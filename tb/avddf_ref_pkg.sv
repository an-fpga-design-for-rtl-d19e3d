// Reference model of the AVDDF filter for the testbenches, in double
// precision floating point, written straight from the filter's equations:
//   gamma_i = (sum_j A(xi,xj))^(1-l) * (sum_j ||xi-xj||)^l
//   xi_thr  = gamma(1) * (N-1+lambda)/(N-1)
//   output  = x(1) if gamma_centre >= xi_thr, else the centre pixel.
// The hardware works in fixed point, so near-ties can go either way. The
// reference therefore widens every gamma to an interval covering the
// hardware's rounding, and returns the set of window pixels an exact-enough
// implementation may output (a 9-bit mask), plus whether that outcome was
// forced (a single admissible decision).
package avddf_ref_pkg;

  typedef logic [23:0] pix24_t;

  function automatic real chan(input pix24_t p, input int c);
    return real'(p[23 - 8*c -: 8]);
  endfunction

  function automatic real ref_dist(input pix24_t a, input pix24_t b);
    real s;
    s = 0.0;
    for (int c = 0; c < 3; c++) s += (chan(a, c) - chan(b, c)) ** 2;
    return $sqrt(s);
  endfunction

  function automatic real ref_angle(input pix24_t a, input pix24_t b);
    real dot, na, nb, c;
    if (a == 0 || b == 0) return 1.5707963267948966;   // no direction: pi/2
    dot = 0.0; na = 0.0; nb = 0.0;
    for (int k = 0; k < 3; k++) begin
      dot += chan(a, k) * chan(b, k);
      na  += chan(a, k) ** 2;
      nb  += chan(b, k) ** 2;
    end
    c = dot / $sqrt(na * nb);
    if (c > 1.0) c = 1.0;
    return $acos(c);
  endfunction

  function automatic real pw(input real x, input real e);
    if (e == 0.0) return 1.0;
    if (x <= 0.0) return 0.0;
    return x ** e;
  endfunction

  // Admissible outputs of the filter for window w (w[4] is the centre).
  // l and lambda as reals. forced = 1 when exactly one decision is possible.
  function automatic logic [8:0] ref_mask(input pix24_t w [9], input real l,
                                          input real lambda, output bit forced,
                                          output bit noisy_sure);
    real d [9];
    real a [9];
    real lo [9];
    real hi [9];
    real min_lo, min_hi, kthr;
    real e_d, e_a;
    logic [8:0] cand;
    bit sure_noisy, sure_clean;
    // rounding of the hardware: 8 terms, distance truncated to 2^-8, angle
    // to a few units of 2^-14 plus the square root in the angle unit.
    e_d = 8.0 * (2.0 ** -8) + 1e-9;
    for (int i = 0; i < 9; i++) begin
      d[i] = 0.0; a[i] = 0.0; e_a = 0.0;
      for (int j = 0; j < 9; j++) begin
        real nn;
        d[i] += ref_dist(w[i], w[j]);
        a[i] += ref_angle(w[i], w[j]);
        nn = $sqrt((chan(w[i],0)**2 + chan(w[i],1)**2 + chan(w[i],2)**2) *
                   (chan(w[j],0)**2 + chan(w[j],1)**2 + chan(w[j],2)**2));
        if (nn < 1.0) nn = 1.0;
        e_a += 6.0 * (2.0 ** -14) + (2.0 ** -8) / nn;
      end
      lo[i] = pw(d[i] - e_d, l) * pw(a[i] - e_a, 1.0 - l);
      hi[i] = pw(d[i] + e_d, l) * pw(a[i] + e_a, 1.0 - l);
    end
    min_lo = lo[0]; min_hi = hi[0];
    for (int i = 1; i < 9; i++) begin
      if (lo[i] < min_lo) min_lo = lo[i];
      if (hi[i] < min_hi) min_hi = hi[i];
    end
    cand = '0;
    for (int i = 0; i < 9; i++) if (lo[i] <= min_hi) cand[i] = 1'b1;
    kthr = (8.0 + lambda) / 8.0;
    sure_noisy = lo[4] >= kthr * min_hi;
    sure_clean = hi[4] <  kthr * min_lo;
    forced     = sure_noisy || sure_clean;
    noisy_sure = sure_noisy;
    ref_mask = '0;
    if (!sure_noisy) ref_mask[4] = 1'b1;
    if (!sure_clean) ref_mask |= cand;
  endfunction

  // True when pixel p equals one of the window pixels admitted by mask.
  function automatic bit admissible(input pix24_t p, input pix24_t w [9],
                                    input logic [8:0] mask);
    for (int i = 0; i < 9; i++) if (mask[i] && w[i] == p) return 1'b1;
    return 1'b0;
  endfunction

  // Clean test pixel: a smooth colour field (gradients that wrap around)
  // with a little random texture.
  function automatic pix24_t clean_pixel(input int x, input int y, input int n);
    return {8'(40 + (150 * x) / n + $urandom_range(4)),
            8'(90 + (120 * y) / n + $urandom_range(4)),
            8'(60 + (80 * (x + y)) / n + $urandom_range(4))};
  endfunction

  // Impulsive noise: with probability noise_pct/100 the pixel is replaced
  // by black, white (salt and pepper) or a random colour.
  function automatic pix24_t add_noise(input pix24_t p, input int noise_pct);
    if ($urandom_range(99) < noise_pct) begin
      case ($urandom_range(2))
        0: return 24'h000000;
        1: return 24'hFFFFFF;
        default: return 24'($urandom);
      endcase
    end
    return p;
  endfunction

  function automatic pix24_t test_pixel(input int x, input int y, input int noise_pct);
    return add_noise(clean_pixel(x, y, 64), noise_pct);
  endfunction

  // Squared error summed over the three channels, for PSNR (Eq. 7 form:
  // PSNR = 10 log10(3 * 255^2 / mean over pixels of this sum)).
  function automatic real sq_err(input pix24_t a, input pix24_t b);
    real s;
    s = 0.0;
    for (int c = 0; c < 3; c++) s += (chan(a, c) - chan(b, c)) ** 2;
    return s;
  endfunction

  // CIE L*u*v* of an sRGB pixel (D65 white), for the normalised colour
  // difference NCD = sum ||Luv(orig) - Luv(filtered)|| / sum ||Luv(orig)||.
  function automatic void to_luv(input pix24_t p, output real l, output real u, output real v);
    real lin [3];
    real x, y, z, den, up, vp;
    for (int c = 0; c < 3; c++) begin
      real cs;
      cs = chan(p, c) / 255.0;
      lin[c] = (cs <= 0.04045) ? cs / 12.92 : ((cs + 0.055) / 1.055) ** 2.4;
    end
    x = 0.4124 * lin[0] + 0.3576 * lin[1] + 0.1805 * lin[2];
    y = 0.2126 * lin[0] + 0.7152 * lin[1] + 0.0722 * lin[2];
    z = 0.0193 * lin[0] + 0.1192 * lin[1] + 0.9505 * lin[2];
    l = (y > 0.008856) ? 116.0 * (y ** (1.0 / 3.0)) - 16.0 : 903.3 * y;
    den = x + 15.0 * y + 3.0 * z;
    up = (den > 0.0) ? 4.0 * x / den : 0.19784;
    vp = (den > 0.0) ? 9.0 * y / den : 0.46834;
    u = 13.0 * l * (up - 0.19784);
    v = 13.0 * l * (vp - 0.46834);
  endfunction

  // ||Luv(a) - Luv(b)|| and ||Luv(a)||
  function automatic void luv_err(input pix24_t a, input pix24_t b,
                                  output real diff, output real norm);
    real la, ua, va, lb, ub, vb;
    to_luv(a, la, ua, va);
    to_luv(b, lb, ub, vb);
    diff = $sqrt((la - lb) ** 2 + (ua - ub) ** 2 + (va - vb) ** 2);
    norm = $sqrt(la ** 2 + ua ** 2 + va ** 2);
  endfunction

endpackage
