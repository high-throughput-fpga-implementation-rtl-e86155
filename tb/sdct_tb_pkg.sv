// sdct_tb_pkg -- reference arithmetic for the sliding DCT testbenches.
//
// The functions here are written independently of the RTL: rounding is done
// on real numbers ($floor and a tie test) rather than on bits, and the DCT
// reference is the direct damped window sum, not a recursion.
package sdct_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  // Round v to an integer: nearest, ties to even.
  function automatic longint round_even(input real v);
    real    fl, d;
    longint r;
    fl = $floor(v);
    d  = v - fl;
    r  = longint'(fl);
    if (d > 0.5) r = r + 1;
    else if (d == 0.5 && (r % 2 != 0)) r = r + 1;
    return r;
  endfunction

  // Clip an integer to a signed w-bit range.
  function automatic longint clip(input longint v, input int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Fixed-point integer p with 'sh' fraction bits to drop: round to even, clip.
  function automatic longint rnd_sat(input longint p, input int sh, input int w);
    return clip(round_even(real'(p) / (2.0 ** sh)), w);
  endfunction

  // Damped sliding DCT-II of the last M samples, hist[0] = x(n), hist[k] = x(n-k):
  //   X_m(n) = k_m sum_k beta^k x(n-k) cos(m (M-k-1/2) pi / M)
  function automatic real sdct_ref(input real hist[], input int m, input int M, input real beta);
    real acc, km;
    acc = 0.0;
    km  = (m == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    for (int k = 0; k < M; k++)
      acc += (beta ** k) * hist[k] * $cos(m * (M - k - 0.5) * PI / M);
    return km * acc;
  endfunction

  // Zero-mean Gaussian sample with standard deviation sigma (Box-Muller).
  function automatic real gauss(input real sigma);
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return sigma * $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

endpackage
