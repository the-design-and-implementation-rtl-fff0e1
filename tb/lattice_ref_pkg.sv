// lattice_ref_pkg: reference model and test signals for the testbenches.
//
// lattice_ref is a sample-by-sample (unfolded) model of the adaptive
// lattice LMS noise canceller, written with plain integer arithmetic on
// longint: stage m forms f_m = f_{m-1} - k_m*b_{m-1}(p-1) and
// b_m = b_{m-1}(p-1) - k_m*f_{m-1}, the taps form y = sum w_j*b_j and the
// weights follow w_j += 2^-MU_SHIFT * e(p-1) * b_j(p-1) before use. Products
// are truncated toward minus infinity and results saturate, the number
// format of the RTL (Q1.15 data, Q2.22 weights). It knows nothing of
// folding, so a folded design must match it sample for sample.
//
// ecg_sample / pli_sample make a synthetic ECG (P wave, QRS complex and T
// wave as Gaussian bumps, 72 beats per minute at 360 samples per second,
// the MIT-BIH sampling rate) and mains interference.
package lattice_ref_pkg;
  localparam longint DMAX = 32767;
  localparam longint DMIN = -32768;
  localparam longint WMAX = (longint'(1) <<< 23) - 1;
  localparam longint WMIN = -(longint'(1) <<< 23);

  function automatic longint clamp(longint v, longint lo, longint hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // floor(a*b / 2^s)
  function automatic longint mul_shr(longint a, longint b, int s);
    return (a * b) >>> s;
  endfunction

  function automatic void stage(input longint f_in, input longint b_del, input longint k,
                                output longint f_out, output longint b_out);
    f_out = clamp(f_in  - mul_shr(k, b_del, 15), DMIN, DMAX);
    b_out = clamp(b_del - mul_shr(k, f_in, 15), DMIN, DMAX);
  endfunction

  function automatic void tap(input longint w_in, input longint e_prev, input longint b_old,
                              input longint b_cur, input int mu_shift,
                              output longint w_out, output longint prod);
    w_out = clamp(w_in + mul_shr(e_prev, b_old, 30 + mu_shift - 22), WMIN, WMAX);
    prod  = w_out * b_cur;
  endfunction

  class lattice_ref;
    int     taps;
    int     mu_shift;
    longint k[];
    longint bd[];
    longint w[];
    longint e_prev;

    function new(int taps_i, int mu_shift_i);
      taps     = taps_i;
      mu_shift = mu_shift_i;
      k  = new[taps];
      bd = new[taps];
      w  = new[taps];
      foreach (k[i]) begin k[i] = 0; bd[i] = 0; w[i] = 0; end
      e_prev = 0;
    endfunction

    function void step(input longint x, input longint d, output longint y, output longint e);
      longint f, b, fn, bn, acc, wn, p;
      f = x; b = x; acc = 0;
      for (int j = 0; j < taps; j++) begin
        tap(w[j], e_prev, bd[j], b, mu_shift, wn, p);
        w[j] = wn;
        acc += p;
        stage(f, bd[j], k[j], fn, bn);
        bd[j] = b;
        f = fn; b = bn;
      end
      y = clamp(acc >>> 22, DMIN, DMAX);
      e = clamp(d - y, DMIN, DMAX);
      e_prev = e;
    endfunction
  endclass

  localparam real PI = 3.14159265358979323846;
  localparam real FS = 360.0;

  function automatic real gauss(real t, real c, real s);
    return $exp(-((t - c) * (t - c)) / (2.0 * s * s));
  endfunction

  // Synthetic ECG in units of full scale (1.0 = Q1.15 full scale).
  function automatic real ecg_sample(int n);
    real t;
    t = real'(n % 300) / FS;   // 300 samples = 0.833 s per beat
    return 0.05 * gauss(t, 0.20, 0.025)
         - 0.06 * gauss(t, 0.31, 0.008)
         + 0.45 * gauss(t, 0.33, 0.010)
         - 0.09 * gauss(t, 0.35, 0.008)
         + 0.10 * gauss(t, 0.55, 0.040);
  endfunction

  function automatic real pli_sample(int n, real freq, real amp, real phase);
    return amp * $sin(2.0 * PI * freq * real'(n) / FS + phase);
  endfunction

  function automatic longint to_q15(real v);
    return clamp(longint'($rtoi(v * 32768.0)), DMIN, DMAX);
  endfunction
endpackage
