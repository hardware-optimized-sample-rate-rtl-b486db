// src_ref_pkg: reference arithmetic for the SRC testbenches.
//
// Builds a Kaiser-windowed sinc prototype filter (beta = kaiser_beta,
// 10 unless a testbench changes it), oversampled
// M times, quantised to Q2.14, and computes expected output samples
// directly from absolute times: output k of a channel lies at time
// N*T1 + k*T2 (the first output waits for a full registerbank), input
// sample n at time (n+1)*T1 with T1 = M*2**FRAC_W. Everything here
// is written from the definitions (sinc, Bessel series, floor division),
// not from the RTL's structure.
package src_ref_pkg;

  localparam int N  = 19;
  localparam int M  = 8;
  localparam int C  = (N - 1) / 2;
  localparam int FRAC = 60;

  real kaiser_beta = 10.0;

  function automatic real bessel_i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 40; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s = s + t;
    end
    return s;
  endfunction

  // prototype tap i (0 .. M*N-1) sits at time (i - C*M)*T3
  function automatic int proto(int i);
    real pi = 3.14159265358979;
    real t, g, w, r;
    if (i < 0 || i >= M * N) return 0;
    t = real'(i - C * M) / real'(M);
    g = (i == C * M) ? 1.0 : $sin(pi * t) / (pi * t);
    r = real'(i - C * M) / real'(C * M + M);
    w = bessel_i0(kaiser_beta * $sqrt(1.0 - r * r)) / bessel_i0(kaiser_beta);
    return int'(g * w * 16384.0);   // round to Q2.14
  endfunction

  // Test signal selection: by default two tones plus a small pseudo-random
  // part; with pure_tone set, a single complex tone of tone_f[ch] cycles per
  // input sample and amplitude tone_amp (for SINR measurements). With
  // multi_tone also set, the real part is instead the four-tone signal
  // 1/4 sin(w) + sin(w/3) + sin(w/2) + cos(w), w = 2 pi tone_f[ch] n, and the
  // imaginary part is the same sum with every term a quarter period later.
  bit  pure_tone = 0;
  bit  multi_tone = 0;
  real tone_f [8] = '{default: 0.01};
  real tone_amp = 16000.0;

  // ideal value of the pure tone at a (fractional) input sample position
  function automatic real tone_value(int ch, real pos, bit im);
    real pi = 3.14159265358979;
    real w = 2.0 * pi * tone_f[ch] * pos;
    if (multi_tone)
      return tone_amp * (im ? (-0.25 * $cos(w) - $cos(w / 3.0) - $cos(w / 2.0) + $sin(w))
                            : ( 0.25 * $sin(w) + $sin(w / 3.0) + $sin(w / 2.0) + $cos(w)));
    return tone_amp * (im ? $sin(2.0 * pi * tone_f[ch] * pos) : $cos(2.0 * pi * tone_f[ch] * pos));
  endfunction

  function automatic int clip16(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  // deterministic test signal for input sample n of channel ch
  function automatic int sample(int ch, longint n, bit im);
    real pi = 3.14159265358979;
    real f1 = 0.013 * (ch + 1), f2 = 0.071 + 0.01 * ch;
    real v;
    int  h;
    if (n < 0) return 0;
    // a tone louder than full scale is clipped, as a converter input would be
    if (pure_tone) return clip16(int'(tone_value(ch, real'(n), im)));
    v = 6000.0 * $sin(2.0 * pi * f1 * real'(n) + (im ? pi / 2.0 : 0.0))
      + 3000.0 * $cos(2.0 * pi * f2 * real'(n) + (im ? 1.0 : 0.0));
    h = int'((n * 7919 + ch * 104729 + (im ? 55 : 0)) % 2001) - 1000;
    return int'(v) + h;
  endfunction

  function automatic longint floor_div(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  // expected output k of channel ch for time step t2 (units 2**-FRAC of T3)
  function automatic int expected(int ch, longint k, logic [69:0] t2, bit im);
    logic [127:0] tau;
    longint       n0, l, alpha, y1, y2, d, y, r;
    logic [127:0] ph;
    tau   = (128'(N) << (FRAC + 3)) + 128'(k) * 128'(t2);
    n0    = longint'(tau / (128'(M) << FRAC)) - 1;         // newest input sample
    ph    = tau % (128'(M) << FRAC);                        // time past it
    l     = longint'(ph / (128'(1) << FRAC));
    alpha = longint'((ph % (128'(1) << FRAC)) / (128'(1) << (FRAC - 16)));
    y1 = 0;
    y2 = 0;
    for (int j = 0; j < N; j++) begin
      y1 += longint'(proto(j * M + int'(l)))     * longint'(sample(ch, n0 - longint'(j), im));
      y2 += longint'(proto(j * M + int'(l) + 1)) * longint'(sample(ch, n0 - longint'(j), im));
    end
    d = floor_div((y2 - y1) * alpha, 65536);
    y = y1 + d;
    r = floor_div(y + 8192, 16384);
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

endpackage
