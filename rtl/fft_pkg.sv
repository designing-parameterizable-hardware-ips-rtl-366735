// fft_pkg -- constants and elaboration-time helpers of the pipelined radix-2 FFT.
//
// The FFT runs log2(N) butterfly stages. Stage s (1-based, counted from the input) works on
// pairs of samples N/2**s apart and owns a feedback buffer of N/2**s samples, so the buffers add
// up to N-1 samples. Stages may be merged into groups that share one butterfly and one memory;
// these helpers give every stage's buffer size, its offset inside a merged memory, its twiddle
// table size and offset, and the twiddle factors themselves, computed at elaboration:
//     W_N^e = cos(2*pi*e/N) - j*sin(2*pi*e/N), quantised as round(value * 2**TF).
package fft_pkg;

  // Bit reversal of the low `bits` bits of v.
  function automatic int bitrev(int v, int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++)
      if (((v >> i) & 1) != 0) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  // Feedback buffer depth of stage s (1-based) of an N-point FFT.
  function automatic int stage_depth(int n, int s);
    return n >> s;
  endfunction

  // Offset of stage first+k inside the memory merged from stages first .. first+g-1.
  function automatic int buf_base(int n, int first, int k);
    int b;
    b = 0;
    for (int i = 0; i < k; i++) b += n >> (first + i);
    return b;
  endfunction

  // Number of distinct twiddle factors stage s uses, and the offset of stage first+k inside a
  // twiddle table merged from stages first .. first+g-1.
  function automatic int tw_count(int s);
    return 1 << (s - 1);
  endfunction

  function automatic int tw_base(int first, int k);
    int b;
    b = 0;
    for (int i = 0; i < k; i++) b += tw_count(first + i);
    return b;
  endfunction

  // Quantised real (imag = 0) or imaginary (imag = 1) part of W_N^e with tf fractional bits.
  function automatic int twiddle(int n, int e, int tf, bit imag);
    real th, v;
    th = 2.0 * 3.14159265358979323846 * real'(e) / real'(n);
    v  = imag ? -$sin(th) : $cos(th);
    return $rtoi($floor(v * real'(1 << tf) + 0.5));
  endfunction

  function automatic int clog2_min1(int v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
