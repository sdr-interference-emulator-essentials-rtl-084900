// dsp_ref_pkg: reference models of the DSP stages, written independently of the RTL for the
// chain and top-level testbenches. Samples are kept as pairs of ints in queues; each function
// takes a whole input sequence and returns the whole output sequence.
//   rs       : round half up after a right shift, saturate to 16 bits
//   mix      : complex multiply by a fixed value or by the oscillator sequence, Q1.15
//   fir_run  : direct convolution with Q1.15 coefficients
//   cic_dec  : N-fold boxcar convolution, every R-th value, scaled by 2**(N*ceil(log2 R))
//   cic_int  : zero stuffing by R, N-fold boxcar, scaled by 2**((N-1)*ceil(log2 R))
//   down/up  : keep every R-th sample / insert R-1 zeros
//   osc      : the oscillator value exp(j*2*pi*phase) from a 1024-entry table, amplitude 32767
package dsp_ref_pkg;

  typedef int seq_t[$];

  function automatic int rs(input longint v, input int sh);
    longint r;
    r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  function automatic int lut(input int k);
    real a;
    a = 2.0 * 3.14159265358979 * real'(k % 1024) / 1024.0;
    return int'($rtoi($floor(32767.0 * $sin(a) + 0.5)));
  endfunction

  // oscillator sample n for phase increment pinc: {cos, sin}
  function automatic void osc(input int n, input logic [31:0] pinc, output int c, output int s);
    logic [31:0] ph;
    int idx;
    ph = 32'(longint'(n) * longint'(pinc));
    idx = int'(ph[31:22]);
    c = lut(idx + 256);
    s = lut(idx);
  endfunction

  function automatic void mix(input seq_t xi, input seq_t xq, input bit use_dds,
                              input logic [31:0] pinc, input int ci, input int cq,
                              output seq_t yi, output seq_t yq);
    yi = {}; yq = {};
    foreach (xi[n]) begin
      int bi, bq;
      if (use_dds) osc(n, pinc, bi, bq);
      else begin bi = ci; bq = cq; end
      yi.push_back(rs(longint'(xi[n]) * bi - longint'(xq[n]) * bq, 15));
      yq.push_back(rs(longint'(xi[n]) * bq + longint'(xq[n]) * bi, 15));
    end
  endfunction

  function automatic seq_t fir_run(input seq_t x, input int c[]);
    seq_t y;
    foreach (x[n]) begin
      longint a = 0;
      a = 0;
      foreach (c[k]) if (n - k >= 0) a += longint'(c[k]) * x[n - k];
      y.push_back(rs(a, 15));
    end
    return y;
  endfunction

  function automatic void boxcar(input int r, input int ns, output longint h[]);
    longint t[];
    h = new[1]; h[0] = 1;
    for (int s = 0; s < ns; s++) begin
      t = new[h.size() + r - 1];
      foreach (t[k]) t[k] = 0;
      foreach (h[k]) for (int j = 0; j < r; j++) t[k + j] += h[k];
      h = t;
    end
  endfunction

  function automatic seq_t cic_dec(input seq_t x, input int r, input int ns);
    seq_t y;
    longint h[];
    int sh;
    boxcar(r, ns, h);
    sh = ns * $clog2(r);
    for (int m = 0; (m + 1) * r - 1 < x.size(); m++) begin
      longint a;
      int n;
      n = (m + 1) * r - 1;
      a = 0;
      foreach (h[k]) if (n - k >= 0) a += h[k] * x[n - k];
      y.push_back(rs(a, sh));
    end
    return y;
  endfunction

  function automatic seq_t cic_int(input seq_t x, input int r, input int ns);
    seq_t y;
    longint h[];
    int sh;
    boxcar(r, ns, h);
    sh = (ns - 1) * $clog2(r);
    for (int n = 0; n < x.size() * r; n++) begin
      longint a;
      a = 0;
      foreach (h[k]) if (n - k >= 0 && (n - k) % r == 0) a += h[k] * x[(n - k) / r];
      y.push_back(rs(a, sh));
    end
    return y;
  endfunction

  function automatic seq_t down(input seq_t x, input int r);
    seq_t y;
    foreach (x[n]) if (r <= 1 || n % r == 0) y.push_back(x[n]);
    return y;
  endfunction

  function automatic seq_t up(input seq_t x, input int r);
    seq_t y;
    foreach (x[n]) begin
      y.push_back(x[n]);
      for (int k = 1; k < r; k++) y.push_back(0);
    end
    return y;
  endfunction

endpackage
