// sr_ref_pkg: reference model of the signal reconstruction arithmetic for
// the testbenches. Written from the number formats and formulas of the
// design description, with 64-bit integers and real arithmetic, and
// without using the RTL.
package sr_ref_pkg;

  function automatic longint sat(longint v, int bits);
    longint hi, lo;
    hi = (longint'(1) <<< (bits - 1)) - 1;
    lo = -(longint'(1) <<< (bits - 1));
    return (v > hi) ? hi : ((v < lo) ? lo : v);
  endfunction

  // floor division for a positive divisor
  function automatic longint fdiv(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  // ADC sample -> Q6.10 in [-1, 1]; "/" of SystemVerilog truncates towards 0
  function automatic longint pre(longint adc, longint mn = 0, longint mx = 4095);
    longint range, scale;
    range = mx - mn;
    scale = fdiv(2 * 67108864 + range, 2 * range);       // round(2^26 / range)
    return sat(((2 * (adc - mn) - range) * scale) / 65536, 16);
  endfunction

  // Q13.18 -> ADC counts, truncated towards 0
  function automatic longint post(longint y, longint mn = 0, longint mx = 4095);
    return sat(((y + 262144) * (mx - mn)) / 524288 + mn, 32);
  endfunction

  // neuron: Q6.10 inputs, Q6.8 weights, Q12.18 bias -> Q13.18 (saturated)
  function automatic longint neuron(longint x[], longint w[], longint b);
    longint acc;
    acc = b;
    foreach (x[i]) acc += x[i] * w[i];
    return sat(acc, 31);
  endfunction

  // tanh table: nearest of 5000 entries over [-0.7, 0.8]
  function automatic longint tanh_idx(longint h, int n = 5000, real lo = -0.7, real hi = 0.8);
    longint lo_raw, hi_raw, span, k, d, idx;
    lo_raw = longint'(lo * 262144.0);
    hi_raw = longint'(hi * 262144.0);
    span   = hi_raw - lo_raw;
    k      = longint'(real'(n - 1) * 1073741824.0 / real'(span));
    d      = h - lo_raw;
    if (d < 0) d = 0;
    if (d > span) d = span;
    idx = (d * k + 536870912) / 1073741824;
    if (idx > longint'(n) - 1) idx = longint'(n) - 1;
    return idx;
  endfunction

  function automatic longint tanh_q(longint h, int n = 5000, real lo = -0.7, real hi = 0.8);
    real xr;
    xr = lo + real'(tanh_idx(h, n, lo, hi)) * (hi - lo) / real'(n - 1);
    return longint'($tanh(xr) * 1024.0);
  endfunction

  // default example network
  function automatic longint w1(int i);
    longint t[9] = '{0, 0, -16, -32, 192, -32, -16, 0, 0};
    return t[i];
  endfunction
  localparam longint B1 = -58982;
  localparam longint W9 = 484;
  localparam longint B2 = 3932;

  // whole network on a window of 9 normalised samples (x0 oldest)
  function automatic longint mlp(longint x[9]);
    longint xd[], wd[], t[], w9[];
    longint h;
    xd = new[9];
    wd = new[9];
    for (int i = 0; i < 9; i++) begin
      xd[i] = x[i];
      wd[i] = w1(i);
    end
    h  = neuron(xd, wd, B1);
    t  = new[1];
    w9 = new[1];
    t[0]  = tanh_q(h);
    w9[0] = W9;
    return neuron(t, w9, B2);
  endfunction

  // amplitude of sample j of a stream; bubbles and BCs outside the stream
  // count as a 0-count sample in the window
  function automatic longint amp_of(longint s[$], bit ok[$], int j);
    longint x[9];
    for (int i = 0; i < 9; i++) begin
      int p;
      p = j - 4 + i;
      x[i] = (p >= 0 && p < s.size() && ok[p]) ? pre(s[p]) : pre(0);
    end
    return post(mlp(x));
  endfunction

endpackage
