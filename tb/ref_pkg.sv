// ref_pkg: bit-true reference models of the decimation chain, used by the
// testbenches to compute expected outputs directly from the filter
// equations (plain convolutions over whole sequences), independently of the
// hardware structures.
package ref_pkg;
  import sdadc_pkg::*;

  typedef longint lq_t[$];

  // 4th-order comb at 128 fs on a +-1 stream, before down-sampling. The
  // history before the first bit is the reset pattern x[-1] = +1,
  // x[-2] = -1, x[-3] = +1, ...
  function automatic lq_t comb4_ref(input bit bits[$]);
    lq_t y;
    for (int n = 0; n < bits.size(); n++) begin
      longint acc = 0;
      for (int i = 0; i < 13; i++) begin
        int j = n - i;
        bit b = (j >= 0) ? bits[j] : ((-j) % 2 == 1);
        acc += b ? COMB4_C[i] : -COMB4_C[i];
      end
      y.push_back(acc);
    end
    return y;
  endfunction

  // Keep samples M-1, 2M-1, ...
  function automatic lq_t downsample(input lq_t x, input int m);
    lq_t y;
    for (int n = m - 1; n < x.size(); n += m) y.push_back(x[n]);
    return y;
  endfunction

  // (1 + z^-1)^K with zero history.
  function automatic lq_t binom_ref(input lq_t x, input int k);
    lq_t y;
    longint c [16];
    c[0] = 1;
    for (int i = 1; i <= k; i++) c[i] = c[i-1] * (k - i + 1) / i;
    for (int n = 0; n < x.size(); n++) begin
      longint acc = 0;
      for (int i = 0; i <= k; i++) if (n - i >= 0) acc += c[i] * x[n-i];
      y.push_back(acc);
    end
    return y;
  endfunction

  // Whole comb decimator: 1-bit stream -> 8 fs words.
  function automatic lq_t comb_ref(input bit bits[$]);
    return downsample(binom_ref(downsample(binom_ref(downsample(comb4_ref(bits), 4), 5), 2), 7), 2);
  endfunction

  // Full symmetric impulse response of half-band filter `stage`. With cw
  // non-zero each stored coefficient (16 bits, 24 for stage 3) is rounded
  // to cw bits: c / 2^(stored - cw), rounded to nearest, ties upwards.
  function automatic lq_t hbf_taps(input int stage, input int n_taps, input int cw = 0);
    lq_t h;
    int  drop = (cw == 0) ? 0 : ((stage == 3) ? 24 : 16) - cw;
    for (int i = 0; i < n_taps; i++) begin
      longint c = longint'(hbf_coef(stage, (i < (n_taps + 1) / 2) ? i : n_taps - 1 - i));
      if (drop > 0) c = longint'($floor(real'(c) / real'(longint'(1) <<< drop) + 0.5));
      h.push_back(c);
    end
    return h;
  endfunction

  // Half-band filter with down-sampling by 2, rounding and saturation.
  function automatic lq_t hbf_ref(input lq_t x, input int stage, input int n_taps,
                                  input int shift, input int out_w, input int cw = 0);
    lq_t y;
    lq_t h = hbf_taps(stage, n_taps, cw);
    longint omax = (longint'(1) <<< (out_w - 1)) - 1;
    longint omin = -(longint'(1) <<< (out_w - 1));
    for (int n = 1; n < x.size(); n += 2) begin
      longint acc = 0, r;
      for (int i = 0; i < n_taps; i++) if (n - i >= 0) acc += h[i] * x[n-i];
      r = (acc + (longint'(1) <<< (shift - 1))) >>> shift;
      y.push_back(r > omax ? omax : (r < omin ? omin : r));
    end
    return y;
  endfunction

  // Output word: 24-bit sample >>> 3, saturated to 18 bits.
  function automatic longint to_pcm(input longint s);
    longint r = s >>> 3;
    return r > 131071 ? 131071 : (r < -131072 ? -131072 : r);
  endfunction

endpackage
