// Reference model of the tunable interpolated filter structure, used by the
// testbenches to compute expected outputs independently of the RTL.
//
// Histories are queues with the newest sample at index 0. The sub-filter is
// computed in direct form, y(n) = sum_k s_k h[k] x(n - (NTAPS-1-k) M), rather
// than the transposed form of the RTL. All intermediate values are wrapped to
// the 24-bit signed word of the RTL.
package ispa_ref_pkg;
  import ispa_pkg::*;

  function automatic longint wrap(input longint v);
    longint m = longint'(1) << W;
    longint r = v % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return r;
  endfunction

  function automatic longint at(input int hist[$], input int idx);
    return (idx < hist.size()) ? longint'(hist[idx]) : 0;
  endfunction

  function automatic longint sub_out(input int xh[$], input int m, input bit sel_sub,
                                     input sub_coefs_t h);
    longint acc = 0;
    for (int k = 0; k < SUB_TAPS; k++) begin
      longint term = longint'($signed(h[k])) * at(xh, (SUB_TAPS - 1 - k) * m);
      if ((k % 2 == 1) && sel_sub) acc -= term;
      else                         acc += term;
    end
    return wrap(acc);
  endfunction

  function automatic longint h_a(input int xh[$], input int m, input bit sel_sub,
                                 input int alpha);
    longint v = sub_out(xh, m, sel_sub, SUB_COEFS[NSUB-1]);
    for (int k = NSUB - 2; k >= 0; k--)
      v = wrap(wrap((v * alpha) >>> FRAC) + sub_out(xh, m, sel_sub, SUB_COEFS[k]));
    return v;
  endfunction

  function automatic longint h_c(input int xh[$], input int m, input bit sel_sub,
                                 input int alpha);
    return wrap(at(xh, (SUB_TAPS - 1) / 2 * m) * (1 << FRAC) - h_a(xh, m, sel_sub, alpha));
  endfunction

  // Scaling and saturation of a mask input to 8 signed bits.
  function automatic int sat8(input longint v);
    longint s = v >>> FRAC;
    if (s > 127)  return 127;
    if (s < -128) return -128;
    return int'(s);
  endfunction

  function automatic longint mask_sum(input int mh[$], input mask_coefs_t g);
    longint acc = 0;
    for (int k = 0; k < MASK_TAPS; k++)
      acc += longint'($signed(g[k])) * at(mh, k);
    return acc;
  endfunction
endpackage
