// nn_model_pkg: bit-accurate reference model of the accelerator's arithmetic,
// written independently of the RTL for the testbenches.
//
// Numbers are carried as longint. A neuron with DATA_W-bit signed inputs and
// weights accumulates exact products into a 2*DATA_W-bit accumulator that is
// clamped to its range after every addition, adds the bias scaled by
// 2**DATA_W (clamped), and applies ReLU (shift down by DATA_W-WEIGHT_INT_W,
// clamp to the largest positive DATA_W-bit value) or the sigmoid table
// (round(2**OUT_FRAC * sigmoid(v)) for the accumulator's top bits read as v).
package nn_model_pkg;

  // Interpret the low `w` bits of `v` as a two's-complement number.
  function automatic longint sx(longint v, int w);
    longint m;
    m = (longint'(1) << w) - 1;
    v = v & m;
    if (v >= (longint'(1) << (w-1))) v = v - (longint'(1) << w);
    return v;
  endfunction

  function automatic longint clamp(longint v, int w, ref int sat_count);
    longint hi, lo;
    hi = (longint'(1) << (w-1)) - 1;
    lo = -(longint'(1) << (w-1));
    if (v > hi) begin sat_count++; return hi; end
    if (v < lo) begin sat_count++; return lo; end
    return v;
  endfunction

  function automatic longint relu_ref(longint acc, int data_w, int wint, ref int sat_count);
    longint v, maxv;
    if (acc < 0) return 0;
    maxv = (longint'(1) << (data_w-1)) - 1;
    v = acc >>> (data_w - wint);
    if (v > maxv) begin sat_count++; return maxv; end
    return v;
  endfunction

  function automatic longint sigmoid_entry(longint idx, int data_w, int sig_size,
                                           int int_bits, int out_frac);
    real v, s, r, maxv;
    v = real'(idx) * (2.0 ** real'(int_bits - sig_size));
    s = 1.0 / (1.0 + $exp(-v));
    r = s * (2.0 ** real'(out_frac));
    maxv = real'((longint'(1) << (data_w-1)) - 1);
    if (r > maxv) r = maxv;
    return longint'($floor(r + 0.5));
  endfunction

  function automatic longint sigmoid_ref(longint acc, int data_w, int sig_size,
                                         int wint, int iint);
    longint idx;
    idx = acc >>> (2*data_w - sig_size);
    return sigmoid_entry(idx, data_w, sig_size, wint + iint, data_w - iint);
  endfunction

  // One neuron: x and w hold n signed values; bias is a signed DATA_W value.
  // Returns the activation; adds to acc_sat / act_sat when a clamp happens.
  function automatic longint neuron_ref(const ref longint x[], const ref longint w[],
                                        input longint bias, input int n, input int data_w,
                                        input bit sigmoid, input int sig_size,
                                        input int wint, input int iint,
                                        ref int acc_sat, ref int act_sat);
    longint acc;
    acc = 0;
    for (int i = 0; i < n; i++)
      acc = clamp(acc + x[i] * w[i], 2*data_w, acc_sat);
    acc = clamp(acc + (bias <<< data_w), 2*data_w, acc_sat);
    if (sigmoid) return sigmoid_ref(acc, data_w, sig_size, wint, iint);
    return relu_ref(acc, data_w, wint, act_sat);
  endfunction

endpackage
