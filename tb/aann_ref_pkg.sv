// Reference model of the adaptive ANN for the testbenches.
//
// Plain integer (and, for the sigmoid, real-valued) arithmetic written
// directly from the network equations, independent of the RTL structure:
//   y = sat(floor((x - x_min) * g / 2^gsh) + y_min)
//   h = PLAN(floor((b_h * 2^F + sum w_h * y) / 2^F))   (PLAN evaluated in reals)
//   o = sat(floor((b_o * 2^F + sum w_o * h) / 2^F))
//   class = first index of the maximum over the first k_s outputs.
// Inputs beyond i_s and hidden neurons beyond j_s are zero. The class
// ann_model holds one parameter set per sensor type, can fill them with
// random values and lists the parameter bank write sequence.
package aann_ref_pkg;
  import aann_pkg::*;

  localparam longint ONE_Q = longint'(1) << FRAC_W;

  function automatic longint sat(longint v, int unsigned w);
    longint hi = (longint'(1) << (w - 1)) - 1;
    longint lo = -(longint'(1) << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // floor(v / 2^k) for any sign
  function automatic longint fdiv2(longint v, int unsigned k);
    longint d = longint'(1) << k;
    longint q = v / d;
    if ((v % d != 0) && (v < 0)) q = q - 1;
    return q;
  endfunction

  // PLAN sigmoid on a value with fw fraction bits, result with fw bits
  function automatic longint plan_ref(longint beta, int unsigned fw = FRAC_W);
    real m, p;
    longint pq, one_q;
    one_q = longint'(1) << fw;
    m = (beta < 0 ? -real'(beta) : real'(beta)) / real'(one_q);
    if (m >= 5.0)        p = 1.0;
    else if (m >= 2.375) p = 0.03125 * m + 0.84375;
    else if (m >= 1.0)   p = 0.125 * m + 0.625;
    else                 p = 0.25 * m + 0.5;
    pq = longint'($floor(p * real'(one_q) + 1.0e-9));
    return (beta < 0) ? one_q - pq : pq;
  endfunction

  function automatic longint input_ref(longint x, longint xmin, longint g, longint gsh, longint ymin,
                                       int unsigned dw = DATA_W);
    return sat(fdiv2((x - xmin) * g, int'(gsh)) + ymin, dw);
  endfunction

  // DW/FW: neuron width and fraction bits of the modelled datapath. Random
  // classifiers are generated at 5 fraction bits and scaled by 2^(FW-5).
  class ann_model #(int unsigned DW = DATA_W, int unsigned FW = FRAC_W);
    localparam longint ONE = longint'(1) << FW;
    localparam longint SCALE = longint'(1) << (FW - 5);
    longint xmin [N_SENS][N_IN];
    longint gain [N_SENS][N_IN];
    longint gsh  [N_SENS][N_IN];
    longint ymin [N_SENS][N_IN];
    longint wh   [N_SENS][N_HID][N_IN];
    longint bh   [N_SENS][N_HID];
    longint wo   [N_SENS][N_OUT][N_HID];
    longint bo   [N_SENS][N_OUT];
    // feature range used by the stimulus generator, per set and feature
    longint xrange [N_SENS][N_IN];

    // intermediate results of the last classify() call
    longint y [N_IN];
    longint beta [N_HID];
    longint h [N_HID];
    longint o [N_OUT];

    // When set, the padding entries of a set (parameters of neurons the
    // classifier does not use) get random values instead of zeros, to show
    // that the datapath ignores them.
    bit pad_garbage;

    function new(bit pad_garbage = 0);
      this.pad_garbage = pad_garbage;
      for (int s = 0; s < N_SENS; s++) randomize_set(s);
    endfunction

    function automatic longint srand(int lo, int hi);
      return longint'($urandom_range(hi - lo, 0)) + longint'(lo);
    endfunction

    // Random classifier for set s. Only the active part of the topology is
    // filled; the padding stays zero as in a resized trained classifier
    // (unless pad_garbage is set).
    function void randomize_set(int s);
      for (int i = 0; i < N_IN; i++) begin
        int r = int'($urandom_range(12, 3));
        xmin[s][i] = 0; gain[s][i] = 0; gsh[s][i] = 0; ymin[s][i] = -ONE;
        xrange[s][i] = longint'(1) << r;
        if (i < int'(TOPO_I[s])) begin
          xmin[s][i] = srand(-2000, 2000);
          gain[s][i] = srand(96, 160) * SCALE;
          gsh[s][i]  = longint'(r) + 1;
        end
      end
      for (int j = 0; j < N_HID; j++) begin
        bh[s][j] = (j < int'(TOPO_J[s]) || pad_garbage) ? srand(-32, 32) * SCALE : 0;
        for (int i = 0; i < N_IN; i++)
          wh[s][j][i] = ((j < int'(TOPO_J[s]) && i < int'(TOPO_I[s])) || pad_garbage) ? srand(-32, 32) * SCALE : 0;
      end
      // output biases centre each output at zero for h = 0.5, so that the
      // winning class depends on the features rather than on the biases
      for (int k = 0; k < N_OUT; k++) begin
        longint wsum = 0;
        for (int j = 0; j < N_HID; j++) begin
          wo[s][k][j] = ((k < int'(TOPO_K[s]) && j < int'(TOPO_J[s])) || pad_garbage) ? srand(-120, 120) * SCALE : 0;
          wsum += wo[s][k][j];
        end
        bo[s][k] = (k < int'(TOPO_K[s]) || pad_garbage) ? sat(srand(-4, 4) * SCALE - wsum / 2, DW) : 0;
      end
    endfunction

    // A feature value for set s, feature i: mostly inside the trained range,
    // sometimes outside it (exercises input saturation).
    function longint feature(int s, int i);
      if ($urandom_range(9, 0) == 0)
        return xmin[s][i] + srand(-4 * int'(xrange[s][i]), 4 * int'(xrange[s][i]));
      return xmin[s][i] + srand(0, int'(xrange[s][i]));
    endfunction

    function int classify(int s, longint x [N_IN]);
      longint acc;
      int best;
      for (int i = 0; i < N_IN; i++)
        y[i] = (i < int'(TOPO_I[s])) ? input_ref(x[i], xmin[s][i], gain[s][i], gsh[s][i], ymin[s][i], DW) : 0;
      for (int j = 0; j < N_HID; j++) begin
        acc = bh[s][j] * ONE;
        for (int i = 0; i < N_IN; i++) acc += wh[s][j][i] * y[i];
        beta[j] = fdiv2(acc, FW);
        h[j] = (j < int'(TOPO_J[s])) ? plan_ref(beta[j], FW) : 0;
      end
      for (int k = 0; k < N_OUT; k++) begin
        acc = bo[s][k] * ONE;
        for (int j = 0; j < N_HID; j++) acc += wo[s][k][j] * h[j];
        o[k] = sat(fdiv2(acc, FW), DW);
      end
      best = 0;
      for (int k = 1; k < int'(TOPO_K[s]); k++)
        if (o[k] > o[best]) best = k;
      return best;
    endfunction

    // Value of parameter bank entry idx of set s (layout of param_bank).
    function longint entry(int s, int idx);
      int b;
      if (idx < N_IN)       return xmin[s][idx];
      if (idx < 2 * N_IN)   return gain[s][idx - N_IN];
      if (idx < 3 * N_IN)   return gsh[s][idx - 2 * N_IN];
      if (idx < 4 * N_IN)   return ymin[s][idx - 3 * N_IN];
      b = 4 * N_IN;
      if (idx < b + N_HID * N_IN) return wh[s][(idx - b) / N_IN][(idx - b) % N_IN];
      b += N_HID * N_IN;
      if (idx < b + N_HID) return bh[s][idx - b];
      b += N_HID;
      if (idx < b + N_OUT * N_HID) return wo[s][(idx - b) / N_HID][(idx - b) % N_HID];
      b += N_OUT * N_HID;
      return bo[s][idx - b];
    endfunction

    function int set_size();
      return 4 * N_IN + N_HID * N_IN + N_HID + N_OUT * N_HID + N_OUT;
    endfunction
  endclass

endpackage
