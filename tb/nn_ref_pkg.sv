// nn_ref_pkg: bit-accurate software model of the shape-recognition network,
// used by the testbenches as the independent reference.
//
// It regenerates the pseudo-random default weights and biases from their defining
// sequence (see nn_tables_pkg) with its own code, computes the activation
// from the real tanh function, not from the activation ROM, and
// does the whole forward pass with plain integer arithmetic in one loop:
//   h_j   = bias1_j + sum_i x_i * w1[i*32+j]
//   a_j   = round(127 * tanh(sat8(h_j >>> 12) / 32))
//   y_k   = bias2_k + sum_j a_j * w2[j*4+k]
//   shape = index of the first largest y_k
package nn_ref_pkg;

  int w1 [512];
  int w2 [128];
  int b1 [32];
  int b2 [4];

  function automatic int sext(int v, int bits);
    int m;
    m = 1 << (bits - 1);
    v = v & ((1 << bits) - 1);
    return (v ^ m) - m;
  endfunction

  // 31-bit LCG, r = s >> 8, value = r mod 2^b - 2^(b-1)
  function automatic void fill(ref int dst [], input int seed, input int n, input int b);
    longint unsigned st;
    st = seed;
    dst = new[n];
    for (int i = 0; i < n; i++) begin
      st = (st * 1103515245 + 12345) % (64'd1 << 31);
      dst[i] = int'((st >> 8) % (64'd1 << b)) - (1 << (b - 1));
    end
  endfunction

  task automatic load();
    int t [];
    fill(t, 1, 512, 11); foreach (t[i]) w1[i] = t[i];
    fill(t, 2, 128, 8);  foreach (t[i]) w2[i] = t[i];
    fill(t, 3, 32, 16);  foreach (t[i]) b1[i] = t[i];
    fill(t, 4, 4, 13);   foreach (t[i]) b2[i] = t[i];
  endtask

  function automatic int tansig(int idx);   // idx in -128..127
    real t;
    t = 127.0 * $tanh(real'(idx) / 32.0);
    return int'($floor(t + 0.5));
  endfunction

  function automatic int act_index(int h);
    int z;
    z = h >>> 12;
    if (z > 127)  z = 127;
    if (z < -128) z = -128;
    return z;
  endfunction

  // Forward pass. Returns the shape code; scores and saturation counts out.
  function automatic int classify(input int x [16], output int y [4],
                                  output int n_sat);
    int h, a [32], best;
    n_sat = 0;
    for (int j = 0; j < 32; j++) begin
      h = b1[j];
      for (int i = 0; i < 16; i++) h += x[i] * w1[i*32 + j];
      if ((h >>> 12) > 127 || (h >>> 12) < -128) n_sat++;
      a[j] = tansig(act_index(h));
    end
    for (int k = 0; k < 4; k++) begin
      y[k] = b2[k];
      for (int j = 0; j < 32; j++) y[k] += a[j] * w2[j*4 + k];
    end
    best = 0;
    for (int k = 1; k < 4; k++) if (y[k] > y[best]) best = k;
    return best;
  endfunction

endpackage
