// tb_ref_pkg: reference models shared by the testbenches.
//
// am_ref      - the approximate product, computed from the algorithm's
//               definition (exact shift terms + biased Mitchell residue term)
// mitchell_ref- classic Mitchell product without decomposition or bias, used
//               only to compare error levels
// ecg_value   - synthetic ECG: piecewise-linear QRS (Q dip, sharp R, S dip)
//               and parabolic P and T humps around a list of R positions
// n_div_ref   - the shift-based division by the beat count
package tb_ref_pkg;

  function automatic int msb(input longint unsigned v);
    int k = -1;
    for (int i = 0; i < 64; i++) if (v[i]) k = i;
    return k;
  endfunction

  function automatic longint am_ref(input int a, input int b);
    longint unsigned am, bm, fa, fb, base, term, mant, x3, x4, xs;
    int k1, k2, k3, k4;
    bit neg;
    neg = (a < 0) != (b < 0);
    am = (a < 0) ? 64'(-longint'(a)) : 64'(a);
    bm = (b < 0) ? 64'(-longint'(b)) : 64'(b);
    if (am == 0 || bm == 0) return 0;
    k1 = msb(am); k2 = msb(bm);
    fa = am - (64'd1 << k1);
    fb = bm - (64'd1 << k2);
    base = am * (64'd1 << k2) + bm * (64'd1 << k1) - (64'd1 << (k1 + k2));
    term = 0;
    if (fa != 0 && fb != 0) begin
      k3 = msb(fa); k4 = msb(fb);
      x3 = ((fa - (64'd1 << k3)) * 65536) / (64'd1 << k3);
      x4 = ((fb - (64'd1 << k4)) * 65536) / (64'd1 << k4);
      xs = x3 + x4;
      if (xs < 65536) mant = 65536 + xs + 5461;
      else            mant = 2 * xs + 5461;
      term = (mant * (64'd1 << (k3 + k4))) / 65536;
    end
    return neg ? -longint'(base + term) : longint'(base + term);
  endfunction

  function automatic longint mitchell_ref(input int a, input int b);
    longint unsigned am, bm, x1, x2, xs, mant;
    int k1, k2;
    am = (a < 0) ? 64'(-longint'(a)) : 64'(a);
    bm = (b < 0) ? 64'(-longint'(b)) : 64'(b);
    if (am == 0 || bm == 0) return 0;
    k1 = msb(am); k2 = msb(bm);
    x1 = ((am - (64'd1 << k1)) * 65536) / (64'd1 << k1);
    x2 = ((bm - (64'd1 << k2)) * 65536) / (64'd1 << k2);
    xs = x1 + x2;
    mant = (xs < 65536) ? 65536 + xs : 2 * xs;
    return ((a < 0) != (b < 0)) ? -longint'((mant << (k1 + k2)) / 65536)
                                :  longint'((mant << (k1 + k2)) / 65536);
  endfunction

  // One neuron: sum of approximate products (Q20.12) back to Q10.6, plus the
  // bias, ReLU if asked, saturated to 16 bits.
  function automatic int neuron_ref(input int x [], input int w [], input int bias, input bit relu);
    longint acc = 0, pre;
    foreach (x[i]) acc += am_ref(x[i], w[i]);
    pre = (acc >>> 6) + bias;
    if (relu && pre < 0) pre = 0;
    if (pre > 32767) pre = 32767;
    if (pre < -32768) pre = -32768;
    return int'(pre);
  endfunction

  // The 6-32-16-8-2 network; wm holds the weight memory image (per neuron
  // its weights then its bias).  Returns the two output nodes.
  function automatic void dnn_ref(input int in_vec [6], input int wm [], output int out [2]);
    int sizes [5] = '{6, 32, 16, 8, 2};
    int cur [], nxt [];
    int ptr = 0;
    cur = new[6];
    foreach (in_vec[i]) cur[i] = in_vec[i];
    for (int l = 0; l < 4; l++) begin
      nxt = new[sizes[l+1]];
      for (int j = 0; j < sizes[l+1]; j++) begin
        int w [];
        w = new[sizes[l]];
        for (int i = 0; i < sizes[l]; i++) w[i] = wm[ptr + i];
        nxt[j] = neuron_ref(cur, w, wm[ptr + sizes[l]], l != 3);
        ptr += sizes[l] + 1;
      end
      cur = nxt;
    end
    out[0] = cur[0];
    out[1] = cur[1];
  endfunction

  function automatic longint unsigned n_div_ref(input longint unsigned x, input int n);
    case (n)
      1: return x;
      2: return x / 2;
      3: return x / 4 + x / 16 + x / 32;
      4: return x / 4;
      default: return 0;
    endcase
  endfunction

  // Shape of one beat around its R peak, at offset d = n - r.
  function automatic int beat_shape(input int d, input int t_off);
    int v = 0;
    // P wave: parabola, peak 150 at d = -40, half-width 10
    if (d > -50 && d < -30) v += 150 - (150 * (d + 40) * (d + 40)) / 100;
    // T wave: parabola, peak 400 at d = t_off, half-width 20
    if (d > t_off - 20 && d < t_off + 20) v += 400 - (400 * (d - t_off) * (d - t_off)) / 400;
    // QRS: 0 at -7, Q -200 at -4, R 2000 at 0, S -400 at +4, 0 at +7
    if (d > -7 && d <= -4) v += (-200 * (d + 7)) / 3;
    else if (d > -4 && d <= 0) v += -200 + (2200 * (d + 4)) / 4;
    else if (d > 0 && d <= 4) v += 2000 - (2400 * d) / 4;
    else if (d > 4 && d < 7) v += -400 + (400 * (d - 4)) / 3;
    return v;
  endfunction

endpackage
