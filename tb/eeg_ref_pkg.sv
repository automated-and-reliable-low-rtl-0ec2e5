// eeg_ref_pkg: plain behavioural reference of the artefact-removal method,
// written with 64-bit integers and simple loops, used by the testbenches to
// predict what the RTL must produce. It follows the method step by step
// (separate arrays, no memory layout tricks beyond the band offsets) and
// also generates synthetic EEG records with muscle bursts and blinks.
package eeg_ref_pkg;

  typedef longint arr_t[];
  // Frame flags, frame b -> bit b (enough for 4-coefficient frames of a
  // 2560-sample record).
  typedef bit [511:0] flags_t;

  function automatic int dof(int n, int z);
    return n - (n >> (z - 1));
  endfunction

  // Forward integer Haar: x[0..n/2^lv-1] <- a_lv, d[dof(z) + k] <- d_z[k].
  function automatic void fwd(ref arr_t x, ref arr_t d, input int n, input int lv);
    for (int z = 1; z <= lv; z++) begin
      arr_t a;
      a = new[n >> z];
      for (int k = 0; k < (n >> z); k++) begin
        a[k] = x[2*k] + x[2*k+1];
        d[dof(n, z) + k] = x[2*k] - x[2*k+1];
      end
      for (int k = 0; k < (n >> z); k++) x[k] = a[k];
    end
  endfunction

  function automatic void inv(ref arr_t x, ref arr_t d, input int n, input int lv);
    for (int z = lv; z >= 1; z--) begin
      arr_t y;
      y = new[n >> (z - 1)];
      for (int k = 0; k < (n >> z); k++) begin
        y[2*k]   = (x[k] + d[dof(n, z) + k]) >>> 1;
        y[2*k+1] = (x[k] - d[dof(n, z) + k]) >>> 1;
      end
      for (int k = 0; k < (n >> (z - 1)); k++) x[k] = y[k];
    end
  endfunction

  function automatic longint soft_ref(longint v, longint thr);
    longint m;
    m = (v < 0) ? -v : v;
    if (m <= thr) return 0;
    return (v < 0) ? -(m - thr) : (m - thr);
  endfunction

  function automatic void denoise(ref arr_t d, input int n, input longint thr[]);
    for (int z = 1; z <= thr.size(); z++)
      for (int k = 0; k < (n >> z); k++)
        d[dof(n, z) + k] = soft_ref(d[dof(n, z) + k], thr[z-1]);
  endfunction

  // Muscle removal on d1/d2; flags returned as bit vectors (frame b -> bit b).
  function automatic void muscle(ref arr_t d, input int n, input int xf,
                                 output flags_t f1, output flags_t f2);
    int s;
    longint p1[], p2[];
    longint msum;
    s = ((n / 2) + xf - 1) / xf;
    p1 = new[s]; p2 = new[s];
    foreach (p1[b]) begin p1[b] = 0; p2[b] = 0; end
    for (int k = 0; k < n / 2; k++) p1[k / xf] += 2 * d[k] * d[k];
    for (int k = 0; k < n / 4; k++) p2[k / (xf / 2)] += d[n/2 + k] * d[n/2 + k];
    msum = 0;
    for (int b = 0; b < s; b++) msum += (p1[b] > p2[b]) ? p1[b] : p2[b];
    f1 = 0; f2 = 0;
    for (int b = 0; b < s; b++) begin
      // P > mean, with the mean kept as a real number
      if (real'(p1[b]) > real'(msum) / real'(s)) f1[b] = 1'b1;
      if (real'(p2[b]) > real'(msum) / real'(s)) f2[b] = 1'b1;
    end
    for (int k = 0; k < n / 2; k++) if (f1[k / xf]) d[k] = 0;
    for (int k = 0; k < n / 4; k++) if (f2[k / (xf / 2)]) d[n/2 + k] = 0;
  endfunction

  // Blink removal (global-mean variant) given the a4 sign flags.
  function automatic void blink(ref arr_t x, input bit neg[], input int n, input int lv,
                                input int win, output longint gm, output int cnt,
                                output int clamped);
    bit inwin[];
    longint sum;
    int blk;
    blk = 1 << lv;
    inwin = new[n];
    foreach (inwin[t]) inwin[t] = 0;
    foreach (neg[m]) if (neg[m])
      for (int t = m * blk - win; t <= m * blk + blk - 1 + win; t++)
        if (t >= 0 && t < n) inwin[t] = 1;
    sum = 0; cnt = 0; clamped = 0; gm = 0;
    for (int t = 0; t < n; t++) if (inwin[t] && x[t] < 0) begin sum += x[t]; cnt++; end
    if (cnt == 0) return;
    gm = -((-sum) / cnt);
    for (int t = 0; t < n; t++) if (x[t] < gm) begin x[t] = gm; clamped++; end
  endfunction

  // Whole chain on one record.
  function automatic void run(ref arr_t x, input int n, input int lv, input int xf,
                              input int win, input longint thr[],
                              output longint gm, output int cnt, output int clamped,
                              output flags_t f1, output flags_t f2);
    arr_t d;
    bit neg[];
    d = new[n];
    foreach (d[i]) d[i] = 0;
    fwd(x, d, n, lv);
    neg = new[n >> lv];
    foreach (neg[m]) neg[m] = (x[m] < 0);
    denoise(d, n, thr);
    muscle(d, n, xf, f1, f2);
    inv(x, d, n, lv);
    blink(x, neg, n, lv, win, gm, cnt, clamped);
  endfunction

  // Synthetic record: two rhythms plus noise, a muscle burst (alternating
  // high-amplitude samples) and a blink (slow negative dip), clipped to 16 bits.
  function automatic arr_t gen(int n, int fs, bit with_muscle, bit with_blink);
    arr_t x;
    real pi;
    pi = 3.14159265358979;
    x = new[n];
    for (int t = 0; t < n; t++) begin
      real v;
      v = 300.0 * $sin(2.0 * pi * 10.0 * t / fs) + 150.0 * $sin(2.0 * pi * 5.0 * t / fs)
        + real'(int'($urandom_range(200)) - 100);
      if (with_muscle && t >= n / 4 && t < n / 4 + n / 20)
        v += ((t % 2) != 0 ? 1.0 : -1.0) * real'(1200 + int'($urandom_range(600)));
      if (with_blink && t >= (6 * n) / 10 && t < (6 * n) / 10 + n / 25)
        v -= 4000.0 * $sin(pi * real'(t - (6 * n) / 10) / real'(n / 25));
      if (v > 32767.0) v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      x[t] = longint'(v);
    end
    return x;
  endfunction

endpackage
