// swt_ref_pkg -- software model of the SWT + WTSE de-noising filter, used by
// the testbenches as the independent reference.
//
// Works on plain integers with explicit floor division, periodic indexing
// inside the frame, eight averaging levels for the baseline, subtraction of
// the baseline taken 128 samples ahead (delay compensation), four analysis levels and four soft-thresholded averaging
// synthesis levels.
package swt_ref_pkg;

  function automatic int fdiv2(input int v);
    if (v >= 0) return v / 2;
    return -((-v + 1) / 2);
  endfunction

  function automatic int soft_t(input int d, input int t);
    int m;
    m = (d < 0) ? -d : d;
    m = m - t;
    if (m <= 0) return 0;
    return (d < 0) ? -m : m;
  endfunction

  // x: input frame (ADC codes), y: de-noised frame, c: baseline-free frame
  function automatic void filter_frame(input int x[], input int thr[4],
                                       output int y[], output int c[]);
    int n_len;
    int a[], b[], d[4][];
    int s;
    n_len = x.size();
    a = new[n_len];
    b = new[n_len];
    y = new[n_len];
    c = new[n_len];
    foreach (a[i]) a[i] = x[i];
    for (int j = 0; j < 8; j++) begin
      s = (1 << j) % n_len;
      for (int i = 0; i < n_len; i++) b[i] = fdiv2(a[i] + a[(i - s + n_len) % n_len]);
      foreach (a[i]) a[i] = b[i];
    end
    foreach (c[i]) c[i] = x[i] - a[(i + (128 % n_len)) % n_len];
    foreach (a[i]) a[i] = c[i];
    for (int j = 0; j < 4; j++) begin
      s = (1 << j) % n_len;
      d[j] = new[n_len];
      for (int i = 0; i < n_len; i++) begin
        d[j][i] = fdiv2(a[i] - a[(i - s + n_len) % n_len]);
        b[i]    = fdiv2(a[i] + a[(i - s + n_len) % n_len]);
      end
      foreach (a[i]) a[i] = b[i];
    end
    for (int j = 3; j >= 0; j--) begin
      s = (1 << j) % n_len;
      for (int i = 0; i < n_len; i++)
        b[i] = fdiv2(a[i] + soft_t(d[j][i], thr[j])
                      + a[(i + s) % n_len] - soft_t(d[j][(i + s) % n_len], thr[j]));
      foreach (a[i]) a[i] = b[i];
    end
    foreach (y[i]) y[i] = a[i];
  endfunction

  // Synthetic ECG-like test frame: slow baseline wander, a sharp QRS-like
  // spike every period samples, a T-like bump, and uniform noise.
  function automatic int ecg_sample(input int k, input int period, input int noise);
    real ph, v;
    int  p;
    p  = k % period;
    ph = 2.0 * 3.14159265 * real'(k) / real'(period * 3);
    v  = 300.0 + 120.0 * $sin(ph);
    if (p >= 10 && p < 13) v = v + 400.0 - 100.0 * real'(p - 10);
    if (p >= 25 && p < 45) v = v + 60.0 * $sin(3.14159265 * real'(p - 25) / 20.0);
    if (noise > 0) v = v + real'($urandom_range(2 * noise, 0)) - real'(noise);
    if (v < 0.0) v = 0.0;
    if (v > 1023.0) v = 1023.0;
    return int'(v);
  endfunction

endpackage
