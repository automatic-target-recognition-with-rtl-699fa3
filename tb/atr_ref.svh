// atr_ref.svh: reference arithmetic for the testbenches, written directly
// from the Round 0 and Round 1 equations with plain integers (no shifts,
// no bit-serial tricks), for inclusion inside a testbench module.

  // TEMPERATURE step for one pixel: b[] background, t[] target points
  function automatic atr_pkg::temp_t ref_temp(input int unsigned b[30],
                                              input int unsigned t[30]);
    int s = 0;
    atr_pkg::temp_t r = '0;
    foreach (b[i]) s += b[i];
    foreach (b[i]) begin
      if (30 * b[i] > s) r.bkg_hot += 16'(30 * b[i] - s);
      else               r.bkg_cold += 16'(s - 30 * b[i]);
      if (30 * t[i] > s) r.trg_hot += 16'(30 * t[i] - s);
      else               r.trg_cold += 16'(s - 30 * t[i]);
    end
    return r;
  endfunction

  // CONVERT step
  function automatic atr_pkg::conv_t ref_conv(input atr_pkg::temp_t t);
    atr_pkg::conv_t c;
    c.hot_n  = (t.trg_hot  < t.bkg_hot)  ? 16'd0 : t.trg_hot  - t.bkg_hot;
    c.hot_d  = t.trg_hot  + t.bkg_hot;
    c.cold_n = (t.trg_cold < t.bkg_cold) ? 16'd0 : t.trg_cold - t.bkg_cold;
    c.cold_d = t.trg_cold + t.bkg_cold;
    return c;
  endfunction

  // ASSERT step
  function automatic bit ref_assert(input atr_pkg::conv_t c);
    longint x, y;
    x = longint'(c.hot_n) * c.cold_d + longint'(c.cold_n) * c.hot_d;
    y = longint'(c.hot_d) * c.cold_d;
    return 20 * x - 13 * y >= 0;
  endfunction

  // Round 1 decision from the 40 point pairs
  function automatic bit ref_r1(input int p[40], input int q[40]);
    longint sump = 0, summ = 0, ssum = 0, sum, sm, d;
    for (int i = 0; i < 40; i++) begin
      d = p[i] > q[i] ? p[i] - q[i] : q[i] - p[i];
      if (i < 20) sump += d; else summ += d;
      ssum += d * d;
    end
    sum = sump + summ;
    sm  = 40 * ssum - sum * sum;
    return (sump > summ) && (400 * (sump - summ) * (sump - summ) >= 81 * sm);
  endfunction
