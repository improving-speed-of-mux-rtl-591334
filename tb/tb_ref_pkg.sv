// tb_ref_pkg: reference models used by the testbenches.  They are written
// from the definitions, not from the RTL:
//   stream_count  walks the whole index sequence of length W position by
//                 position (index of position k = N-1 - trailing zeros of k,
//                 found here by repeated halving) and counts the ones of I.
//   eq1_count     sum over j = 1..N of round(W / 2^j) * I[N-j], halves
//                 rounded up (the closed form of the same count).
//   split_cycles  cycles of the split-shift scheme:
//                 popcount(W_H)*H + floor(log2 W_H) + W_H + W_L  (W_H > 0)
//                 W_L                                             (W_H = 0)
package tb_ref_pkg;

  function automatic int stream_count(input int unsigned i_val, input int unsigned w,
                                      input int unsigned n);
    int cnt;
    cnt = 0;
    for (int unsigned k = 1; k <= w; k++) begin
      int unsigned t, kk;
      t  = 0;
      kk = k;
      while (kk % 2 == 0) begin
        kk = kk / 2;
        t++;
      end
      cnt += int'((i_val >> (n - 1 - t)) & 1);
    end
    return cnt;
  endfunction

  function automatic int eq1_count(input int unsigned i_val, input int unsigned w,
                                   input int unsigned n);
    int cnt;
    cnt = 0;
    for (int unsigned j = 1; j <= n; j++) begin
      int unsigned times;
      times = (w + (1 << (j - 1))) >> j;   // round half up of w / 2^j
      cnt += int'(times * ((i_val >> (n - j)) & 1));
    end
    return cnt;
  endfunction

  function automatic int split_cycles(input int unsigned w, input int unsigned n);
    int unsigned h, wh, wl, pc, lg;
    h  = n / 2;
    wh = w >> h;
    wl = w % (1 << h);
    if (wh == 0) return int'(wl);
    pc = 0;
    for (int unsigned b = 0; b < h; b++) pc += (wh >> b) & 1;
    lg = 0;
    while ((wh >> (lg + 1)) != 0) lg++;
    return int'(pc * h + lg + wh + wl);
  endfunction

endpackage
