// cbc_ref_pkg: bit-level reference models for the testbenches.
//
// These functions recompute, from the published equations, what the
// counters and multipliers must return, without using any RTL module:
//   ref_c63     : 6-3 counter, exact or approximate (Design-1 / Design-2)
//   ref_counter : N-input counter built the same way as cbc_counter
//                 (6-3 groups from the LSB, padded 6-3 for 4-5 leftovers,
//                 exact full/half adder for 3/2 leftovers)
//   ref_mul     : W x W multiplier with the same two-stage column plan
//                 (pass bits first, then counter outputs of columns c..c-3)
// Modes are plain ints: 0 exact, 1 Design-1, 2 Design-2.
package cbc_ref_pkg;

  typedef bit bitq_t[$];

  function automatic int ref_c63(bit [5:0] x, int mode);
    bit A, B, C, D, E, F, s, c1, c2;
    int cnt;
    A = x[0] & x[1]; B = x[0] | x[1];
    C = x[2] & x[3]; D = x[2] | x[3];
    E = x[4] & x[5]; F = x[4] | x[5];
    cnt = $countones(x);
    s  = cnt[0];
    c1 = cnt[1];
    c2 = cnt[2];
    if (mode != 0)
      s = (!B && !D) || (!B && !F) || (!B && E) || (!B && C) || (!D && !F) || (!D && E)
       || (!A && B && !C && D && !E) || (C && !F) || (C && E) || (A && !D) || (A && F)
       || (A && E) || (A && C);
    if (mode == 2)
      c1 = (C && E) || (!A && E) || (!A && C) || (B && !C && !F) || (B && !D && !E)
        || (!A && D && F);
    return 4 * int'(c2) + 2 * int'(c1) + int'(s);
  endfunction

  function automatic int out_bits(int n);
    if (n <= 1) return n;
    return $clog2(n + 1);
  endfunction

  // Count of the bits q[0..n-1], modulo 2^out_bits(n).
  function automatic int ref_counter(bitq_t q, int mode);
    int n, total, g;
    bit [5:0] x;
    n = q.size();
    total = 0;
    g = 0;
    while (n - g >= 6) begin
      for (int i = 0; i < 6; i++) x[i] = q[g + i];
      total += ref_c63(x, mode);
      g += 6;
    end
    if (n - g >= 4) begin
      x = '0;
      for (int i = 0; i < n - g; i++) x[i] = q[g + i];
      total += ref_c63(x, mode);
    end else begin
      for (int i = g; i < n; i++) total += int'(q[i]);
    end
    return total % (1 << out_bits(n));
  endfunction

  function automatic longint unsigned ref_mul(int w, longint unsigned a, longint unsigned b,
                                             int mode, int lo, int hi);
    bitq_t cols [64];
    bitq_t nc   [64];
    bitq_t cin;
    longint unsigned p;
    int m, cnt, ob;
    for (int c = 0; c < 64; c++) cols[c] = {};
    for (int c = 0; c < 2 * w - 1; c++)
      for (int i = 0; i < w; i++)
        if (c - i >= 0 && c - i < w) cols[c].push_back(a[c - i] & b[i]);
    for (int stage = 0; stage < 2; stage++) begin
      int outs [64];
      int outw [64];
      for (int c = 0; c < 64; c++) begin nc[c] = {}; outs[c] = 0; outw[c] = 0; end
      for (int c = 0; c < 2 * w; c++) begin
        m = (cols[c].size() < 3) ? 0 : ((cols[c].size() > 15) ? 15 : cols[c].size());
        for (int i = m; i < cols[c].size(); i++) nc[c].push_back(cols[c][i]);
        if (m > 0) begin
          cin = {};
          for (int i = 0; i < m; i++) cin.push_back(cols[c][i]);
          cnt = ref_counter(cin, (c >= lo && c <= hi) ? mode : 0);
          outs[c] = cnt;
          outw[c] = out_bits(m);
        end
      end
      for (int c = 0; c < 2 * w; c++)
        for (int k = 0; k < 4; k++)
          if (c - k >= 0 && outw[c - k] > k) nc[c].push_back(outs[c - k][k]);
      for (int c = 0; c < 64; c++) cols[c] = nc[c];
    end
    p = 0;
    for (int c = 0; c < 2 * w; c++)
      foreach (cols[c][i]) p += longint'(cols[c][i]) << c;
    if (w < 32) p &= (64'd1 << (2 * w)) - 1;
    return p;
  endfunction

endpackage
