// cbc_pkg: shared types and elaboration-time helpers for the counter based
// compressor (CBC) multipliers.
//
// cbc_mode_e selects how a 6-3 counter is built: exact, or one of the two
// approximate variants (Design-1 approximates only the sum bit, Design-2 the
// sum bit and the middle output Cout1).
//
// The height functions describe the column-reduction plan of the multiplier.
// A column of n bits is reduced by one counter per column and stage:
//   n <= 2       : bits pass through unchanged
//   n == 3       : full adder (3-2 counter)
//   4 <= n <= 7  : n-3 counter
//   8 <= n <= 15 : n-4 counter
//   n > 15       : a 15-4 counter takes 15 bits, the rest pass through.
// Output bit k of the counter in column c lands in column c+k. After every
// stage a column holds its pass-through bits first, then the outputs of the
// counters in columns c, c-1, c-2, c-3, in that order. This ordering is a
// choice of this implementation; any order gives the same sum.
package cbc_pkg;

  typedef enum logic [1:0] {
    CBC_EXACT   = 2'd0,
    CBC_DESIGN1 = 2'd1,
    CBC_DESIGN2 = 2'd2
  } cbc_mode_e;

  // Widest counter used by the reduction (15-4 CBC).
  localparam int unsigned CBC_MAX_IN = 15;
  // Largest supported operand width (64 columns of bookkeeping).
  localparam int unsigned CBC_MAX_COLS = 64;

  // Number of output bits of an n-input counter (n >= 1).
  function automatic int cbc_out_bits(input int n);
    if (n <= 1) return n;
    return $clog2(n + 1);
  endfunction

  // Number of bits of an n-bit column that go into the column's counter.
  function automatic int cbc_counter_in(input int n);
    if (n < 3) return 0;
    return (n > CBC_MAX_IN) ? CBC_MAX_IN : n;
  endfunction

  // Number of bits of an n-bit column that bypass the counter.
  function automatic int cbc_pass(input int n);
    return n - cbc_counter_in(n);
  endfunction

  // Number of output bits of the counter of an n-bit column (0 if none).
  function automatic int cbc_col_outs(input int n);
    int m;
    m = cbc_counter_in(n);
    return (m == 0) ? 0 : cbc_out_bits(m);
  endfunction

  // Height of column c of a W x W partial-product array.
  function automatic int pp_height(input int w, input int c);
    if (c < 0 || c >= 2 * w - 1) return 0;
    return (c < w) ? c + 1 : 2 * w - 1 - c;
  endfunction

  // Height of column c after `stage` reduction stages (stage 0 = partial products).
  function automatic int stage_height(input int w, input int stage, input int c);
    int h  [CBC_MAX_COLS];
    int nh [CBC_MAX_COLS];
    for (int i = 0; i < CBC_MAX_COLS; i++) h[i] = pp_height(w, i);
    for (int s = 0; s < stage; s++) begin
      for (int i = 0; i < CBC_MAX_COLS; i++) begin
        nh[i] = (i < 2 * w) ? cbc_pass(h[i]) : 0;
        for (int k = 0; k < 4; k++)
          if (i < 2 * w && i - k >= 0 && cbc_col_outs(h[i - k]) > k) nh[i] += 1;
      end
      for (int i = 0; i < CBC_MAX_COLS; i++) h[i] = nh[i];
    end
    if (c < 0 || c >= CBC_MAX_COLS) return 0;
    return h[c];
  endfunction

  // Slot, in column c after stage `stage`+1, of output bit k of the counter
  // in column c-k of stage `stage`.
  function automatic int stage_slot(input int w, input int stage, input int c, input int k);
    int off;
    off = cbc_pass(stage_height(w, stage, c));
    for (int j = 0; j < k; j++)
      if (c - j >= 0 && cbc_col_outs(stage_height(w, stage, c - j)) > j) off += 1;
    return off;
  endfunction

  // Tallest column of the array after `stage` stages.
  function automatic int stage_max_height(input int w, input int stage);
    int m;
    m = 0;
    for (int i = 0; i < 2 * w; i++)
      if (stage_height(w, stage, i) > m) m = stage_height(w, stage, i);
    return m;
  endfunction

endpackage
