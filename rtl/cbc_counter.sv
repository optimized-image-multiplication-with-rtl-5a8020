// cbc_counter: N-input counter based compressor (N-3 for N <= 7, N-4 for
// 8 <= N <= 15), built from input-shuffled 6-3 counters.
//
// The N inputs, all of one weight, are split into groups from the LSB up:
//   - every full group of six goes to a cbc_6_3;
//   - a leftover group of four or five goes to one more cbc_6_3 whose
//     unused inputs are tied to 0 (this is how the 4-3 and 5-3 counters of
//     the multiplier are formed);
//   - a leftover group of three goes to a full adder, of two to a half
//     adder, and a single leftover bit is used as it is.
// The 3-bit (or 2-bit) group counts are then added into the OUT_W-bit
// result with weights 1, 2, 4, 8. This merge is written as an addition; it
// is the full/half-adder network that joins the 6-3 counters.
//
// With MODE other than CBC_EXACT every 6-3 counter inside is the
// approximate one; the full and half adders and the merge stay exact.
// Approximate group counts can add up to more than OUT_W bits hold; the
// result then wraps, as the dropped carry has no output to go to.
// Purely combinational. N must be 2..CBC_MAX_IN.
module cbc_counter
  import cbc_pkg::*;
#(
  parameter int unsigned N     = 15,
  parameter cbc_mode_e   MODE  = CBC_EXACT,
  localparam int unsigned OUT_W = cbc_out_bits(N)
) (
  input  logic [N-1:0]     x,
  output logic [OUT_W-1:0] count
);
  localparam int unsigned G6  = N / 6;           // full 6-3 groups
  localparam int unsigned R   = N % 6;           // leftover inputs
  localparam int unsigned G6X = (R >= 4) ? 1 : 0; // padded 6-3 group
  localparam int unsigned NG  = G6 + G6X;

  if (N < 2 || N > CBC_MAX_IN) begin : g_bad_n
    $error("cbc_counter: N=%0d out of range", N);
  end

  logic [2:0] grp [NG+1];  // group counts; the last entry is the leftover group

  for (genvar g = 0; g < G6; g++) begin : g_full
    cbc_6_3 #(.MODE(MODE)) u_c63 (
      .x    (x[6*g +: 6]),
      .sum  (grp[g][0]),
      .cout1(grp[g][1]),
      .cout2(grp[g][2])
    );
  end

  if (R >= 4) begin : g_pad
    logic [5:0] xp;
    assign xp = 6'(x[N-1 -: R]);
    cbc_6_3 #(.MODE(MODE)) u_c63 (
      .x    (xp),
      .sum  (grp[G6][0]),
      .cout1(grp[G6][1]),
      .cout2(grp[G6][2])
    );
    assign grp[NG] = '0;
  end else if (R == 3) begin : g_fa
    full_adder u_fa (
      .a   (x[N-3]),
      .b   (x[N-2]),
      .cin (x[N-1]),
      .sum (grp[NG][0]),
      .cout(grp[NG][1])
    );
    assign grp[NG][2] = 1'b0;
  end else if (R == 2) begin : g_ha
    half_adder u_ha (
      .a   (x[N-2]),
      .b   (x[N-1]),
      .sum (grp[NG][0]),
      .cout(grp[NG][1])
    );
    assign grp[NG][2] = 1'b0;
  end else if (R == 1) begin : g_one
    assign grp[NG] = {2'b00, x[N-1]};
  end else begin : g_none
    assign grp[NG] = '0;
  end

  always_comb begin
    logic [OUT_W+1:0] acc;
    acc = '0;
    for (int g = 0; g <= NG; g++) acc += (OUT_W+2)'(grp[g]);
    count = acc[OUT_W-1:0];
  end
endmodule
