// cbc_reduce_stage: one stage of counter-based partial-product reduction.
//
// Input and output are bit matrices of 2*W columns and H slots per column;
// only the first stage_height(W, STAGE, c) slots of input column c are
// meaningful, the rest must be 0. In every column with three or more bits
// one counter (cbc_counter: 3-2 up to 15-4) adds up to 15 of them; any bits
// beyond the counter pass straight to the output column. Output bit k of
// the counter in column c goes to column c+k, at the slot given by
// cbc_pkg::stage_slot; slots above the new column height are driven 0.
// Counter outputs that would land beyond column 2*W-1 are dropped (for an
// exact multiplier they are always 0).
//
// Counters whose column lies in [APX_LO, APX_HI] are built with MODE; all
// others are exact. Purely combinational. The matrix is sized for the
// tallest column of the array (H = W in the multiplier), so most output
// slots are constant 0 by construction; they keep both stages on one type.
// The column plan (one counter per column, bit order within a column) is
// this implementation's choice, computed by the functions in cbc_pkg.
module cbc_reduce_stage
  import cbc_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter int unsigned STAGE  = 0,
  parameter int unsigned H      = 16,
  parameter cbc_mode_e   MODE   = CBC_EXACT,
  parameter int          APX_LO = 0,
  parameter int          APX_HI = -1
) (
  input  logic [H-1:0] cols_in  [2*W],
  output wire  [H-1:0] cols_out [2*W]
);
  localparam int NCOL = 2 * W;

  localparam int HMAX_IN  = stage_max_height(W, STAGE);
  localparam int HMAX_OUT = stage_max_height(W, STAGE + 1);
  if (HMAX_IN > int'(H) || HMAX_OUT > int'(H)) begin : g_bad_h
    $error("cbc_reduce_stage: H=%0d smaller than column height %0d/%0d", H, HMAX_IN, HMAX_OUT);
  end

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    localparam int NIN  = stage_height(W, STAGE, c);
    localparam int M    = cbc_counter_in(NIN);
    localparam int P    = NIN - M;
    localparam int NOUT = stage_height(W, STAGE + 1, c);

    // bits that bypass the counter take the lowest output slots
    for (genvar p = 0; p < P; p++) begin : g_pass
      assign cols_out[c][p] = cols_in[c][M + p];
    end
    // unused slots
    for (genvar s = NOUT; s < int'(H); s++) begin : g_zero
      assign cols_out[c][s] = 1'b0;
    end

    if (M > 0) begin : g_cnt
      localparam cbc_mode_e CM = (c >= APX_LO && c <= APX_HI) ? MODE : CBC_EXACT;
      localparam int OW = cbc_out_bits(M);
      logic [OW-1:0] cnt;
      cbc_counter #(.N(M), .MODE(CM)) u_cnt (
        .x    (cols_in[c][M-1:0]),
        .count(cnt)
      );
      for (genvar k = 0; k < OW; k++) begin : g_out
        if (c + k < NCOL) begin : g_keep
          localparam int SLOT = stage_slot(W, STAGE, c + k, k);
          assign cols_out[c + k][SLOT] = cnt[k];
        end
      end
    end
  end

  // Input slots above the column height are 0 by contract and unused.
  logic unused_ok;
  always_comb begin
    unused_ok = 1'b0;
    for (int c = 0; c < NCOL; c++) unused_ok ^= ^cols_in[c];
  end
endmodule
