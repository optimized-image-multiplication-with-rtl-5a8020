// cbc_multiplier: W x W unsigned multiplier with two-stage counter based
// compressor (CBC) reduction.
//
// The partial products a[j] & b[i] form a W x W AND array whose column c
// holds min(c+1, 2W-1-c) bits. Two reduction stages (cbc_reduce_stage)
// follow. In stage 1 every column of three or more bits is reduced by one
// counter sized to the column (3-2, 4-3, 5-3, 6-3, 7-3, 8-4 ... 15-4; the
// 16-bit middle column of a 16x16 array uses a 15-4 counter and passes one
// bit). After stage 1 no column is taller than 5; stage 2 reduces these
// with 3-2, 4-3 and 5-3 counters, leaving at most three bits per column.
// A final carry-propagate addition of those three rows gives the product.
//
// Approximation: counters in columns APX_LO..APX_HI use the approximate 6-3
// counter selected by MODE (Design-1 or Design-2) in both stages; all other
// counters are exact. With MODE = CBC_EXACT the product is exact.
//   true model   : MODE = CBC_EXACT
//   model-1 (8x8): W=8,  columns 5..9 (the middle five of the 15 columns)
//   model-2 (16x16): W=16, columns 0..31 (every counter)
//   model-3 (16x16): W=16, columns 0..15 (LSB side up to the middle)
// The exact column allocation, the stage-2 counters and the final adder are
// choices of this implementation. Purely combinational; p is the product
// modulo 2^(2W).
module cbc_multiplier
  import cbc_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter cbc_mode_e   MODE   = CBC_EXACT,
  parameter int          APX_LO = 0,
  parameter int          APX_HI = -1
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int NCOL = 2 * W;
  localparam int H    = W;                        // tallest column (stage 0)
  localparam int H2   = stage_max_height(W, 2);  // rows left for the final adder

  logic [H-1:0] s0 [NCOL];
  wire  [H-1:0] s1 [NCOL];
  wire  [H-1:0] s2 [NCOL];

  // Partial products: row i (b[i]) contributes a[j]&b[i] to column i+j.
  // Within column c the rows are stored from the lowest row that reaches it.
  always_comb begin
    for (int c = 0; c < NCOL; c++) s0[c] = '0;
    for (int i = 0; i < int'(W); i++)
      for (int j = 0; j < int'(W); j++)
        s0[i + j][(i + j < int'(W)) ? i : i - (i + j - int'(W) + 1)] = a[j] & b[i];
  end

  cbc_reduce_stage #(.W(W), .STAGE(0), .H(H), .MODE(MODE), .APX_LO(APX_LO), .APX_HI(APX_HI))
    u_stage1 (.cols_in(s0), .cols_out(s1));

  cbc_reduce_stage #(.W(W), .STAGE(1), .H(H), .MODE(MODE), .APX_LO(APX_LO), .APX_HI(APX_HI))
    u_stage2 (.cols_in(s1), .cols_out(s2));

  // Final carry-propagate adder over the H2 remaining rows.
  always_comb begin
    logic [2*W-1:0] row;
    p = '0;
    for (int r = 0; r < H2; r++) begin
      for (int c = 0; c < NCOL; c++) row[c] = s2[c][r];
      p += row;
    end
  end

  // Slots above the final height are constant 0.
  logic unused_ok;
  always_comb begin
    unused_ok = 1'b0;
    for (int c = 0; c < NCOL; c++) unused_ok ^= ^s2[c][H-1:H2];
  end
endmodule
