// image_multiplier_top: pixel multipliers for 8-bit and 16-bit images,
// true and approximate side by side.
//
// Two independent datapaths share nothing but the package:
//   8-bit  : a8 x b8  -> p8_true (exact two-stage CBC multiplier) and
//            p8_apx  (model-1: approximate 6-3 counters in the middle five
//            product columns, APX8_LO..APX8_HI = 5..9, variant MODE8)
//   16-bit : a16 x b16 -> p16_true (exact) and p16_apx (approximate 6-3
//            counters in columns APX16_LO..APX16_HI, variant MODE16). The
//            default 0..15 is model-3 (middle to LSB side); 0..31 gives
//            model-2 (every counter).
// Each output is the full double-width product of one pixel pair; scaling
// it back to pixel range (e.g. keeping the upper half for contrast
// squaring) is left to the user. Default variants (Design-1 for both) are
// this design's choice; Design-2 is selected through MODE8 / MODE16.
// Purely combinational: every output follows its inputs in the same cycle.
module image_multiplier_top
  import cbc_pkg::*;
#(
  parameter cbc_mode_e MODE8     = CBC_DESIGN1,
  parameter int        APX8_LO   = 5,
  parameter int        APX8_HI   = 9,
  parameter cbc_mode_e MODE16    = CBC_DESIGN1,
  parameter int        APX16_LO  = 0,
  parameter int        APX16_HI  = 15
) (
  input  logic [7:0]  a8,
  input  logic [7:0]  b8,
  output logic [15:0] p8_true,
  output logic [15:0] p8_apx,
  input  logic [15:0] a16,
  input  logic [15:0] b16,
  output logic [31:0] p16_true,
  output logic [31:0] p16_apx
);
  cbc_multiplier #(.W(8), .MODE(CBC_EXACT)) u_mul8_true (
    .a(a8), .b(b8), .p(p8_true)
  );

  cbc_multiplier #(.W(8), .MODE(MODE8), .APX_LO(APX8_LO), .APX_HI(APX8_HI)) u_mul8_apx (
    .a(a8), .b(b8), .p(p8_apx)
  );

  cbc_multiplier #(.W(16), .MODE(CBC_EXACT)) u_mul16_true (
    .a(a16), .b(b16), .p(p16_true)
  );

  cbc_multiplier #(.W(16), .MODE(MODE16), .APX_LO(APX16_LO), .APX_HI(APX16_HI)) u_mul16_apx (
    .a(a16), .b(b16), .p(p16_apx)
  );
endmodule
