// cbc_6_3: input-shuffled 6-3 counter based compressor (CBC).
//
// Counts the ones among six inputs of equal weight and returns the count as
// {cout2, cout1, sum} with weights 4, 2, 1. The inputs first pass through
// cbc_input_shuffle, which turns each pair into an AND/OR thermometer code
// {A,B}, {C,D}, {E,F}; only 27 of the 64 shuffled codes can occur.
//
// MODE selects the output logic:
//   CBC_EXACT   : {cout2,cout1,sum} = A+B+C+D+E+F, which is the 27-row truth
//                 table of the reduced combinations (all three outputs exact).
//   CBC_DESIGN1 : sum is replaced by the approximate sum
//                 SUM' = B'D' + B'F' + B'E + B'C + D'F' + D'E + A'BC'DE'
//                        + CF' + CE + AD' + AF + AE + AC;
//                 cout1 and cout2 stay exact.
//   CBC_DESIGN2 : as Design-1, and cout1 is replaced by
//                 COUT1' = CE + A'E + A'C + BC'F' + BD'E' + A'DF.
// The approximate equations are the published ones, used as printed. Over
// all 64 input patterns Design-1 gives the exact count for 46 patterns and
// Design-2 for 34. The exact output logic is written as the sum of the
// shuffled bits rather than as a hand-minimised sum of products; a
// synthesis tool minimises it using the unreachable codes as it sees fit.
// Purely combinational.
module cbc_6_3
  import cbc_pkg::*;
#(
  parameter cbc_mode_e MODE = CBC_EXACT
) (
  input  logic [5:0] x,
  output logic       sum,
  output logic       cout1,
  output logic       cout2
);
  logic [5:0] y;
  logic A, B, C, D, E, F;
  logic [2:0] cnt;
  logic sum_apx, cout1_apx;

  cbc_input_shuffle u_shuffle (.x(x), .y(y));

  always_comb begin
    {A, B, C, D, E, F} = y;
    cnt = 3'(A) + 3'(B) + 3'(C) + 3'(D) + 3'(E) + 3'(F);
    sum_apx = (~B & ~D) | (~B & ~F) | (~B & E) | (~B & C) | (~D & ~F) | (~D & E)
            | (~A & B & ~C & D & ~E) | (C & ~F) | (C & E) | (A & ~D) | (A & F)
            | (A & E) | (A & C);
    cout1_apx = (C & E) | (~A & E) | (~A & C) | (B & ~C & ~F) | (B & ~D & ~E)
              | (~A & D & F);
    cout2 = cnt[2];
    case (MODE)
      CBC_DESIGN1: begin sum = sum_apx; cout1 = cnt[1];    end
      CBC_DESIGN2: begin sum = sum_apx; cout1 = cout1_apx; end
      default:     begin sum = cnt[0];  cout1 = cnt[1];    end
    endcase
  end
endmodule
