// tb_cbc_6_3: exhaustive check of the 6-3 counter in its three modes.
// The exact counter must return the number of ones for all 64 inputs. The
// approximate ones are compared with the published equations (reference
// package), and their pass rates over the 64 inputs must be 46 (Design-1)
// and 34 (Design-2) patterns.
module tb_cbc_6_3;
  import cbc_pkg::*;
  import cbc_ref_pkg::*;
  logic [5:0] x;
  logic [2:0] o_ex, o_d1, o_d2;
  int checks = 0, failures = 0;
  int pass1 = 0, pass2 = 0;

  cbc_6_3 #(.MODE(CBC_EXACT))   u_ex (.x(x), .sum(o_ex[0]), .cout1(o_ex[1]), .cout2(o_ex[2]));
  cbc_6_3 #(.MODE(CBC_DESIGN1)) u_d1 (.x(x), .sum(o_d1[0]), .cout1(o_d1[1]), .cout2(o_d1[2]));
  cbc_6_3 #(.MODE(CBC_DESIGN2)) u_d2 (.x(x), .sum(o_d2[0]), .cout1(o_d2[1]), .cout2(o_d2[2]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      x = 6'(i);
      #1;
      checks++;
      if (int'(o_ex) != $countones(x)) begin
        failures++; $display("FAIL exact x=%b got %0d", x, o_ex);
      end
      checks++;
      if (int'(o_d1) != ref_c63(x, 1)) begin
        failures++; $display("FAIL design1 x=%b got %0d exp %0d", x, o_d1, ref_c63(x, 1));
      end
      checks++;
      if (int'(o_d2) != ref_c63(x, 2)) begin
        failures++; $display("FAIL design2 x=%b got %0d exp %0d", x, o_d2, ref_c63(x, 2));
      end
      if (int'(o_d1) == $countones(x)) pass1++;
      if (int'(o_d2) == $countones(x)) pass2++;
    end
    $display("pass rate design-1 %0d/64, design-2 %0d/64", pass1, pass2);
    checks++;
    if (pass1 != 46) failures++;
    checks++;
    if (pass2 != 34) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
