// tb_cbc_multiplier: checks the two-stage CBC multiplier.
//   8x8 exact      : all 65536 operand pairs against a*b
//   8x8 model-1    : Design-1 counters in columns 5..9, random pairs vs reference
//   16x16 exact    : random and corner pairs against a*b
//   16x16 model-2  : Design-2 in every column, random pairs vs reference
//   16x16 model-3  : Design-1 in columns 0..15, random pairs vs reference
// The reference (cbc_ref_pkg::ref_mul) rebuilds the same column plan from
// queues of bits and the published counter equations.
module tb_cbc_multiplier;
  import cbc_pkg::*;
  import cbc_ref_pkg::*;
  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  logic [15:0] p8x, p8a;
  logic [31:0] p16x, p16a2, p16a3;
  int checks = 0, failures = 0;
  int diff8 = 0, diff16 = 0;

  cbc_multiplier #(.W(8), .MODE(CBC_EXACT)) u8x (.a(a8), .b(b8), .p(p8x));
  cbc_multiplier #(.W(8), .MODE(CBC_DESIGN1), .APX_LO(5), .APX_HI(9)) u8a (.a(a8), .b(b8), .p(p8a));
  cbc_multiplier #(.W(16), .MODE(CBC_EXACT)) u16x (.a(a16), .b(b16), .p(p16x));
  cbc_multiplier #(.W(16), .MODE(CBC_DESIGN2), .APX_LO(0), .APX_HI(31)) u16a2 (.a(a16), .b(b16), .p(p16a2));
  cbc_multiplier #(.W(16), .MODE(CBC_DESIGN1), .APX_LO(0), .APX_HI(15)) u16a3 (.a(a16), .b(b16), .p(p16a3));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a8=%0d b8=%0d a16=%0d b16=%0d got %0d exp %0d",
                                  what, a8, b8, a16, b16, got, exp);
    end
  endtask

  initial begin
    a16 = '0; b16 = '0;
    for (int i = 0; i < 65536; i++) begin
      a8 = 8'(i); b8 = 8'(i >> 8);
      #1;
      check("8x8 exact", p8x, longint'(a8) * longint'(b8));
      if (i % 13 == 0) begin
        check("8x8 model-1", p8a, ref_mul(8, a8, b8, 1, 5, 9));
        if (p8a != p8x) diff8++;
      end
    end
    for (int i = 0; i < 3000; i++) begin
      if (i == 0) begin a16 = '1; b16 = '1; end
      else if (i == 1) begin a16 = '0; b16 = '1; end
      else begin a16 = 16'($urandom); b16 = 16'($urandom); end
      #1;
      check("16x16 exact", p16x, longint'(a16) * longint'(b16));
      check("16x16 model-2 d2", p16a2, ref_mul(16, a16, b16, 2, 0, 31));
      check("16x16 model-3 d1", p16a3, ref_mul(16, a16, b16, 1, 0, 15));
      if (p16a3 != p16x) diff16++;
    end
    $display("approximate products differing from exact: 8x8 %0d, 16x16 %0d", diff8, diff16);
    checks++;
    if (diff8 == 0 || diff16 == 0) begin failures++; $display("FAIL approximation never visible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
