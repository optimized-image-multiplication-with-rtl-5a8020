// tb_image_multiplier_top: end-to-end test of the pixel multiplier top at
// its default parameters (8x8 model-1 Design-1, 16x16 model-3 Design-1).
// Drives random and corner pixel pairs plus self-multiplied pixels (the
// contrast-squaring case) and checks the exact outputs against a*b and the
// approximate outputs against the reference model. It counts, for each
// datapath, how often the approximate product was below, equal to and above
// the exact one; a case that never occurs counts as a failure (except an
// exact 16-bit approximate product: with approximate counters across the
// whole lower half, at least one of them always sees an all-zero group and
// adds a spurious one).
module tb_image_multiplier_top;
  import cbc_ref_pkg::*;
  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  logic [15:0] p8_true, p8_apx;
  logic [31:0] p16_true, p16_apx;
  int checks = 0, failures = 0;
  int lo8 = 0, eq8 = 0, hi8 = 0, lo16 = 0, eq16 = 0, hi16 = 0;

  image_multiplier_top dut (
    .a8(a8), .b8(b8), .p8_true(p8_true), .p8_apx(p8_apx),
    .a16(a16), .b16(b16), .p16_true(p16_true), .p16_apx(p16_apx)
  );

  initial begin
    #10000000;
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

  task automatic mechanism(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      case (i)
        0: begin a8 = '0; b8 = '0; a16 = '0; b16 = '0; end
        1: begin a8 = '1; b8 = '1; a16 = '1; b16 = '1; end
        default: begin
          a8 = 8'($urandom); a16 = 16'($urandom);
          if (i % 2 == 0) begin b8 = a8; b16 = a16; end      // squaring
          else begin b8 = 8'($urandom); b16 = 16'($urandom); end
        end
      endcase
      #1;
      check("p8_true", p8_true, longint'(a8) * longint'(b8));
      check("p16_true", p16_true, longint'(a16) * longint'(b16));
      check("p8_apx", p8_apx, ref_mul(8, a8, b8, 1, 5, 9));
      check("p16_apx", p16_apx, ref_mul(16, a16, b16, 1, 0, 15));
      if (p8_apx < p8_true) lo8++; else if (p8_apx == p8_true) eq8++; else hi8++;
      if (p16_apx < p16_true) lo16++; else if (p16_apx == p16_true) eq16++; else hi16++;
    end
    $display("8x8   approximate below/equal/above exact: %0d/%0d/%0d", lo8, eq8, hi8);
    $display("16x16 approximate below/equal/above exact: %0d/%0d/%0d", lo16, eq16, hi16);
    mechanism("8-bit approximate product below exact", lo8);
    mechanism("8-bit approximate product above exact", hi8);
    mechanism("8-bit approximate product exact", eq8);
    mechanism("16-bit approximate product below exact", lo16);
    mechanism("16-bit approximate product above exact", hi16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
