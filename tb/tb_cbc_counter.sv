// tb_cbc_counter: checks the N-input counters used by the multiplier.
// Exact counters for every N from 3 to 15 must return the number of ones;
// 15-4, 10-4 and 5-3 counters in Design-1 and Design-2 are compared with
// the reference model. Random and corner inputs (all 0, all 1). Finally all
// 32768 inputs of the approximate 15-4 counters are run to measure their
// pass rate (share of inputs counted exactly): 17440 for Design-1 and 9728
// for Design-2, as computed from the 6-3 equations.
module tb_cbc_counter;
  import cbc_pkg::*;
  import cbc_ref_pkg::*;
  localparam int NMAX = 15;
  logic [NMAX-1:0] x;
  logic [3:0] cex [NMAX+1];
  logic [3:0] c15_1, c15_2, c10_1, c10_2;
  logic [2:0] c5_1, c5_2;
  int checks = 0, failures = 0;

  for (genvar n = 3; n <= NMAX; n++) begin : g_ex
    logic [cbc_out_bits(n)-1:0] cnt;
    cbc_counter #(.N(n), .MODE(CBC_EXACT)) u (.x(x[n-1:0]), .count(cnt));
    assign cex[n] = 4'(cnt);
  end
  assign cex[0] = '0;
  assign cex[1] = '0;
  assign cex[2] = '0;

  cbc_counter #(.N(15), .MODE(CBC_DESIGN1)) u15_1 (.x(x), .count(c15_1));
  cbc_counter #(.N(15), .MODE(CBC_DESIGN2)) u15_2 (.x(x), .count(c15_2));
  cbc_counter #(.N(10), .MODE(CBC_DESIGN1)) u10_1 (.x(x[9:0]), .count(c10_1));
  cbc_counter #(.N(10), .MODE(CBC_DESIGN2)) u10_2 (.x(x[9:0]), .count(c10_2));
  cbc_counter #(.N(5),  .MODE(CBC_DESIGN1)) u5_1  (.x(x[4:0]), .count(c5_1));
  cbc_counter #(.N(5),  .MODE(CBC_DESIGN2)) u5_2  (.x(x[4:0]), .count(c5_2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    begin
      int ok1, ok2;
      ok1 = 0; ok2 = 0;
      for (int i = 0; i < (1 << 15); i++) begin
        x = NMAX'(i);
        #1;
        if (int'(c15_1) == $countones(x)) ok1++;
        if (int'(c15_2) == $countones(x)) ok2++;
      end
      $display("15-4 pass rate: design-1 %0d/32768, design-2 %0d/32768", ok1, ok2);
      check("15-4 d1 pass count", ok1, 17440);
      check("15-4 d2 pass count", ok2, 9728);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bitq_t low_bits(logic [NMAX-1:0] v, int n);
    bitq_t q;
    q = {};
    for (int i = 0; i < n; i++) q.push_back(v[i]);
    return q;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%b got %0d exp %0d", what, x, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      if (t == 0) x = '0;
      else if (t == 1) x = '1;
      else x = NMAX'($urandom);
      #1;
      for (int n = 3; n <= NMAX; n++)
        check($sformatf("exact %0d", n), int'(cex[n]), $countones(x[NMAX-1:0] & NMAX'((1 << n) - 1)));
      check("15 d1", int'(c15_1), ref_counter(low_bits(x, 15), 1));
      check("15 d2", int'(c15_2), ref_counter(low_bits(x, 15), 2));
      check("10 d1", int'(c10_1), ref_counter(low_bits(x, 10), 1));
      check("10 d2", int'(c10_2), ref_counter(low_bits(x, 10), 2));
      check("5 d1",  int'(c5_1),  ref_counter(low_bits(x, 5), 1));
      check("5 d2",  int'(c5_2),  ref_counter(low_bits(x, 5), 2));
    end
    begin
      int ok1, ok2;
      ok1 = 0; ok2 = 0;
      for (int i = 0; i < (1 << 15); i++) begin
        x = NMAX'(i);
        #1;
        if (int'(c15_1) == $countones(x)) ok1++;
        if (int'(c15_2) == $countones(x)) ok2++;
      end
      $display("15-4 pass rate: design-1 %0d/32768, design-2 %0d/32768", ok1, ok2);
      check("15-4 d1 pass count", ok1, 17440);
      check("15-4 d2 pass count", ok2, 9728);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
