// tb_cbc_input_shuffle: exhaustive check of the input shuffling stage.
// For all 64 inputs it checks each AND/OR pair output, that a+b+c+d+e+f
// equals the number of ones, and that exactly 27 distinct codes occur.
module tb_cbc_input_shuffle;
  logic [5:0] x, y;
  int checks = 0, failures = 0;
  bit seen [64];
  int distinct;

  cbc_input_shuffle dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] exp;
    for (int i = 0; i < 64; i++) seen[i] = 0;
    for (int i = 0; i < 64; i++) begin
      x = 6'(i);
      #1;
      exp = {x[0] && x[1], x[0] || x[1], x[2] && x[3], x[2] || x[3], x[4] && x[5], x[4] || x[5]};
      checks++;
      if (y !== exp) begin failures++; $display("FAIL x=%b y=%b exp=%b", x, y, exp); end
      checks++;
      if ($countones(y) != $countones(x)) begin
        failures++; $display("FAIL count x=%b y=%b", x, y);
      end
      seen[y] = 1;
    end
    distinct = 0;
    foreach (seen[i]) distinct += int'(seen[i]);
    checks++;
    if (distinct != 27) begin failures++; $display("FAIL distinct codes %0d", distinct); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
