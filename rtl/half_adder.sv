// half_adder: 2-2 counter. {cout, sum} = a + b. Combinational.
// Used inside the wider counters for a group of two leftover inputs.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end
endmodule
