// cbc_input_shuffle: input shuffling stage of the 6-3 counter.
//
// The six inputs are taken in pairs and each pair is replaced by its AND and
// its OR:  a = x[1]&x[0], b = x[1]|x[0], c = x[3]&x[2], d = x[3]|x[2],
// e = x[5]&x[4], f = x[5]|x[4].  Each pair (a,b), (c,d), (e,f) is then a
// thermometer code of the number of ones in that pair (00 = 0, 01 = 1,
// 11 = 2), so a+b+c+d+e+f still equals the number of ones in x, but only 27
// of the 64 codes can occur. The counter logic that follows treats the other
// 37 codes as don't-cares. Purely combinational.
//
// Output y is packed as {a,b,c,d,e,f}, a in the MSB, so that y read as a
// number is the minterm index used for the counter's truth table.
module cbc_input_shuffle (
  input  logic [5:0] x,
  output logic [5:0] y
);
  always_comb begin
    y[5] = x[1] & x[0];  // a
    y[4] = x[1] | x[0];  // b
    y[3] = x[3] & x[2];  // c
    y[2] = x[3] | x[2];  // d
    y[1] = x[5] & x[4];  // e
    y[0] = x[5] | x[4];  // f
  end
endmodule
