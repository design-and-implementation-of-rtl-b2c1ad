// compressor_4_2: adds four bits x0..x3 of one column and a carry cin from
// the column to its right, producing s (weight 1) and two bits of weight 2,
// c and cout:  x0 + x1 + x2 + x3 + cin = s + 2*(c + cout).
// cout does not depend on cin, so a row of these cells chained cout -> cin
// has no rippling carry: each cin is consumed by the next column only.
// Port names follow the published block symbol (X0..X3, Cin, S, Cout, C).
// The inside is this design's choice: two cascaded XOR/MUX full adders,
// the first adding x0, x1, x2 (giving cout), the second adding that sum,
// x3 and cin (giving s and c). Purely combinational.
module compressor_4_2 (
  input  logic x0,
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic c
);
  logic s1;

  full_adder_mux u_fa1 (.x1(x1), .x2(x2), .cin(x0),  .sum(s1), .carry(cout));
  full_adder_mux u_fa2 (.x1(s1), .x2(x3), .cin(cin), .sum(s),  .carry(c));
endmodule
