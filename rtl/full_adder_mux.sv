// full_adder_mux: full adder built from two XOR gates and a 2:1 multiplexer,
// the form used inside the 4:2 compressor. The first XOR forms p = x1 ^ x2;
// sum = p ^ cin. The multiplexer, steered by p, passes cin when the two
// operand bits differ (p = 1) and x1 when they are equal (then x1 = x2 is the
// carry). The gate list and signal names follow the published cell; which
// mux input is taken for which select value is this design's choice, fixed
// by the full-adder truth table. Purely combinational.
module full_adder_mux (
  input  logic x1,
  input  logic x2,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic p;

  assign p     = x1 ^ x2;
  assign sum   = p ^ cin;
  assign carry = p ? cin : x1;
endmodule
