// half_adder: adds two one-bit inputs, giving sum = a ^ b and carry = a & b.
// One XOR and one AND gate, the HA cell drawn twice inside the 3:2 compressor.
// The Wallace tree uses it on every column where a group of three rows holds
// only two bits. Purely combinational; no clock, no reset.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
