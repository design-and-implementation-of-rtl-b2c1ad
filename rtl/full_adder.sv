// full_adder: the 3:2 compressor. Three one-bit inputs of equal weight are
// added into a two-bit number {c, s}: s = a ^ b ^ cin, c = ab + bc + ac.
// Built as two cascaded half adders whose carries are ORed, the classic
// gate-level structure. Used by the Wallace tree (columns holding three bits)
// and by the ripple-carry final adder. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic c
);
  logic s1, c1, c2;

  half_adder u_ha1 (.a(a),  .b(b),   .s(s1), .c(c1));
  half_adder u_ha2 (.a(s1), .b(cin), .s(s),  .c(c2));

  assign c = c1 | c2;
endmodule
