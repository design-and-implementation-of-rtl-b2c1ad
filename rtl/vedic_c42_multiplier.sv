// vedic_c42_multiplier: unsigned N x N combinational multiplier, p = in1 * in2.
// Three steps: urdhva_pp_gen forms every crosswise bit product of the
// Urdhva-Tiryakbhyam ("vertically and crosswise") rule as N rows; 4:2 compressors (c42_tree)
// reduces them to a sum row and a carry row; ripple_carry_adder adds those
// two rows into the 2N-bit product. The port names, the unsigned operands and
// the 32-bit default width follow the published 32x32 design (inputs IN1,
// IN2, output P, all active high); N may be set to 8 or 16, the other sizes
// that were evaluated. There is no clock and no register: the product is
// valid one propagation delay after the operands settle.
module vedic_c42_multiplier #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   in1,
  input  logic [N-1:0]   in2,
  output logic [2*N-1:0] p
);
  logic [2*N-1:0] pp [N];
  logic [2*N-1:0] row_s;
  logic [2*N-1:0] row_c;
  logic           unused_cout;

  urdhva_pp_gen #(.N(N)) u_ppg (
    .a (in1),
    .b (in2),
    .pp(pp)
  );

  c42_tree #(.N(N)) u_tree (
    .pp   (pp),
    .row_s(row_s),
    .row_c(row_c)
  );

  // The carry out is always zero: the product fits in 2N bits.
  ripple_carry_adder #(.W(2 * N)) u_cpa (
    .a   (row_s),
    .b   (row_c),
    .cin (1'b0),
    .sum (p),
    .cout(unused_cout)
  );
endmodule
