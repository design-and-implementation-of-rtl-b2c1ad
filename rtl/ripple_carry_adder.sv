// ripple_carry_adder: the final carry-propagate adder of both multipliers.
// It adds the two rows (sum row and carry row) left by a compressor tree into
// the binary product, one full_adder per bit with the carry passed from bit k
// to bit k+1, as the last step of the published Wallace example shows. The
// adder type is this design's choice; the source names no fast adder for the
// final step. Purely combinational; the delay grows linearly with W.
module ripple_carry_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (
      .a  (a[k]),
      .b  (b[k]),
      .cin(carry[k]),
      .s  (sum[k]),
      .c  (carry[k+1])
    );
  end

  assign cout = carry[W];
endmodule
