// vedic_multiplier_top: the two compressor-based Vedic multipliers side by
// side, each with its own operand and product ports, so that both can be
// exercised and compared in one build. vedic_c42_multiplier reduces the
// crosswise partial products with 4:2 compressors; vedic_wallace_multiplier
// reduces them with a Wallace tree of half and full adders. Both compute the
// unsigned product of two N-bit operands (N = 32 by default) combinationally,
// with no clock, reset or handshake. Placing both in one top is this
// design's choice; each multiplier stands alone in the published work.
module vedic_multiplier_top #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   in1_c42,
  input  logic [N-1:0]   in2_c42,
  output logic [2*N-1:0] p_c42,
  input  logic [N-1:0]   in1_wal,
  input  logic [N-1:0]   in2_wal,
  output logic [2*N-1:0] p_wal
);
  vedic_c42_multiplier #(.N(N)) u_c42 (
    .in1(in1_c42),
    .in2(in2_c42),
    .p  (p_c42)
  );

  vedic_wallace_multiplier #(.N(N)) u_wal (
    .in1(in1_wal),
    .in2(in2_wal),
    .p  (p_wal)
  );
endmodule
