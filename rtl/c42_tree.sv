// c42_tree: reduces the N partial-product rows of an N x N multiplier to two
// rows (sum row and carry row) with 4:2 compressors.
//
// Each stage takes its rows four at a time. A group of four rows passes
// through one compressor_4_2 per column; the cout of column k feeds the cin
// of column k+1, and since cout never depends on cin the chain does not
// ripple. The group becomes a sum row (the s outputs) and a carry row (the
// c outputs, one column to the left). Rows left over when the count is not a
// multiple of four drop to the next stage untouched; a last group of three
// rows is compressed with a zero fourth row. A stage halves the row count,
// so 32 rows take 4 stages (32, 16, 8, 4, 2), 16 rows 3 and 8 rows 2.
//
// Compressors are placed on every column of the 2N-bit rows; bits that are
// always zero are left to logic optimisation. The carries out of the top
// column are dropped: the rows add up to the product, which fits in 2N bits,
// so they are always zero.
//
// The use of 4:2 compressors follows the published design; the shape of the
// tree (regular four-to-two stages, padding of a three-row group, compressors
// on every column) is this design's choice, as none is specified.
//
// Purely combinational. Requires N >= 2.
module c42_tree #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 2 * N
) (
  input  logic [W-1:0] pp    [N],
  output logic [W-1:0] row_s,
  output logic [W-1:0] row_c
);
  function automatic int unsigned next_rows(int unsigned n);
    if (n == 3) return 2;
    return 2 * (n / 4) + n % 4;
  endfunction

  // Rows present before stage s.
  function automatic int unsigned rows_before(int unsigned s);
    int unsigned n;
    n = N;
    for (int unsigned k = 0; k < s; k++) n = next_rows(n);
    return n;
  endfunction

  function automatic int unsigned num_stages();
    int unsigned n;
    int unsigned k;
    n = N;
    k = 0;
    while (n > 2) begin
      n = next_rows(n);
      k++;
    end
    return k;
  endfunction

  localparam int unsigned STAGES = num_stages();

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned NIN = rows_before(s);
    localparam int unsigned G   = (NIN == 3) ? 1 : NIN / 4;
    localparam int unsigned REM = (NIN == 3) ? 0 : NIN % 4;

    logic [W-1:0] rin  [N];
    logic [W-1:0] rout [N];

    if (s == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_stage[s-1].rout;
    end

    for (genvar j = 0; j < G; j++) begin : g_group
      logic [W-1:0] x3_row;
      logic [W-1:0] sum_row;
      logic [W-1:0] car_row;

      if (4 * j + 3 < NIN) begin : g_x3
        assign x3_row = rin[4*j+3];
      end else begin : g_x3_zero
        assign x3_row = '0;
      end

      for (genvar k = 0; k < W; k++) begin : g_col
        logic cin;
        logic cout;

        if (k == 0) begin : g_cin0
          assign cin = 1'b0;
        end else begin : g_cin
          assign cin = g_col[k-1].cout;
        end

        compressor_4_2 u_c42 (
          .x0  (rin[4*j][k]),
          .x1  (rin[4*j+1][k]),
          .x2  (rin[4*j+2][k]),
          .x3  (x3_row[k]),
          .cin (cin),
          .s   (sum_row[k]),
          .cout(cout),
          .c   (car_row[k])
        );
      end

      assign rout[2*j]   = sum_row;
      assign rout[2*j+1] = {car_row[W-2:0], 1'b0};
    end

    for (genvar j = 0; j < REM; j++) begin : g_carry_over
      assign rout[2*G+j] = rin[4*G+j];
    end

    for (genvar j = 2 * G + REM; j < N; j++) begin : g_unused
      assign rout[j] = '0;
    end
  end

  if (STAGES == 0) begin : g_no_stage
    assign row_s = pp[0];
    assign row_c = pp[1];
  end else begin : g_out
    assign row_s = g_stage[STAGES-1].rout[0];
    assign row_c = g_stage[STAGES-1].rout[1];
  end
endmodule
