// wallace_tree: reduces the N partial-product rows of an N x N multiplier to
// two rows (a sum row and a carry row) whose sum is the product.
//
// Each stage splits its rows into groups of three, top down. In every column
// of a group, three live bits go through a full adder (3:2 compressor), two
// live bits through a half adder, and a single live bit passes unchanged.
// The group thus becomes a sum row (weight of the column) and a carry row
// (shifted one column left). Rows left over when the count is not a multiple
// of three drop to the next stage untouched, where they join the new groups.
// Stages repeat until two rows remain: 32 rows take 8 stages
// (32, 22, 15, 10, 7, 5, 4, 3, 2).
//
// Which bits are live (possibly non-zero) is known at elaboration: row i of
// the partial products spans bits i..i+N-1, and row_mask() follows those
// spans through the stages, so that cells are placed only where the
// half-adder/full-adder grouping needs them. Bits outside a mask are tied to
// zero. The carry out of the top column is dropped: the rows add up to the
// product, which fits in 2N bits, so that carry is always zero.
//
// The grouping into threes with full adders on three-bit columns and half
// adders on two-bit columns follows the published Wallace scheme; grouping
// the rows from the top and the mask bookkeeping are this design's choices.
//
// Purely combinational. Requires N >= 2.
module wallace_tree #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 2 * N
) (
  input  logic [W-1:0] pp    [N],
  output logic [W-1:0] row_s,
  output logic [W-1:0] row_c
);
  // Rows present before stage s.
  function automatic int unsigned rows_before(int unsigned s);
    int unsigned n;
    n = N;
    for (int unsigned k = 0; k < s; k++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_stages();
    int unsigned n;
    int unsigned k;
    n = N;
    k = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      k++;
    end
    return k;
  endfunction

  // Live-bit mask of row r before stage s.
  function automatic logic [W-1:0] row_mask(int unsigned s, int unsigned r);
    logic [W-1:0] m  [N];
    logic [W-1:0] nm [N];
    int unsigned n;
    int unsigned g;
    for (int unsigned i = 0; i < N; i++) m[i] = {{(W - N){1'b0}}, {N{1'b1}}} << i;
    n = N;
    for (int unsigned k = 0; k < s; k++) begin
      g = n / 3;
      for (int unsigned j = 0; j < N; j++) nm[j] = '0;
      for (int unsigned j = 0; j < g; j++) begin
        nm[2*j]   = m[3*j] | m[3*j+1] | m[3*j+2];
        nm[2*j+1] = ((m[3*j] & m[3*j+1]) | (m[3*j] & m[3*j+2]) |
                     (m[3*j+1] & m[3*j+2])) << 1;
      end
      for (int unsigned j = 0; j < n % 3; j++) nm[2*g+j] = m[3*g+j];
      for (int unsigned j = 0; j < N; j++) m[j] = nm[j];
      n = 2 * g + n % 3;
    end
    return m[r];
  endfunction

  localparam int unsigned STAGES = num_stages();

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned NIN = rows_before(s);
    localparam int unsigned G   = NIN / 3;
    localparam int unsigned REM = NIN % 3;

    logic [W-1:0] rin  [N];
    logic [W-1:0] rout [N];

    if (s == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_stage[s-1].rout;
    end

    for (genvar j = 0; j < G; j++) begin : g_group
      localparam logic [W-1:0] M0 = row_mask(s, 3 * j);
      localparam logic [W-1:0] M1 = row_mask(s, 3 * j + 1);
      localparam logic [W-1:0] M2 = row_mask(s, 3 * j + 2);

      logic [W-1:0] r0, r1, r2;
      logic [W-1:0] sum_row;
      logic [W-1:0] cy;

      assign r0 = rin[3*j];
      assign r1 = rin[3*j+1];
      assign r2 = rin[3*j+2];

      for (genvar k = 0; k < W; k++) begin : g_col
        localparam int unsigned CNT = 32'(M0[k]) + 32'(M1[k]) + 32'(M2[k]);
        if (CNT == 3) begin : g_fa
          full_adder u_fa (.a(r0[k]), .b(r1[k]), .cin(r2[k]), .s(sum_row[k]), .c(cy[k]));
        end else if (CNT == 2) begin : g_ha
          if (!M0[k]) begin : g_12
            half_adder u_ha (.a(r1[k]), .b(r2[k]), .s(sum_row[k]), .c(cy[k]));
          end else if (!M1[k]) begin : g_02
            half_adder u_ha (.a(r0[k]), .b(r2[k]), .s(sum_row[k]), .c(cy[k]));
          end else begin : g_01
            half_adder u_ha (.a(r0[k]), .b(r1[k]), .s(sum_row[k]), .c(cy[k]));
          end
        end else if (CNT == 1) begin : g_pass
          assign sum_row[k] = r0[k] | r1[k] | r2[k];
          assign cy[k]      = 1'b0;
        end else begin : g_none
          assign sum_row[k] = 1'b0;
          assign cy[k]      = 1'b0;
        end
      end

      assign rout[2*j]   = sum_row;
      assign rout[2*j+1] = {cy[W-2:0], 1'b0};
    end

    for (genvar j = 0; j < REM; j++) begin : g_carry_over
      assign rout[2*G+j] = rin[3*G+j];
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
