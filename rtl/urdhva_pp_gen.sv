// urdhva_pp_gen: partial-product generator of the Urdhva-Tiryakbhyam
// ("vertically and crosswise") rule for two unsigned N-bit operands.
// Column k of the product collects every crosswise bit product a[i] & b[k-i]
// (i = 0..N-1), all formed at once by an array of N*N AND gates, so that
// generation and summation of a column can proceed in parallel. The products
// are delivered as N rows of 2N bits: row i holds a[k-i] & b[i] at bit k,
// i.e. (a AND b[i]) shifted left by i, and zero outside bits i..i+N-1.
// Reading down a column of the rows gives exactly the column's crosswise
// products. The crosswise rule is the published method; laying the products
// out as shifted rows for the compressor trees is this design's choice.
// Purely combinational.
module urdhva_pp_gen #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp [N]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar k = 0; k < 2 * N; k++) begin : g_col
      if (k >= i && k < i + N) begin : g_and
        assign pp[i][k] = a[k-i] & b[i];
      end else begin : g_zero
        assign pp[i][k] = 1'b0;
      end
    end
  end
endmodule
