// tb_c42_tree: checks c42_tree at three sizes side by side: N = 32 (the default),
// N = 8 and N = 7 (a size whose row counts do not divide evenly, so that
// leftover rows and short groups occur). Each instance gets its partial
// products formed here, independently of the design's generator, as
// pp[i] = (a AND b[i]) << i. The check is that the two output rows add up,
// without overflow, to the integer product a * b. Vectors: corner operands
// (zero, one, all ones, alternating bits) then random ones; N = 7 and
// N = 8 are swept exhaustively.
module tb_c42_tree;
  localparam int unsigned NSIZES = 3;
  localparam int unsigned SIZES [NSIZES] = '{32, 8, 7};
  localparam int unsigned NRANDOM = 3000;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  logic [NSIZES-1:0] done = '0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    localparam int unsigned N = SIZES[g];
    localparam int unsigned W = 2 * N;

    logic [N-1:0] a, b;
    logic [W-1:0] pp [N];
    logic [W-1:0] row_s, row_c;

    always_comb begin
      for (int unsigned i = 0; i < N; i++) pp[i] = W'(a & {N{b[i]}}) << i;
    end

    c42_tree #(.N(N)) dut (.pp(pp), .row_s(row_s), .row_c(row_c));

    task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb);
      longint unsigned expect_p;
      longint unsigned got;
      @(negedge clk);
      a = va;
      b = vb;
      #1;
      expect_p = longint'(va) * longint'(vb);
      got      = 64'(row_s) + 64'(row_c);
      checks++;
      if (got != expect_p || (N == 32 && got < 64'(row_s))) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d a=%h b=%h rows sum=%h expected %h", N, va, vb, got, expect_p);
      end
    endtask

    initial begin
      logic [N-1:0] ones;
      ones = '1;
      apply('0, '0);
      apply(ones, ones);
      apply(ones, N'(1));
      apply(N'(1), ones);
      apply({(N+1)/2{2'b10}}, ones);
      apply({(N+1)/2{2'b01}}, {(N+1)/2{2'b10}});
      if (N <= 8) begin
        for (int unsigned x = 0; x < (1 << N); x++)
          for (int unsigned y = 0; y < (1 << N); y++)
            apply(N'(x), N'(y));
      end else begin
        for (int n = 0; n < NRANDOM; n++) apply(N'($urandom), N'($urandom));
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
