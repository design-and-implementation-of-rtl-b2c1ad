// tb_vedic_sizes: runs the three operand sizes that were evaluated for both
// multipliers, 8 x 8, 16 x 16 and 32 x 32 bits, each multiplier built at
// each size (N = 8, 16, 32). Every instance gets corner operands and random
// ones (8 x 8 exhaustively) and its product is compared with the integer
// product. All products are combinational and checked one time step after
// the operands change.
module tb_vedic_sizes;
  localparam int unsigned NSIZES = 3;
  localparam int unsigned SIZES [NSIZES] = '{8, 16, 32};
  localparam int unsigned NRANDOM = 4000;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  logic [NSIZES-1:0] done = '0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    localparam int unsigned N = SIZES[g];

    logic [N-1:0]   in1, in2;
    logic [2*N-1:0] p_c42, p_wal;

    vedic_c42_multiplier     #(.N(N)) u_c42 (.in1(in1), .in2(in2), .p(p_c42));
    vedic_wallace_multiplier #(.N(N)) u_wal (.in1(in1), .in2(in2), .p(p_wal));

    task automatic apply(input logic [N-1:0] a, input logic [N-1:0] b);
      longint unsigned expect_p;
      @(negedge clk);
      in1 = a;
      in2 = b;
      #1;
      expect_p = longint'(a) * longint'(b);
      checks += 2;
      if (64'(p_c42) != expect_p) begin
        failures++;
        if (failures < 10) $display("FAIL 4:2 N=%0d %h * %h = %h", N, a, b, p_c42);
      end
      if (64'(p_wal) != expect_p) begin
        failures++;
        if (failures < 10) $display("FAIL Wallace N=%0d %h * %h = %h", N, a, b, p_wal);
      end
    endtask

    initial begin
      apply('0, '0);
      apply('1, '1);
      apply({1'b1, {(N-1){1'b0}}}, '1);
      if (N == 8) begin
        for (int unsigned x = 0; x < 256; x++)
          for (int unsigned y = 0; y < 256; y++)
            apply(N'(x), N'(y));
      end else begin
        for (int n = 0; n < NRANDOM; n++) apply(N'($urandom), N'($urandom));
      end
      $display("size %0d x %0d done", N, N);
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
