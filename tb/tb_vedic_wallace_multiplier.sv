// tb_vedic_wallace_multiplier: checks vedic_wallace_multiplier at N = 32 and N = 8 side by side.
// The multiplier has no clock: operands are applied between clock edges and
// the product is compared one time step later with the integer product
// in1 * in2 computed here, so a result that needed a clock edge to appear
// would fail. Vectors: the operand pair shown in the published simulation
// waveform of this multiplier (0x7FFFFFFF * 0xFFFFFFFE at 32 bits), corner
// operands, then random ones; N = 8 is swept exhaustively.
module tb_vedic_wallace_multiplier;
  localparam int unsigned NSIZES = 2;
  localparam int unsigned SIZES [NSIZES] = '{32, 8};
  localparam int unsigned NRANDOM = 5000;

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

    logic [N-1:0]   in1, in2;
    logic [2*N-1:0] p;

    vedic_wallace_multiplier #(.N(N)) dut (.in1(in1), .in2(in2), .p(p));

    task automatic apply(input logic [N-1:0] a, input logic [N-1:0] b);
      longint unsigned expect_p;
      @(negedge clk);
      in1 = a;
      in2 = b;
      #1;
      expect_p = longint'(a) * longint'(b);
      checks++;
      if (64'(p) != expect_p) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d %h * %h = %h, expected %h", N, a, b, p, expect_p);
      end
    endtask

    initial begin
      logic [N-1:0] ones;
      ones = '1;
      // Operand pair of the published waveform, with its product.
      if (N == 32) begin
        apply(N'(32'h7fff_ffff), N'(32'hffff_fffe));
        checks++;
        if (64'(p) != 64'h7fff_fffe_0000_0002) failures++;
      end
      apply('0, '0);
      apply(ones, ones);
      apply(ones, '0);
      apply(N'(1), ones);
      apply({N/2{2'b10}}, {N/2{2'b01}});
      apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});
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
