// tb_compressor_4_2: exhaustive check of compressor_4_2. For all 32 input
// combinations it checks the counting identity
//   x0 + x1 + x2 + x3 + cin = s + 2 * (c + cout)
// and that cout does not depend on cin (the property that keeps a chained
// row of compressors from rippling).
module tb_compressor_4_2;
  logic clk = 1'b0;
  logic x0, x1, x2, x3, cin;
  logic s, cout, c;
  logic cout_cin0;
  int   checks = 0;
  int   failures = 0;

  compressor_4_2 dut (
    .x0(x0), .x1(x1), .x2(x2), .x3(x3), .cin(cin),
    .s(s), .cout(cout), .c(c)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        @(negedge clk);
        {x0, x1, x2, x3} = 4'(v);
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(s) + 2 * (int'(c) + int'(cout)) !=
            int'(x0) + int'(x1) + int'(x2) + int'(x3) + int'(cin)) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> s=%0d c=%0d cout=%0d", 4'(v), cin, s, c, cout);
        end
        if (ci == 0) begin
          cout_cin0 = cout;
        end else begin
          checks++;
          if (cout !== cout_cin0) begin
            failures++;
            $display("FAIL x=%b: cout depends on cin", 4'(v));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
