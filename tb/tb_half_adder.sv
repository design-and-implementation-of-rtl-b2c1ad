// tb_half_adder: exhaustive check of half_adder. All four input pairs are
// applied, one per clock, and {c, s} is compared with the integer sum a + b.
module tb_half_adder;
  logic clk = 1'b0;
  logic a, b, s, c;
  int   checks = 0;
  int   failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {a, b} = 2'(v);
      #1;
      checks++;
      if (2'({c, s}) !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> c=%0d s=%0d", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
