// tb_full_adder_mux: exhaustive check of full_adder_mux. All eight input combinations are
// applied, one per clock, and the two-bit result {carry, sum} is compared
// with the integer sum of the three inputs.
module tb_full_adder_mux;
  logic clk = 1'b0;
  logic a, b, ci, s, c;
  int   checks = 0;
  int   failures = 0;

  full_adder_mux dut (.x1(a), .x2(b), .cin(ci), .sum(s), .carry(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if (2'({c, s}) !== 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL in=%b -> carry=%0d sum=%0d", 3'(v), c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
