// tb_ripple_carry_adder: checks ripple_carry_adder at its default width
// W = 64 and at W = 4 (exhaustively, with both carry-in values). The 64-bit
// instance gets corner operands (a carry rippling through all 64 bits,
// all ones plus all ones) and random operands; {cout, sum} is compared
// with the integer sum a + b + cin computed in 65 bits.
module tb_ripple_carry_adder;
  localparam int unsigned NRANDOM = 3000;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [63:0] a, b, sum;
  logic        cin, cout;
  logic [3:0]  a4, b4, sum4;
  logic        cin4, cout4;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  ripple_carry_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .sum(sum4), .cout(cout4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check64(input logic [63:0] va, input logic [63:0] vb, input logic vc);
    logic [64:0] expect_s;
    @(negedge clk);
    a   = va;
    b   = vb;
    cin = vc;
    #1;
    expect_s = 65'(va) + 65'(vb) + 65'(vc);
    checks++;
    if ({cout, sum} !== expect_s) begin
      failures++;
      if (failures < 10) $display("FAIL W=64 %h + %h + %0d = %h", va, vb, vc, {cout, sum});
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          @(negedge clk);
          a4 = 4'(x);
          b4 = 4'(y);
          cin4 = 1'(c);
          #1;
          checks++;
          if ({cout4, sum4} !== 5'(x + y + c)) begin
            failures++;
            $display("FAIL W=4 %0d + %0d + %0d = %0d", x, y, c, {cout4, sum4});
          end
        end
    check64('1, 64'd1, 1'b0);
    check64('1, '0, 1'b1);
    check64('1, '1, 1'b1);
    check64(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    for (int n = 0; n < NRANDOM; n++)
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
