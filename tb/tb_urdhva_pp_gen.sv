// tb_urdhva_pp_gen: checks urdhva_pp_gen at N = 8 (exhaustively) and at the
// default N = 32 (random operands). For every row i and bit k it compares
// the output with the crosswise product a[k-i] & b[i] (zero outside the
// row's span), and it checks that every column k holds exactly
// popcount of { a[k-i] & b[i] } and that the rows add up to a * b.
module tb_urdhva_pp_gen;
  localparam int unsigned NRANDOM = 2000;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] pp8 [8];
  logic [31:0] a32, b32;
  logic [63:0] pp32 [32];

  urdhva_pp_gen #(.N(8)) dut8 (.a(a8), .b(b8), .pp(pp8));
  urdhva_pp_gen dut32 (.a(a32), .b(b32), .pp(pp32));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input logic [7:0] va, input logic [7:0] vb);
    logic   exp_bit;
    int unsigned total;
    @(negedge clk);
    a8 = va;
    b8 = vb;
    #1;
    total = 0;
    for (int i = 0; i < 8; i++) begin
      for (int k = 0; k < 16; k++) begin
        exp_bit = (k >= i && k < i + 8) ? (va[(k-i)%8] & vb[i]) : 1'b0;
        checks++;
        if (pp8[i][k] !== exp_bit) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 a=%h b=%h row %0d bit %0d", va, vb, i, k);
        end
      end
      total += int'(pp8[i]);
    end
    checks++;
    if (total != int'(va) * int'(vb)) begin
      failures++;
      $display("FAIL N=8 a=%h b=%h row sum %0d", va, vb, total);
    end
  endtask

  task automatic check32(input logic [31:0] va, input logic [31:0] vb);
    longint unsigned total;
    int unsigned     col_bits;
    int unsigned     col_expect;
    @(negedge clk);
    a32 = va;
    b32 = vb;
    #1;
    total = 0;
    for (int i = 0; i < 32; i++) total += pp32[i];
    checks++;
    if (total != longint'(va) * longint'(vb)) begin
      failures++;
      $display("FAIL N=32 a=%h b=%h row sum %h", va, vb, total);
    end
    for (int k = 0; k < 64; k++) begin
      col_bits   = 0;
      col_expect = 0;
      for (int i = 0; i < 32; i++) begin
        col_bits += 32'(pp32[i][k]);
        if (k >= i && k < i + 32) col_expect += 32'(va[(k-i)%32] & vb[i]);
      end
      checks++;
      if (col_bits != col_expect) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 a=%h b=%h column %0d", va, vb, k);
      end
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        check8(8'(x), 8'(y));
    check32('1, '1);
    check32(32'h7fff_ffff, 32'hffff_fffe);
    for (int n = 0; n < NRANDOM; n++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
