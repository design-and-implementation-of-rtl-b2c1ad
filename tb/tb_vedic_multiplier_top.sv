// tb_vedic_multiplier_top: end-to-end test of vedic_multiplier_top at its
// default size (two 32 x 32 multipliers, no parameter override).
// Each product is compared with the integer product. In the first part of
// the run both multipliers get the same operands and their products are also
// compared with each other; in the second part each gets operands of its own,
// which shows that the two sets of ports are not crossed.
// The vectors start with the operand pair of the published 32-bit waveform
// (0x7FFFFFFF * 0xFFFFFFFE = 0x7FFFFFFE00000002), then corner and random
// operands. The test counts how often each mechanism of the datapath was
// used, reading the rows that each reduction tree hands to its final adder:
//   - the 4:2 compressor tree leaving a non-zero carry row,
//   - the Wallace tree leaving a non-zero carry row,
//   - the final adder of each multiplier having to propagate a carry
//     (sum row and carry row share a set bit),
//   - a product reaching the top bit (bit 63) of the 64-bit output.
// A mechanism that never happened counts as a failure. The multipliers are
// combinational: the product is checked one time step after the operands
// change, with no clock edge in between.
module tb_vedic_multiplier_top;
  localparam int unsigned NRANDOM = 20000;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [31:0] in1, in2, in1_w, in2_w;
  logic [63:0] p_c42, p_wal;

  int n_c42_carry_row = 0;
  int n_wal_carry_row = 0;
  int n_c42_propagate = 0;
  int n_wal_propagate = 0;
  int n_top_bit       = 0;

  vedic_multiplier_top dut (
    .in1_c42(in1),
    .in2_c42(in2),
    .p_c42  (p_c42),
    .in1_wal(in1_w),
    .in2_wal(in2_w),
    .p_wal  (p_wal)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply2(input logic [31:0] a, input logic [31:0] b,
                        input logic [31:0] aw, input logic [31:0] bw);
    logic [63:0] expect_p;
    logic [63:0] expect_w;
    @(negedge clk);
    in1   = a;
    in2   = b;
    in1_w = aw;
    in2_w = bw;
    #1;
    expect_p = 64'(a) * 64'(b);
    expect_w = 64'(aw) * 64'(bw);
    checks += 2;
    if (p_c42 !== expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL 4:2 %h * %h = %h, expected %h", a, b, p_c42, expect_p);
    end
    if (p_wal !== expect_w) begin
      failures++;
      if (failures < 10) $display("FAIL Wallace %h * %h = %h, expected %h", aw, bw, p_wal, expect_w);
    end
    if (a == aw && b == bw) begin
      checks++;
      if (p_c42 !== p_wal) failures++;
    end
    if (dut.u_c42.row_c != '0) n_c42_carry_row++;
    if (dut.u_wal.row_c != '0) n_wal_carry_row++;
    if ((dut.u_c42.row_s & dut.u_c42.row_c) != '0) n_c42_propagate++;
    if ((dut.u_wal.row_s & dut.u_wal.row_c) != '0) n_wal_propagate++;
    if (expect_p[63]) n_top_bit++;
  endtask

  task automatic apply(input logic [31:0] a, input logic [31:0] b);
    apply2(a, b, a, b);
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    apply(32'h7fff_ffff, 32'hffff_fffe);
    checks++;
    if (p_wal !== 64'h7fff_fffe_0000_0002 || p_c42 !== 64'h7fff_fffe_0000_0002) failures++;
    apply('0, '0);
    apply('1, '1);
    apply('1, 32'd1);
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'haaaa_aaaa, 32'h5555_5555);
    for (int i = 0; i < 32; i++) apply(32'd1 << i, '1);
    for (int n = 0; n < NRANDOM / 2; n++) apply($urandom, $urandom);
    for (int n = 0; n < NRANDOM / 2; n++) apply2($urandom, $urandom, $urandom, $urandom);
    require("4:2 tree carry row non-zero", n_c42_carry_row);
    require("Wallace tree carry row non-zero", n_wal_carry_row);
    require("4:2 final adder carry propagation", n_c42_propagate);
    require("Wallace final adder carry propagation", n_wal_propagate);
    require("product bit 63 set", n_top_bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
