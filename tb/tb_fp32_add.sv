// tb_fp32_add: checks fp32_add against the real-arithmetic reference on
// directed cases (cancellation, carries, rounding ties, specials) and on
// 30000 random pairs whose exponents differ by at most 28, plus pairs far
// apart where the smaller operand only contributes to rounding.
module tb_fp32_add;
  import fp32_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a, .b, .y);

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] e);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h + %h = %h, expected %h", ta, tb_, y, e);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F800000, 32'h3F800000, 32'h40000000);   // 1 + 1
    check(32'h3F800000, 32'hBF800000, 32'h00000000);   // 1 - 1 = +0
    check(32'h40400000, 32'hBF800000, 32'h40000000);   // 3 - 1
    check(32'h3F800000, 32'h33800000, 32'h3F800000);   // 1 + 2^-24: tie to even
    check(32'h3F800001, 32'h33800000, 32'h3F800002);   // 1+u + 2^-24: tie up
    check(32'h3F800000, 32'hB3800000, 32'h3F7FFFFF);   // 1 - 2^-24
    check(32'h4B7FFFFF, 32'h3F800000, 32'h4B800000);   // carry out
    check(32'h7F800000, 32'hFF800000, 32'h7FC00000);   // inf - inf
    check(32'h7F800000, 32'h3F800000, 32'h7F800000);
    check(32'h7F7FFFFF, 32'h7F7FFFFF, 32'h7F800000);   // overflow
    check(32'h00000000, 32'hC0000000, 32'hC0000000);
    check(32'h80000000, 32'h80000000, 32'h80000000);   // -0 + -0
    check(32'h3F800000, 32'h00400000, 32'h3F800000);   // subnormal flushed
    for (int i = 0; i < 30000; i++) begin
      logic [31:0] x, z;
      x = frand(110, 138);
      z = frand(110, 138);
      check(x, z, fadd(x, z));
    end
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, z;
      x = frand(127, 127);
      z = frand(127, 128);
      check(x, z, fadd(x, z));        // heavy cancellation
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
