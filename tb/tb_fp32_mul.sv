// tb_fp32_mul: checks fp32_mul against the real-arithmetic reference on
// directed special cases and 20000 random operand pairs (normal range,
// plus pairs whose product overflows or underflows).
module tb_fp32_mul;
  import fp32_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] e);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h * %h = %h, expected %h", ta, tb_, y, e);
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
    check(32'h3FC00000, 32'h40000000, 32'h40400000);   // 1.5 * 2 = 3
    check(32'hBF800000, 32'h3F800000, 32'hBF800000);   // -1 * 1
    check(32'h00000000, 32'h3F800000, 32'h00000000);   // 0 * 1
    check(32'h7F800000, 32'h00000000, 32'h7FC00000);   // inf * 0 = NaN
    check(32'h7F800000, 32'hBF800000, 32'hFF800000);   // inf * -1
    check(32'h7FC00001, 32'h3F800000, 32'h7FC00000);   // NaN
    check(32'h7F000000, 32'h7F000000, 32'h7F800000);   // overflow
    check(32'h00800000, 32'h00800000, 32'h00000000);   // underflow, flushed
    check(32'h3F800001, 32'h3F800001, 32'h3F800002);   // (1+u)^2 rounds to 1+2u
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, z;
      x = frand(100, 154);
      z = frand(100, 154);
      check(x, z, fmul(x, z));
    end
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x, z;
      x = frand(1, 254);
      z = frand(1, 254);
      check(x, z, fmul(x, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
