// tb_clp_compute_engine: drives a 3 x 5 engine with a new random operand
// set on most cycles and checks every output against
// acc[m] = tree_sum_n(pix[n]*wgt[m][n]) + psum[m] computed with the
// reference arithmetic in the same order, and that results appear exactly
// 2 cycles after their operands.
module tb_clp_compute_engine;
  import fp32_ref_pkg::*;

  localparam int TM = 3, TN = 5;

  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] pix [TN];
  logic [31:0] wgt [TM][TN];
  logic [31:0] psum [TM];
  logic [31:0] acc [TM];
  int checks = 0, failures = 0, cyc = 0;

  typedef struct { logic [31:0] v [TM]; int due; } exp_t;
  exp_t q [$];

  clp_compute_engine #(.TM(TM), .TN(TN)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_tree(input logic [31:0] v [TN]);
    logic [31:0] l [8];
    for (int i = 0; i < 8; i++) l[i] = (i < TN) ? v[i] : 32'd0;
    for (int w = 4; w >= 1; w /= 2)
      for (int i = 0; i < w; i++) l[i] = fadd(l[2*i], l[2*i+1]);
    return l[0];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        e = q.pop_front();
        if (e.due != cyc) begin
          failures++;
          $display("latency: output at cycle %0d, expected %0d", cyc, e.due);
        end
        for (int m = 0; m < TM; m++) begin
          checks++;
          if (acc[m] !== e.v[m]) begin
            failures++;
            if (failures < 10) $display("MISMATCH m=%0d got %h exp %h", m, acc[m], e.v[m]);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int n = 0; n < TN; n++) pix[n] = frand(118, 136);
      for (int m = 0; m < TM; m++) begin
        for (int n = 0; n < TN; n++) wgt[m][n] = frand(118, 136);
        psum[m] = (t % 7 == 0) ? 32'd0 : frand(125, 150);
      end
      if (in_valid) begin
        exp_t e;
        logic [31:0] pr [TN];
        for (int m = 0; m < TM; m++) begin
          for (int n = 0; n < TN; n++) pr[n] = fmul(pix[n], wgt[m][n]);
          e.v[m] = fadd(ref_tree(pr), psum[m]);
        end
        e.due = cyc + 2;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d results never appeared", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
