// tb_fp32_adder_tree: checks a 12-input and a 5-input adder tree against a
// reference that adds in the same tree order (leaf pairs, then pairs of
// partial sums, missing leaves +0) with correctly rounded fp32 additions.
module tb_fp32_adder_tree;
  import fp32_ref_pkg::*;

  logic [31:0] x12 [12];
  logic [31:0] x5  [5];
  logic [31:0] y12, y5;
  int checks = 0, failures = 0;

  fp32_adder_tree #(.N(12)) dut12 (.x(x12), .y(y12));
  fp32_adder_tree #(.N(5))  dut5  (.x(x5),  .y(y5));

  function automatic logic [31:0] ref_tree(input logic [31:0] v [], input int n);
    logic [31:0] lvl [$];
    int p = 1;
    while (p < n) p = p * 2;
    for (int i = 0; i < p; i++) lvl.push_back(i < n ? v[i] : 32'd0);
    while (lvl.size() > 1) begin
      logic [31:0] nxt [$];
      for (int i = 0; i < lvl.size(); i += 2) nxt.push_back(fadd(lvl[i], lvl[i+1]));
      lvl = nxt;
    end
    return lvl[0];
  endfunction

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] v12 [], v5 [];
      v12 = new[12];
      v5  = new[5];
      for (int i = 0; i < 12; i++) begin
        v12[i] = frand(120, 134);
        x12[i] = v12[i];
      end
      for (int i = 0; i < 5; i++) begin
        v5[i] = frand(120, 134);
        x5[i] = v5[i];
      end
      #1;
      checks += 2;
      if (y12 !== ref_tree(v12, 12)) begin
        failures++;
        if (failures < 10) $display("MISMATCH N=12 got %h expected %h", y12, ref_tree(v12, 12));
      end
      if (y5 !== ref_tree(v5, 5)) begin
        failures++;
        if (failures < 10) $display("MISMATCH N=5 got %h expected %h", y5, ref_tree(v5, 5));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
