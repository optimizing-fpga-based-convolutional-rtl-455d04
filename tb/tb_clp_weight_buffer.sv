// tb_clp_weight_buffer: writes every weight of a 3 x 2 x (3x3) buffer and
// reads back each kernel position, checking all Tm x Tn words at once.
module tb_clp_weight_buffer;
  localparam int TM = 3, TN = 2, KMAX = 3, KK = 9;
  logic        clk = 0, we = 0;
  logic [1:0]  wm;
  logic [0:0]  wn;
  logic [3:0]  waddr, raddr;
  logic [31:0] wdata;
  logic [31:0] rdata [TM][TN];
  logic [31:0] model [TM][TN][KK];
  int checks = 0, failures = 0;

  clp_weight_buffer #(.TM(TM), .TN(TN), .KMAX(KMAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = 0;
    for (int m = 0; m < TM; m++)
      for (int n = 0; n < TN; n++)
        for (int a = 0; a < KK; a++) begin
          @(negedge clk);
          we = 1; wm = 2'(m); wn = 1'(n); waddr = 4'(a); wdata = $urandom;
          model[m][n][a] = wdata;
        end
    @(negedge clk) we = 0;
    for (int a = 0; a < KK; a++) begin
      raddr = 4'(a);
      @(posedge clk); #1;
      for (int m = 0; m < TM; m++)
        for (int n = 0; n < TN; n++) begin
          checks++;
          if (rdata[m][n] !== model[m][n][a]) begin
            failures++;
            $display("w[%0d][%0d][%0d] got %h exp %h", m, n, a, rdata[m][n], model[m][n][a]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
