// tb_clp_input_buffer: fills a 3-bank, 40-word input buffer with known
// words, then reads every address and checks all banks, one-cycle latency.
module tb_clp_input_buffer;
  localparam int TN = 3, DEPTH = 40;
  logic        clk = 0, we = 0;
  logic [1:0]  wbank;
  logic [5:0]  waddr, raddr;
  logic [31:0] wdata;
  logic [31:0] rdata [TN];
  logic [31:0] model [TN][DEPTH];
  int checks = 0, failures = 0;

  clp_input_buffer #(.TN(TN), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = 0;
    for (int n = 0; n < TN; n++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1; wbank = 2'(n); waddr = 6'(a); wdata = $urandom;
        model[n][a] = wdata;
      end
    @(negedge clk) we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 6'(DEPTH - 1 - a);
      @(posedge clk); #1;
      for (int n = 0; n < TN; n++) begin
        checks++;
        if (rdata[n] !== model[n][DEPTH-1-a]) begin
          failures++;
          $display("bank %0d addr %0d got %h exp %h", n, DEPTH-1-a, rdata[n], model[n][DEPTH-1-a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
