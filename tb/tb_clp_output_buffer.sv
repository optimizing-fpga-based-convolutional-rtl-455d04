// tb_clp_output_buffer: writes all banks of a 4 x 16 output buffer through
// the engine port, then reads them back through both the accumulation
// read port and the host port, including a read and a write of different
// addresses in the same cycle.
module tb_clp_output_buffer;
  localparam int TM = 4, DEPTH = 16;
  logic        clk = 0, we = 0;
  logic [3:0]  raddr, waddr, haddr;
  logic [1:0]  hbank;
  logic [31:0] rdata [TM];
  logic [31:0] wdata [TM];
  logic [31:0] hdata;
  logic [31:0] model [TM][DEPTH];
  int checks = 0, failures = 0;

  clp_output_buffer #(.TM(TM), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = 0; haddr = 0; hbank = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a);
      for (int m = 0; m < TM; m++) begin
        wdata[m] = $urandom;
        model[m][a] = wdata[m];
      end
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 4'(a);
      @(posedge clk); #1;
      for (int m = 0; m < TM; m++) begin
        checks++;
        if (rdata[m] !== model[m][a]) begin
          failures++;
          $display("acc read [%0d][%0d] got %h exp %h", m, a, rdata[m], model[m][a]);
        end
      end
    end
    for (int m = 0; m < TM; m++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        hbank = 2'(m); haddr = 4'(a);
        // concurrent engine write to another address
        we = 1; waddr = 4'(a ^ 1);
        for (int j = 0; j < TM; j++) wdata[j] = $urandom;
        @(posedge clk); #1;
        checks++;
        if (hdata !== model[m][a]) begin
          failures++;
          $display("host read [%0d][%0d] got %h exp %h", m, a, hdata, model[m][a]);
        end
        for (int j = 0; j < TM; j++) model[j][a ^ 1] = wdata[j];
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
