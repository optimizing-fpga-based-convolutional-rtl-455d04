// tb_clp_controller: runs several tile shapes and kernel sizes and checks
// every issued step (input, weight and output addresses, first_k) against
// the loop nest kh, kw, r, c; that the write-back address trails the read
// address by 3 cycles; that done pulses once, K*K*rows*cols + 3 cycles
// after start; and that start is ignored while busy.
module tb_clp_controller;
  localparam int TR = 4, TC = 5, KMAX = 3, LAT = 3, IN_W = TC + KMAX - 1;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [1:0] k;
  logic [2:0] rows, cols;
  logic       step_valid, first_k, busy, done;
  logic [5:0] in_raddr_w;
  logic [3:0] w_raddr;
  logic [4:0] o_raddr, wb_addr;
  int checks = 0, failures = 0, cyc = 0;
  int oaddr_hist [$];

  clp_controller #(.TR(TR), .TC(TC), .KMAX(KMAX), .LAT(LAT)) dut (
    .clk, .rst_n, .start, .k, .rows, .cols, .step_valid, .first_k,
    .in_raddr(in_raddr_w), .w_raddr, .o_raddr, .wb_addr, .busy, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  task automatic run_tile(input int kk, input int rr, input int cc);
    int t0, ndone, hist [$];
    @(negedge clk);
    k = 2'(kk); rows = 3'(rr); cols = 3'(cc); start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 1;            // held high: must not restart a busy tile
    k = 2'd1;
    for (int kh = 0; kh < kk; kh++)
      for (int kw = 0; kw < kk; kw++)
        for (int r = 0; r < rr; r++)
          for (int c = 0; c < cc; c++) begin
            chk(step_valid, "step_valid");
            chk(in_raddr_w == 6'((r + kh) * IN_W + c + kw), "in_raddr");
            chk(w_raddr == 4'(kh * KMAX + kw), "w_raddr");
            chk(o_raddr == 5'(r * TC + c), "o_raddr");
            chk(first_k == (kh == 0 && kw == 0), "first_k");
            hist.push_back(r * TC + c);
            if (hist.size() > LAT) begin
              void'(hist.pop_front());
            end
            start = 0;
            @(negedge clk);
          end
    chk(!step_valid, "stops after last step");
    ndone = 0;
    for (int i = 0; i < LAT + 2; i++) begin
      if (done) begin
        ndone++;
        chk(cyc - t0 == kk * kk * rr * cc + LAT, $sformatf("done latency %0d", cyc - t0));
        chk(32'(wb_addr) == (rr - 1) * TC + cc - 1, "wb_addr of last step");
      end
      @(negedge clk);
    end
    chk(ndone == 1, "one done pulse");
    chk(!busy, "idle after done");
  endtask

  // write-back address = read address 3 cycles earlier
  always @(posedge clk) begin
    if (rst_n) begin
      oaddr_hist.push_back(step_valid ? int'(o_raddr) : -1);
      if (oaddr_hist.size() > LAT) begin
        int a;
        a = oaddr_hist.pop_front();
        if (a >= 0) begin chk(int'(wb_addr) == a, "wb_addr delay"); if (int'(wb_addr) != a && failures < 5) $display("wb %0d exp %0d", wb_addr, a); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_tile(3, 4, 5);
    run_tile(1, 2, 3);
    run_tile(2, 4, 1);
    run_tile(3, 1, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
