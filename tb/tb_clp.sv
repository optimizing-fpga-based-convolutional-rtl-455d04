// tb_clp: one CLP (Tm = 3, Tn = 2, 4 x 5 tiles, kernels up to 3 x 3)
// computes full and edge tiles of convolutions over 4 input channels, that
// is two input-channel tiles: the first with clear = 1, the second with
// clear = 0 accumulating onto the first. Outputs are read through the host
// port and compared with a reference that follows the hardware's order of
// additions; the start-to-done time must be K*K*rows*cols + 3 cycles.
module tb_clp;
  import fp32_ref_pkg::*;

  localparam int TM = 3, TN = 2, TR = 4, TC = 5, KMAX = 3;
  localparam int IN_W = TC + KMAX - 1, IN_D = (TR + KMAX - 1) * IN_W;
  localparam int N = 4;

  logic        clk = 0, rst_n = 0, start = 0, clear = 0, busy, done;
  logic [1:0]  k;
  logic [2:0]  rows, cols;
  logic        in_we = 0, w_we = 0;
  logic [0:0]  in_bank, w_n;
  logic [5:0]  in_addr;
  logic [1:0]  w_m, o_bank;
  logic [3:0]  w_addr;
  logic [4:0]  o_addr;
  logic [31:0] in_data, w_data, o_data;
  int checks = 0, failures = 0, cyc = 0;

  logic [31:0] img [N][TR+KMAX-1][TC+KMAX-1];
  logic [31:0] wts [TM][N][KMAX][KMAX];
  logic [31:0] ref_acc [TM][TR][TC];

  clp #(.TM(TM), .TN(TN), .TR(TR), .TC(TC), .KMAX(KMAX)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_nt(input int nt, input int kk, input int rr, input int cc, input bit clr);
    int t0;
    // load the TN input channels of this tile and their weights
    for (int n = 0; n < TN; n++)
      for (int y = 0; y < rr + kk - 1; y++)
        for (int x = 0; x < cc + kk - 1; x++) begin
          @(negedge clk);
          in_we = 1; in_bank = 1'(n); in_addr = 6'(y * IN_W + x); in_data = img[nt*TN+n][y][x];
        end
    for (int m = 0; m < TM; m++)
      for (int n = 0; n < TN; n++)
        for (int a = 0; a < kk; a++)
          for (int b = 0; b < kk; b++) begin
            @(negedge clk);
            in_we = 0;
            w_we = 1; w_m = 2'(m); w_n = 1'(n); w_addr = 4'(a * KMAX + b); w_data = wts[m][nt*TN+n][a][b];
          end
    @(negedge clk);
    in_we = 0; w_we = 0;
    k = 2'(kk); rows = 3'(rr); cols = 3'(cc); clear = clr; start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != kk * kk * rr * cc + 3) begin
      failures++;
      $display("tile time %0d, expected %0d", cyc - t0, kk * kk * rr * cc + 3);
    end
    // reference in hardware order
    for (int m = 0; m < TM; m++)
      for (int r = 0; r < rr; r++)
        for (int c = 0; c < cc; c++)
          for (int a = 0; a < kk; a++)
            for (int b = 0; b < kk; b++) begin
              logic [31:0] p0, p1, s;
              p0 = fmul(img[nt*TN][r+a][c+b], wts[m][nt*TN][a][b]);
              p1 = fmul(img[nt*TN+1][r+a][c+b], wts[m][nt*TN+1][a][b]);
              s  = fadd(p0, p1);
              ref_acc[m][r][c] = fadd(s, (clr && a == 0 && b == 0) ? 32'd0 : ref_acc[m][r][c]);
            end
  endtask

  task automatic read_check(input int rr, input int cc);
    for (int m = 0; m < TM; m++)
      for (int r = 0; r < rr; r++)
        for (int c = 0; c < cc; c++) begin
          @(negedge clk);
          o_bank = 2'(m); o_addr = 5'(r * TC + c);
          @(negedge clk);
          checks++;
          if (o_data !== ref_acc[m][r][c]) begin
            failures++;
            if (failures < 10) $display("out[%0d][%0d][%0d] got %h exp %h", m, r, c, o_data, ref_acc[m][r][c]);
          end
        end
  endtask

  task automatic layer(input int kk, input int rr, input int cc);
    for (int n = 0; n < N; n++)
      for (int y = 0; y < TR + KMAX - 1; y++)
        for (int x = 0; x < TC + KMAX - 1; x++) img[n][y][x] = qrand(16);
    for (int m = 0; m < TM; m++)
      for (int n = 0; n < N; n++)
        for (int a = 0; a < KMAX; a++)
          for (int b = 0; b < KMAX; b++) wts[m][n][a][b] = qrand(16);
    run_nt(0, kk, rr, cc, 1);
    run_nt(1, kk, rr, cc, 0);
    read_check(rr, cc);
  endtask

  initial begin
    o_bank = 0; o_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    layer(3, 4, 5);
    layer(1, 4, 5);
    layer(3, 2, 3);
    layer(2, 4, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
