// tb_tdc_weight_mapper: for S_D = 2, 3 and 4 (K_D = 9) loads random
// integer deconvolution kernels, collects the converted K_C x K_C kernels
// and checks that a stride-1 convolution with them reproduces, pixel by
// pixel, a directly computed stride-S_D deconvolution of a random 5 x 5
// image (out[S*i + k - PO] += in[i]*W_D[k]). It also checks K_C (5, 3, 3),
// the number of coefficients and the S_D^2*K_C^2-cycle conversion time.
module tb_tdc_weight_mapper;
  import fsrcnn_pkg::*;
  import fp32_ref_pkg::*;

  localparam int KD = 9, NI = 5;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic        we [3];
  logic [6:0]  wa [3];
  logic [31:0] wdat [3];
  logic        st [3], bsy [3], v [3];
  logic [3:0]  sub [3];
  logic [4:0]  ca [3];
  logic [31:0] cd [3];

  for (genvar g = 0; g < 3; g++) begin : g_dut
    localparam int SD = g + 2;
    localparam int SWL = $clog2(SD * SD);
    logic [SWL-1:0] sub_w;
    tdc_weight_mapper #(.SD(SD), .KD(KD), .KMAX_C(5)) dut (
      .clk, .rst_n, .wd_we(we[g]), .wd_addr(wa[g]), .wd_data(wdat[g]), .start(st[g]),
      .busy(bsy[g]), .wc_valid(v[g]), .wc_sub(sub_w), .wc_addr(ca[g]), .wc_data(cd[g]));
    assign sub[g] = 4'(sub_w);
  end

  task automatic test_sd(input int g);
    int sd, kc, po, t0, cnt;
    real wdk [KD][KD];
    real wc [16][5][5];
    real img [NI][NI];
    real dec [32][32];
    sd = g + 2;
    kc = tdc_kc(KD, sd);
    po = tdc_po(KD, sd);
    chk(kc == (sd == 2 ? 5 : 3), $sformatf("K_C for S_D=%0d is %0d", sd, kc));
    for (int a = 0; a < KD; a++)
      for (int b = 0; b < KD; b++) begin
        wdk[a][b] = real'(int'($urandom % 15) - 7);
        @(negedge clk);
        we[g] = 1; wa[g] = 7'(a * KD + b); wdat[g] = r2f(wdk[a][b]);
      end
    @(negedge clk);
    we[g] = 0;
    for (int s = 0; s < 16; s++) for (int a = 0; a < 5; a++) for (int b = 0; b < 5; b++) wc[s][a][b] = 99.0;
    st[g] = 1;
    t0 = cyc;
    @(negedge clk) st[g] = 0;
    cnt = 0;
    while (bsy[g] || v[g]) begin
      if (v[g]) begin
        wc[sub[g]][ca[g] / 5][ca[g] % 5] = f2r(cd[g]);
        cnt++;
      end
      @(negedge clk);
    end
    chk(cnt == sd * sd * kc * kc, $sformatf("coefficient count %0d", cnt));
    chk(cyc - t0 == sd * sd * kc * kc + 2, $sformatf("conversion time %0d", cyc - t0));
    // direct deconvolution
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) dec[y][x] = 0.0;
    for (int i = 0; i < NI; i++) for (int j = 0; j < NI; j++) img[i][j] = real'(int'($urandom % 9) - 4);
    for (int i = 0; i < NI; i++)
      for (int j = 0; j < NI; j++)
        for (int a = 0; a < KD; a++)
          for (int b = 0; b < KD; b++) begin
            int oy, ox;
            oy = sd * i + a - po;
            ox = sd * j + b - po;
            if (oy >= 0 && oy < sd * NI && ox >= 0 && ox < sd * NI) dec[oy][ox] += img[i][j] * wdk[a][b];
          end
    // convolution with the converted kernels
    for (int y = 0; y < NI; y++)
      for (int x = 0; x < NI; x++)
        for (int py = 0; py < sd; py++)
          for (int px = 0; px < sd; px++) begin
            real acc;
            acc = 0.0;
            for (int a = 0; a < kc; a++)
              for (int b = 0; b < kc; b++) begin
                int iy, ix;
                iy = y + a - kc / 2;
                ix = x + b - kc / 2;
                if (iy >= 0 && iy < NI && ix >= 0 && ix < NI) acc += img[iy][ix] * wc[py*sd+px][a][b];
              end
            chk(acc == dec[sd*y+py][sd*x+px], $sformatf("S_D=%0d out(%0d,%0d): %f vs %f", sd, sd*y+py, sd*x+px, acc, dec[sd*y+py][sd*x+px]));
          end
  endtask

  initial begin
    for (int g = 0; g < 3; g++) begin
      we[g] = 0; st[g] = 0; wa[g] = 0; wdat[g] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 3; g++) test_sd(g);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
