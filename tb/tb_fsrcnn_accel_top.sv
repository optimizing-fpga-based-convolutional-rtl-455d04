// tb_fsrcnn_accel_top: end-to-end test of the accelerator at its default
// parameters (three CLPs <2,56>, <56,4>, <12,12>, 16 x 16 tiles, S_D = 2).
//
// The testbench plays the host that owns off-chip memory: for each CLP it
// answers tile requests by writing the input tile (with its halo and zero
// padding at the image border) and the weights, and store requests by
// reading the output tile back into its feature-map arrays. Weights of the
// deconvolution layer are sent in their 9 x 9 form through the TDC path.
// Over EPOCHS epochs a 20 x 20 low-resolution image flows through all eight
// layers as in the multi-CLP schedule: each epoch, every layer's input is
// what the previous layer produced in the previous epoch, except Conv4..6,
// which take Conv3..5's output of the same epoch on CLP2.
//
// Checks: every output value of every layer, bit-exact, against a
// reference that adds in the hardware's order; in the first epoch the
// high-resolution output of the deconvolution layer against a directly
// computed stride-2 9x9 deconvolution; the time from a tile's start to its
// store request (K*K*rows*cols + 5 cycles). It counts each mechanism
// (multi-tile rows/columns, edge tiles, input-channel accumulation,
// output-channel tiles, TDC conversions, epoch barrier waits, frame_start
// ignored while busy) and fails any that never happened.
module tb_fsrcnn_accel_top;
  import fsrcnn_pkg::*;
  import fp32_ref_pkg::*;

  localparam int EPOCHS = 5;
  localparam int IMG    = 20;
  localparam int T      = 16;
  localparam int KM     = 5;
  localparam int IN_W   = T + KM - 1;

  logic        clk = 0, rst_n = 0;
  logic        frame_start = 0, epoch_busy, epoch_done;
  logic [2:0]  clp_finished;
  logic        tile_req [3], tile_ack [3], store_req [3], store_ack [3];
  tile_desc_t  tile_desc [3];
  logic        in_we [3];
  logic [5:0]  in_bank [3];
  logic [8:0]  in_addr [3];
  logic [31:0] in_data [3];
  logic        w_we [3];
  logic [5:0]  w_m [3], w_n [3];
  logic [4:0]  w_addr [3];
  logic [31:0] w_data [3];
  logic        tdc_mode = 0, wd_we = 0, wd_start = 0, wd_busy;
  logic [6:0]  wd_addr;
  logic [31:0] wd_data;
  logic [5:0]  wd_n;
  logic [5:0]  o_bank [3];
  logic [7:0]  o_addr [3];
  logic [31:0] o_data [3];

  fsrcnn_accel_top dut (
    .clk, .rst_n, .frame_start, .img_rows(16'(IMG)), .img_cols(16'(IMG)),
    .epoch_busy, .epoch_done, .clp_finished,
    .tile_req, .tile_ack, .store_req, .store_ack, .tile_desc,
    .in_we, .in_bank, .in_addr, .in_data,
    .w_we, .w_m, .w_n, .w_addr, .w_data,
    .tdc_mode, .wd_we, .wd_addr, .wd_data, .wd_n, .wd_start, .wd_busy,
    .o_bank, .o_addr, .o_data
  );

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int n_loads = 0, n_multi_rc = 0, n_edge = 0, n_accum = 0, n_mtile = 0;
  int n_tdc = 0, n_barrier = 0, n_ignored = 0, n_epochs = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- data
  // layer shapes (index = layer number)
  function automatic int lk(input int l);
    return (l == 1 || l == 8) ? 5 : (l >= 3 && l <= 6) ? 3 : 1;
  endfunction
  function automatic int ln(input int l);
    return (l == 1) ? 1 : (l == 2 || l == 8) ? 56 : 12;
  endfunction
  function automatic int lm(input int l);
    return (l == 1 || l == 7) ? 56 : (l == 8) ? 4 : 12;
  endfunction
  function automatic int ltn(input int l);
    return (l == 1 || l == 7) ? CLP0_TN : (l == 2 || l == 8) ? CLP1_TN : CLP2_TN;
  endfunction
  function automatic int ltm(input int l);
    return (l == 1 || l == 7) ? CLP0_TM : (l == 2 || l == 8) ? CLP1_TM : CLP2_TM;
  endfunction

  logic [31:0] W   [9][56][56][5][5];   // convolution weights (layer 8: TDC form)
  logic [31:0] WD  [56][9][9];          // deconvolution kernels (output channel 0)
  logic [31:0] SRC [9][56][IMG][IMG];   // input of each layer in this epoch
  logic [31:0] RES [9][56][IMG][IMG];   // output of each layer, from the hardware
  logic [31:0] REF [9][56][IMG][IMG];   // output of each layer, reference

  function automatic logic [31:0] in_px(input int l, input int n, input int y, input int x);
    if (y < 0 || y >= IMG || x < 0 || x >= IMG) return 32'd0;
    if (l >= 4 && l <= 6) return RES[l-1][n][y][x];
    return SRC[l][n][y][x];
  endfunction

  function automatic logic [31:0] ref_in(input int l, input int n, input int y, input int x);
    if (y < 0 || y >= IMG || x < 0 || x >= IMG) return 32'd0;
    if (l >= 4 && l <= 6) return REF[l-1][n][y][x];
    return SRC[l][n][y][x];
  endfunction

  function automatic logic [31:0] tree(input logic [31:0] v [64], input int n);
    logic [31:0] t [64];
    int p = 1;
    while (p < n) p = p * 2;
    for (int i = 0; i < p; i++) t[i] = (i < n) ? v[i] : 32'd0;
    for (int w = p / 2; w >= 1; w /= 2)
      for (int i = 0; i < w; i++) t[i] = fadd(t[2*i], t[2*i+1]);
    return t[0];
  endfunction

  // reference layer, with the hardware's order of additions
  task automatic ref_layer(input int l);
    int k, n, m, tn, h;
    logic [31:0] pr [64];
    k = lk(l); n = ln(l); m = lm(l); tn = ltn(l); h = (k - 1) / 2;
    for (int oc = 0; oc < m; oc++)
      for (int y = 0; y < IMG; y++)
        for (int x = 0; x < IMG; x++) begin
          logic [31:0] acc;
          acc = 32'd0;
          for (int nt = 0; nt < (n + tn - 1) / tn; nt++)
            for (int a = 0; a < k; a++)
              for (int b = 0; b < k; b++) begin
                for (int i = 0; i < tn; i++) begin
                  int ic;
                  ic = nt * tn + i;
                  pr[i] = (ic < n) ? fmul(ref_in(l, ic, y + a - h, x + b - h), W[l][oc][ic][a][b])
                                   : fmul(32'd0, 32'd0);
                end
                acc = fadd(tree(pr, tn), (nt == 0 && a == 0 && b == 0) ? 32'd0 : acc);
              end
          REF[l][oc][y][x] = acc;
        end
  endtask

  // ---------------------------------------------------------------- host
  task automatic load_tile(input int g, input tile_desc_t d);
    int l, k, h, tn, tm, n0, m0, r0, c0;
    l = int'(d.layer); k = lk(l); h = (k - 1) / 2; tn = ltn(l); tm = ltm(l);
    n0 = int'(d.nt) * tn; m0 = int'(d.mt) * tm;
    r0 = int'(d.rt) * T - h; c0 = int'(d.ct) * T - h;
    n_loads++;
    if (d.rt != 0 || d.ct != 0) n_multi_rc++;
    if (int'(d.rows) < T || int'(d.cols) < T) n_edge++;
    if (d.nt != 0) n_accum++;
    if (d.mt != 0) n_mtile++;
    for (int i = 0; i < tn; i++)
      for (int y = 0; y < int'(d.rows) + k - 1; y++)
        for (int x = 0; x < int'(d.cols) + k - 1; x++) begin
          @(negedge clk);
          in_we[g] = 1; in_bank[g] = 6'(i); in_addr[g] = 9'(y * IN_W + x);
          in_data[g] = (n0 + i < ln(l)) ? in_px(l, n0 + i, r0 + y, c0 + x) : 32'd0;
        end
    @(negedge clk) in_we[g] = 0;
    if (l == 8) begin
      tdc_mode = 1;
      for (int i = 0; i < tn; i++) begin
        for (int a = 0; a < K_D * K_D; a++) begin
          wd_we = 1; wd_addr = 7'(a); wd_data = WD[n0 + i][a / K_D][a % K_D];
          @(negedge clk);
        end
        wd_we = 0; wd_n = 6'(i); wd_start = 1;
        n_tdc++;
        @(negedge clk) wd_start = 0;
        while (wd_busy) @(negedge clk);
      end
      tdc_mode = 0;
    end else begin
      for (int mm = 0; mm < tm; mm++)
        for (int i = 0; i < tn; i++)
          for (int a = 0; a < k; a++)
            for (int b = 0; b < k; b++) begin
              w_we[g] = 1; w_m[g] = 6'(mm); w_n[g] = 6'(i); w_addr[g] = 5'(a * KM + b);
              w_data[g] = (m0 + mm < lm(l) && n0 + i < ln(l)) ? W[l][m0 + mm][n0 + i][a][b] : 32'd0;
              @(negedge clk);
            end
      w_we[g] = 0;
    end
  endtask

  // one read per cycle: the address set after a falling edge is registered
  // on the next rising edge and its word is on o_data at the falling edge
  task automatic store_tile(input int g, input tile_desc_t d);
    int l, tm, m0;
    l = int'(d.layer); tm = ltm(l); m0 = int'(d.mt) * tm;
    for (int mm = 0; mm < tm; mm++)
      for (int r = 0; r < int'(d.rows); r++)
        for (int c = 0; c < int'(d.cols); c++)
          if (m0 + mm < lm(l)) begin
            o_bank[g] = 6'(mm); o_addr[g] = 8'(r * T + c);
            @(negedge clk);
            RES[l][m0 + mm][int'(d.rt) * T + r][int'(d.ct) * T + c] = o_data[g];
          end
  endtask

  task automatic host(input int g);
    forever begin
      @(negedge clk);
      if (tile_req[g]) begin
        tile_desc_t d;
        int t0, kk;
        d = tile_desc[g];
        load_tile(g, d);
        tile_ack[g] = 1;
        t0 = cyc;
        @(negedge clk) tile_ack[g] = 0;
        kk = lk(int'(d.layer));
        if (int'(d.nt) == (ln(int'(d.layer)) + ltn(int'(d.layer)) - 1) / ltn(int'(d.layer)) - 1) begin
          while (!store_req[g]) @(negedge clk);
          chk(cyc - t0 == kk * kk * int'(d.rows) * int'(d.cols) + 5,
              $sformatf("CLP%0d tile time %0d", g, cyc - t0));
        end
      end
      if (store_req[g]) begin
        store_tile(g, tile_desc[g]);
        store_ack[g] = 1;
        @(negedge clk) store_ack[g] = 0;
      end
    end
  endtask

  // ---------------------------------------------------------------- run
  task automatic check_layer(input int l, input int e);
    int bad = 0;
    for (int oc = 0; oc < lm(l); oc++)
      for (int y = 0; y < IMG; y++)
        for (int x = 0; x < IMG; x++) begin
          checks++;
          if (RES[l][oc][y][x] !== REF[l][oc][y][x]) begin
            failures++;
            bad++;
            if (bad < 4) $display("epoch %0d layer %0d out[%0d][%0d][%0d] = %h, expected %h",
                                  e, l, oc, y, x, RES[l][oc][y][x], REF[l][oc][y][x]);
          end
        end
  endtask

  // first epoch: layer 8 against a direct stride-2 deconvolution
  task automatic check_deconv();
    real hr [2*IMG][2*IMG];
    int po;
    po = tdc_po(K_D, S_D);
    for (int y = 0; y < 2 * IMG; y++) for (int x = 0; x < 2 * IMG; x++) hr[y][x] = 0.0;
    for (int n = 0; n < 56; n++)
      for (int i = 0; i < IMG; i++)
        for (int j = 0; j < IMG; j++)
          for (int a = 0; a < K_D; a++)
            for (int b = 0; b < K_D; b++) begin
              int oy, ox;
              oy = S_D * i + a - po; ox = S_D * j + b - po;
              if (oy >= 0 && oy < S_D * IMG && ox >= 0 && ox < S_D * IMG)
                hr[oy][ox] += f2r(SRC[8][n][i][j]) * f2r(WD[n][a][b]);
            end
    for (int y = 0; y < 2 * IMG; y++)
      for (int x = 0; x < 2 * IMG; x++)
        chk(f2r(RES[8][(y % 2) * 2 + (x % 2)][y / 2][x / 2]) == hr[y][x],
            $sformatf("HR pixel (%0d,%0d) = %f, deconvolution gives %f", y, x,
                      f2r(RES[8][(y % 2) * 2 + (x % 2)][y / 2][x / 2]), hr[y][x]));
  endtask

  initial begin
    for (int g = 0; g < 3; g++) begin
      tile_ack[g] = 0; store_ack[g] = 0; in_we[g] = 0; w_we[g] = 0;
      in_bank[g] = 0; in_addr[g] = 0; in_data[g] = 0;
      w_m[g] = 0; w_n[g] = 0; w_addr[g] = 0; w_data[g] = 0;
      o_bank[g] = 0; o_addr[g] = 0;
    end
    wd_addr = 0; wd_data = 0; wd_n = 0;
    // weights: q/8, |q| <= 4; deconvolution kernels likewise
    for (int l = 1; l <= 7; l++)
      for (int m = 0; m < lm(l); m++)
        for (int n = 0; n < ln(l); n++)
          for (int a = 0; a < lk(l); a++)
            for (int b = 0; b < lk(l); b++) W[l][m][n][a][b] = qrand(4);
    for (int n = 0; n < 56; n++)
      for (int a = 0; a < K_D; a++)
        for (int b = 0; b < K_D; b++) WD[n][a][b] = qrand(4);
    // TDC form of the deconvolution weights (mapping as documented in tdc_weight_mapper)
    for (int py = 0; py < S_D; py++)
      for (int px = 0; px < S_D; px++)
        for (int n = 0; n < 56; n++)
          for (int a = 0; a < K_C; a++)
            for (int b = 0; b < K_C; b++) begin
              int ky, kx;
              ky = py + tdc_po(K_D, S_D) - S_D * (a - K_C / 2);
              kx = px + tdc_po(K_D, S_D) - S_D * (b - K_C / 2);
              W[8][py*S_D+px][n][a][b] = (ky >= 0 && ky < K_D && kx >= 0 && kx < K_D) ? WD[n][ky][kx] : 32'd0;
            end
    for (int l = 1; l <= 8; l++)
      for (int n = 0; n < ln(l); n++)
        for (int y = 0; y < IMG; y++)
          for (int x = 0; x < IMG; x++) SRC[l][n][y][x] = qrand(16);

    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      host(0);
      host(1);
      host(2);
    join_none

    for (int e = 1; e <= EPOCHS; e++) begin
      bit waited;
      int t0;
      @(negedge clk) frame_start = 1;
      @(negedge clk) frame_start = 0;
      chk(epoch_busy, "epoch starts");
      t0 = cyc;
      waited = 0;
      while (!epoch_done) begin
        if (clp_finished != 3'b000 && clp_finished != 3'b111) waited = 1;
        // a frame_start while busy must be ignored
        if (cyc - t0 == 100) begin
          frame_start = 1;
          @(negedge clk) frame_start = 0;
          chk(clp_finished == 3'b000 && epoch_busy, "frame_start ignored while busy");
          n_ignored++;
        end
        @(negedge clk);
      end
      if (waited) n_barrier++;
      n_epochs++;
      $display("epoch %0d: %0d cycles", e, cyc - t0);
      for (int l = 1; l <= 8; l++) ref_layer(l);
      for (int l = 1; l <= 8; l++) check_layer(l, e);
      if (e == 1) check_deconv();
      // pipeline: next epoch's inputs are this epoch's outputs
      for (int l = 8; l >= 2; l--)
        if (l != 4 && l != 5 && l != 6)
          for (int n = 0; n < ln(l); n++)
            for (int y = 0; y < IMG; y++)
              for (int x = 0; x < IMG; x++) SRC[l][n][y][x] = RES[l-1][n][y][x];
      for (int y = 0; y < IMG; y++) for (int x = 0; x < IMG; x++) SRC[1][0][y][x] = qrand(16);
    end

    chk(n_loads > 0, "tile loads");
    chk(n_multi_rc > 0, "several tiles per layer");
    chk(n_edge > 0, "edge tiles");
    chk(n_accum > 0, "input-channel accumulation");
    chk(n_mtile > 0, "output-channel tiles");
    chk(n_tdc > 0, "TDC weight conversions");
    chk(n_barrier > 0, "epoch barrier waits");
    chk(n_ignored > 0, "frame_start ignored while busy");
    $display("mechanisms: loads=%0d multi_rc=%0d edge=%0d accum=%0d mtile=%0d tdc=%0d barrier=%0d ignored=%0d epochs=%0d",
             n_loads, n_multi_rc, n_edge, n_accum, n_mtile, n_tdc, n_barrier, n_ignored, n_epochs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
