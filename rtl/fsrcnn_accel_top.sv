// fsrcnn_accel_top: FSRCNN super-resolution accelerator with three
// convolutional layer processors (multi-CLP) and the transformed
// deconvolution (TDC) method.
//
// FSRCNN has seven convolution layers (1->56 5x5, 56->12 1x1, four
// 12->12 3x3, 12->56 1x1) and one 9x9 stride-S_D deconvolution (56->1)
// that produces the high-resolution image. The channel counts change by
// almost 5x between layers, so one CLP sized for all of them leaves most
// multipliers idle. Instead the multipliers are split into three CLPs,
// each with unroll factors <Tn, Tm> chosen for its layers (S_D = 2):
//   CLP0 <2, 56>  : Conv1, Conv7
//   CLP1 <56, 4>  : Conv2, Conv8 (the deconvolution, as a 5x5 convolution
//                   with S_D*S_D = 4 output channels)
//   CLP2 <12, 12> : Conv3, Conv4, Conv5, Conv6
// All three start together when frame_start is pulsed and each works
// through its layer list on its own data (in a streaming system, the
// stages of successive images). epoch_done pulses when the last of the
// three has finished; only then is the next frame_start accepted.
//
// Off-chip memory and data movement are outside this module: each CLP's
// scheduler asks the host with tile_req / tile_desc to fill the CLP's input
// and weight buffers, and with store_req to read its output buffer, and
// waits for the matching ack. The weights of the deconvolution layer can
// be loaded in their original K_D x K_D form: with tdc_mode = 1, the
// kernel for input channel wd_n is written through wd_we/wd_addr/wd_data,
// wd_start converts it (tdc_weight_mapper) and the converted coefficients
// go straight into CLP1's weight buffer (output channel = sub-pixel
// py*S_D + px); with tdc_mode = 0, CLP1's weight port takes w_*[1] from
// the host.
//
// Port arrays are indexed by CLP number; index widths are those of the
// widest CLP and are truncated for the narrower ones. Buffer addressing:
// input buffer address y*(TC+KMAX-1) + x for the tile plus its halo (the
// tile's top-left output pixel minus (k-1)/2 in each direction); weight
// address kh*KMAX + kw; output address r*TC + c. Output buffer reads have
// one cycle of latency.
//
// The CLP tiling and the layer assignment are the design's; the tile size
// (16 x 16), the handshakes, the epoch barrier and the port layout are
// this implementation's choices.
module fsrcnn_accel_top
  import fsrcnn_pkg::*;
#(
  parameter int TR = TILE_R,
  parameter int TC = TILE_C,
  localparam int KMAX = LAYER_KMAX,
  localparam int IAW  = $clog2((TR + KMAX - 1) * (TC + KMAX - 1)),
  localparam int WAW  = $clog2(KMAX * KMAX),
  localparam int OAW  = $clog2(TR * TC),
  localparam int DAW  = $clog2(K_D * K_D)
) (
  input  logic           clk,
  input  logic           rst_n,
  // schedule
  input  logic           frame_start,
  input  logic [15:0]    img_rows,
  input  logic [15:0]    img_cols,
  output logic           epoch_busy,
  output logic           epoch_done,
  output logic [2:0]     clp_finished,
  // host handshakes, per CLP
  output logic           tile_req   [3],
  input  logic           tile_ack   [3],
  output logic           store_req  [3],
  input  logic           store_ack  [3],
  output tile_desc_t     tile_desc  [3],
  // host: input buffers
  input  logic           in_we      [3],
  input  logic [5:0]     in_bank    [3],
  input  logic [IAW-1:0] in_addr    [3],
  input  fp32_t          in_data    [3],
  // host: weight buffers
  input  logic           w_we       [3],
  input  logic [5:0]     w_m        [3],
  input  logic [5:0]     w_n        [3],
  input  logic [WAW-1:0] w_addr     [3],
  input  fp32_t          w_data     [3],
  // host: deconvolution weights through the TDC mapper into CLP1
  input  logic           tdc_mode,
  input  logic           wd_we,
  input  logic [DAW-1:0] wd_addr,
  input  fp32_t          wd_data,
  input  logic [5:0]     wd_n,
  input  logic           wd_start,
  output logic           wd_busy,
  // host: output buffers
  input  logic [5:0]     o_bank     [3],
  input  logic [OAW-1:0] o_addr     [3],
  output fp32_t          o_data     [3]
);

  localparam int TN_ [3] = '{CLP0_TN, CLP1_TN, CLP2_TN};
  localparam int TM_ [3] = '{CLP0_TM, CLP1_TM, CLP2_TM};

  logic       s_start, s_done [3];
  logic       c_start [3], c_clear [3], c_done [3];
  logic [2:0] fin;
  logic       run;

  // TDC weight path
  localparam int SUBW = $clog2(S_D * S_D);
  logic            wc_valid;
  logic [SUBW-1:0] wc_sub;
  logic [WAW-1:0]  wc_addr;
  fp32_t           wc_data;
  logic [5:0]      wd_n_q;
  logic            w1_we;
  logic [5:0]      w1_m, w1_n;
  logic [WAW-1:0]  w1_addr;
  fp32_t           w1_data;

  // epoch barrier: all three schedulers start together; the epoch ends
  // when every one of them has finished its layer list
  assign s_start = frame_start && !run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run        <= 1'b0;
      fin        <= '0;
      epoch_done <= 1'b0;
    end else begin
      epoch_done <= 1'b0;
      if (s_start) begin
        run <= 1'b1;
        fin <= '0;
      end else if (run) begin
        if ((fin | {s_done[2], s_done[1], s_done[0]}) == 3'b111) begin
          run        <= 1'b0;
          epoch_done <= 1'b1;
        end
        fin <= fin | {s_done[2], s_done[1], s_done[0]};
      end
    end
  end

  assign epoch_busy   = run;
  assign clp_finished = fin;

  tdc_weight_mapper #(.SD(S_D), .KD(K_D), .KMAX_C(KMAX)) u_tdc (
    .clk, .rst_n, .wd_we, .wd_addr, .wd_data, .start(wd_start),
    .busy(wd_busy), .wc_valid, .wc_sub, .wc_addr, .wc_data
  );

  always_ff @(posedge clk) begin
    if (wd_start && !wd_busy) wd_n_q <= wd_n;
  end

  always_comb begin
    if (tdc_mode) begin
      w1_we   = wc_valid;
      w1_m    = 6'(wc_sub);
      w1_n    = wd_n_q;
      w1_addr = wc_addr;
      w1_data = wc_data;
    end else begin
      w1_we   = w_we[1];
      w1_m    = w_m[1];
      w1_n    = w_n[1];
      w1_addr = w_addr[1];
      w1_data = w_data[1];
    end
  end

  for (genvar g = 0; g < 3; g++) begin : g_clp
    localparam int TNg = TN_[g];
    localparam int TMg = TM_[g];
    localparam int NWg = (TNg > 1) ? $clog2(TNg) : 1;
    localparam int MWg = (TMg > 1) ? $clog2(TMg) : 1;
    localparam int KWg = $clog2(KMAX + 1);
    localparam int RWg = $clog2(TR + 1);
    localparam int CWg = $clog2(TC + 1);

    logic [KWg-1:0] k_s;
    logic [RWg-1:0] rows_s;
    logic [CWg-1:0] cols_s;
    logic           wwe;
    logic [5:0]     wm, wn;
    logic [WAW-1:0] wa;
    fp32_t          wdat;

    multi_clp_scheduler #(.CLP_ID(g), .TM(TMg), .TN(TNg), .TR(TR), .TC(TC), .KMAX(KMAX)) u_sched (
      .clk, .rst_n, .start(s_start), .img_rows, .img_cols,
      .busy(), .done(s_done[g]),
      .tile_req(tile_req[g]), .tile_ack(tile_ack[g]),
      .store_req(store_req[g]), .store_ack(store_ack[g]), .desc(tile_desc[g]),
      .clp_start(c_start[g]), .clp_k(k_s), .clp_rows(rows_s), .clp_cols(cols_s),
      .clp_clear(c_clear[g]), .clp_done(c_done[g])
    );

    if (g == 1) begin : g_w1
      assign wwe = w1_we;  assign wm = w1_m;  assign wn = w1_n;
      assign wa  = w1_addr; assign wdat = w1_data;
    end else begin : g_wh
      assign wwe = w_we[g];  assign wm = w_m[g];  assign wn = w_n[g];
      assign wa  = w_addr[g]; assign wdat = w_data[g];
    end

    clp #(.TM(TMg), .TN(TNg), .TR(TR), .TC(TC), .KMAX(KMAX)) u_clp (
      .clk, .rst_n,
      .start(c_start[g]), .k(k_s), .rows(rows_s), .cols(cols_s), .clear(c_clear[g]),
      .busy(), .done(c_done[g]),
      .in_we(in_we[g]), .in_bank(NWg'(in_bank[g])), .in_addr(in_addr[g]), .in_data(in_data[g]),
      .w_we(wwe), .w_m(MWg'(wm)), .w_n(NWg'(wn)), .w_addr(wa), .w_data(wdat),
      .o_bank(MWg'(o_bank[g])), .o_addr(o_addr[g]), .o_data(o_data[g])
    );
  end

  a_tdc_fits: assert property (@(posedge clk) disable iff (!rst_n)
      wc_valid |-> 32'(wc_sub) < CLP1_TM);

endmodule
