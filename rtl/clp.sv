// clp: one tile-based convolutional layer processor (CLP).
//
// Computes one output tile of a stride-1 convolution layer for TM output
// channels from TN input channels:
//   out[m][r][c] (+)= sum_{n, kh, kw} in[n][r+kh][c+kw] * w[m][n][kh][kw]
// The host fills the input buffer (TN banks, row pitch TC+KMAX-1, tile
// plus halo) and the weight buffer (TM x TN kernels), then pulses start
// with the kernel size k and the tile size rows x cols. With clear = 1 the
// partial sums start from zero (first input-channel tile); with clear = 0
// they accumulate onto what the output buffer holds, so a layer with more
// than TN input channels is computed by ceil(N/TN) runs. When done pulses,
// the host reads the tile through the output buffer's host port.
//
// Structure: clp_controller walks the loops, clp_input_buffer /
// clp_weight_buffer / clp_output_buffer hold the tiles, and
// clp_compute_engine does the Tm x Tn multiply-accumulate. This follows the
// tile-based CLP of the design; port layout, buffer latency and pipeline
// depth (LAT = 3: buffer read, products, sum) are this implementation's
// choices. A tile takes k*k*rows*cols + 3 cycles.
module clp
  import fsrcnn_pkg::*;
#(
  parameter int TM   = 4,
  parameter int TN   = 4,
  parameter int TR   = 16,
  parameter int TC   = 16,
  parameter int KMAX = 5,
  localparam int LAT   = 3,
  localparam int IN_D  = (TR + KMAX - 1) * (TC + KMAX - 1),
  localparam int IAW   = $clog2(IN_D),
  localparam int WAW   = $clog2(KMAX * KMAX),
  localparam int OAW   = $clog2(TR * TC),
  localparam int MW    = (TM > 1) ? $clog2(TM) : 1,
  localparam int NW    = (TN > 1) ? $clog2(TN) : 1,
  localparam int KW    = $clog2(KMAX + 1),
  localparam int RW    = $clog2(TR + 1),
  localparam int CW    = $clog2(TC + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // tile command
  input  logic           start,
  input  logic [KW-1:0]  k,
  input  logic [RW-1:0]  rows,
  input  logic [CW-1:0]  cols,
  input  logic           clear,
  output logic           busy,
  output logic           done,
  // host: input buffer write
  input  logic           in_we,
  input  logic [NW-1:0]  in_bank,
  input  logic [IAW-1:0] in_addr,
  input  fp32_t          in_data,
  // host: weight buffer write
  input  logic           w_we,
  input  logic [MW-1:0]  w_m,
  input  logic [NW-1:0]  w_n,
  input  logic [WAW-1:0] w_addr,
  input  fp32_t          w_data,
  // host: output buffer read (one-cycle latency)
  input  logic [MW-1:0]  o_bank,
  input  logic [OAW-1:0] o_addr,
  output fp32_t          o_data
);

  logic           step_valid, first_k, ctl_busy;
  logic [IAW-1:0] in_raddr;
  logic [WAW-1:0] w_raddr;
  logic [OAW-1:0] o_raddr, wb_addr;
  logic           clear_q, v_rd, zero_rd, eng_valid;
  fp32_t          pix  [TN];
  fp32_t          wgt  [TM][TN];
  fp32_t          oold [TM];
  fp32_t          psum [TM];
  fp32_t          acc  [TM];

  clp_controller #(.TR(TR), .TC(TC), .KMAX(KMAX), .LAT(LAT)) u_ctl (
    .clk, .rst_n, .start, .k, .rows, .cols,
    .step_valid, .first_k, .in_raddr, .w_raddr, .o_raddr, .wb_addr,
    .busy(ctl_busy), .done
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clear_q <= 1'b0;
      v_rd    <= 1'b0;
      zero_rd <= 1'b0;
    end else begin
      if (start && !ctl_busy) clear_q <= clear;
      v_rd    <= step_valid;
      zero_rd <= step_valid && first_k && clear_q;
    end
  end

  clp_input_buffer #(.TN(TN), .DEPTH(IN_D)) u_ibuf (
    .clk, .we(in_we), .wbank(in_bank), .waddr(in_addr), .wdata(in_data),
    .raddr(in_raddr), .rdata(pix)
  );

  clp_weight_buffer #(.TM(TM), .TN(TN), .KMAX(KMAX)) u_wbuf (
    .clk, .we(w_we), .wm(w_m), .wn(w_n), .waddr(w_addr), .wdata(w_data),
    .raddr(w_raddr), .rdata(wgt)
  );

  clp_output_buffer #(.TM(TM), .DEPTH(TR * TC)) u_obuf (
    .clk, .raddr(o_raddr), .rdata(oold),
    .we(eng_valid), .waddr(wb_addr), .wdata(acc),
    .hbank(o_bank), .haddr(o_addr), .hdata(o_data)
  );

  always_comb begin
    for (int m = 0; m < TM; m++) psum[m] = zero_rd ? FP32_ZERO : oold[m];
  end

  clp_compute_engine #(.TM(TM), .TN(TN)) u_eng (
    .clk, .rst_n, .in_valid(v_rd), .pix, .wgt, .psum,
    .out_valid(eng_valid), .acc
  );

  assign busy = ctl_busy;

  a_wb_align: assert property (@(posedge clk) disable iff (!rst_n)
      done |-> eng_valid);

endmodule
