// clp_compute_engine: the Tm x Tn multiply-accumulate array of one
// convolutional layer processor (CLP).
//
// Every cycle it takes Tn input pixels (one per input channel) and a
// Tm x Tn block of weights. For each of the Tm output channels it
// multiplies the Tn pixels by that channel's Tn weights, sums the products
// in an adder tree, and adds the partial sum read from the output buffer:
//   acc[m] = sum_n(pix[n] * wgt[m][n]) + psum[m]
// This is the unrolled (tm, tn) body of the convolution loop nest, with
// single-precision arithmetic as in the design.
//
// Timing (this implementation's choice of pipeline): stage 1 registers the
// Tm*Tn products and the partial sums, stage 2 registers the tree sum plus
// partial sum. acc and out_valid follow in_valid by 2 cycles; a new set of
// operands is accepted every cycle.
module clp_compute_engine
  import fsrcnn_pkg::*;
#(
  parameter int TM = 4,
  parameter int TN = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t pix  [TN],
  input  fp32_t wgt  [TM][TN],
  input  fp32_t psum [TM],
  output logic  out_valid,
  output fp32_t acc  [TM]
);

  fp32_t prod   [TM][TN];
  fp32_t prod_q [TM][TN];
  fp32_t psum_q [TM];
  fp32_t tsum   [TM];
  fp32_t nsum   [TM];
  logic  v1;

  for (genvar m = 0; m < TM; m++) begin : g_m
    for (genvar n = 0; n < TN; n++) begin : g_n
      fp32_mul u_mul (.a(pix[n]), .b(wgt[m][n]), .y(prod[m][n]));
    end
    fp32_adder_tree #(.N(TN)) u_tree (.x(prod_q[m]), .y(tsum[m]));
    fp32_add u_acc (.a(tsum[m]), .b(psum_q[m]), .y(nsum[m]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
    prod_q <= prod;
    psum_q <= psum;
    acc    <= nsum;
  end

endmodule
