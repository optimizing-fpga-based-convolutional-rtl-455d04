// tdc_weight_mapper: weight conversion of the transformed deconvolution
// (TDC) method.
//
// A stride-S_D deconvolution with a K_D x K_D kernel is computed as a
// stride-1 convolution with S_D*S_D output channels and a K_C x K_C kernel:
// output channel (py, px) produces the output pixels (S_D*y + py,
// S_D*x + px) of the high-resolution image from the K_C x K_C input block
// around input pixel (y, x). Each coefficient of the new kernels is one
// deconvolution coefficient or zero (inverse coefficient mapping):
//   W_C[py,px][jy][jx] = W_D[ky][kx],
//   ky = py + PO - S_D*(jy - K_C/2),  kx = px + PO - S_D*(jx - K_C/2),
// and 0 when ky or kx falls outside 0..K_D-1. Here the deconvolution is
// taken as out[S_D*i + k - PO] += in[i] * W_D[k]. K_C follows the design's
// formula (5, 3, 3 for S_D = 2, 3, 4 with K_D = 9); the explicit index
// mapping and the offset PO = K_D/2 - S_D/2 (the value for which that K_C
// covers every tap) are this implementation's reading.
//
// Interface: the host writes one K_D x K_D kernel, row-major, through
// wd_we/wd_addr/wd_data, then pulses start. Starting the cycle after start,
// the unit emits one converted coefficient per cycle on wc_valid, with
// wc_sub = py*S_D + px (the output-channel offset) and wc_addr = jy*KMAX_C
// + jx, in order of wc_sub, then jy, then jx: S_D*S_D*K_C*K_C cycles in
// all; busy falls S_D*S_D*K_C*K_C + 2 cycles after start. KMAX_C is the
// row pitch of the destination weight buffer.
module tdc_weight_mapper
  import fsrcnn_pkg::*;
#(
  parameter int SD     = 2,
  parameter int KD     = 9,
  parameter int KMAX_C = 5,
  localparam int KC    = tdc_kc(KD, SD),
  localparam int PO    = tdc_po(KD, SD),
  localparam int DAW   = $clog2(KD * KD),
  localparam int SW    = (SD * SD > 1) ? $clog2(SD * SD) : 1,
  localparam int CAW   = $clog2(KMAX_C * KMAX_C),
  localparam int JW    = $clog2(KC + 1),
  localparam int PW    = $clog2(SD + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wd_we,
  input  logic [DAW-1:0] wd_addr,
  input  fp32_t          wd_data,
  input  logic           start,
  output logic           busy,
  output logic           wc_valid,
  output logic [SW-1:0]  wc_sub,
  output logic [CAW-1:0] wc_addr,
  output fp32_t          wc_data
);

  fp32_t         wd [KD*KD];
  logic          run;
  logic [PW-1:0] py, px;
  logic [JW-1:0] jy, jx;
  int            ky, kx;
  fp32_t         coef;
  logic          last;

  always_ff @(posedge clk) begin
    if (wd_we) wd[wd_addr] <= wd_data;
  end

  always_comb begin
    ky   = int'(py) + PO - SD * (int'(jy) - KC / 2);
    kx   = int'(px) + PO - SD * (int'(jx) - KC / 2);
    coef = FP32_ZERO;
    if (ky >= 0 && ky < KD && kx >= 0 && kx < KD) coef = wd[ky * KD + kx];
    last = (py == PW'(SD - 1)) && (px == PW'(SD - 1)) &&
           (jy == JW'(KC - 1)) && (jx == JW'(KC - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run      <= 1'b0;
      py       <= '0;
      px       <= '0;
      jy       <= '0;
      jx       <= '0;
      wc_valid <= 1'b0;
    end else begin
      wc_valid <= run;
      if (!run) begin
        if (start) begin
          run <= 1'b1;
          py  <= '0;
          px  <= '0;
          jy  <= '0;
          jx  <= '0;
        end
      end else begin
        if (last) run <= 1'b0;
        if (jx != JW'(KC - 1)) begin
          jx <= jx + 1'b1;
        end else begin
          jx <= '0;
          if (jy != JW'(KC - 1)) begin
            jy <= jy + 1'b1;
          end else begin
            jy <= '0;
            if (px != PW'(SD - 1)) begin
              px <= px + 1'b1;
            end else begin
              px <= '0;
              py <= py + 1'b1;
            end
          end
        end
      end
    end
    wc_sub  <= SW'(32'(py) * SD + 32'(px));
    wc_addr <= CAW'(32'(jy) * KMAX_C + 32'(jx));
    wc_data <= coef;
  end

  assign busy = run || wc_valid;

  initial begin
    assert (KC <= KMAX_C) else $error("K_C = %0d exceeds KMAX_C = %0d", KC, KMAX_C);
  end

endmodule
