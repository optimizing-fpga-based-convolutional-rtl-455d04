// clp_weight_buffer: on-chip weight buffer of one CLP.
//
// One weight store per multiplier of the Tm x Tn compute engine, each
// holding a KMAX x KMAX kernel (row-major, address kh*KMAX + kw). The read
// port takes a kernel position and returns all TM*TN weights of that
// position in one cycle. The host writes one word per cycle, addressed by
// output channel wm, input channel wn and kernel position waddr.
//
// A weight store next to each multiplier follows the design's compute
// engine; the one-cycle registered read is this implementation's choice.
module clp_weight_buffer
  import fsrcnn_pkg::*;
#(
  parameter int TM   = 4,
  parameter int TN   = 4,
  parameter int KMAX = 5,
  localparam int MW  = (TM > 1) ? $clog2(TM) : 1,
  localparam int NW  = (TN > 1) ? $clog2(TN) : 1,
  localparam int KK  = KMAX * KMAX,
  localparam int AW  = $clog2(KK)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [MW-1:0] wm,
  input  logic [NW-1:0] wn,
  input  logic [AW-1:0] waddr,
  input  fp32_t         wdata,
  input  logic [AW-1:0] raddr,
  output fp32_t         rdata [TM][TN]
);

  fp32_t mem [TM][TN][KK];

  always_ff @(posedge clk) begin
    if (we) mem[wm][wn][waddr] <= wdata;
  end

  for (genvar m = 0; m < TM; m++) begin : g_m
    for (genvar n = 0; n < TN; n++) begin : g_n
      always_ff @(posedge clk) rdata[m][n] <= mem[m][n][raddr];
    end
  end

endmodule
