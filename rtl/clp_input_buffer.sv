// clp_input_buffer: on-chip input-tile buffer of one CLP.
//
// TN banks, one per input channel of the current input-channel tile, each
// holding DEPTH single-precision words: an input tile with its halo, stored
// row-major. The read port presents the same address to every bank and
// returns TN words at once, which feed the TN columns of the compute
// engine. The host fills the banks one word per cycle through the write
// port.
//
// One bank per input channel follows the design's "Tn inputs" buffer
// organisation; port count and the one-cycle registered read (block-RAM
// style) are this implementation's choices.
module clp_input_buffer
  import fsrcnn_pkg::*;
#(
  parameter int TN    = 2,
  parameter int DEPTH = 400,
  localparam int BW   = (TN > 1) ? $clog2(TN) : 1,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BW-1:0] wbank,
  input  logic [AW-1:0] waddr,
  input  fp32_t         wdata,
  input  logic [AW-1:0] raddr,
  output fp32_t         rdata [TN]
);

  fp32_t mem [TN][DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wbank][waddr] <= wdata;
  end

  for (genvar n = 0; n < TN; n++) begin : g_rd
    always_ff @(posedge clk) rdata[n] <= mem[n][raddr];
  end

endmodule
