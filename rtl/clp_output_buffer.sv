// clp_output_buffer: on-chip output (partial-sum) buffer of one CLP.
//
// TM banks, one per output channel, each holding DEPTH words of one output
// tile (row-major). The compute engine reads the partial sums of one pixel
// from all banks (raddr -> rdata, one cycle), and writes the updated sums
// back (we, waddr, wdata) a few cycles later; this feedback loop is the
// accumulation path of the design. A third port lets the host read one word
// (hbank, haddr -> hdata, one cycle) to move the finished tile off chip.
//
// The three-port organisation and registered reads are this
// implementation's choices.
module clp_output_buffer
  import fsrcnn_pkg::*;
#(
  parameter int TM    = 4,
  parameter int DEPTH = 256,
  localparam int BW   = (TM > 1) ? $clog2(TM) : 1,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output fp32_t         rdata [TM],
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  fp32_t         wdata [TM],
  input  logic [BW-1:0] hbank,
  input  logic [AW-1:0] haddr,
  output fp32_t         hdata
);

  fp32_t mem [TM][DEPTH];

  for (genvar m = 0; m < TM; m++) begin : g_m
    always_ff @(posedge clk) begin
      if (we) mem[m][waddr] <= wdata[m];
      rdata[m] <= mem[m][raddr];
    end
  end

  always_ff @(posedge clk) hdata <= mem[hbank][haddr];

endmodule
