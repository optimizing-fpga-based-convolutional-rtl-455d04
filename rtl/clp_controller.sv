// clp_controller: loop controller of one CLP.
//
// Runs the convolution loop nest of one tile: kernel row kh and kernel
// column kw outermost, then tile row r and tile column c, one (r, c) step
// per cycle (initiation interval 1). The Tm x Tn unrolled loops are the
// compute engine itself. For each step it issues
//   in_raddr = (r + kh) * IN_W + (c + kw)   input-buffer address
//   w_raddr  = kh * KMAX + kw               weight-buffer address
//   o_raddr  = r * TC + c                   output-buffer address
// and first_k, set during kernel position (0,0), where the partial sum must
// start from zero for the first input-channel tile. wb_addr is o_raddr
// delayed by LAT cycles, the write-back address for the result that
// leaves the pipeline. done pulses together with the last write-back.
//
// A tile takes K*K*rows*cols + LAT cycles from start to done, the form of
// the design's cycle count (K*K per output pixel plus the pipeline depth P
// spread over the tile). Because kernel loops are outermost, an output
// address is revisited only every rows*cols cycles; rows*cols must exceed
// LAT, which an assertion checks. Stride 1 (all layers, including the
// converted deconvolution layer, are stride-1 convolutions).
module clp_controller #(
  parameter int TR   = 16,
  parameter int TC   = 16,
  parameter int KMAX = 5,
  parameter int LAT  = 3,
  localparam int IN_W  = TC + KMAX - 1,
  localparam int IN_D  = (TR + KMAX - 1) * IN_W,
  localparam int IAW   = $clog2(IN_D),
  localparam int WAW   = $clog2(KMAX * KMAX),
  localparam int OAW   = $clog2(TR * TC),
  localparam int KW    = $clog2(KMAX + 1),
  localparam int RW    = $clog2(TR + 1),
  localparam int CW    = $clog2(TC + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [KW-1:0]  k,
  input  logic [RW-1:0]  rows,
  input  logic [CW-1:0]  cols,
  output logic           step_valid,
  output logic           first_k,
  output logic [IAW-1:0] in_raddr,
  output logic [WAW-1:0] w_raddr,
  output logic [OAW-1:0] o_raddr,
  output logic [OAW-1:0] wb_addr,
  output logic           busy,
  output logic           done
);

  logic           run;
  logic [KW-1:0]  kh, kw, k_q;
  logic [RW-1:0]  r, rows_q;
  logic [CW-1:0]  c, cols_q;
  logic           last_step;
  logic [OAW-1:0] addr_sr [LAT];
  logic [LAT-1:0] last_sr;

  assign last_step = run && (kh == k_q - 1'b1) && (kw == k_q - 1'b1) &&
                     (r == rows_q - 1'b1) && (c == cols_q - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run    <= 1'b0;
      kh     <= '0;
      kw     <= '0;
      r      <= '0;
      c      <= '0;
      k_q    <= '0;
      rows_q <= '0;
      cols_q <= '0;
    end else if (start && !busy) begin
      run    <= 1'b1;
      kh     <= '0;
      kw     <= '0;
      r      <= '0;
      c      <= '0;
      k_q    <= k;
      rows_q <= rows;
      cols_q <= cols;
    end else if (run) begin
      if (last_step) begin
        run <= 1'b0;
      end
      if (c != cols_q - 1'b1) begin
        c <= c + 1'b1;
      end else begin
        c <= '0;
        if (r != rows_q - 1'b1) begin
          r <= r + 1'b1;
        end else begin
          r <= '0;
          if (kw != k_q - 1'b1) begin
            kw <= kw + 1'b1;
          end else begin
            kw <= '0;
            kh <= kh + 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    step_valid = run;
    first_k    = (kh == '0) && (kw == '0);
    in_raddr   = IAW'((32'(r) + 32'(kh)) * IN_W + 32'(c) + 32'(kw));
    w_raddr    = WAW'(32'(kh) * KMAX + 32'(kw));
    o_raddr    = OAW'(32'(r) * TC + 32'(c));
  end

  // write-back address and end-of-tile marker travel with the pipeline
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_sr <= '0;
    end else begin
      last_sr <= {last_sr[LAT-2:0], last_step};
    end
    addr_sr[0] <= o_raddr;
    for (int i = 1; i < LAT; i++) addr_sr[i] <= addr_sr[i-1];
  end

  assign wb_addr = addr_sr[LAT-1];
  assign done    = last_sr[LAT-1];
  assign busy    = run || (|last_sr);

  a_tile_size: assert property (@(posedge clk) disable iff (!rst_n)
      (start && !busy) |-> (32'(rows) * 32'(cols) > LAT && k != '0 && 32'(k) <= KMAX &&
                            rows != '0 && 32'(rows) <= TR && cols != '0 && 32'(cols) <= TC));

endmodule
