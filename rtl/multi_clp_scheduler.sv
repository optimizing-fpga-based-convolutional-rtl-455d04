// multi_clp_scheduler: layer and tile sequencer of one CLP.
//
// Walks the list of layers this CLP runs in the multi-CLP schedule
// (CLP 0: Conv1, Conv7; CLP 1: Conv2, Conv8 as its TDC convolution;
// CLP 2: Conv3..Conv6; see fsrcnn_pkg::clp_layer) over an image of
// img_rows x img_cols pixels. For each layer it steps through output-channel
// tiles (ceil(M/TM)), tile rows (ceil(R/TR)), tile columns (ceil(C/TC)) and,
// innermost, input-channel tiles (ceil(N/TN)). For every step it
//   1. raises tile_req with tile_desc until the host answers tile_ack
//      (the host has filled the CLP's input and weight buffers),
//   2. starts the CLP with the layer's kernel size, the tile size (edge
//      tiles are shorter) and clear = 1 on the first input-channel tile,
//   3. waits for the CLP's done and, after the last input-channel tile,
//      raises store_req until store_ack (the host has read the outputs).
// done pulses after the last tile of the last layer.
//
// The layer assignment follows the design's schedule; the loop order,
// with input channels innermost so that partial sums stay in the output
// buffer as in the convolution loop nest, and the req/ack handshakes with
// the host that owns off-chip memory, are this implementation's choices.
module multi_clp_scheduler
  import fsrcnn_pkg::*;
#(
  parameter int CLP_ID = 0,
  parameter int TM     = 56,
  parameter int TN     = 2,
  parameter int TR     = 16,
  parameter int TC     = 16,
  parameter int KMAX   = 5,
  localparam int KW    = $clog2(KMAX + 1),
  localparam int RW    = $clog2(TR + 1),
  localparam int CW    = $clog2(TC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   img_rows,
  input  logic [15:0]   img_cols,
  output logic          busy,
  output logic          done,
  output logic          tile_req,
  input  logic          tile_ack,
  output logic          store_req,
  input  logic          store_ack,
  output tile_desc_t    desc,
  output logic          clp_start,
  output logic [KW-1:0] clp_k,
  output logic [RW-1:0] clp_rows,
  output logic [CW-1:0] clp_cols,
  output logic          clp_clear,
  input  logic          clp_done
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_WAIT, S_STORE, S_NEXT} state_t;

  localparam int NL = clp_num_layers(CLP_ID);

  state_t     state;
  logic [2:0] li;
  logic [7:0] mt, nt, rt, ct;
  layer_t     lay;
  int         m_tiles, n_tiles, r_tiles, c_tiles, rows_i, cols_i;

  always_comb begin
    lay     = clp_layer(CLP_ID, int'(li));
    m_tiles = (int'(lay.m) + TM - 1) / TM;
    n_tiles = (int'(lay.n) + TN - 1) / TN;
    r_tiles = (int'(img_rows) + TR - 1) / TR;
    c_tiles = (int'(img_cols) + TC - 1) / TC;
    rows_i  = int'(img_rows) - int'(rt) * TR;
    cols_i  = int'(img_cols) - int'(ct) * TC;
    if (rows_i > TR) rows_i = TR;
    if (cols_i > TC) cols_i = TC;
    desc = '{layer: lay.layer, mt: mt, nt: nt, rt: rt, ct: ct,
             rows: 5'(rows_i), cols: 5'(cols_i)};
  end

  assign tile_req  = (state == S_LOAD);
  assign store_req = (state == S_STORE);
  assign clp_start = (state == S_RUN);
  assign clp_k     = KW'(lay.k);
  assign clp_rows  = RW'(rows_i);
  assign clp_cols  = CW'(cols_i);
  assign clp_clear = (nt == 8'd0);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      li    <= '0;
      mt    <= '0;
      nt    <= '0;
      rt    <= '0;
      ct    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          li    <= '0;
          mt    <= '0;
          nt    <= '0;
          rt    <= '0;
          ct    <= '0;
          state <= S_LOAD;
        end
        S_LOAD:  if (tile_ack) state <= S_RUN;
        S_RUN:   state <= S_WAIT;
        S_WAIT:  if (clp_done) state <= (int'(nt) == n_tiles - 1) ? S_STORE : S_NEXT;
        S_STORE: if (store_ack) state <= S_NEXT;
        S_NEXT: begin
          state <= S_LOAD;
          if (int'(nt) != n_tiles - 1) begin
            nt <= nt + 1'b1;
          end else begin
            nt <= '0;
            if (int'(ct) != c_tiles - 1) begin
              ct <= ct + 1'b1;
            end else begin
              ct <= '0;
              if (int'(rt) != r_tiles - 1) begin
                rt <= rt + 1'b1;
              end else begin
                rt <= '0;
                if (int'(mt) != m_tiles - 1) begin
                  mt <= mt + 1'b1;
                end else begin
                  mt <= '0;
                  if (int'(li) != NL - 1) begin
                    li <= li + 1'b1;
                  end else begin
                    li    <= '0;
                    state <= S_IDLE;
                    done  <= 1'b1;
                  end
                end
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
      tile_req && !tile_ack |=> tile_req && $stable(desc));
  a_img_size: assert property (@(posedge clk) disable iff (!rst_n)
      start && !busy |-> img_rows != 16'd0 && img_cols != 16'd0);

endmodule
