// fsrcnn_pkg: types and constants shared by the FSRCNN accelerator.
//
// Holds the 32-bit single-precision word type, the FSRCNN layer table
// (channel counts and kernel sizes of the eight layers), the assignment of
// layers to the three convolutional layer processors (CLPs) and their
// unroll factors <Tn, Tm> for an upscaling factor S_D of 2, the kernel size
// K_C of the deconvolution layer after its conversion to a convolution, and
// the tile descriptor the scheduler hands to the host.
//
// Layer shapes and the layer-to-CLP assignment follow the FSRCNN network
// and the multi-CLP schedule of the design. The numeric encoding of the
// descriptor fields is this implementation's own choice.
package fsrcnn_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_QNAN = 32'h7FC0_0000;

  // Upscaling factor and deconvolution kernel of the built configuration.
  localparam int S_D = 2;
  localparam int K_D = 9;

  // Kernel size after the transformation of the deconvolution layer:
  // with h = floor(K_D/2) and D the fractional part of h/S_D,
  // K_C = 2*floor(h/S_D) + 1 when D < 0.5, else 2*floor(h/S_D) + 2.
  function automatic int tdc_kc(input int kd, input int sd);
    int h, q, r;
    h = kd / 2;
    q = h / sd;
    r = h % sd;
    return (2 * r < sd) ? 2 * q + 1 : 2 * q + 2;
  endfunction

  // Offset between the deconvolution kernel and the output sub-pixel grid:
  // output pixel o receives in[i] * W_D[o + PO - S_D*i].
  function automatic int tdc_po(input int kd, input int sd);
    return kd / 2 - sd / 2;
  endfunction

  localparam int K_C = tdc_kc(K_D, S_D);

  // Unroll factors of the three CLPs (multi-CLP configuration, S_D = 2).
  localparam int CLP0_TN = 2;
  localparam int CLP0_TM = 56;
  localparam int CLP1_TN = 56;
  localparam int CLP1_TM = 4;
  localparam int CLP2_TN = 12;
  localparam int CLP2_TM = 12;

  // Output tile size (rows x columns) and largest kernel of any layer.
  localparam int TILE_R = 16;
  localparam int TILE_C = 16;
  localparam int LAYER_KMAX = 5;

  typedef struct packed {
    logic [3:0] layer;   // FSRCNN layer number, 1..8
    logic [6:0] n;       // input channels
    logic [6:0] m;       // output channels (S_D*S_D for the converted layer 8)
    logic [2:0] k;       // kernel size (K_C for the converted layer 8)
  } layer_t;

  // Layers run by each CLP, in order (schedule: CLP0 Conv1, Conv7;
  // CLP1 Conv2, Conv8; CLP2 Conv3..Conv6).
  function automatic int clp_num_layers(input int clp);
    return (clp == 2) ? 4 : 2;
  endfunction

  function automatic layer_t clp_layer(input int clp, input int idx);
    layer_t l;
    case (clp)
      0: l = (idx == 0) ? layer_t'{4'd1, 7'd1, 7'd56, 3'd5}
                        : layer_t'{4'd7, 7'd12, 7'd56, 3'd1};
      1: l = (idx == 0) ? layer_t'{4'd2, 7'd56, 7'd12, 3'd1}
                        : layer_t'{4'd8, 7'd56, 7'(S_D * S_D), 3'(K_C)};
      default: l = layer_t'{4'(3 + idx), 7'd12, 7'd12, 3'd3};
    endcase
    return l;
  endfunction

  // What the scheduler asks the host to load (tile_req) or store (store_req).
  typedef struct packed {
    logic [3:0] layer;   // FSRCNN layer number
    logic [7:0] mt;      // output-channel tile index
    logic [7:0] nt;      // input-channel tile index
    logic [7:0] rt;      // tile row index
    logic [7:0] ct;      // tile column index
    logic [4:0] rows;    // rows in this tile (edge tiles are shorter)
    logic [4:0] cols;    // columns in this tile
  } tile_desc_t;

endpackage
