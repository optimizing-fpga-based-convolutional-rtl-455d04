// fp32_adder_tree: sums N single-precision values with a balanced binary
// tree of fp32_add units.
//
// The N inputs are the leaves of a full binary tree with P = 2**ceil(log2 N)
// leaves, stored heap-style in node[0 .. 2P-2] (node i adds nodes 2i+1 and
// 2i+2; node 0 is the root). Leaves beyond N are +0.0. The tree shape, one
// adder tree per output channel summing the Tn products, follows the
// design's compute engine; padding the unused leaves with zero is this
// implementation's choice.
//
// Interface: x[0..N-1] addends; y their sum. Combinational.
module fp32_adder_tree
  import fsrcnn_pkg::*;
#(
  parameter int N = 56
) (
  input  fp32_t x [N],
  output fp32_t y
);

  localparam int L = (N > 1) ? $clog2(N) : 0;
  localparam int P = 1 << L;

  fp32_t node [2*P-1];

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[P-1+i] = x[i];
    end else begin : g_pad
      assign node[P-1+i] = FP32_ZERO;
    end
  end

  for (genvar i = 0; i < P - 1; i++) begin : g_add
    fp32_add u_add (
      .a(node[2*i+1]),
      .b(node[2*i+2]),
      .y(node[i])
    );
  end

  assign y = node[0];

endmodule
