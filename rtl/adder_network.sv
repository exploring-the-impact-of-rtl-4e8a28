// adder_network: exclusive-sum network of SIZE = 2^K inputs.
//
// Output i is the sum of all inputs except input i. The network is a binary tree walked in
// both directions: a forward pass of adder_unit cells combines pairs of inputs up to the two
// halves below the root, the two halves swap at the root, and the backward pass (the same
// cells) combines each subtree's "everything else" value with its sibling until every leaf
// has the result over all other inputs. There are SIZE-2 cells of three operators each,
// 3*SIZE-6 operators in all, and the path from any input to any output crosses
// 2*(K-1) operators. SIZE must be a power of two, at least 2. Purely combinational.
// This two-way tree and its cell are the published design; a node of other degree uses the
// next power of two and pads the spare inputs with a neutral value.
module adder_network #(
  parameter int unsigned SIZE = 4,
  parameter int unsigned W    = 7
) (
  input  logic [SIZE-1:0][W-1:0]    din,
  output logic [SIZE-1:0][W+$clog2(SIZE)-1:0] dout
);
  localparam int unsigned K     = $clog2(SIZE);
  localparam int unsigned WN    = W + K;

  // One generate scope per tree level; f = forward partial result of a node,
  // b = result over every input outside that node's subtree.
  for (genvar l = 0; l < K; l++) begin : g_lvl
    logic [WN-1:0] f [SIZE >> l];
    logic [WN-1:0] b [SIZE >> l];
    if (l == 0) begin : g_leaves
      for (genvar i = 0; i < SIZE; i++) begin : g_leaf
        assign f[i]    = WN'($signed(din[i]));
        assign dout[i] = b[i];
      end
    end else begin : g_cells
      for (genvar i = 0; i < (SIZE >> l); i++) begin : g_cell
        adder_unit #(.W(WN)) u_cell (
          .a      (g_lvl[l-1].f[2*i]),
          .b      (g_lvl[l-1].f[2*i+1]),
          .p      (b[i]),
          .up     (f[i]),
          .down_a (g_lvl[l-1].b[2*i]),
          .down_b (g_lvl[l-1].b[2*i+1])
        );
      end
    end
    if (l == K-1) begin : g_root
      // the two halves below the root exchange their results
      assign b[0] = f[1];
      assign b[1] = f[0];
    end
  end
endmodule
