// adder_tree: pipelined binary adder tree that sums the N tap products of
// the systolic filter.
//
// The N inputs (N a power of two, at least 2) are added in pairs, the pair
// sums in pairs again, and so on, with a register after every adder level,
// so the tree has log2(N) levels and the same number of clock cycles of
// latency: sum(n) = in_0(n-L) + ... + in_{N-1}(n-L), L = log2(N). For the
// four-tap filter this is the two-level tree whose output is y(n-2).
// The sum is kept at full precision (IN_W + L bits), so it never overflows.
// Nodes are numbered as a heap: node 1 is the root, node i adds its children
// 2i and 2i+1, and the children of the last level are the inputs.
// The paired, registered tree follows the published 4-tap structure; its
// generalisation to any power of two and the full-precision sum are this
// design's choices. Reset (active low, asynchronous) clears every level.
// With REG_ROOT = 0 the root adder is left unregistered (latency L - 1), so
// that a following stage can add one more term before its own register; the
// cascaded tree PE uses this to merge the root with its accumulation chain.
// A two-input tree with REG_ROOT = 0 has no register, and clk and rst_n are
// then unused.
module adder_tree #(
  parameter int unsigned N        = 4,
  parameter int unsigned IN_W     = 16,
  parameter int unsigned L        = $clog2(N),
  parameter int unsigned O_W      = IN_W + L,
  parameter bit          REG_ROOT = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] in [N],
  output logic signed [O_W-1:0]  sum
);

  // Node i of the heap (1 .. N-1) is g_node[i].q.
  for (genvar i = 1; i < N; i++) begin : g_node
    logic signed [O_W-1:0] left, right, q;

    if (2 * i >= N) begin : g_leaf_children
      assign left  = O_W'(in[2*i - N]);
      assign right = O_W'(in[2*i + 1 - N]);
    end else begin : g_node_children
      assign left  = g_node[2*i].q;
      assign right = g_node[2*i + 1].q;
    end

    if (i == 1 && !REG_ROOT) begin : g_comb_root
      assign q = left + right;
    end else begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) q <= '0;
        else        q <= left + right;
      end
    end
  end

  assign sum = g_node[1].q;

  // The tree is balanced only for a power of two of at least two inputs.
  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("adder_tree: N=%0d must be a power of two >= 2", N);
    assert (L == $clog2(N))
      else $error("adder_tree: L must equal log2(N)");
  end

endmodule
