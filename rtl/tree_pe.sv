// tree_pe: systolic-tree processing element of order p, the building block
// of the cascaded form of the systolic DLMS filter.
//
// The PE holds G = 2**p consecutive filter taps (dlms_tap). Its taps pass
// the input line x, the delayed input line x(n-D) and the scaled error
// mu*e along as in the plain array. Their G products are summed by a
// pipelined adder tree of p levels whose root is left unregistered; the
// root is added to the partial sum arriving on the accumulation chain, and
// the result is registered: acc_out(t+1) = acc_in(t) + tree(t). A PE of
// order 0 holds one tap and adds its product straight to the chain.
//
// Timing: the tree adds max(p-1, 0) clocks, the chain register one more.
// The x, x(n-D) and mu*e lines leave the PE as they leave its last tap; the
// enclosing array puts one register on each of them between PEs.
//
// The PE of order p made of a tree, the accumulation chain with one delay
// per PE and the three lines passing through the PEs follow the published
// generalised structure. Merging the tree root into the chain adder, and
// hence the exact delays, are choices of this implementation, made so that
// a single PE of order log2(N) is the same circuit as the plain tree array.
module tree_pe #(
  parameter int unsigned P     = 1,            // order: G = 2**P taps
  parameter int unsigned X_W   = 8,
  parameter int unsigned W_W   = 8,
  parameter int unsigned E_W   = 16,
  parameter int unsigned ACC_W = X_W + W_W + P + 1,
  parameter int unsigned G     = 1 << P
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [X_W-1:0]    x_in,
  input  logic signed [X_W-1:0]    xd_in,
  input  logic signed [E_W-1:0]    mue_in,
  input  logic signed [ACC_W-1:0]  acc_in,
  output logic signed [X_W-1:0]    x_out,
  output logic signed [X_W-1:0]    xd_out,
  output logic signed [E_W-1:0]    mue_out,
  output logic signed [ACC_W-1:0]  acc_out,
  output logic signed [W_W-1:0]    weights [G]
);

  localparam int unsigned P_W = X_W + W_W;

  logic signed [X_W-1:0] x_line   [G+1];
  logic signed [X_W-1:0] xd_line  [G+1];
  logic signed [E_W-1:0] mue_line [G+1];
  logic signed [P_W-1:0] prods    [G];
  logic signed [P_W+P-1:0] tree;

  assign x_line[0]   = x_in;
  assign xd_line[0]  = xd_in;
  assign mue_line[0] = mue_in;

  for (genvar k = 0; k < G; k++) begin : g_tap
    dlms_tap #(
      .X_W(X_W),
      .W_W(W_W),
      .E_W(E_W)
    ) u_tap (
      .clk    (clk),
      .rst_n  (rst_n),
      .x_in   (x_line[k]),
      .xd_in  (xd_line[k]),
      .mue_in (mue_line[k]),
      .x_out  (x_line[k+1]),
      .xd_out (xd_line[k+1]),
      .mue_out(mue_line[k+1]),
      .w      (weights[k]),
      .prod   (prods[k])
    );
  end

  if (G == 1) begin : g_single
    assign tree = prods[0];
  end else begin : g_tree
    adder_tree #(
      .N       (G),
      .IN_W    (P_W),
      .L       (P),
      .O_W     (P_W + P),
      .REG_ROOT(1'b0)
    ) u_tree (
      .clk  (clk),
      .rst_n(rst_n),
      .in   (prods),
      .sum  (tree)
    );
  end

  // Accumulation chain stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_out <= '0;
    else        acc_out <= acc_in + ACC_W'(tree);
  end

  assign x_out   = x_line[G];
  assign xd_out  = xd_line[G];
  assign mue_out = mue_line[G];

  initial begin
    assert (ACC_W >= P_W + P)
      else $error("tree_pe: ACC_W=%0d narrower than the tree sum", ACC_W);
  end

endmodule
