// dlms_systolic_fir: N-tap adaptive FIR filter trained by the delayed LMS
// (DLMS) algorithm, built as a systolic array of identical tap PEs.
//
// Every clock one input sample x(n) and one desired sample d(n) enter. The
// filter computes y(n) = sum_k w_k(n) x(n-k), compares it with d(n) and
// adapts the weights by w_k(n+1) = w_k(n) + mu e(n-D) x(n-D-k), e = d - y.
//
// Structure. The N taps are grouped into M = N / 2**P systolic-tree PEs
// (tree_pe) of order P, each holding 2**P taps:
//  * x(n) enters the first tap and moves one tap per clock through the
//    registers between taps, so a tap multiplies a past input by its weight;
//  * a second input line, x(n) delayed by D, moves the same way and feeds
//    the weight-update multiplier of every tap;
//  * the scaled error mu*e(n-D) is broadcast to the taps of a PE;
//  * each PE sums its products in an adder tree and adds the result to an
//    accumulation chain that runs from PE to PE through one register each;
//  * between PEs the x, x(n-D) and mu*e lines each pass one extra register,
//    so that every PE sees its data exactly as late as its partial sum is;
//  * d(n) is delayed by L to line up with the chain output, the error unit
//    forms e(n-L) = d(n-L) - y(n-L), scales it by mu and registers it.
// The output is y(n-L) with L = max(P-1, 0) + M, and D = L + 1.
// With the default P = log2(N) there is one PE whose tree ends in the chain
// register: the plain pipelined adder tree with output y(n-2) for four taps.
// P = 0 gives the fully pipelined form, one tap per PE and a chain of N
// registers (L = N). Because PE j runs j clocks behind PE 0, the weights
// shown for the taps of PE j are those of j clocks earlier.
//
// Weights clear to zero at reset and keep their low W_W bits when updated.
// The filter sum is shifted right by P_SHIFT before it is cut to Y_W bits;
// P_SHIFT = 0 (plain integers, as in the published simulations) by default.
// `state` counts clocks since reset up to N: it shows how many taps have
// received a sample since reset and stays at N once the line is full.
//
// Follows the published design: the tap count, the 8-bit input, desired and
// weight words, the 16-bit output and error, mu = 0.5, the tap/tree/feedback
// structure with y(n-2) at four taps, and the generalised form with
// cascaded tree PEs of order p and one delay per PE on the accumulation
// chain. This design's own choices: the delays on the lines between PEs,
// signed integer arithmetic with wrap-around, mu as a shift, asynchronous
// active-low reset, the output scale shift and the meaning of `state`.
// The x, x(n-D) and mu*e lines leaving the last tap are brought out
// (x_casc, xd_casc, mue_casc) so that arrays can be chained.
module dlms_systolic_fir
  import dlms_pkg::*;
#(
  parameter int unsigned N        = N_TAPS_DEF,
  parameter int unsigned X_W      = X_W_DEF,
  parameter int unsigned D_W      = D_W_DEF,
  parameter int unsigned W_W      = W_W_DEF,
  parameter int unsigned Y_W      = Y_W_DEF,
  parameter int unsigned E_W      = E_W_DEF,
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEF,
  parameter int unsigned P_SHIFT  = 0,
  parameter int unsigned P        = tree_depth(N),
  parameter int unsigned S_W      = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [X_W-1:0] x_in,      // x(n)
  input  logic signed [D_W-1:0] d_in,      // d(n)
  output logic signed [Y_W-1:0] y_out,     // y(n-L)
  output logic signed [E_W-1:0] err_out,   // e(n-L)
  output logic signed [W_W-1:0] weights [N], // tap weights
  output logic [S_W-1:0]        state,     // taps filled since reset, 0..N
  output logic signed [X_W-1:0] x_casc,    // x line after the last tap
  output logic signed [X_W-1:0] xd_casc,   // x(n-D) line after the last tap
  output logic signed [E_W-1:0] mue_casc   // mu*e line after the last PE
);

  localparam int unsigned G   = 1 << P;                  // taps per PE
  localparam int unsigned M   = N / G;                   // number of PEs
  localparam int unsigned L   = ((P == 0) ? 0 : P - 1) + M; // output latency
  localparam int unsigned D   = L + 1;                   // adaptation delay
  localparam int unsigned T_W = X_W + W_W + tree_depth(N); // chain width

  // Lines entering PE j (index M leaves the array), and the chain.
  logic signed [X_W-1:0] x_pe   [M];
  logic signed [X_W-1:0] xd_pe  [M];
  logic signed [E_W-1:0] mue_pe [M];
  logic signed [X_W-1:0] x_po   [M];
  logic signed [X_W-1:0] xd_po  [M];
  logic signed [E_W-1:0] mue_po [M];
  logic signed [T_W-1:0] chain  [M+1];

  logic signed [T_W-1:0] chain_scaled;
  logic signed [D_W-1:0] d_aligned;
  logic signed [E_W-1:0] mue;

  assign x_pe[0]   = x_in;
  assign mue_pe[0] = mue;
  assign chain[0]  = '0;

  // x(n) delayed by the adaptation delay for the weight-update line.
  delay_line #(.W(X_W), .DEPTH(D)) u_xd_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (x_in),
    .q    (xd_pe[0])
  );

  for (genvar j = 0; j < M; j++) begin : g_pe
    tree_pe #(
      .P    (P),
      .X_W  (X_W),
      .W_W  (W_W),
      .E_W  (E_W),
      .ACC_W(T_W)
    ) u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .x_in   (x_pe[j]),
      .xd_in  (xd_pe[j]),
      .mue_in (mue_pe[j]),
      .acc_in (chain[j]),
      .x_out  (x_po[j]),
      .xd_out (xd_po[j]),
      .mue_out(mue_po[j]),
      .acc_out(chain[j+1]),
      .weights(weights[j*G +: G])
    );

    // One register on each line between neighbouring PEs.
    if (j > 0) begin : g_link
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          x_pe[j]   <= '0;
          xd_pe[j]  <= '0;
          mue_pe[j] <= '0;
        end else begin
          x_pe[j]   <= x_po[j-1];
          xd_pe[j]  <= xd_po[j-1];
          mue_pe[j] <= mue_po[j-1];
        end
      end
    end
  end

  always_comb begin
    chain_scaled = chain[M] >>> P_SHIFT;
    y_out        = chain_scaled[Y_W-1:0];
  end

  // d(n) lined up with the filter output y(n-L).
  delay_line #(.W(D_W), .DEPTH(L)) u_d_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (d_in),
    .q    (d_aligned)
  );

  error_unit #(
    .D_W     (D_W),
    .Y_W     (Y_W),
    .E_W     (E_W),
    .MU_SHIFT(MU_SHIFT)
  ) u_err (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (d_aligned),
    .y    (y_out),
    .err  (err_out),
    .mue  (mue)
  );

  // Fill counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 state <= '0;
    else if (state < S_W'(N))   state <= state + 1'b1;
  end

  assign x_casc   = x_po[M-1];
  assign xd_casc  = xd_po[M-1];
  assign mue_casc = mue_po[M-1];

  initial begin
    assert ((N & (N - 1)) == 0 && N != 0)
      else $error("dlms_systolic_fir: N=%0d must be a power of two", N);
    assert (P <= tree_depth(N))
      else $error("dlms_systolic_fir: PE order P=%0d exceeds log2(N)", P);
  end

endmodule
