// systolic_matmul: two-dimensional systolic array that multiplies an M x K
// matrix A by a K x P matrix B, C = A * B, with one mac_pe per element of C.
//
// PE(i,j) sits in row i and column j. Row i of A enters the left edge of
// row i one element per clock, a(i,0) first; column j of B enters the top
// edge of column j the same way, b(0,j) first. Each PE multiplies the pair
// it holds, adds the product to its accumulator, and passes the a element
// right and the b element down through registers. Row i starts one clock
// after row i-1 and column j one clock after column j-1, so a(i,s) and
// b(s,j) meet in PE(i,j) at clock s + i + j and the accumulator of PE(i,j)
// ends as c(i,j) = sum_s a(i,s) b(s,j). Positions outside a row or column
// are fed zero, which adds nothing.
//
// Interface and timing: a_mat and b_mat are captured on the clock where
// start is high (ignored while busy); that clock also clears every
// accumulator. The skewed feed then runs for M + K + P - 2 clocks, busy is
// high throughout, and done pulses for one clock in the clock after the
// last product has been accumulated, when c_mat holds the product. c_mat
// keeps its value until the next start. Reset is asynchronous, active low.
//
// The multiply-accumulate PE, the passing of elements to the neighbouring
// PEs and the one-clock stagger of successive rows of A and columns of B
// follow the published description; the default 3 x 3 x 3 size is read from
// the three-element input sequences printed with the PE. Element widths, the
// exact accumulator width, the parallel load and the start/busy/done
// handshake are choices of this implementation.
module systolic_matmul #(
  parameter int unsigned M     = 3,                    // rows of A and C
  parameter int unsigned K     = 3,                    // columns of A, rows of B
  parameter int unsigned P     = 3,                    // columns of B and C
  parameter int unsigned A_W   = 8,                    // element of A
  parameter int unsigned B_W   = 8,                    // element of B
  parameter int unsigned C_W   = A_W + B_W + $clog2(K) // element of C, exact
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [A_W-1:0] a_mat [M][K],
  input  logic signed [B_W-1:0] b_mat [K][P],
  output logic                  busy,
  output logic                  done,
  output logic signed [C_W-1:0] c_mat [M][P]
);

  localparam int unsigned STEPS = M + K + P - 2;       // clocks of feeding
  localparam int unsigned T_W   = $clog2(STEPS + 1);

  logic signed [A_W-1:0] a_lat [M][K];
  logic signed [B_W-1:0] b_lat [K][P];
  logic [T_W-1:0]        t;
  logic                  clr;

  // Element streams: a_h[i][j] enters PE(i,j) from the left, b_v[i][j]
  // enters it from above. Column P and row M are the streams leaving the
  // array.
  logic signed [A_W-1:0] a_h [M][P+1];
  logic signed [B_W-1:0] b_v [M+1][P];

  // Control: capture the operands and count the feeding clocks.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      t    <= '0;
      for (int i = 0; i < int'(M); i++)
        for (int s = 0; s < int'(K); s++) a_lat[i][s] <= '0;
      for (int s = 0; s < int'(K); s++)
        for (int j = 0; j < int'(P); j++) b_lat[s][j] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        t     <= '0;
        a_lat <= a_mat;
        b_lat <= b_mat;
      end else if (busy) begin
        if (t == T_W'(STEPS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        t <= t + 1'b1;
      end
    end
  end

  assign clr = start && !busy;

  // Skewed feed: row i carries a(i, t-i), column j carries b(t-j, j).
  always_comb begin
    for (int i = 0; i < int'(M); i++) begin
      a_h[i][0] = '0;
      for (int s = 0; s < int'(K); s++)
        if (busy && int'(t) == s + i) a_h[i][0] = a_lat[i][s];
    end
    for (int j = 0; j < int'(P); j++) begin
      b_v[0][j] = '0;
      for (int s = 0; s < int'(K); s++)
        if (busy && int'(t) == s + j) b_v[0][j] = b_lat[s][j];
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < P; j++) begin : g_col
      mac_pe #(
        .A_W  (A_W),
        .B_W  (B_W),
        .ACC_W(C_W),
        .REG_B(1'b1)
      ) u_pe (
        .clk  (clk),
        .rst_n(rst_n),
        .clr  (clr),
        .a_in (a_h[i][j]),
        .b_in (b_v[i][j]),
        .a_out(a_h[i][j+1]),
        .b_out(b_v[i+1][j]),
        .acc  (c_mat[i][j])
      );
    end
  end

endmodule
