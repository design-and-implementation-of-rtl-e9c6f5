// mac_pe: systolic multiply-accumulate processing element.
//
// Each clock the PE multiplies its two operands a and b and adds the product
// to its accumulator, acc(n+1) = acc(n) + a(n)*b(n), keeping the low ACC_W
// bits (two's complement wrap-around). The a operand leaves the PE through a
// register, a_out(n+1) = a(n), so a row of PEs forms a systolic pipeline for
// a. The b operand leaves either through a register as well (REG_B = 1, the
// classic two-way systolic cell) or straight through (REG_B = 0, a broadcast
// line shared by every PE of a row).
//
// The multiplier, the accumulator with its feedback and the two exiting data
// streams follow the published processing element. Whether the exits are
// registered, the wrap-around accumulator and the reset are choices of this
// implementation. Reset (active low, asynchronous) clears the accumulator and
// the pass-through registers; clr (synchronous) clears only the accumulator,
// dropping that clock's product, so a new sum can start without a reset.
// Latency: acc and a_out change one clock after the operands are presented.
module mac_pe #(
  parameter int unsigned A_W   = 8,
  parameter int unsigned B_W   = 16,
  parameter int unsigned ACC_W = 8,
  parameter bit          REG_B = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic signed [A_W-1:0]   a_in,
  input  logic signed [B_W-1:0]   b_in,
  output logic signed [A_W-1:0]   a_out,
  output logic signed [B_W-1:0]   b_out,
  output logic signed [ACC_W-1:0] acc
);

  // Product width, never narrower than the accumulator.
  localparam int unsigned P_W = (A_W + B_W > ACC_W) ? A_W + B_W : ACC_W;

  logic signed [P_W-1:0]   prod;
  logic signed [ACC_W-1:0] prod_t;

  // Full-precision signed product, then kept to the accumulator width.
  always_comb begin
    prod   = P_W'(a_in) * P_W'(b_in);
    prod_t = prod[ACC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      a_out <= '0;
    end else begin
      acc   <= clr ? '0 : acc + prod_t;
      a_out <= a_in;
    end
  end

  if (REG_B) begin : g_b_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) b_out <= '0;
      else        b_out <= b_in;
    end
  end else begin : g_b_wire
    assign b_out = b_in;
  end

endmodule
