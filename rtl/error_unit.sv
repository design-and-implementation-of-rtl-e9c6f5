// error_unit: feedback path of the systolic DLMS filter.
//
// From the aligned desired response d(n-L) and the pipelined filter output
// y(n-L) it forms the error e(n-L) = d(n-L) - y(n-L) (E_W bits, kept to the
// low bits), scales it by the step size mu = 2**-MU_SHIFT with an arithmetic
// right shift, and registers the result, so that mue(n) = mu*e(n-L-1). With
// L adder-tree levels the adaptation delay is therefore D = L + 1.
// The subtractor, the step-size multiplier and the single register in the
// feedback path follow the published structure; realising mu as a shift,
// the error width and the reset (active low, asynchronous, clearing the
// register) are this design's choices. err is combinational, mue is one
// clock later.
module error_unit #(
  parameter int unsigned D_W      = 8,
  parameter int unsigned Y_W      = 16,
  parameter int unsigned E_W      = 16,
  parameter int unsigned MU_SHIFT = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [D_W-1:0] d,
  input  logic signed [Y_W-1:0] y,
  output logic signed [E_W-1:0] err,
  output logic signed [E_W-1:0] mue
);

  localparam int unsigned M_W = (D_W > Y_W) ? D_W : Y_W;
  localparam int unsigned S_W = ((M_W > E_W) ? M_W : E_W) + 1;

  logic signed [S_W-1:0] diff;

  always_comb begin
    diff = S_W'(d) - S_W'(y);
    err  = diff[E_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mue <= '0;
    else        mue <= err >>> MU_SHIFT;
  end

endmodule
