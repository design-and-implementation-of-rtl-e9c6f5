// dlms_tap: one processing element (one tap) of the systolic DLMS adaptive
// FIR filter.
//
// Tap k holds the weight w_k(n) and sees three streams:
//   x_in   = x(n-k),       the filter input as seen by this tap
//   xd_in  = x(n-D-k),     the input delayed by the adaptation delay D
//   mue_in = mu*e(n-D),    the scaled, delayed error, common to all taps
// It produces
//   prod   = w_k(n) * x(n-k)   (combinational, full precision) for the adder
//                              tree that forms y(n),
//   w      = w_k(n), updated every clock by the DLMS rule
//            w_k(n+1) = w_k(n) + mu*e(n-D) * x(n-D-k)   (low W_W bits kept),
//   x_out  = x(n-k-1) and xd_out = x(n-D-k-1) through one register each, to
//            the next tap, and mue_out = mue_in passed straight on.
// The weight update is a mac_pe whose a stream is the delayed input and whose
// b stream (not registered) is the error broadcast; a second multiplier forms
// the filter product. This division into update and filter multipliers, the
// registers between taps and the broadcast error follow the published
// systolic structure; widths and wrap-around of the weight are this design's
// choices (the published waveforms show 8-bit weights wrapping modulo 256).
// The weights are cleared only by reset, so the PE's accumulator clear is
// tied off, and mue_out is a plain wire from mue_in.
module dlms_tap #(
  parameter int unsigned X_W = 8,
  parameter int unsigned W_W = 8,
  parameter int unsigned E_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [X_W-1:0]      x_in,
  input  logic signed [X_W-1:0]      xd_in,
  input  logic signed [E_W-1:0]      mue_in,
  output logic signed [X_W-1:0]      x_out,
  output logic signed [X_W-1:0]      xd_out,
  output logic signed [E_W-1:0]      mue_out,
  output logic signed [W_W-1:0]      w,
  output logic signed [X_W+W_W-1:0]  prod
);

  localparam int unsigned P_W = X_W + W_W;

  // Weight update: w <= w + xd_in * mue_in.
  mac_pe #(
    .A_W  (X_W),
    .B_W  (E_W),
    .ACC_W(W_W),
    .REG_B(1'b0)
  ) u_update (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (1'b0),
    .a_in (xd_in),
    .b_in (mue_in),
    .a_out(xd_out),
    .b_out(mue_out),
    .acc  (w)
  );

  // Filter multiplier: w_k(n) * x(n-k).
  always_comb prod = P_W'(w) * P_W'(x_in);

  // Input delay element to the next tap.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_out <= '0;
    else        x_out <= x_in;
  end

endmodule
