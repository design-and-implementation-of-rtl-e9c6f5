// systolic_dsp_top: the two systolic designs side by side.
//
//  * dlms_systolic_fir - the N-tap adaptive FIR filter trained by the delayed
//    LMS algorithm (default 4 taps in one tree PE of order P = 2, 8-bit
//    samples and weights, 16-bit output and error, mu = 0.5). Ports
//    prefixed fir_.
//  * systolic_matmul   - the M x K by K x P systolic matrix multiplier built
//    from the same multiply-accumulate PE (default 3 x 3 x 3, 8-bit
//    elements). Ports prefixed mm_.
//
// The two share only the clock and reset; they are independent designs that
// use the same processing element, and neither waits for the other. See the
// two modules for their timing. Bringing both out in one top is a choice of
// this implementation.
module systolic_dsp_top
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
  parameter int unsigned MM_M     = 3,
  parameter int unsigned MM_K     = 3,
  parameter int unsigned MM_P     = 3,
  parameter int unsigned MM_A_W   = 8,
  parameter int unsigned MM_B_W   = 8,
  parameter int unsigned MM_C_W   = MM_A_W + MM_B_W + $clog2(MM_K)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Adaptive filter
  input  logic signed [X_W-1:0]    fir_x_in,
  input  logic signed [D_W-1:0]    fir_d_in,
  output logic signed [Y_W-1:0]    fir_y_out,
  output logic signed [E_W-1:0]    fir_err_out,
  output logic signed [W_W-1:0]    fir_weights [N],
  output logic [$clog2(N+1)-1:0]   fir_state,
  output logic signed [X_W-1:0]    fir_x_casc,
  output logic signed [X_W-1:0]    fir_xd_casc,
  output logic signed [E_W-1:0]    fir_mue_casc,
  // Matrix multiplier
  input  logic                     mm_start,
  input  logic signed [MM_A_W-1:0] mm_a [MM_M][MM_K],
  input  logic signed [MM_B_W-1:0] mm_b [MM_K][MM_P],
  output logic                     mm_busy,
  output logic                     mm_done,
  output logic signed [MM_C_W-1:0] mm_c [MM_M][MM_P]
);

  dlms_systolic_fir #(
    .N       (N),
    .X_W     (X_W),
    .D_W     (D_W),
    .W_W     (W_W),
    .Y_W     (Y_W),
    .E_W     (E_W),
    .MU_SHIFT(MU_SHIFT),
    .P_SHIFT (P_SHIFT),
    .P       (P)
  ) u_fir (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_in    (fir_x_in),
    .d_in    (fir_d_in),
    .y_out   (fir_y_out),
    .err_out (fir_err_out),
    .weights (fir_weights),
    .state   (fir_state),
    .x_casc  (fir_x_casc),
    .xd_casc (fir_xd_casc),
    .mue_casc(fir_mue_casc)
  );

  systolic_matmul #(
    .M  (MM_M),
    .K  (MM_K),
    .P  (MM_P),
    .A_W(MM_A_W),
    .B_W(MM_B_W),
    .C_W(MM_C_W)
  ) u_mm (
    .clk  (clk),
    .rst_n(rst_n),
    .start(mm_start),
    .a_mat(mm_a),
    .b_mat(mm_b),
    .busy (mm_busy),
    .done (mm_done),
    .c_mat(mm_c)
  );

endmodule
