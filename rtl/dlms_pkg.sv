// dlms_pkg: word widths and constants shared by the systolic DLMS adaptive
// FIR filter. The input sample x(n) and the desired response d(n) are 8-bit,
// the filter weights are 8-bit and the filter output y(n) and the error e(n)
// are 16-bit, all two's complement integers. The step size mu is a power of
// two, applied as an arithmetic right shift; mu = 0.5 is a shift by one.
// The widths, the step size and the default length of four taps follow the
// published design; signedness, integer (not fractional) scaling and the
// shift realisation of mu are choices of this implementation.
package dlms_pkg;

  localparam int unsigned N_TAPS_DEF   = 4;   // taps of the default filter
  localparam int unsigned X_W_DEF      = 8;   // input sample x(n)
  localparam int unsigned D_W_DEF      = 8;   // desired response d(n)
  localparam int unsigned W_W_DEF      = 8;   // weight w_k(n)
  localparam int unsigned Y_W_DEF      = 16;  // filter output y(n)
  localparam int unsigned E_W_DEF      = 16;  // error e(n) and mu*e(n)
  localparam int unsigned MU_SHIFT_DEF = 1;   // mu = 2**-MU_SHIFT = 0.5

  // Number of pipeline stages of a balanced adder tree over n inputs.
  function automatic int unsigned tree_depth(int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage
