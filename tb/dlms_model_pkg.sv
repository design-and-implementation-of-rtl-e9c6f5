// dlms_model_pkg: cycle-level reference model of the systolic DLMS adaptive
// FIR filter, written directly from the DLMS equations rather than from the
// structure of the RTL. It keeps the whole history of x(n), d(n), y(n) and
// e(n) and computes, for the sample n presented in the current clock,
//   y(n)   = (sum_k w_k(n) x(n-k)) >>> P_SHIFT, kept to Y_W bits
//   e(n)   = d(n) - y(n), kept to E_W bits
//   w_k(n+1) = w_k(n) + (e(n-D) >>> MU_SHIFT) * x(n-D-k), kept to W_W bits
// with every sample before reset taken as zero. For a filter built from
// tree PEs of order TREE_P (2**TREE_P taps each, M = N / 2**TREE_P PEs) the
// output latency is L = max(TREE_P-1, 0) + M and D = L + 1; the default
// order log2(N) gives L = log2(N). The filter's outputs in clock n are then
// y(n-L) and e(n-L), and the taps of PE j show the weights of clock n-j.
package dlms_model_pkg;

  class dlms_model #(
    int N = 4, int X_W = 8, int D_W = 8, int W_W = 8, int Y_W = 16,
    int E_W = 16, int MU_SHIFT = 1, int P_SHIFT = 0, int TREE_P = $clog2(N)
  );
    localparam int G = 1 << TREE_P;
    localparam int M = N / G;
    localparam int L = ((TREE_P == 0) ? 0 : TREE_P - 1) + M;
    localparam int D = L + 1;

    longint xs[$];
    longint ds[$];
    longint ys[$];
    longint es[$];
    longint w[N];
    longint wh[$];      // weights of every past clock, N per clock
    int     n;

    function new();
      reset();
    endfunction

    function void reset();
      xs.delete(); ds.delete(); ys.delete(); es.delete(); wh.delete();
      foreach (w[k]) w[k] = 0;
      n = 0;
    endfunction

    // Two's complement value of the low `bits` bits of v.
    static function longint wrap(longint v, int bits);
      longint m;
      m = (longint'(1) <<< bits);
      v = v & (m - 1);
      if (v >= (m >>> 1)) v = v - m;
      return v;
    endfunction

    function longint x_at(int m); return (m < 0) ? 0 : xs[m]; endfunction
    function longint y_at(int m); return (m < 0) ? 0 : ys[m]; endfunction
    function longint e_at(int m); return (m < 0) ? 0 : es[m]; endfunction

    // Present sample n and compute y(n), e(n) from the current weights.
    function void present(longint x, longint d);
      longint acc;
      xs.push_back(x);
      ds.push_back(d);
      for (int k = 0; k < N; k++) wh.push_back(w[k]);
      acc = 0;
      for (int k = 0; k < N; k++) acc += w[k] * x_at(n - k);
      ys.push_back(wrap(acc >>> P_SHIFT, Y_W));
      es.push_back(wrap(d - ys[n], E_W));
    endfunction

    // Outputs the filter shows in the current clock.
    function longint exp_y();   return y_at(n - L); endfunction
    function longint exp_err(); return e_at(n - L); endfunction
    function longint exp_mue(); return e_at(n - D) >>> MU_SHIFT; endfunction
    function int     exp_state(); return (n < N) ? n : N; endfunction
    // mu*e leaving the last PE: M-1 line registers behind the broadcast.
    function longint exp_mue_casc(); return e_at(n - D - (M - 1)) >>> MU_SHIFT; endfunction
    // Weight shown by tap k in the current clock (after present()).
    function longint exp_w(int k);
      int m = n - k / G;
      return (m < 0) ? 0 : wh[m * N + k];
    endfunction

    // Weight update at the clock edge; returns how many weights wrapped.
    function int advance();
      longint mue, nw;
      int wraps;
      wraps = 0;
      mue = exp_mue();
      for (int k = 0; k < N; k++) begin
        nw = w[k] + wrap(mue * x_at(n - D - k), W_W);
        if (nw != wrap(nw, W_W)) wraps++;
        w[k] = wrap(nw, W_W);
      end
      n++;
      return wraps;
    endfunction
  endclass

endpackage
