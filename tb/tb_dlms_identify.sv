// tb_dlms_identify: system identification with the systolic DLMS filter,
// showing that the adaptation loop converges to the minimum error.
//
// An 8-tap filter with 16-bit weights, 16-bit desired value and step size
// mu = 2**-5 is driven with random +-1 samples x(n); the desired response
// d(n) is the output of a fixed, unknown 8-tap FIR system H driven by the
// same samples. Every clock the filter's output, error, weights and fill
// counter are compared with the reference model. At the end the weights
// must lie within 64 of the taps of H and the mean absolute error over the
// last 200 samples must be under a tenth of that over the first 200.
// With the published 8-bit integer weights and mu = 0.5 the loop cannot
// settle (the weights wrap), so this test uses wider weights and a small
// step size.
// A second filter of the same size, built as the fully pipelined chain of
// one-tap PEs (P = 0, adaptation delay 9 instead of 4), runs on the same
// data against its own model. The summed absolute error of the default tree
// form over the first 600 samples must not exceed that of the chain: the
// shorter adaptation delay converges at least as fast.
module tb_dlms_identify;
  import dlms_model_pkg::*;

  localparam int N = 8;
  localparam int MU = 5;
  localparam longint H [N] = '{1000, -700, 500, 300, -200, 150, -100, 50};

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic signed [7:0]  x;
  logic signed [15:0] d, y, e;
  logic signed [15:0] w [N];
  logic [3:0]         s;
  logic signed [7:0]  xc, xdc;
  logic signed [15:0] mc;

  logic signed [15:0] y0, e0;
  logic signed [15:0] w0 [N];
  logic [3:0]         s0;
  logic signed [7:0]  xc0, xdc0;
  logic signed [15:0] mc0;

  int checks = 0, failures = 0;

  dlms_systolic_fir #(
    .N(N), .X_W(8), .D_W(16), .W_W(16), .Y_W(16), .E_W(16), .MU_SHIFT(MU)
  ) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x), .d_in(d), .y_out(y), .err_out(e),
    .weights(w), .state(s), .x_casc(xc), .xd_casc(xdc), .mue_casc(mc)
  );

  dlms_systolic_fir #(
    .N(N), .X_W(8), .D_W(16), .W_W(16), .Y_W(16), .E_W(16), .MU_SHIFT(MU),
    .P(0)
  ) dut_chain (
    .clk(clk), .rst_n(rst_n), .x_in(x), .d_in(d), .y_out(y0), .err_out(e0),
    .weights(w0), .state(s0), .x_casc(xc0), .xd_casc(xdc0), .mue_casc(mc0)
  );

  dlms_model #(.N(N), .X_W(8), .D_W(16), .W_W(16), .Y_W(16), .E_W(16),
               .MU_SHIFT(MU)) m;
  dlms_model #(.N(N), .X_W(8), .D_W(16), .W_W(16), .Y_W(16), .E_W(16),
               .MU_SHIFT(MU), .TREE_P(0)) m0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint hist[$];
    longint acc, e_early, e_late, e_tree, e_chain;
    int near;
    m = new();
    m0 = new();
    e_tree = 0; e_chain = 0;
    rst_n = 1'b0; x = '0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    e_early = 0; e_late = 0;
    for (int i = 0; i < 1500; i++) begin
      x = ($urandom & 1) ? 8'sd1 : -8'sd1;
      hist.push_front(x);
      acc = 0;
      for (int k = 0; k < N && k < hist.size(); k++) acc += H[k] * hist[k];
      d = 16'(acc);
      m.present(x, d);
      m0.present(x, d);
      #1;
      check("y", y, m.exp_y());
      check("err", e, m.exp_err());
      check("state", s, m.exp_state());
      for (int k = 0; k < N; k++) check($sformatf("w%0d", k), w[k], m.w[k]);
      check("chain y", y0, m0.exp_y());
      check("chain err", e0, m0.exp_err());
      for (int k = 0; k < N; k++)
        check($sformatf("chain w%0d", k), w0[k], m0.exp_w(k));
      if (i < 600) begin
        e_tree  += (e  < 0) ? -e  : e;
        e_chain += (e0 < 0) ? -e0 : e0;
      end
      if (i >= 8 && i < 208) e_early += (e < 0) ? -e : e;
      if (i >= 1300)         e_late  += (e < 0) ? -e : e;
      @(posedge clk);
      void'(m.advance());
      void'(m0.advance());
      #1;
    end
    near = 1;
    for (int k = 0; k < N; k++) begin
      $display("w%0d = %0d, system tap %0d", k, w[k], H[k]);
      if (w[k] - H[k] > 64 || H[k] - w[k] > 64) near = 0;
    end
    checks++;
    if (!near) begin failures++; $display("FAIL weights did not converge"); end
    checks++;
    if (e_late * 10 >= e_early) begin
      failures++;
      $display("FAIL error did not shrink: early %0d late %0d", e_early, e_late);
    end
    checks++;
    if (e_tree > e_chain) begin
      failures++;
      $display("FAIL tree form converged slower than the chain");
    end
    $display("summed |e| over 600 samples: tree (D=4) %0d, chain (D=9) %0d",
             e_tree, e_chain);
    $display("mean |e| first 200: %0d, last 200: %0d", e_early / 200, e_late / 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
