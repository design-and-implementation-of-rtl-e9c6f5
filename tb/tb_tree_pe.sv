// tb_tree_pe: self-checking test of the systolic-tree PE at orders 0, 1
// (default) and 2. Random x, x(n-D), mu*e and chain inputs are applied every
// clock. The test keeps the input histories and its own weights
// (w_k += mue * xd(n-k), kept to 8 bits) and checks every clock:
//   acc_out(t+1) = acc_in(t) + sum_k w_k(t-T) x(t-T-k),  T = max(P-1, 0),
// the weights, and the x, x(n-D) and mu*e lines leaving the last tap.
module tb_tree_pe;
  localparam int NUM = 3;
  localparam int ORDER [NUM] = '{0, 1, 2};

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic signed [7:0]  x, xd;
  logic signed [15:0] mue;
  logic signed [19:0] acc_in;
  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap(longint v, int bits);
    longint mm = longint'(1) <<< bits;
    v = v & (mm - 1);
    if (v >= (mm >>> 1)) v = v - mm;
    return v;
  endfunction

  // Histories, index 0 = the current clock.
  longint xh[$], xdh[$], mueh[$], acch[$];

  for (genvar g = 0; g < NUM; g++) begin : g_cfg
    localparam int P = ORDER[g];
    localparam int G = 1 << P;
    localparam int T = (P == 0) ? 0 : P - 1;
    logic signed [7:0]  xo, xdo;
    logic signed [15:0] mo;
    logic signed [19:0] acc_out;
    logic signed [7:0]  w [G];
    longint mw [G];
    longint prod_h[$];            // tree input sum per clock, index 0 = now
    int lchecks = 0, lfail = 0;

    if (P == 1) begin : g_default
      tree_pe #(.ACC_W(20)) dut (
        .clk(clk), .rst_n(rst_n), .x_in(x), .xd_in(xd), .mue_in(mue),
        .acc_in(acc_in), .x_out(xo), .xd_out(xdo), .mue_out(mo),
        .acc_out(acc_out), .weights(w)
      );
    end else begin : g_param
      tree_pe #(.P(P), .ACC_W(20)) dut (
        .clk(clk), .rst_n(rst_n), .x_in(x), .xd_in(xd), .mue_in(mue),
        .acc_in(acc_in), .x_out(xo), .xd_out(xdo), .mue_out(mo),
        .acc_out(acc_out), .weights(w)
      );
    end

    task automatic chk(string what, longint got, longint exp);
      lchecks++;
      if (got != exp) begin
        lfail++;
        if (lfail < 5) $display("FAIL P=%0d %s: got %0d expected %0d", P, what, got, exp);
      end
    endtask

    function automatic longint hx(int k);  return (k < xh.size())  ? xh[k]  : 0; endfunction
    function automatic longint hxd(int k); return (k < xdh.size()) ? xdh[k] : 0; endfunction

    // Before the edge: record this clock's products, check the lines.
    task automatic before_edge();
      longint s = 0;
      for (int k = 0; k < G; k++) begin
        chk("weight", w[k], mw[k]);
        s += mw[k] * hx(k);
      end
      prod_h.push_front(s);
      chk("x leaving", xo, hx(G));
      chk("x(n-D) leaving", xdo, hxd(G));
      chk("mu*e leaving", mo, mue);
    endtask

    // After the edge: check the chain and update the weights.
    task automatic after_edge();
      longint tree;
      tree = (T < prod_h.size()) ? prod_h[T] : 0;
      for (int k = 0; k < G; k++) mw[k] = wrap(mw[k] + mueh[0] * hxd(k), 8);
      chk("acc_out", acc_out, wrap(acch[0] + tree, 20));
    endtask

    initial foreach (mw[k]) mw[k] = 0;
  end

  initial begin
    rst_n = 1'b0; x = '0; xd = '0; mue = '0; acc_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      x = $urandom; xd = $urandom; acc_in = $signed(20'($urandom));
      mue = $signed(16'($urandom_range(0, 200))) - 16'sd100;
      xh.push_front(x); xdh.push_front(xd); mueh.push_front(mue); acch.push_front(acc_in);
      #1;
      g_cfg[0].before_edge(); g_cfg[1].before_edge(); g_cfg[2].before_edge();
      @(posedge clk); #1;
      g_cfg[0].after_edge(); g_cfg[1].after_edge(); g_cfg[2].after_edge();
    end
    checks   = g_cfg[0].lchecks + g_cfg[1].lchecks + g_cfg[2].lchecks;
    failures = g_cfg[0].lfail + g_cfg[1].lfail + g_cfg[2].lfail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
