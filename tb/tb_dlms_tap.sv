// tb_dlms_tap: self-checking test of one DLMS filter tap.
// Random x(n-k), x(n-D-k) and mu*e(n-D) are applied every clock. The test
// keeps its own weight, w <= w + mue*xd modulo 2**W_W, and checks the
// weight, the full-precision product w*x, the one-clock delays to the next
// tap and the direct pass-through of mu*e. It also replays the first update
// shown in the published 4-tap simulation: x = 8, mu*e = 0.5*18 = 9 gives a
// weight of 72 (01001000) after one clock.
module tb_dlms_tap;
  localparam int X_W = 8, W_W = 8, E_W = 16;

  logic clk = 1'b0, rst_n;
  logic signed [X_W-1:0]     x_in, xd_in, x_out, xd_out;
  logic signed [E_W-1:0]     mue_in, mue_out;
  logic signed [W_W-1:0]     w;
  logic signed [X_W+W_W-1:0] prod;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dlms_tap dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .xd_in(xd_in), .mue_in(mue_in),
    .x_out(x_out), .xd_out(xd_out), .mue_out(mue_out), .w(w), .prod(prod)
  );

  function automatic longint wrap(longint v, int bits);
    longint m = longint'(1) <<< bits;
    v = v & (m - 1);
    if (v >= (m >>> 1)) v = v - m;
    return v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m_w, m_x, m_xd;
    rst_n = 1'b0; x_in = '0; xd_in = '0; mue_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check("w after reset", w, 0);

    // Published first update: 0.5 * 18 * 8 = 72.
    x_in = 8; xd_in = 8; mue_in = 9;
    @(posedge clk); #1;
    check("first update w0 = 72", w, 72);
    check("product 72*8", prod, 576);

    m_w = 72;
    for (int i = 0; i < 400; i++) begin
      x_in = $urandom; xd_in = $urandom; mue_in = $urandom;
      if (i % 3 == 0) mue_in = $signed(16'($urandom_range(0, 40))) - 16'sd20;
      #1;
      check("product", prod, m_w * longint'(x_in));
      check("mue pass-through", mue_out, mue_in);
      @(posedge clk);
      m_w  = wrap(m_w + longint'(xd_in) * longint'(mue_in), W_W);
      m_x  = x_in; m_xd = xd_in;
      #1;
      check("weight", w, m_w);
      check("x to next tap", x_out, m_x);
      check("x(n-D) to next tap", xd_out, m_xd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
