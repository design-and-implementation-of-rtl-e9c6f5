// tb_dlms_cascade: the filter built from tree PEs of every order.
//
// Eight-tap filters with PEs of order P = 0 (eight one-tap PEs, the fully
// pipelined chain), 1, 2 and 3 (one eight-tap tree), and a four-tap filter
// of order 0, all with the default word sizes and mu = 0.5, run side by
// side on the published stimulus (x = 8, d = 18) and then on random
// samples. Every clock each filter's output, error, fill counter, the mu*e
// line leaving its last PE and every tap weight (the taps of PE j show the
// weights of j clocks earlier) are compared with the reference model, whose
// output latency is L = max(P-1, 0) + N/2**P. Independently of the model,
// the first update of w0 (72) must land exactly L + 1 clocks after the
// first sample.
module tb_dlms_cascade;
  import dlms_model_pkg::*;

  localparam int NUM = 5;
  localparam int TAPS  [NUM] = '{8, 8, 8, 8, 4};
  localparam int ORDER [NUM] = '{0, 1, 2, 3, 0};

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic signed [7:0] x, d;
  bit published = 1'b1;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NUM; g++) begin : g_cfg
    localparam int N  = TAPS[g];
    localparam int PO = ORDER[g];
    localparam int L  = ((PO == 0) ? 0 : PO - 1) + N / (1 << PO);
    logic signed [15:0] y, e;
    logic signed [7:0]  w [N];
    logic [$clog2(N+1)-1:0] s;
    logic signed [7:0]  xc, xdc;
    logic signed [15:0] mc;
    int lchecks = 0, lfail = 0;
    dlms_model #(.N(N), .TREE_P(PO)) m;

    dlms_systolic_fir #(.N(N), .P(PO)) dut (
      .clk(clk), .rst_n(rst_n), .x_in(x), .d_in(d), .y_out(y), .err_out(e),
      .weights(w), .state(s), .x_casc(xc), .xd_casc(xdc), .mue_casc(mc)
    );

    initial m = new();

    task automatic chk(string what, longint got, longint exp);
      lchecks++;
      if (got != exp) begin
        lfail++;
        if (lfail < 5) $display("FAIL N=%0d P=%0d %s: got %0d expected %0d", N, PO, what, got, exp);
      end
    endtask

    task automatic present_compare();
      if (published && m.n == L + 1) chk("w0 zero before update", w[0], 0);
      if (published && m.n == L + 2) chk("first update w0 = 72", w[0], 72);
      m.present(x, d);
      chk("y", y, m.exp_y());
      chk("err", e, m.exp_err());
      chk("state", s, m.exp_state());
      chk("mue_casc", mc, m.exp_mue_casc());
      for (int k = 0; k < N; k++) chk($sformatf("w%0d", k), w[k], m.exp_w(k));
    endtask

    task automatic advance();
      void'(m.advance());
    endtask
  end

  task automatic one_clock(longint xv, longint dv);
    x = 8'(xv); d = 8'(dv);
    #1;
    g_cfg[0].present_compare();
    g_cfg[1].present_compare();
    g_cfg[2].present_compare();
    g_cfg[3].present_compare();
    g_cfg[4].present_compare();
    @(posedge clk);
    g_cfg[0].advance();
    g_cfg[1].advance();
    g_cfg[2].advance();
    g_cfg[3].advance();
    g_cfg[4].advance();
    #1;
  endtask

  initial begin
    rst_n = 1'b0; x = '0; d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (40) one_clock(8, 18);
    published = 1'b0;
    repeat (400) one_clock($signed(8'($urandom)), $signed(8'($urandom)));
    checks   = g_cfg[0].lchecks + g_cfg[1].lchecks + g_cfg[2].lchecks
             + g_cfg[3].lchecks + g_cfg[4].lchecks;
    failures = g_cfg[0].lfail + g_cfg[1].lfail + g_cfg[2].lfail
             + g_cfg[3].lfail + g_cfg[4].lfail;
    $display("checks per configuration: %0d %0d %0d %0d %0d",
             g_cfg[0].lchecks, g_cfg[1].lchecks, g_cfg[2].lchecks,
             g_cfg[3].lchecks, g_cfg[4].lchecks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
