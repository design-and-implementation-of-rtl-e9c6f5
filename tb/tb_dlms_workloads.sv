// tb_dlms_workloads: runs the filter at the five published lengths, 2, 4, 8,
// 16 and 32 taps, side by side on the same samples: first the published
// stimulus (x = 8, d = 18, mu = 0.5, 8-bit weights starting at zero), then
// random samples. Every clock each filter's output, error, weights and fill
// counter are compared with the reference model. Independently of the
// model, the first weight update of each length, 0.5 * 18 * 8 = 72, must
// land exactly D = log2(N) + 1 clocks after the first sample, which checks
// the adaptation delay of every tree depth.
module tb_dlms_workloads;
  import dlms_model_pkg::*;

  localparam int NUM = 5;
  localparam int TAPS [NUM] = '{2, 4, 8, 16, 32};

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

  for (genvar g = 0; g < NUM; g++) begin : g_len
    localparam int N = TAPS[g];
    localparam int L = $clog2(N);
    logic signed [15:0] y, e;
    logic signed [7:0]  w [N];
    logic [$clog2(N+1)-1:0] s;
    logic signed [7:0]  xc, xdc;
    logic signed [15:0] mc;
    int lchecks = 0, lfail = 0;
    dlms_model #(.N(N)) m;

    dlms_systolic_fir #(.N(N)) dut (
      .clk(clk), .rst_n(rst_n), .x_in(x), .d_in(d), .y_out(y), .err_out(e),
      .weights(w), .state(s), .x_casc(xc), .xd_casc(xdc), .mue_casc(mc)
    );

    initial m = new();

    task automatic chk(string what, longint got, longint exp);
      lchecks++;
      if (got != exp) begin
        lfail++;
        if (lfail < 5) $display("FAIL N=%0d %s: got %0d expected %0d", N, what, got, exp);
      end
    endtask

    // Samples x, d are on the inputs: compare this clock's outputs.
    task automatic present_compare();
      if (published && m.n == L + 1) chk("w0 zero before update", w[0], 0);
      if (published && m.n == L + 2) chk("first update w0 = 72", w[0], 72);
      m.present(x, d);
      chk("y", y, m.exp_y());
      chk("err", e, m.exp_err());
      chk("state", s, m.exp_state());
      chk("mue_casc", mc, m.exp_mue());
      for (int k = 0; k < N; k++) chk("w", w[k], m.w[k]);
    endtask

    task automatic advance();
      void'(m.advance());
    endtask
  end

  task automatic one_clock(longint xv, longint dv);
    x = 8'(xv); d = 8'(dv);
    #1;
    g_len[0].present_compare();
    g_len[1].present_compare();
    g_len[2].present_compare();
    g_len[3].present_compare();
    g_len[4].present_compare();
    @(posedge clk);
    g_len[0].advance();
    g_len[1].advance();
    g_len[2].advance();
    g_len[3].advance();
    g_len[4].advance();
    #1;
  endtask

  initial begin
    rst_n = 1'b0; x = '0; d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (40) one_clock(8, 18);
    published = 1'b0;
    repeat (400) one_clock($signed(8'($urandom)), $signed(8'($urandom)));
    checks   = g_len[0].lchecks + g_len[1].lchecks + g_len[2].lchecks
             + g_len[3].lchecks + g_len[4].lchecks;
    failures = g_len[0].lfail + g_len[1].lfail + g_len[2].lfail
             + g_len[3].lfail + g_len[4].lfail;
    $display("checks per length: 2:%0d 4:%0d 8:%0d 16:%0d 32:%0d",
             g_len[0].lchecks, g_len[1].lchecks, g_len[2].lchecks,
             g_len[3].lchecks, g_len[4].lchecks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
