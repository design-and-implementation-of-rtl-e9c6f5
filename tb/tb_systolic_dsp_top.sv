// tb_systolic_dsp_top: end-to-end test of both systolic designs at their
// default sizes, running at the same time.
//
// Filter: the published stimulus (x = 8, d = 18), then random samples, then
// a reset in mid-run and the published stimulus again. Every clock the
// output y(n-2), the error, all four weights, the fill counter and the
// broadcast mu*e are compared with the reference model; the first update
// must give w0 = 72 after the fourth clock edge: the first sample's error
// reaches the weights D = 3 clocks after the sample enters.
// Matrix multiplier: back-to-back 3 x 3 x 3 products of random matrices,
// checked against products computed here, with done expected exactly
// M + K + P - 1 = 8 clocks after start, and one start issued while busy,
// which must be ignored.
//
// Counted mechanisms, each of which must occur at least once: weight
// updates, weight wrap-around, the fill counter reaching N, non-zero error
// fed back, a reset during operation, completed matrix products and an
// ignored start.
module tb_systolic_dsp_top;
  import dlms_model_pkg::*;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_updates = 0, n_wraps = 0, n_fill = 0, n_feedback = 0, n_resets = 0;
  int n_products = 0, n_ignored = 0;

  logic signed [7:0]  x, d;
  logic signed [15:0] y, e;
  logic signed [7:0]  w [4];
  logic [2:0]         s;
  logic signed [7:0]  xc, xdc;
  logic signed [15:0] mc;
  logic               mm_start, mm_busy, mm_done;
  logic signed [7:0]  mm_a [3][3];
  logic signed [7:0]  mm_b [3][3];
  logic signed [17:0] mm_c [3][3];

  systolic_dsp_top dut (
    .clk(clk), .rst_n(rst_n),
    .fir_x_in(x), .fir_d_in(d), .fir_y_out(y), .fir_err_out(e),
    .fir_weights(w), .fir_state(s), .fir_x_casc(xc), .fir_xd_casc(xdc),
    .fir_mue_casc(mc),
    .mm_start(mm_start), .mm_a(mm_a), .mm_b(mm_b), .mm_busy(mm_busy),
    .mm_done(mm_done), .mm_c(mm_c)
  );

  dlms_model #(.N(4)) m;

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

  // One filter clock: apply samples, compare, clock edge, advance model.
  task automatic fir_step(longint xv, longint dv);
    logic signed [7:0] w_before [4];
    int prev_state;
    x = 8'(xv); d = 8'(dv);
    m.present(x, d);
    #1;
    check("y_out", y, m.exp_y());
    check("err_out", e, m.exp_err());
    check("state", s, m.exp_state());
    check("mue", mc, m.exp_mue());
    for (int k = 0; k < 4; k++) check($sformatf("w%0d", k), w[k], m.w[k]);
    if (m.exp_mue() != 0) n_feedback++;
    w_before = w;
    prev_state = s;
    @(posedge clk);
    n_wraps += m.advance();
    #1;
    for (int k = 0; k < 4; k++) if (w[k] != w_before[k]) n_updates++;
    if (prev_state < 4 && s == 4) n_fill++;
  endtask

  task automatic fir_run();
    for (int i = 0; i < 24; i++) begin
      if (i < 4)  check("w0 zero before the adaptation delay", w[0], 0);
      if (i == 4) check("w0 first update = 72", w[0], 72);
      fir_step(8, 18);
    end
    for (int i = 0; i < 600; i++) fir_step($signed(8'($urandom)), $signed(8'($urandom)));
  endtask

  task automatic mm_run(int ops);
    longint exp [3][3];
    int cycles;
    for (int r = 0; r < ops; r++) begin
      foreach (mm_a[i, k]) mm_a[i][k] = $urandom;
      foreach (mm_b[k, j]) mm_b[k][j] = $urandom;
      foreach (exp[i, j]) begin
        exp[i][j] = 0;
        for (int k = 0; k < 3; k++) exp[i][j] += longint'(mm_a[i][k]) * longint'(mm_b[k][j]);
      end
      @(negedge clk);
      mm_start = 1'b1;
      @(negedge clk);
      mm_start = 1'b0;
      cycles = 1;
      while (!mm_done && cycles < 40) begin
        if (cycles == 4) begin
          mm_start = 1'b1;         // ignored: the array is busy
          n_ignored++;
        end else mm_start = 1'b0;
        @(negedge clk);
        cycles++;
      end
      mm_start = 1'b0;
      check("matrix product done after 8 clocks", cycles, 8);
      foreach (exp[i, j]) check($sformatf("c[%0d][%0d]", i, j), mm_c[i][j], exp[i][j]);
      if (cycles == 8) n_products++;
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    x = '0; d = '0; mm_start = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    for (int k = 0; k < 4; k++) check("weight cleared by reset", w[k], 0);
    check("matrix multiplier idle after reset", mm_busy, 0);
    rst_n = 1'b1;
    m.reset();
  endtask

  initial begin
    m = new();
    foreach (mm_a[i, k]) mm_a[i][k] = '0;
    foreach (mm_b[k, j]) mm_b[k][j] = '0;
    do_reset();
    fork
      fir_run();
      mm_run(30);
    join
    n_resets++;
    do_reset();
    for (int i = 0; i < 12; i++) begin
      if (i == 4) check("w0 = 72 again after reset", w[0], 72);
      fir_step(8, 18);
    end
    mm_run(2);

    $display("mechanisms: updates=%0d wraps=%0d fill=%0d feedback=%0d resets=%0d products=%0d ignored_starts=%0d",
             n_updates, n_wraps, n_fill, n_feedback, n_resets, n_products, n_ignored);
    checks += 7;
    if (n_updates  == 0) begin failures++; $display("FAIL no weight update"); end
    if (n_wraps    == 0) begin failures++; $display("FAIL no weight wrap-around"); end
    if (n_fill     == 0) begin failures++; $display("FAIL fill counter never reached N"); end
    if (n_feedback == 0) begin failures++; $display("FAIL no error fed back"); end
    if (n_resets   == 0) begin failures++; $display("FAIL no reset in operation"); end
    if (n_products == 0) begin failures++; $display("FAIL no matrix product"); end
    if (n_ignored  == 0) begin failures++; $display("FAIL no start while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
