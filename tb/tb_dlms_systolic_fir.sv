// tb_dlms_systolic_fir: end-to-end test of the systolic DLMS adaptive FIR
// filter against the reference model of dlms_model_pkg.
//
// The filter is instantiated at its default parameters (4 taps, 8-bit input,
// desired value and weights, 16-bit output and error, mu = 0.5). It is run
// with the published stimulus x = 8, d = 18, then with random samples, then
// reset in mid-run and run again. Every clock the output y(n-2), the error,
// all weights and the fill counter are compared with the model; the first
// weight update must give w0 = 72 (01001000), as in the published 4-tap
// simulation.
//
// Counted mechanisms, each of which must occur at least once: weight
// updates, weight wrap-around, the fill counter reaching N, a reset during
// operation and non-zero error fed back to the taps. Convergence of the
// adaptation is tested separately, with wider weights, in tb_dlms_identify.
module tb_dlms_systolic_fir;
  import dlms_model_pkg::*;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_updates = 0, n_wraps = 0, n_fill = 0, n_resets = 0, n_feedback = 0;

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

  // ---------------- instance A: default parameters ----------------------
  logic signed [7:0]  xa, da;
  logic signed [15:0] ya, ea;
  logic signed [7:0]  wa [4];
  logic [2:0]         sa;
  logic signed [7:0]  xca, xdca;
  logic signed [15:0] mca;

  dlms_systolic_fir dut_a (
    .clk(clk), .rst_n(rst_n), .x_in(xa), .d_in(da), .y_out(ya), .err_out(ea),
    .weights(wa), .state(sa), .x_casc(xca), .xd_casc(xdca), .mue_casc(mca)
  );

  dlms_model #(.N(4)) ma;

  // Compare both instances with their models in the current clock.
  task automatic compare_all();
    check("A y_out", ya, ma.exp_y());
    check("A err_out", ea, ma.exp_err());
    check("A state", sa, ma.exp_state());
    check("A mue_casc", mca, ma.exp_mue());
    for (int k = 0; k < 4; k++) check($sformatf("A w%0d", k), wa[k], ma.w[k]);
    if (ma.exp_mue() != 0) n_feedback++;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    xa = '0; da = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int k = 0; k < 4; k++) check("A weight cleared by reset", wa[k], 0);
    rst_n = 1'b1;
    ma.reset();
  endtask

  // One clock: apply samples, compare, clock edge, advance the models.
  task automatic step(longint x_a, longint d_a);
    longint wa_before[4];
    int prev_state;
    xa = 8'(x_a); da = 8'(d_a);
    ma.present(xa, da);
    #1;
    compare_all();
    for (int k = 0; k < 4; k++) wa_before[k] = wa[k];
    prev_state = sa;
    @(posedge clk);
    n_wraps += ma.advance();
    #1;
    for (int k = 0; k < 4; k++) if (wa[k] != wa_before[k]) n_updates++;
    if (prev_state < 4 && sa == 4) n_fill++;
  endtask

  initial begin
    ma = new();
    do_reset();

    // Published stimulus: x = 8, d = 18. The first update of w0 is
    // 0.5 * 18 * 8 = 72; it lands D = 3 clocks after the first sample.
    for (int i = 0; i < 24; i++) begin
      step(8, 18);
      if (i == 3) check("w0 first update = 72 (01001000)", wa[0], 72);
      if (i < 3)  check("w0 still zero before the adaptation delay", wa[0], 0);
    end

    // Random samples.
    for (int i = 0; i < 1500; i++) step($signed(8'($urandom)), $signed(8'($urandom)));

    // Reset in mid-operation, then the published stimulus again.
    n_resets++;
    do_reset();
    for (int i = 0; i < 12; i++) begin
      step(8, 18);
      if (i == 3) check("w0 = 72 again after reset", wa[0], 72);
    end

    $display("mechanisms: updates=%0d wraps=%0d fill=%0d resets=%0d feedback=%0d",
             n_updates, n_wraps, n_fill, n_resets, n_feedback);
    checks += 5;
    if (n_updates   == 0) begin failures++; $display("FAIL no weight update"); end
    if (n_wraps     == 0) begin failures++; $display("FAIL no weight wrap-around"); end
    if (n_fill      == 0) begin failures++; $display("FAIL fill counter never reached N"); end
    if (n_resets    == 0) begin failures++; $display("FAIL no reset in operation"); end
    if (n_feedback  == 0) begin failures++; $display("FAIL no error fed back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
