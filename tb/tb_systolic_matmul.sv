// tb_systolic_matmul: self-checking test of the systolic matrix multiplier.
// A 3 x 3 x 3 array (default) and a 2 x 4 x 3 array multiply random signed
// matrices, including all-extreme ones; each result is compared with a
// product computed here with three nested loops. The test also checks the
// timing: done must pulse exactly M + K + P - 1 clocks after start, with
// busy high in between, and a start while busy must be ignored. Two
// operations run back to back to check that the accumulators are cleared.
module tb_systolic_matmul;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Default 3 x 3 x 3 instance.
  logic               start0, busy0, done0;
  logic signed [7:0]  a0 [3][3];
  logic signed [7:0]  b0 [3][3];
  logic signed [17:0] c0 [3][3];
  systolic_matmul dut0 (
    .clk(clk), .rst_n(rst_n), .start(start0), .a_mat(a0), .b_mat(b0),
    .busy(busy0), .done(done0), .c_mat(c0)
  );

  // Non-square 2 x 4 x 3 instance.
  logic               start1, busy1, done1;
  logic signed [7:0]  a1 [2][4];
  logic signed [7:0]  b1 [4][3];
  logic signed [17:0] c1 [2][3];
  systolic_matmul #(.M(2), .K(4), .P(3)) dut1 (
    .clk(clk), .rst_n(rst_n), .start(start1), .a_mat(a1), .b_mat(b1),
    .busy(busy1), .done(done1), .c_mat(c1)
  );

  task automatic run0(int mode);
    longint exp [3][3];
    int cycles;
    foreach (a0[i, s]) a0[i][s] = (mode == 1) ? -8'sd128 : $urandom;
    foreach (b0[s, j]) b0[s][j] = (mode == 1) ? -8'sd128 : $urandom;
    foreach (exp[i, j]) begin
      exp[i][j] = 0;
      for (int s = 0; s < 3; s++) exp[i][j] += longint'(a0[i][s]) * longint'(b0[s][j]);
    end
    start0 = 1'b1;
    @(posedge clk); #1;
    start0 = 1'b0;
    // Scramble the operand inputs: they were captured at start.
    foreach (a0[i, s]) a0[i][s] = $urandom;
    check("busy after start", busy0, 1);
    cycles = 1;
    while (!done0) begin
      if (cycles == 3) begin
        start0 = 1'b1;             // must be ignored while busy
      end else start0 = 1'b0;
      check("busy while running", busy0, 1);
      @(posedge clk); #1;
      cycles++;
      if (cycles > 50) break;
    end
    start0 = 1'b0;
    check("3x3x3 done after M+K+P-1 clocks", cycles, 3 + 3 + 3 - 1);
    check("busy low at done", busy0, 0);
    foreach (exp[i, j]) check($sformatf("c0[%0d][%0d]", i, j), c0[i][j], exp[i][j]);
    @(posedge clk); #1;
    check("done is a pulse", done0, 0);
    foreach (exp[i, j]) check("c0 held", c0[i][j], exp[i][j]);
  endtask

  task automatic run1();
    longint exp [2][3];
    int cycles;
    foreach (a1[i, s]) a1[i][s] = $urandom;
    foreach (b1[s, j]) b1[s][j] = $urandom;
    foreach (exp[i, j]) begin
      exp[i][j] = 0;
      for (int s = 0; s < 4; s++) exp[i][j] += longint'(a1[i][s]) * longint'(b1[s][j]);
    end
    start1 = 1'b1;
    @(posedge clk); #1;
    start1 = 1'b0;
    cycles = 1;
    while (!done1 && cycles < 50) begin @(posedge clk); #1; cycles++; end
    check("2x4x3 done after M+K+P-1 clocks", cycles, 2 + 4 + 3 - 1);
    foreach (exp[i, j]) check($sformatf("c1[%0d][%0d]", i, j), c1[i][j], exp[i][j]);
  endtask

  initial begin
    rst_n = 1'b0; start0 = 1'b0; start1 = 1'b0;
    foreach (a0[i, s]) a0[i][s] = '0;
    foreach (b0[s, j]) b0[s][j] = '0;
    foreach (a1[i, s]) a1[i][s] = '0;
    foreach (b1[s, j]) b1[s][j] = '0;
    repeat (2) @(posedge clk);
    #1;
    check("idle after reset", busy0, 0);
    rst_n = 1'b1;
    run0(1);                       // all -128: largest result, 3 * 16384
    for (int r = 0; r < 20; r++) run0(0);
    for (int r = 0; r < 20; r++) run1();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
