// tb_error_unit: self-checking test of the error / feedback unit.
// Random desired values d and filter outputs y are applied; the error
// e = d - y (low 16 bits) must appear at once and mu*e = e >>> 1 one clock
// later. The published case d = 18, y = 0 gives e = 18 and mu*e = 9.
module tb_error_unit;
  localparam int D_W = 8, Y_W = 16, E_W = 16;

  logic clk = 1'b0, rst_n;
  logic signed [D_W-1:0] d;
  logic signed [Y_W-1:0] y;
  logic signed [E_W-1:0] err, mue;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  error_unit dut (.clk(clk), .rst_n(rst_n), .d(d), .y(y), .err(err), .mue(mue));

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
    longint e_prev;
    rst_n = 1'b0; d = '0; y = '0;
    repeat (2) @(posedge clk);
    #1;
    check("mue after reset", mue, 0);
    rst_n = 1'b1;
    d = 18; y = 0;
    #1;
    check("e = 18", err, 18);
    @(posedge clk); #1;
    check("mu*e = 9", mue, 9);
    for (int i = 0; i < 300; i++) begin
      d = $urandom; y = $urandom;
      if (i % 25 == 3) begin d = -128; y = 16'sh7fff; end
      if (i % 25 == 4) begin d = -7; y = 0; end
      #1;
      e_prev = wrap(longint'(d) - longint'(y), E_W);
      check("error", err, e_prev);
      @(posedge clk); #1;
      check("mu*error", mue, e_prev >>> 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
