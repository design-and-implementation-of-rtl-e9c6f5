// tb_mac_pe: self-checking test of the systolic multiply-accumulate PE.
// Two PEs are driven with random signed operands: one with registered b
// exit, one with b passed straight through. Each clock the accumulator,
// the a exit and the b exit are compared with a model kept in the
// testbench (acc += a*b modulo 2**ACC_W, exits one clock late or direct).
// Also checks that the accumulator wraps and that clr and reset clear it.
module tb_mac_pe;
  localparam int A_W = 8, B_W = 16, ACC_W = 8;

  logic clk = 1'b0, rst_n, clr;
  logic signed [A_W-1:0]   a;
  logic signed [B_W-1:0]   b;
  logic signed [A_W-1:0]   a_out0, a_out1;
  logic signed [B_W-1:0]   b_out0, b_out1;
  logic signed [ACC_W-1:0] acc0, acc1;

  int checks = 0, failures = 0, wraps = 0;

  always #5 clk = ~clk;

  mac_pe dut_reg (
    .clk(clk), .rst_n(rst_n), .clr(clr), .a_in(a), .b_in(b),
    .a_out(a_out0), .b_out(b_out0), .acc(acc0)
  );
  mac_pe #(.A_W(A_W), .B_W(B_W), .ACC_W(ACC_W), .REG_B(1'b0)) dut_wire (
    .clk(clk), .rst_n(rst_n), .clr(clr), .a_in(a), .b_in(b),
    .a_out(a_out1), .b_out(b_out1), .acc(acc1)
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
    longint m_acc, m_a, m_b, raw;
    rst_n = 1'b0; clr = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1;
    check("acc after reset", acc0, 0);
    check("a_out after reset", a_out0, 0);
    rst_n = 1'b1;
    m_acc = 0; m_a = 0; m_b = 0;
    for (int i = 0; i < 300; i++) begin
      a = $urandom; b = $urandom;
      if (i % 50 == 7) begin a = 8'sd1; b = 16'sd1; end
      clr = (i % 37 == 20);
      #1;
      check("b_out direct", b_out1, b);
      @(posedge clk);
      raw = m_acc + wrap(longint'(a) * longint'(b), ACC_W);
      if (raw != wrap(raw, ACC_W)) wraps++;
      m_acc = clr ? 0 : wrap(raw, ACC_W);
      m_a = a; m_b = b;
      #1;
      check("acc (registered b)", acc0, m_acc);
      check("acc (direct b)", acc1, m_acc);
      check("a_out", a_out0, m_a);
      check("a_out direct-b PE", a_out1, m_a);
      check("b_out registered", b_out0, m_b);
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL accumulator never wrapped"); end
    rst_n = 1'b0; #1;
    check("acc cleared by reset", acc0, 0);
    $display("accumulator wraps seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
