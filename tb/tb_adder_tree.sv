// tb_adder_tree: self-checking test of the pipelined adder tree.
// A 4-input tree (two levels) and an 8-input tree (three levels) get new
// random products every clock; the output of each is compared with the sum
// of the inputs presented exactly L clocks earlier (L = 2 and 3), which
// checks both the arithmetic and the latency. A 4-input tree with its root
// left unregistered must show a latency of one clock. Extreme values check that the
// full-precision sum does not overflow.
module tb_adder_tree;
  localparam int IN_W = 16;

  logic clk = 1'b0, rst_n;
  logic signed [IN_W-1:0] in4 [4];
  logic signed [IN_W-1:0] in8 [8];
  logic signed [IN_W+1:0] sum4;
  logic signed [IN_W+2:0] sum8;
  logic signed [IN_W+1:0] sum4c;

  int checks = 0, failures = 0;
  longint hist4[$], hist8[$];

  always #5 clk = ~clk;

  adder_tree dut4 (.clk(clk), .rst_n(rst_n), .in(in4), .sum(sum4));
  adder_tree #(.N(4), .IN_W(IN_W), .REG_ROOT(1'b0)) dut4c (.clk(clk), .rst_n(rst_n), .in(in4), .sum(sum4c));
  adder_tree #(.N(8), .IN_W(IN_W)) dut8 (.clk(clk), .rst_n(rst_n), .in(in8), .sum(sum8));

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
    longint s4, s8;
    rst_n = 1'b0;
    foreach (in4[i]) in4[i] = '0;
    foreach (in8[i]) in8[i] = '0;
    repeat (2) @(posedge clk);
    #1;
    check("sum4 after reset", sum4, 0);
    check("sum8 after reset", sum8, 0);
    rst_n = 1'b1;
    // Sums presented before reset release count as zero.
    repeat (3) begin hist4.push_back(0); hist8.push_back(0); end
    for (int i = 0; i < 300; i++) begin
      s4 = 0; s8 = 0;
      foreach (in4[j]) begin
        in4[j] = $urandom;
        if (i % 40 == 5) in4[j] = 16'sh7fff;
        if (i % 40 == 6) in4[j] = 16'sh8000;
        s4 += in4[j];
      end
      foreach (in8[j]) begin
        in8[j] = $urandom;
        if (i % 40 == 5) in8[j] = 16'sh7fff;
        if (i % 40 == 6) in8[j] = 16'sh8000;
        s8 += in8[j];
      end
      hist4.push_back(s4); hist8.push_back(s8);
      @(posedge clk); #1;
      // After this edge sum4 holds the input of 1 edge earlier (2 levels).
      check("4-input tree, latency 2", sum4, hist4[hist4.size() - 2]);
      check("8-input tree, latency 3", sum8, hist8[hist8.size() - 3]);
      // Unregistered root: one level of registers, and the root follows
      // the inputs of this clock combinationally.
      check("4-input tree, unregistered root, latency 1", sum4c, hist4[hist4.size() - 1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
