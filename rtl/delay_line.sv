// delay_line: a z^-DEPTH shift register for a W-bit two's complement word.
// q(n) = d(n - DEPTH); all stages clear to zero on reset, so the line reads
// as if every sample before reset was zero. DEPTH = 0 is a plain wire.
// Used for the x(n-D) line feeding the weight update and for aligning the
// desired response d(n) with the pipelined filter output.
module delay_line #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic signed [W-1:0] stage [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[DEPTH-1];
  end

endmodule
