// pipe_delay: a chain of DEPTH registers. Used at the end of the arithmetic
// units to pad each one to exactly the latency of the ALU command table while
// it still accepts a new operand every cycle. DEPTH = 0 is a plain wire. The registers have no reset: the data path never needs one,
// because the control table only selects a result after it has passed through.
module pipe_delay #(
  parameter int unsigned DEPTH = 1,
  parameter int unsigned W     = 32
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[DEPTH-1];
  end
endmodule
