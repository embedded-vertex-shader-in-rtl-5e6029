// rsq_seed: the rsq command. Returns MAGIC - (a >> 1) on the raw 32-bit
// pattern of the float a, a rough approximation of 1/sqrt(a) used as the start
// value of a Newton step x' = x/2 * (3 - a*x*x), which the shader itself runs
// on the multiply and dot-product commands. The constant 0x5F3759DF and the
// latency of 2 cycles are those of the ALU command table; one input per cycle.
module rsq_seed #(
  parameter int unsigned LAT   = 2,
  parameter logic [31:0] MAGIC = 32'h5F37_59DF
) (
  input  logic        clk,
  input  logic [31:0] a,
  output logic [31:0] y
);
  logic [31:0] y_comb;
  assign y_comb = MAGIC - (a >> 1);
  pipe_delay #(.DEPTH(LAT), .W(32)) u_pipe (.clk, .d(y_comb), .q(y));
endmodule
