// fp_f2i: float2int. Converts a single-precision number to a 32-bit
// two's-complement integer, truncating toward zero, with a latency of LAT
// cycles (6, from the ALU command table) and one conversion per cycle.
// Magnitudes below one give 0; values beyond the integer range saturate to
// 0x7FFF_FFFF or 0x8000_0000. Truncation and saturation are this design's
// choice; the document says only "converts float to integer".
module fp_f2i
  import fp_pkg::*;
#(
  parameter int unsigned LAT = 6
) (
  input  logic        clk,
  input  logic [31:0] a,
  output logic [31:0] y
);
  fp32_t       fa;
  logic [31:0] mag, y_comb;
  int          sh;

  always_comb begin
    fa  = a;
    sh  = int'(fa.exp) - 127;          // unbiased exponent
    mag = 32'd0;
    if (sh < 0) begin
      y_comb = 32'd0;
    end else if (sh >= 31) begin
      y_comb = fa.sign ? 32'h8000_0000 : 32'h7FFF_FFFF;
    end else begin
      if (sh >= 23) mag = {8'd0, 1'b1, fa.man} << (sh - 23);
      else          mag = {8'd0, 1'b1, fa.man} >> (23 - sh);
      y_comb = fa.sign ? (~mag + 32'd1) : mag;
    end
  end

  pipe_delay #(.DEPTH(LAT), .W(32)) u_pipe (.clk, .d(y_comb), .q(y));
endmodule
