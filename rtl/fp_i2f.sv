// fp_i2f: int2float. Converts a 32-bit two's-complement integer to single
// precision, rounded to nearest even, with a latency of LAT cycles (6, from
// the ALU command table) and one conversion per cycle. The magnitude is
// normalised by a leading-zero count in one combinational stage, followed by a
// LAT-deep register chain. The integer format is this design's choice.
module fp_i2f
  import fp_pkg::*;
#(
  parameter int unsigned LAT = 6
) (
  input  logic        clk,
  input  logic [31:0] a,
  output logic [31:0] y
);
  logic [31:0] mag, norm, y_comb;
  int unsigned lz;

  always_comb begin
    mag  = a[31] ? (~a + 32'd1) : a;   // -2^31 stays 0x8000_0000, read unsigned
    lz   = lzc32(mag);
    norm = mag << lz;
    if (mag == 32'd0)
      y_comb = 32'd0;
    else
      y_comb = round_pack(a[31], 127 + 31 - int'(lz), norm[31:8], norm[7], |norm[6:0]);
  end

  pipe_delay #(.DEPTH(LAT), .W(32)) u_pipe (.clk, .d(y_comb), .q(y));
endmodule
