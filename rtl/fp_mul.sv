// fp_mul: single-precision multiplier y = a * b with a latency of LAT cycles
// (9, the mult2 delay of the ALU command table) and one new operand pair per
// cycle. Four register stages do the work:
//   1  unpack: sign, exponent sum, special cases, significands with hidden one
//   2  two partial products, 24 x 12 bits each (the shape of FPGA multiplier
//      blocks)
//   3  sum of the partial products, the 48-bit significand product
//   4  normalise by at most one place, round to nearest even, pack
// The remaining LAT - 4 registers delay the result to the latency of the
// command table; a synthesis flow may retime them into the multiplier.
// Subnormals are flushed to zero, overflow and infinite operands give
// infinity. The stage split, number format and rounding are this design's
// choice; the document gives the latency and that the numbers are 32-bit
// floats.
module fp_mul
  import fp_pkg::*;
#(
  parameter int unsigned LAT = 9
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam int unsigned STAGES = 4;

  typedef struct packed {
    logic        sign, inf, zero;
    logic [9:0]  exp;      // ea + eb - 127, two's complement
  } hdr_t;

  fp32_t       fa, fb;
  hdr_t        h1, h2, h3;
  logic [23:0] ma1, mb1;
  logic [35:0] pp_hi2, pp_lo2;
  logic [47:0] prod3;
  logic [31:0] y4_d, y4_q;

  // ---- stage 1: unpack
  assign fa = a;
  assign fb = b;
  always_ff @(posedge clk) begin
    h1.sign <= fa.sign ^ fb.sign;
    h1.inf  <= (fa.exp == 8'hFF) || (fb.exp == 8'hFF);
    h1.zero <= (fa.exp == 8'd0) || (fb.exp == 8'd0);
    h1.exp  <= 10'(int'(fa.exp) + int'(fb.exp) - 127);
    ma1     <= {1'b1, fa.man};
    mb1     <= {1'b1, fb.man};
  end

  // ---- stage 2: partial products
  always_ff @(posedge clk) begin
    h2     <= h1;
    pp_hi2 <= ma1 * mb1[23:12];
    pp_lo2 <= ma1 * mb1[11:0];
  end

  // ---- stage 3: significand product
  always_ff @(posedge clk) begin
    h3    <= h2;
    prod3 <= {pp_hi2, 12'd0} + {12'd0, pp_lo2};
  end

  // ---- stage 4: normalise, round, pack
  always_comb begin
    if (h3.inf)
      y4_d = {h3.sign, FP_INF[30:0]};
    else if (h3.zero)
      y4_d = {h3.sign, 31'd0};
    else if (prod3[47])
      y4_d = round_pack(h3.sign, int'($signed(h3.exp)) + 1, prod3[47:24], prod3[23], |prod3[22:0]);
    else
      y4_d = round_pack(h3.sign, int'($signed(h3.exp)), prod3[46:23], prod3[22], |prod3[21:0]);
  end
  always_ff @(posedge clk) y4_q <= y4_d;

  if (LAT < STAGES) begin : g_lat_check
    $error("fp_mul needs LAT >= %0d", STAGES);
  end

  pipe_delay #(.DEPTH((LAT > STAGES) ? LAT - STAGES : 0), .W(32)) u_pipe (.clk, .d(y4_q), .q(y));
endmodule
