// vs_alu: the scalar ALU of the vertex shader co-processor.
//
// Eight single-precision inputs a..h first pass a sign stage: each input's sign
// bit is XORed with its inv bit from the instruction, so any input can be
// multiplied by -1 for free. The sign-adjusted inputs feed, without further
// control, a fixed network of pipelined units that all run every cycle:
//
//   a*b            -> mult2                           ( 9 cycles)
//   a*b + c*d      -> dot2                            (14)
//   e*f + g*h      -> second half of dot4
//   dot2 + (e*f + g*h)            -> dot4             (19)
//   (a*b) * (c*d)                 -> mult4            (18)
//   dot2 < 0 ? e*f : g*h          -> slt              (14)
//   a / b                         -> div              (27)
//   0x5F3759DF - (a >> 1)         -> rsq              ( 2)
//   int(a), float(a)              -> float2int, int2float (6 each)
//
// The delays are counted from the cycle the operands are at the inputs to the
// cycle the result is at the output. The one-hot sel input, taken from the
// instruction that is in the ALU in the current cycle, picks which of the
// nine results appears at the output; there is no other control, so the
// program must select each result exactly its delay after it issued the
// operands. For slt the e*f and g*h products that are compared are those of
// the e..h inputs given 5 cycles after a..d, which is why the program must
// supply e..h twice. Several set select bits OR their results and no set bit
// gives 0 (this design's choice). The unit structure follows the ALU block
// diagram; the adder delay of 5 is the step between the table's delays.
module vs_alu
  import vs_pkg::*;
#(
  parameter int unsigned MUL_LAT = vs_pkg::DLY_MUL,
  parameter int unsigned ADD_LAT = vs_pkg::DLY_ADD,
  parameter int unsigned DIV_LAT = vs_pkg::DLY_DIV,
  parameter int unsigned RSQ_LAT = vs_pkg::DLY_RSQ,
  parameter int unsigned CVT_LAT = vs_pkg::DLY_CVT
) (
  input  logic            clk,
  input  logic [31:0]     opnd [NSRC],  // a..h
  input  logic [NSRC-1:0] inv,          // inv0 (a) .. inv7 (h)
  input  alu_sel_t        sel,
  output logic [31:0]     result
);
  logic [31:0] x [NSRC];
  logic [31:0] p_ab, p_cd, p_ef, p_gh, s_ab_cd, s_ef_gh, r_dot4, r_mult4;
  logic [31:0] r_div, r_rsq, r_i2f, r_f2i, r_slt;

  // Sign stage: multiply any input by -1.
  always_comb
    for (int i = 0; i < NSRC; i++) x[i] = {opnd[i][31] ^ inv[i], opnd[i][30:0]};

  fp_mul #(.LAT(MUL_LAT)) u_mul_ab (.clk, .a(x[0]), .b(x[1]), .y(p_ab));
  fp_mul #(.LAT(MUL_LAT)) u_mul_cd (.clk, .a(x[2]), .b(x[3]), .y(p_cd));
  fp_mul #(.LAT(MUL_LAT)) u_mul_ef (.clk, .a(x[4]), .b(x[5]), .y(p_ef));
  fp_mul #(.LAT(MUL_LAT)) u_mul_gh (.clk, .a(x[6]), .b(x[7]), .y(p_gh));

  fp_add #(.LAT(ADD_LAT)) u_add_abcd (.clk, .a(p_ab), .b(p_cd), .y(s_ab_cd));
  fp_add #(.LAT(ADD_LAT)) u_add_efgh (.clk, .a(p_ef), .b(p_gh), .y(s_ef_gh));
  fp_add #(.LAT(ADD_LAT)) u_add_dot4 (.clk, .a(s_ab_cd), .b(s_ef_gh), .y(r_dot4));

  fp_mul #(.LAT(MUL_LAT)) u_mul4 (.clk, .a(p_ab), .b(p_cd), .y(r_mult4));

  fp_div   #(.LAT(DIV_LAT)) u_div (.clk, .a(x[0]), .b(x[1]), .y(r_div));
  rsq_seed #(.LAT(RSQ_LAT)) u_rsq (.clk, .a(x[0]), .y(r_rsq));
  fp_i2f   #(.LAT(CVT_LAT)) u_i2f (.clk, .a(x[0]), .y(r_i2f));
  fp_f2i   #(.LAT(CVT_LAT)) u_f2i (.clk, .a(x[0]), .y(r_f2i));

  // slt: a*b + c*d < 0 (sign set, not a zero) selects e*f, otherwise g*h.
  // The products arriving now belong to e..h issued ADD_LAT cycles after a..d.
  assign r_slt = (s_ab_cd[31] && s_ab_cd[30:0] != 31'd0) ? p_ef : p_gh;

  always_comb begin
    result = '0;
    if (sel.dot4)  result |= r_dot4;
    if (sel.dot2)  result |= s_ab_cd;
    if (sel.mult4) result |= r_mult4;
    if (sel.mult2) result |= p_ab;
    if (sel.div)   result |= r_div;
    if (sel.rsq)   result |= r_rsq;
    if (sel.slt)   result |= r_slt;
    if (sel.i2f)   result |= r_i2f;
    if (sel.f2i)   result |= r_f2i;
  end
endmodule
