// fp_pkg: helpers shared by the single-precision units (IEEE-754 binary32).
// The units round to nearest, ties to even, flush subnormal operands and
// results to a signed zero, and return a signed infinity on overflow.
package fp_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_t;

  localparam logic [31:0] FP_INF = 32'h7F80_0000;

  // Round a normalised significand m (hidden one in bit 23) with guard bit g
  // and sticky bit st, and pack it with sign s and biased exponent e.
  function automatic logic [31:0] round_pack(input logic s, input int e,
                                             input logic [23:0] m,
                                             input logic g, input logic st);
    logic [24:0] mr;
    int          er;
    mr = {1'b0, m} + 25'((g && (st || m[0])) ? 1 : 0);
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er >= 255) return {s, FP_INF[30:0]};
    if (er <= 0)   return {s, 31'd0};
    return {s, er[7:0], mr[22:0]};
  endfunction

  // Count of leading zeros of a 32-bit value (32 for zero).
  function automatic int unsigned lzc32(input logic [31:0] v);
    int unsigned n;
    n = 32;
    for (int i = 0; i < 32; i++) if (v[i]) n = 31 - i;
    return n;
  endfunction

endpackage
