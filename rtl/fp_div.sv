// fp_div: single-precision divider y = a / b with a latency of LAT cycles
// (27, the div delay of the ALU command table) and one new operand pair per
// cycle.
//
// The significand quotient is formed by a pipelined restoring division, one
// quotient bit per stage. Stage 0 compares the dividend significand with the
// divisor significand; every later stage doubles the partial remainder and
// subtracts the divisor where it fits. Together the 27 stages produce the
// quotient (1.m_a / 1.m_b) * 2^26, which has 26 or 27 significant bits, and
// the final remainder. Both travel with sign, exponent and special-case flags
// through the pipeline. After the last stage register a combinational step
// rounds to nearest even (the remainder feeds the sticky bit) and packs the
// result. LAT above 27 adds plain delay registers.
//
// Division by zero and overflow give a signed infinity; a zero or subnormal
// dividend gives zero. The special cases, rounding and the stage split are
// this design's choice; the document gives the latency and that the units
// are pipelined.
module fp_div
  import fp_pkg::*;
#(
  parameter int unsigned LAT = 27
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam int unsigned QB = 27;   // quotient bits = pipeline stages

  typedef struct packed {
    logic          sign;
    logic [9:0]    exp;     // biased exponent of the quotient, two's complement
    logic          inf;
    logic          zero;
    logic [24:0]   rem;     // partial remainder, always below the divisor
    logic [23:0]   den;     // divisor significand
    logic [QB-1:0] q;
  } stage_t;

  fp32_t  fa, fb;
  stage_t st_in;
  stage_t st_q [QB];        // registered output of each stage

  // Stage 0 input: unpack.
  always_comb begin
    fa            = a;
    fb            = b;
    st_in.sign    = fa.sign ^ fb.sign;
    st_in.exp     = 10'(int'(fa.exp) - int'(fb.exp) + 127);
    st_in.inf     = (fa.exp == 8'hFF) || (fb.exp == 8'd0);
    st_in.zero    = (fa.exp == 8'd0) || (fb.exp == 8'hFF);
    st_in.rem     = {1'b0, 1'b1, fa.man};
    st_in.den     = {1'b1, fb.man};
    st_in.q       = '0;
  end

  // One quotient bit per stage, most significant first.
  for (genvar i = 0; i < QB; i++) begin : g_stage
    stage_t prev, nxt;
    logic [24:0] trial;
    assign prev = (i == 0) ? st_in : st_q[(i == 0) ? 0 : i - 1];
    always_comb begin
      nxt   = prev;
      trial = (i == 0) ? prev.rem : {prev.rem[23:0], 1'b0};
      if (trial >= {1'b0, prev.den}) begin
        nxt.rem         = trial - {1'b0, prev.den};
        nxt.q[QB-1-i]   = 1'b1;
      end else begin
        nxt.rem         = trial;
      end
    end
    always_ff @(posedge clk) st_q[i] <= nxt;
  end

  // Round and pack after the last stage.
  stage_t      last;
  logic [31:0] y_comb;
  int          e;
  always_comb begin
    last = st_q[QB-1];
    e    = int'($signed(last.exp));
    if (last.inf)
      y_comb = {last.sign, FP_INF[30:0]};
    else if (last.zero)
      y_comb = {last.sign, 31'd0};
    else if (last.q[26])
      y_comb = round_pack(last.sign, e, last.q[26:3], last.q[2],
                          (|last.q[1:0]) || (last.rem != '0));
    else
      y_comb = round_pack(last.sign, e - 1, last.q[25:2], last.q[1],
                          last.q[0] || (last.rem != '0));
  end

  if (LAT < QB) begin : g_lat_check
    $error("fp_div needs LAT >= %0d", QB);
  end

  pipe_delay #(.DEPTH((LAT > QB) ? LAT - QB : 0), .W(32)) u_pipe (.clk, .d(y_comb), .q(y));
endmodule
