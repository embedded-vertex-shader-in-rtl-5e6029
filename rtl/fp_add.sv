// fp_add: single-precision adder y = a + b with a latency of LAT cycles and
// one new operand pair per cycle. LAT = 5 is the step between the mult2 (9),
// dot2 (14) and dot4 (19) delays of the ALU command table, and the adder is
// built as five register stages:
//   1  unpack; keep the operand of larger magnitude as "big"
//   2  align the smaller significand, shifted-out bits folded into a sticky bit
//   3  add or subtract the significands (three extra bits: guard, round, sticky)
//   4  renormalise by a leading-zero count, or by one right shift on carry
//   5  round to nearest even and pack
// LAT above 5 adds plain delay registers. Subnormals are flushed to zero, an
// exact zero sum is +0, an infinite operand gives infinity; these and the
// stage split are this design's choices, the document fixes only the latency.
module fp_add
  import fp_pkg::*;
#(
  parameter int unsigned LAT = 5
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam int unsigned STAGES = 5;

  typedef struct packed {
    logic        sign;      // sign of the result (sign of "big")
    logic        sub;       // effective subtraction
    logic        inf;
    logic [9:0]  exp;       // exponent of the result before normalisation
    logic [26:0] mbig;      // {1, man, 3'b000}
    logic [26:0] msml;
    logic [7:0]  dexp;      // exponent difference
  } s1_t;

  typedef struct packed {
    logic        sign, inf;
    logic [9:0]  exp;
    logic [27:0] sum;
  } s3_t;

  typedef struct packed {
    logic        sign, inf, zero;
    logic [9:0]  exp;
    logic [23:0] man;
    logic        g, st;
  } s4_t;

  // ---- stage 1: unpack and order by magnitude
  fp32_t fx, fy, big, sml;
  s1_t   s1_d, s1_q;
  always_comb begin
    fx = a;
    fy = b;
    if ({fx.exp, fx.man} >= {fy.exp, fy.man}) begin
      big = fx; sml = fy;
    end else begin
      big = fy; sml = fx;
    end
    s1_d.sign = big.sign;
    s1_d.sub  = big.sign ^ sml.sign;
    s1_d.inf  = (big.exp == 8'hFF);
    s1_d.exp  = {2'b00, big.exp};
    s1_d.mbig = (big.exp == 8'd0) ? 27'd0 : {1'b1, big.man, 3'b000};
    s1_d.msml = (sml.exp == 8'd0) ? 27'd0 : {1'b1, sml.man, 3'b000};
    s1_d.dexp = big.exp - sml.exp;
  end
  always_ff @(posedge clk) s1_q <= s1_d;

  // ---- stage 2: align
  s1_t s2_d, s2_q;
  always_comb begin
    s2_d = s1_q;
    if (s1_q.dexp >= 8'd27)
      s2_d.msml = {26'd0, |s1_q.msml};
    else if (s1_q.dexp != 8'd0)
      s2_d.msml = (s1_q.msml >> s1_q.dexp)
                | {26'd0, |(s1_q.msml & ((27'd1 << s1_q.dexp) - 27'd1))};
  end
  always_ff @(posedge clk) s2_q <= s2_d;

  // ---- stage 3: add or subtract
  s3_t s3_d, s3_q;
  always_comb begin
    s3_d.sign = s2_q.sign;
    s3_d.inf  = s2_q.inf;
    s3_d.exp  = s2_q.exp;
    s3_d.sum  = s2_q.sub ? ({1'b0, s2_q.mbig} - {1'b0, s2_q.msml})
                         : ({1'b0, s2_q.mbig} + {1'b0, s2_q.msml});
  end
  always_ff @(posedge clk) s3_q <= s3_d;

  // ---- stage 4: normalise
  s4_t         s4_d, s4_q;
  logic [27:0] nrm;
  int unsigned lz;
  always_comb begin
    s4_d.sign = s3_q.sign;
    s4_d.inf  = s3_q.inf;
    s4_d.zero = (s3_q.sum == 28'd0);
    nrm       = s3_q.sum;
    lz        = 0;
    if (s3_q.sum[27]) begin
      nrm      = {1'b0, s3_q.sum[27:2], s3_q.sum[1] | s3_q.sum[0]};
      s4_d.exp = s3_q.exp + 10'd1;
    end else begin
      lz       = lzc32({5'd0, s3_q.sum[26:0]}) - 5;
      nrm      = s3_q.sum << lz;
      s4_d.exp = s3_q.exp - 10'(lz);
    end
    s4_d.man = nrm[26:3];
    s4_d.g   = nrm[2];
    s4_d.st  = |nrm[1:0];
  end
  always_ff @(posedge clk) s4_q <= s4_d;

  // ---- stage 5: round and pack
  logic [31:0] s5_d, s5_q;
  always_comb begin
    if (s4_q.inf)       s5_d = {s4_q.sign, FP_INF[30:0]};
    else if (s4_q.zero) s5_d = 32'd0;
    else s5_d = round_pack(s4_q.sign, int'($signed(s4_q.exp)), s4_q.man, s4_q.g, s4_q.st);
  end
  always_ff @(posedge clk) s5_q <= s5_d;

  if (LAT < STAGES) begin : g_lat_check
    $error("fp_add needs LAT >= %0d", STAGES);
  end

  pipe_delay #(.DEPTH((LAT > STAGES) ? LAT - STAGES : 0), .W(32)) u_pipe (.clk, .d(s5_q), .q(y));
endmodule
