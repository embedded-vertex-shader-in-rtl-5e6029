// tb_vs_alu: self-checking testbench of the ALU. Every cycle it applies eight
// random operands a..h and random sign-invert bits, and selects one of the
// nine results in rotation. The expected value of a result selected in cycle
// t is computed from the operands applied in cycle t - delay, with the delays
// of the ALU command table (dot4 19, dot2 14, mult4 18, mult2 9, div 27,
// rsq 2, slt 14 with e..h taken from cycle t - 9, int2float and float2int 6).
// A cycle with no select bit set must give 0. Each command must be checked
// at least 20 times.
module tb_vs_alu;
  import fp_ref_pkg::*;
  import vs_pkg::*;
  localparam int N = 1200;
  logic        clk = 1'b0;
  logic [31:0] opnd [NSRC];
  logic [NSRC-1:0] inv;
  alu_sel_t    sel;
  logic [31:0] result;
  logic [31:0] hist [N][NSRC];   // sign-adjusted operands per cycle
  int checks = 0, failures = 0;
  int per_cmd [10];

  vs_alu dut (.clk, .opnd, .inv, .sel, .result);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_of(int k, int t);
    logic [31:0] x[NSRC], y[NSRC], s;
    case (k)
      0: begin x = hist[t-19];
           return fadd(fadd(fmul(x[0], x[1]), fmul(x[2], x[3])),
                       fadd(fmul(x[4], x[5]), fmul(x[6], x[7]))); end
      1: begin x = hist[t-14]; return fadd(fmul(x[0], x[1]), fmul(x[2], x[3])); end
      2: begin x = hist[t-18]; return fmul(fmul(x[0], x[1]), fmul(x[2], x[3])); end
      3: begin x = hist[t-9];  return fmul(x[0], x[1]); end
      4: begin x = hist[t-27]; return fdiv(x[0], x[1]); end
      5: begin x = hist[t-2];  return 32'h5F37_59DF - (x[0] >> 1); end
      6: begin x = hist[t-14]; y = hist[t-9];
           s = fadd(fmul(x[0], x[1]), fmul(x[2], x[3]));
           return (f2r(s) < 0.0) ? fmul(y[4], y[5]) : fmul(y[6], y[7]); end
      7: begin x = hist[t-6];  return i2f(x[0]); end
      8: begin x = hist[t-6];  return f2i(x[0]); end
      default: return 32'd0;
    endcase
  endfunction

  function automatic alu_sel_t sel_of(int k);
    alu_sel_t s;
    s = '0;
    case (k)
      0: s.dot4 = 1'b1;   1: s.dot2 = 1'b1;   2: s.mult4 = 1'b1;
      3: s.mult2 = 1'b1;  4: s.div = 1'b1;    5: s.rsq = 1'b1;
      6: s.slt = 1'b1;    7: s.i2f = 1'b1;    8: s.f2i = 1'b1;
      default: ;
    endcase
    return s;
  endfunction

  initial begin
    int k;
    logic [31:0] want;
    for (int i = 0; i < 10; i++) per_cmd[i] = 0;
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      // result of the current cycle, combinational on the select input
      k   = (t < 30) ? 9 : (t % 10);
      sel = sel_of(k);
      for (int i = 0; i < NSRC; i++) begin
        opnd[i] = rand_f(118, 136);
        inv[i]  = 1'($urandom);
        hist[t][i] = {opnd[i][31] ^ inv[i], opnd[i][30:0]};
      end
      if (t % 7 == 0) begin     // integer-valued a for float2int, an integer for int2float
        opnd[0] = flt(real'($urandom_range(0, 4000)) - 2000.0);
        hist[t][0] = {opnd[0][31] ^ inv[0], opnd[0][30:0]};
      end
      if (t % 7 == 3) begin
        opnd[0] = 32'($urandom_range(1000, 32'h1000_0000));   // positive: a valid float too
        inv[0]  = 1'b0;
        hist[t][0] = opnd[0];
      end
      #1;
      if (t >= 30) begin
        want = expect_of(k, t);
        checks++;
        per_cmd[k]++;
        if (result !== want) begin
          failures++;
          if (failures < 10) $display("cycle %0d cmd %0d: got %h want %h", t, k, result, want);
        end
      end
    end
    for (int i = 0; i < 10; i++) if (per_cmd[i] < 20) begin
      failures++;
      $display("command %0d checked only %0d times", i, per_cmd[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
