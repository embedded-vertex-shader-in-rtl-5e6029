// tb_fp_add: self-checking testbench of fp_add. Feeds one random operand set per
// cycle for N cycles, then checks that the result of operand set i appears
// exactly 5 cycles after it was applied and equals the reference model,
// bit for bit. Directed operands cover zero and exact cases.
module tb_fp_add;
  import fp_ref_pkg::*;
  localparam int LAT = 5;
  localparam int N   = 400;
  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  logic [31:0] in_a [N], in_b [N], exp_y [N];
  int checks = 0, failures = 0, cyc = 0;

  fp_add #(.LAT(LAT)) dut (.clk, .a, .b, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (N + LAT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      in_a[i] = rand_f(110, 140);
      in_b[i] = rand_f(110, 140);
    end
    in_a[0] = flt(2.5); in_b[0] = flt(-2.5); in_a[1] = flt(1.0); in_b[1] = flt(1.0); in_a[2] = flt(1.0); in_b[2] = 32'h3380_0000;
    for (int i = 3; i < 60; i++) in_b[i] = {~in_a[i][31], in_a[i][30:23], 23'($urandom)};
    for (int i = 0; i < N; i++) exp_y[i] = fadd(in_a[i], in_b[i]);
    a = 32'd0; b = 32'd0;
    for (int i = 0; i < N + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        checks++;
        if (y !== exp_y[i-LAT]) begin
          failures++;
          if (failures < 10) $display("mismatch set %0d: a=%h b=%h got %h want %h",
                                      i-LAT, in_a[i-LAT], in_b[i-LAT], y, exp_y[i-LAT]);
        end
      end
      if (i < N) begin a = in_a[i]; b = in_b[i]; end
      else           begin a = 32'd0;     b = 32'd0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
