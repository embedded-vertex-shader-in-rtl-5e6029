// tb_reg_array: self-checking testbench of the register array. For 3000
// cycles it issues a random write (to all copies) and eight independent random
// reads, one per copy, biased toward recently written addresses. Each copy's
// data must equal a shadow model one clock after the address, returning the
// old value when the same address is written on the same edge. The first
// reads check the zero initial contents.
module tb_reg_array;
  localparam int COPIES = 8, DEPTH = 512, AW = 9, N = 3000;
  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr;
  logic [31:0]   wdata;
  logic [AW-1:0] raddr [COPIES];
  logic [31:0]   rdata [COPIES];
  logic [31:0]   shadow [DEPTH];
  logic [31:0]   want [COPIES];
  logic [AW-1:0] last_w;
  int checks = 0, failures = 0, same_edge = 0;

  reg_array dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    last_w = '0;
    we = 1'b0; waddr = '0; wdata = '0;
    for (int c = 0; c < COPIES; c++) raddr[c] = '0;
    for (int t = 0; t <= N; t++) begin
      @(negedge clk);
      if (t > 0)
        for (int c = 0; c < COPIES; c++) begin
          checks++;
          if (rdata[c] !== want[c]) begin
            failures++;
            if (failures < 10) $display("t=%0d copy %0d addr %0d: got %h want %h",
                                        t, c, raddr[c], rdata[c], want[c]);
          end
        end
      we    = (t > 20) && ($urandom_range(0, 2) != 0);
      waddr = AW'($urandom);
      wdata = $urandom;
      for (int c = 0; c < COPIES; c++) begin
        raddr[c] = ($urandom_range(0, 1) == 0) ? last_w : AW'($urandom);
        if (c == 0 && t % 9 == 0) raddr[c] = waddr;
        want[c]  = shadow[raddr[c]];
        if (we && raddr[c] == waddr) same_edge++;
      end
      if (we) begin
        shadow[waddr] = wdata;
        last_w = waddr;
      end
    end
    if (same_edge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
