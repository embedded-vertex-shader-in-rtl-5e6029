// tb_output_mem: self-checking testbench of output_mem (). For 3000 cycles
// it issues a random write and a random read, biased toward recently written
// addresses; the read data must equal a shadow model one clock after the
// address, with the old value when the same address is written on the same
// edge. The first reads check the zero initial contents.
module tb_output_mem;
  localparam int DEPTH = 512, AW = 9, W = 32, N = 3000;
  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata, want;
  logic [W-1:0]  shadow [DEPTH];
  logic [AW-1:0] last_w;
  int checks = 0, failures = 0;

  output_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    last_w = '0;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int t = 0; t <= N; t++) begin
      @(negedge clk);
      if (t > 0) begin
        checks++;
        if (rdata !== want) begin
          failures++;
          if (failures < 10) $display("t=%0d addr %0d: got %h want %h", t, raddr, rdata, want);
        end
      end
      we    = (t > 20) && ($urandom_range(0, 2) != 0);
      waddr = AW'($urandom);
      wdata = rand_word();
      raddr = ($urandom_range(0, 1) == 0) ? last_w : AW'($urandom);
      if (t % 9 == 0) raddr = waddr;
      want  = shadow[raddr];
      if (we) begin
        shadow[waddr] = wdata;
        last_w = waddr;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
