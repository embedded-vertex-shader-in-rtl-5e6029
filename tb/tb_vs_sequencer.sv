// tb_vs_sequencer: self-checking testbench of the program counter and
// instruction register. A behavioural instruction memory (registered read)
// holds random rows. After a start pulse with last row L the testbench checks
// cycle by cycle that the PC counts 0..L, that the source addresses of row k
// appear one cycle after row k is fetched, that its control fields (inv,
// select, dst/we, out/oe, decoded here directly from the bit positions of the
// instruction format) appear one cycle after that, that busy lasts exactly
// L + 3 cycles, that a start pulse while busy is ignored and that we/oe stay
// low outside a run. Three runs of different lengths are made.
module tb_vs_sequencer;
  import vs_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [IAW-1:0]  prog_last, pc;
  logic [127:0]    instr;
  logic [AW-1:0]   src [NSRC];
  alu_ctrl_t       ctrl;
  logic            busy;
  logic [127:0]    rows [512];
  int checks = 0, failures = 0;

  vs_sequencer dut (.clk, .rst_n, .start, .prog_last, .pc, .instr, .src, .ctrl, .busy);

  always #5 clk = ~clk;
  always_ff @(posedge clk) instr <= rows[pc];

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%t: %s", $time, what);
    end
  endtask

  task automatic run(input int last);
    int busy_cycles;
    logic [31:0] w [4];
    @(negedge clk);
    prog_last = IAW'(last);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    busy_cycles = 0;
    for (int c = 1; c <= last + 6; c++) begin
      // c = cycles since the start edge, sampled before the next edge
      if (c == 3) start = 1'b1;                 // ignored: busy
      if (c == 4) start = 1'b0;
      if (busy) busy_cycles++;
      if (c >= 1 && c <= last + 1)
        check(pc == IAW'(c - 1), $sformatf("pc=%0d want %0d", pc, c - 1));
      if (c >= 2 && c <= last + 2) begin
        {w[3], w[2], w[1], w[0]} = rows[c - 2];
        for (int k = 0; k < 8; k++)
          check(src[k] == ((k % 2 == 0) ? w[k/2][8:0] : w[k/2][17:9]),
                $sformatf("row %0d src%0d", c - 2, k));
      end
      if (c >= 3 && c <= last + 3) begin
        {w[3], w[2], w[1], w[0]} = rows[c - 3];
        check(ctrl.dst == w[0][26:18] && ctrl.we == w[0][27] &&
              ctrl.out == w[1][26:18] && ctrl.oe == w[1][27] &&
              ctrl.inv == {w[1][31:28], w[0][31:28]} &&
              {ctrl.sel.dot2, ctrl.sel.mult2, ctrl.sel.slt, ctrl.sel.rsq, ctrl.sel.div} == w[2][31:27] &&
              {ctrl.sel.dot4, ctrl.sel.mult4, ctrl.sel.i2f, ctrl.sel.f2i} == w[3][30:27],
              $sformatf("row %0d control", c - 3));
      end
      if (c > last + 3) check(!busy && !ctrl.we && !ctrl.oe, "idle after the run");
      @(negedge clk);
    end
    check(busy_cycles == last + 3, $sformatf("busy for %0d cycles, want %0d", busy_cycles, last + 3));
  endtask

  initial begin
    for (int i = 0; i < 512; i++) rows[i] = {$urandom, $urandom, $urandom, $urandom};
    rows[0][27] = 1'b1;    // a row with we set
    prog_last = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) begin
      @(negedge clk);
      check(!busy && !ctrl.we && !ctrl.oe, "idle before start");
    end
    run(0);
    run(40);
    run(511);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
