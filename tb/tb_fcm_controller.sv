// tb_fcm_controller: self-checking testbench of the CPU-side controller.
// Behavioural models stand for the register array (records writes), the
// instruction memory (records writes) and the output RAM (random contents,
// registered read). The testbench issues transfers as the CPU would (a req
// pulse, then wait for ack) and checks: 4D-vector writes land at scalar
// addresses {page[1:0], addr, 0..3} in four cycles, instruction rows at
// {page, addr}, 4D-vector reads return the four scalars in five cycles, a
// start command pulses start once with the last-row address, the status read
// returns busy, and a register write issued while busy waits for idle.
module tb_fcm_controller;
  import vs_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0;
  logic            req = 1'b0, wr = 1'b0;
  fcm_space_e      space = SP_REGS;
  logic [4:0]      addr = '0;
  logic [127:0]    wdata = '0, rdata;
  logic            ack;
  logic            reg_we, imem_we, start, busy = 1'b0;
  logic [AW-1:0]   reg_waddr, omem_raddr;
  logic [31:0]     reg_wdata, omem_rdata;
  logic [IAW-1:0]  imem_waddr, prog_last;
  logic [127:0]    imem_wdata;

  logic [31:0]     regs [512], omem [512];
  logic [127:0]    imem [512];
  int              reg_writes = 0, starts = 0, writes_while_busy = 0;
  int checks = 0, failures = 0;

  fcm_controller dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    omem_rdata <= omem[omem_raddr];
    if (reg_we) begin
      regs[reg_waddr] <= reg_wdata;
      reg_writes <= reg_writes + 1;
      if (busy) writes_while_busy <= writes_while_busy + 1;
    end
    if (imem_we) imem[imem_waddr] <= imem_wdata;
    if (start) starts <= starts + 1;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // One transfer; returns the read data and the cycles from req to ack.
  task automatic xfer(input bit w, input fcm_space_e sp, input logic [4:0] a,
                      input logic [127:0] d, output logic [127:0] q, output int cyc);
    @(negedge clk);
    req = 1'b1; wr = w; space = sp; addr = a; wdata = d;
    @(negedge clk);
    req = 1'b0; wdata = '0;
    cyc = 1;
    while (!ack) begin
      @(negedge clk);
      cyc++;
    end
    q = rdata;
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [127:0] q, d;
    logic [3:0]   page;
    int           cyc, n0;
    for (int i = 0; i < 512; i++) begin
      regs[i] = '0; omem[i] = $urandom; imem[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Random vector writes and reads over all pages.
    for (int n = 0; n < 200; n++) begin
      page = 4'($urandom);
      xfer(1'b1, SP_CTRL, CTRL_PAGE, 128'(page), q, cyc);
      addr = 5'($urandom);
      d = rnd128();
      case ($urandom_range(0, 2))
        0: begin
          xfer(1'b1, SP_REGS, addr, d, q, cyc);
          check(cyc == 5, $sformatf("vector write took %0d cycles", cyc));
          for (int k = 0; k < 4; k++)
            check(regs[{page[1:0], addr, 2'(k)}] == d[32*k +: 32],
                  $sformatf("register %0d", {page[1:0], addr, 2'(k)}));
        end
        1: begin
          xfer(1'b1, SP_INSTR, addr, d, q, cyc);
          @(negedge clk);
          check(imem[{page, addr}] == d, $sformatf("instruction row %0d", {page, addr}));
        end
        default: begin
          xfer(1'b0, SP_OUT, addr, '0, q, cyc);
          check(cyc == 6, $sformatf("vector read took %0d cycles", cyc));
          for (int k = 0; k < 4; k++)
            check(q[32*k +: 32] == omem[{page[1:0], addr, 2'(k)}],
                  $sformatf("output %0d", {page[1:0], addr, 2'(k)}));
        end
      endcase
    end

    // Start and status.
    n0 = starts;
    xfer(1'b1, SP_CTRL, CTRL_START, 128'(9'd123), q, cyc);
    @(negedge clk);
    check(starts == n0 + 1 && prog_last == 9'd123, "start pulse and last row");
    busy = 1'b1;
    xfer(1'b0, SP_CTRL, CTRL_STATUS, '0, q, cyc);
    check(q[0] == 1'b1, "status shows busy");

    // A register write while busy waits until the run ends.
    xfer(1'b1, SP_CTRL, CTRL_PAGE, 128'd1, q, cyc);
    d = rnd128();
    fork
      xfer(1'b1, SP_REGS, 5'd9, d, q, cyc);
      begin
        repeat (20) @(negedge clk);
        busy = 1'b0;
      end
    join
    check(cyc == 23, $sformatf("write while busy acknowledged after %0d cycles", cyc));
    check(writes_while_busy == 0, "no register write while busy");
    for (int k = 0; k < 4; k++)
      check(regs[{2'd1, 5'd9, 2'(k)}] == d[32*k +: 32], "held write landed");
    xfer(1'b0, SP_CTRL, CTRL_STATUS, '0, q, cyc);
    check(q[0] == 1'b0, "status shows idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
