// vertex_shader_top: the vertex shader co-processor.
//
// A host CPU loads a pre-scheduled control table into the instruction memory
// and vertex data and constants into the register array through the FCM
// controller, starts a run, and later reads the results from the output RAM.
// During a run the sequencer steps through the table one row per clock; each
// row reads eight scalars from the eight register-array copies into the ALU
// inputs a..h, and selects which of the nine ALU results of earlier rows is
// written back to the register array (dst/we) and/or to the output RAM
// (out/oe). All scheduling, including the latency of every ALU command and the
// interleaving of several vertices (threads), is in the table itself.
//
// The register array's single write port is a multiplexer: the ALU owns it
// while a run is busy, the FCM controller while idle. Everything else is
// wired point to point as in the block diagram of the co-processor.
//
// CPU bus timing: see fcm_controller (req pulse, ack pulse).
module vertex_shader_top
  import vs_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cpu_req,
  input  logic         cpu_wr,
  input  fcm_space_e   cpu_space,
  input  logic [4:0]   cpu_addr,
  input  logic [127:0] cpu_wdata,
  output logic         cpu_ack,
  output logic [127:0] cpu_rdata,
  output logic         busy
);
  logic            fcm_reg_we, imem_we, start;
  logic [AW-1:0]   fcm_reg_waddr, omem_raddr;
  logic [31:0]     fcm_reg_wdata, omem_rdata, alu_result;
  logic [IAW-1:0]  imem_waddr, prog_last, pc;
  logic [127:0]    imem_wdata, row;
  logic [AW-1:0]   src [NSRC];
  logic [31:0]     opnd [NSRC];
  alu_ctrl_t       ctrl;
  logic            rf_we;
  logic [AW-1:0]   rf_waddr;
  logic [31:0]     rf_wdata;

  fcm_controller u_fcm (
    .clk, .rst_n,
    .req(cpu_req), .wr(cpu_wr), .space(cpu_space), .addr(cpu_addr),
    .wdata(cpu_wdata), .ack(cpu_ack), .rdata(cpu_rdata),
    .reg_we(fcm_reg_we), .reg_waddr(fcm_reg_waddr), .reg_wdata(fcm_reg_wdata),
    .imem_we, .imem_waddr, .imem_wdata,
    .omem_raddr, .omem_rdata,
    .start, .prog_last, .busy
  );

  instr_mem u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .raddr(pc), .rdata(row)
  );

  vs_sequencer u_seq (
    .clk, .rst_n, .start, .prog_last, .pc, .instr(row), .src, .ctrl, .busy
  );

  // Register array write port: ALU during a run, CPU otherwise.
  always_comb begin
    if (busy) begin
      rf_we    = ctrl.we;
      rf_waddr = ctrl.dst;
      rf_wdata = alu_result;
    end else begin
      rf_we    = fcm_reg_we;
      rf_waddr = fcm_reg_waddr;
      rf_wdata = fcm_reg_wdata;
    end
  end

  reg_array u_regs (
    .clk, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr(src), .rdata(opnd)
  );

  vs_alu u_alu (
    .clk, .opnd, .inv(ctrl.inv), .sel(ctrl.sel), .result(alu_result)
  );

  output_mem u_omem (
    .clk, .we(ctrl.oe), .waddr(ctrl.out), .wdata(alu_result),
    .raddr(omem_raddr), .rdata(omem_rdata)
  );
endmodule
