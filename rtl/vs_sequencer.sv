// vs_sequencer: the program counter and instruction register, the whole of
// the co-processor's control logic. A start pulse loads the PC with 0 and
// records the address of the last row; the PC then advances one row per
// clock (vertex shader 1.1 code has no jumps) until that row is fetched.
//
// Pipeline, one row per cycle:
//   F  pc -> instruction memory (registered read)
//   R  row -> eight source addresses -> register array (registered read)
//   E  operands and the row's control fields (inv, result select, dst/we,
//      out/oe) are at the ALU together
// So every field of a row acts in that row's E cycle. A result that row j
// writes to the register array can be a source of row j+2 or later. we and oe
// are held low outside a run. busy covers F, R and E of the last row; a start
// pulse while busy is ignored. The source addresses are plain slices of the
// fetched row; the instruction needs no decoding. The end-address register and this pipeline
// split are this design's choices; the document states only that the control
// is a program counter stepping a table of one row per cycle.
module vs_sequencer
  import vs_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IAW-1:0]  prog_last,
  output logic [IAW-1:0]  pc,
  input  logic [127:0]    instr,        // row at pc of the previous cycle
  output logic [AW-1:0]   src [NSRC],   // register array read addresses (R)
  output alu_ctrl_t       ctrl,         // control of the row in E
  output logic            busy
);
  logic            run, v_r, v_e;
  logic [IAW-1:0]  last_q;
  alu_ctrl_t       ctrl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      pc     <= '0;
      last_q <= '0;
      v_r    <= 1'b0;
      v_e    <= 1'b0;
      ctrl_q <= '0;
    end else begin
      if (start && !busy) begin
        run    <= 1'b1;
        pc     <= '0;
        last_q <= prog_last;
      end else if (run) begin
        if (pc == last_q) run <= 1'b0;
        else              pc  <= pc + 1'b1;
      end
      v_r    <= run;
      v_e    <= v_r;
      ctrl_q <= row_ctrl(instr);
    end
  end

  always_comb
    for (int k = 0; k < NSRC; k++) src[k] = row_src(instr, k);

  always_comb begin
    ctrl    = ctrl_q;
    ctrl.we = ctrl_q.we && v_e;
    ctrl.oe = ctrl_q.oe && v_e;
  end

  assign busy = run || v_r || v_e;
endmodule
