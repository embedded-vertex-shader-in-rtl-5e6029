// vs_pkg: types and constants shared by the vertex shader co-processor.
//
// The co-processor executes a pre-scheduled control table: one 128-bit row per
// clock cycle. A row is four 32-bit words cmd0..cmd3 (cmd0 in bits 31:0). Each
// word carries two 9-bit source addresses of the register array, and the
// remaining bits carry the destination address and write enable (cmd0), the
// output-RAM address and output enable (cmd1), the eight sign-invert bits
// (cmd0/cmd1, bits 31:28) and the one-hot selection of the ALU result
// (cmd2/cmd3, bits 31:27). Bit 0 of each word is taken as its LSB.
// The ALU delays below are those of the ALU command table; the adder delay is
// the difference between the dot2 and mult2 delays.
package vs_pkg;

  localparam int unsigned AW      = 9;    // register array / output RAM address
  localparam int unsigned IAW     = 9;    // instruction memory address
  localparam int unsigned NSRC    = 8;    // ALU inputs a..h

  localparam int unsigned DLY_MUL = 9;    // mult2
  localparam int unsigned DLY_ADD = 5;    // dot2 - mult2
  localparam int unsigned DLY_DIV = 27;
  localparam int unsigned DLY_RSQ = 2;
  localparam int unsigned DLY_CVT = 6;    // int2float, float2int
  localparam int unsigned SLT_REUSE = 5;  // e..h are needed again after 5 cycles

  // One-hot result select. Bit order matches the ALU mux inputs.
  typedef struct packed {
    logic dot4;
    logic mult4;
    logic i2f;
    logic f2i;
    logic dot2;
    logic mult2;
    logic slt;
    logic rsq;
    logic div;
  } alu_sel_t;

  // ALU-stage control derived from one instruction row.
  typedef struct packed {
    logic [NSRC-1:0] inv;   // inv7..inv0
    alu_sel_t        sel;
    logic [AW-1:0]   dst;
    logic            we;
    logic [AW-1:0]   out;
    logic            oe;
  } alu_ctrl_t;

  // Field positions inside one 32-bit command word.
  localparam int unsigned F_SRC_LO  = 0;
  localparam int unsigned F_SRC_HI  = 9;
  localparam int unsigned F_ADDR    = 18;
  localparam int unsigned F_FLAG    = 27;

  // FCM controller address spaces.
  typedef enum logic [1:0] {
    SP_REGS  = 2'd0,
    SP_INSTR = 2'd1,
    SP_OUT   = 2'd2,
    SP_CTRL  = 2'd3
  } fcm_space_e;

  localparam logic [4:0] CTRL_PAGE   = 5'd0;
  localparam logic [4:0] CTRL_START  = 5'd1;
  localparam logic [4:0] CTRL_STATUS = 5'd2;

  // Source address k (0..7) of an instruction row.
  function automatic logic [AW-1:0] row_src(input logic [127:0] row, input int k);
    logic [31:0] w;
    w = row[32*(k/2) +: 32];
    return (k % 2 == 0) ? w[F_SRC_LO +: AW] : w[F_SRC_HI +: AW];
  endfunction

  // ALU-stage control fields of an instruction row.
  function automatic alu_ctrl_t row_ctrl(input logic [127:0] row);
    alu_ctrl_t c;
    logic [31:0] c0, c1, c2, c3;
    {c3, c2, c1, c0} = row;
    c.inv       = {c1[31:28], c0[31:28]};
    c.dst       = c0[F_ADDR +: AW];
    c.we        = c0[F_FLAG];
    c.out       = c1[F_ADDR +: AW];
    c.oe        = c1[F_FLAG];
    c.sel.div   = c2[27];
    c.sel.rsq   = c2[28];
    c.sel.slt   = c2[29];
    c.sel.mult2 = c2[30];
    c.sel.dot2  = c2[31];
    c.sel.f2i   = c3[27];
    c.sel.i2f   = c3[28];
    c.sel.mult4 = c3[29];
    c.sel.dot4  = c3[30];
    return c;
  endfunction

endpackage
