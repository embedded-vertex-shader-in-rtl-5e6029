// fcm_controller: the CPU side of the co-processor.
//
// The CPU issues one transfer at a time with a single-cycle req pulse and
// waits for the single-cycle ack. A transfer names an address space, a 5-bit
// address (the FCM load/store instructions carry only five address bits) and,
// for writes, a 128-bit word. A page register extends the 5-bit address:
//   space 0  register array  write a 4D vector at vector {page[1:0], addr}
//   space 1  instructions    write one 128-bit row at {page[3:0], addr}
//   space 2  output RAM      read a 4D vector at vector {page[1:0], addr}
//   space 3  control         addr 0: write page; addr 1: start a run, last row
//                            in wdata[8:0]; addr 2: read busy in rdata[0]
// A 4D vector is four scalars at scalar addresses {vector, 0..3}, component x
// (wdata[31:0]) lowest. The memories take one scalar per cycle, so a vector
// write takes four cycles and a vector read five. Writes to the register
// array wait while a program runs, because the ALU owns its write port then.
// The 5-bit address and the small page register are the document's; the
// req/ack bus, the space codes, the 4-bit page width (the document's 2 bits
// reach only 128 of the 512 instruction rows) and the control addresses are
// this design's choices.
module fcm_controller
  import vs_pkg::*;
#(
  parameter int unsigned PAGE_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // CPU side
  input  logic             req,
  input  logic             wr,
  input  fcm_space_e       space,
  input  logic [4:0]       addr,
  input  logic [127:0]     wdata,
  output logic             ack,
  output logic [127:0]     rdata,
  // register array write port (used while idle)
  output logic             reg_we,
  output logic [AW-1:0]    reg_waddr,
  output logic [31:0]      reg_wdata,
  // instruction memory write port
  output logic             imem_we,
  output logic [IAW-1:0]   imem_waddr,
  output logic [127:0]     imem_wdata,
  // output RAM read port
  output logic [AW-1:0]    omem_raddr,
  input  logic [31:0]      omem_rdata,
  // sequencer
  output logic             start,
  output logic [IAW-1:0]   prog_last,
  input  logic             busy
);
  typedef enum logic [1:0] {S_IDLE, S_REGWR, S_OUTRD} state_e;

  state_e             state;
  logic [PAGE_W-1:0]  page;
  logic [6:0]         vec;       // 4D vector index in the data spaces
  logic [2:0]         beat;
  logic [127:0]       wbuf;

  assign reg_we     = (state == S_REGWR) && !busy;
  assign reg_waddr  = {vec, beat[1:0]};
  assign reg_wdata  = wbuf[32*beat[1:0] +: 32];
  assign omem_raddr = {vec, beat[1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      page       <= '0;
      vec        <= '0;
      beat       <= '0;
      wbuf       <= '0;
      ack        <= 1'b0;
      rdata      <= '0;
      imem_we    <= 1'b0;
      imem_waddr <= '0;
      imem_wdata <= '0;
      start      <= 1'b0;
      prog_last  <= '0;
    end else begin
      ack     <= 1'b0;
      imem_we <= 1'b0;
      start   <= 1'b0;
      case (state)
        S_IDLE: if (req) begin
          vec  <= {page[1:0], addr};
          beat <= '0;
          wbuf <= wdata;
          unique case (space)
            SP_REGS: if (wr) state <= S_REGWR;
                     else    ack   <= 1'b1;
            SP_INSTR: begin
              imem_we    <= wr;
              imem_waddr <= IAW'({page, addr});
              imem_wdata <= wdata;
              ack        <= 1'b1;
            end
            SP_OUT: if (!wr) state <= S_OUTRD;
                    else     ack   <= 1'b1;
            SP_CTRL: begin
              ack <= 1'b1;
              if (wr && addr == CTRL_PAGE) page <= wdata[PAGE_W-1:0];
              if (wr && addr == CTRL_START) begin
                start     <= 1'b1;
                prog_last <= wdata[IAW-1:0];
              end
              if (!wr && addr == CTRL_STATUS) rdata <= {127'd0, busy};
            end
          endcase
        end
        S_REGWR: if (!busy) begin
          beat <= beat + 1'b1;
          if (beat == 3'd3) begin
            state <= S_IDLE;
            ack   <= 1'b1;
          end
        end
        S_OUTRD: begin
          beat <= beat + 1'b1;
          if (beat != 3'd0) rdata[32*int'(2'(beat - 3'd1)) +: 32] <= omem_rdata;
          if (beat == 3'd4) begin
            state <= S_IDLE;
            ack   <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The CPU must wait for ack before the next request.
  a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
                                    req |-> state == S_IDLE);
endmodule
