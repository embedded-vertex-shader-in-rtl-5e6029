// instr_mem: the instruction memory, DEPTH rows of IW bits (512 rows of 128
// bits). The FCM controller writes rows through the write port while the
// program counter reads one row per cycle through the read port; read data is
// registered (one clock after the address), as in a BlockRAM. The sizes are
// the document's; zero initial contents are this design's choice.
module instr_mem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned IW    = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);
  logic [IW-1:0] mem [DEPTH];
  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
