// output_mem: the output RAM, DEPTH 32-bit scalars. The ALU writes its result
// at the instruction's out address when oe is set; the FCM controller reads
// results back through the second port (registered, one clock after the
// address). It is addressed independently of the register array, so results
// can be placed anywhere, and the register array needs no read-address mux for
// the CPU. DEPTH = 512 follows from the 9-bit out field; the document gives no
// size. Zero initial contents are this design's choice.
module output_mem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];
  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
