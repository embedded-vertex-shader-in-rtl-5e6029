// reg_array: the register array. COPIES identical simple-dual-port memories of
// DEPTH 32-bit scalars (eight 512-entry BlockRAMs, 128 4D vectors). Every
// write is sent to all copies so that they always hold the same data; each
// copy has its own read address, so the array delivers eight different
// scalars per cycle, one for each ALU input a..h. Reads are registered: data
// appears one clock after the address. A read and a write of the same address
// on one edge return the old value. The duplication and sizes follow the
// document; the read-during-write behaviour and the zero initial contents
// (as configured BlockRAM has) are this design's choice.
module reg_array #(
  parameter int unsigned COPIES = 8,
  parameter int unsigned DEPTH  = 512,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr [COPIES],
  output logic [31:0]   rdata [COPIES]
);
  for (genvar c = 0; c < COPIES; c++) begin : g_copy
    logic [31:0] mem [DEPTH];
    initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
      rdata[c] <= mem[raddr[c]];
    end
  end
endmodule
