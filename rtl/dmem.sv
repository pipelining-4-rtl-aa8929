// dmem: data memory of the Y86-64 pipeline, used by the memory stage.
//
// A byte array holding 64-bit little-endian words at any byte address. Reads are
// combinational (the memory stage produces valM in the same cycle); a write of eight
// bytes happens at the rising clock edge. dmem_error is raised, and nothing is
// written, when the eight bytes do not all lie inside the array. The slides place
// memory writes in the memory stage and name the memory; size and the separate
// instruction and data arrays are this design's own choice.
module dmem
  import y86_pkg::*;
#(
  parameter int unsigned BYTES = 1024
) (
  input  logic  clk,
  input  logic  rd,
  input  logic  wr,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata,
  output logic  dmem_error
);

  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];
  logic       oob;

  assign oob        = (addr > word_t'(BYTES) - 64'd8);
  assign dmem_error = (rd || wr) && oob;

  always_ff @(posedge clk)
    if (wr && !oob)
      for (int i = 0; i < 8; i++) mem[addr[AW-1:0] + AW'(i)] <= wdata[8*i +: 8];

  always_comb
    for (int i = 0; i < 8; i++)
      rdata[8*i +: 8] = (rd && !oob) ? mem[addr[AW-1:0] + AW'(i)] : 8'h00;

endmodule
