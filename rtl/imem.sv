// imem: instruction memory of the Y86-64 pipeline.
//
// A byte array read combinationally: the fetch stage presents a PC and gets the ten
// bytes starting there (the longest Y86-64 instruction is ten bytes), byte 0 in
// bits 7:0. imem_error is raised when the ten bytes do not all lie inside the array.
// A byte-wide write port, clocked, loads the program. The slides show the memory
// only as a box ("Instr. Mem."); its size and the load port are this design's own.
module imem
  import y86_pkg::*;
#(
  parameter int unsigned BYTES = 1024
) (
  input  logic        clk,
  input  logic        we,
  input  word_t       waddr,
  input  logic [7:0]  wdata,
  input  word_t       pc,
  output logic [79:0] bytes_out,
  output logic        imem_error
);

  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk)
    if (we && waddr < word_t'(BYTES)) mem[waddr[AW-1:0]] <= wdata;

  always_comb begin
    imem_error = (pc > word_t'(BYTES) - 64'd10);
    for (int i = 0; i < 10; i++) begin
      if (imem_error) bytes_out[8*i +: 8] = 8'h00;
      else            bytes_out[8*i +: 8] = mem[pc[AW-1:0] + AW'(i)];
    end
  end

endmodule
