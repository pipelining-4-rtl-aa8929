// regfile: the register file of the Y86-64 and addq pipelines.
//
// Fifteen 64-bit registers (numbers 0..14); number 0xF names no register, reads as
// zero and is never written. Two combinational read ports (srcA, srcB) serve the
// decode stage; two write ports (dstE for ALU results, dstM for memory results)
// are written at the rising clock edge by the writeback stage, as the figures show
// (srcA, srcB, dstM, dstE, next R[dstE], next R[dstM]). When both write ports name
// the same register the dstM value wins (the standard Y86-64 rule for popq %rsp).
// A read in the same cycle as a write to that register returns the old value: the
// slides state that the register written during cycle 3 is read during cycle 4.
// Reset clears all registers (own choice). A debug read port lets a testbench or
// the top observe any register.
module regfile
  import y86_pkg::*;
#(
  parameter int unsigned NREGS = 15
) (
  input  logic    clk,
  input  logic    rst,
  input  reg_id_t srcA,
  input  reg_id_t srcB,
  output word_t   valA,
  output word_t   valB,
  input  reg_id_t dstE,
  input  word_t   valE,
  input  reg_id_t dstM,
  input  word_t   valM,
  input  reg_id_t dbg_id,
  output word_t   dbg_val
);

  word_t r [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else begin
      if (int'(dstE) < NREGS) r[dstE] <= valE;
      if (int'(dstM) < NREGS) r[dstM] <= valM;
    end
  end

  assign valA    = (int'(srcA)   < NREGS) ? r[srcA]   : '0;
  assign valB    = (int'(srcB)   < NREGS) ? r[srcB]   : '0;
  assign dbg_val = (int'(dbg_id) < NREGS) ? r[dbg_id] : '0;

endmodule
