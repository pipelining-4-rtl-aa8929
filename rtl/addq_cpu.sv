// addq_cpu: the four-stage "addq processor" used to introduce data hazards.
//
// Every instruction is taken to be addq rA, rB (R[rB] <= R[rA] + R[rB]), two bytes
// long: byte 0 the opcode (ignored), byte 1 rA in bits 7:4 and rB in bits 3:0.
// Stages and pipeline registers, as in the figures:
//   fetch     PC, instruction memory, split, PC + 2
//   fetch/decode register:      rA, rB
//   decode    register file read R[srcA], R[srcB] (srcA = rA, srcB = rB, dstE = rB)
//   decode/execute register:    R[srcA], R[srcB], dstE
//   execute   ADD
//   execute/writeback register: next R[dstE], dstE
//   writeback register file write through the dstE port (the dstM port carries
//             only the register preload below)
// The register file is written at the end of the writeback cycle and read
// combinationally, so an instruction reading a register the instruction ahead
// of it writes would get the old value. Two cures, chosen by FORWARDING:
//   FORWARDING = 0: stalling. While the instruction being fetched reads a register
//     that the instruction in decode or in execute will write, the PC is held and a
//     no-op (rA = rB = 0xF) is put into the fetch/decode register. A dependent addq
//     right behind its producer therefore waits two cycles.
//   FORWARDING = 1 (default): no stalls; the decode stage takes a source value from
//     the ADD output (producer in execute) or from the execute/writeback register
//     (producer in writeback) instead of the register file.
// Both variants, their cycle tables and the forwarding paths follow the slides; the
// instruction byte layout, reset values and the register preload port are this
// design's own. init_we/init_reg/init_val write a register (through the otherwise
// unused dstM port) so that a test can set R[8] = 800 and so on; the register file
// is not cleared by rst, so it can be preloaded while rst holds the pipeline.
// rst (synchronous) sets the PC to 0 and fills the pipeline registers with no-ops.
// Outputs: the pipeline register contents, for comparison with the slides' tables.
// The PC only ever advances by 2 from 0, so its bit 0 is constant 0.
// The instruction memory is the same ten-byte-wide one the Y86-64 pipeline uses;
// only byte 1 (rA:rB) of what it returns is needed here.
module addq_cpu
  import y86_pkg::*;
#(
  parameter bit          FORWARDING = 1'b1,
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       prog_we,
  input  word_t      prog_addr,
  input  logic [7:0] prog_data,
  input  logic       init_we,
  input  reg_id_t    init_reg,
  input  word_t      init_val,
  input  reg_id_t    dbg_reg,
  output word_t      dbg_val,
  output word_t      pc,
  output logic       stall,
  output reg_id_t    D_rA,
  output reg_id_t    D_rB,
  output word_t      E_valA,
  output word_t      E_valB,
  output reg_id_t    E_dstE,
  output word_t      W_valE,
  output reg_id_t    W_dstE,
  output logic [1:0] fwd_used   // bit 0: from execute, bit 1: from writeback
);

  typedef struct packed {
    reg_id_t rA;
    reg_id_t rB;
  } fd_t;

  typedef struct packed {
    word_t   valA;
    word_t   valB;
    reg_id_t dstE;
  } de_t;

  typedef struct packed {
    word_t   valE;
    reg_id_t dstE;
  } ew_t;

  localparam fd_t FD_NOP = '{rA: R_NONE, rB: R_NONE};
  localparam de_t DE_NOP = '{valA: '0, valB: '0, dstE: R_NONE};
  localparam ew_t EW_NOP = '{valE: '0, dstE: R_NONE};

  fd_t   fd, fd_in;
  de_t   de, de_in;
  ew_t   ew, ew_in;
  word_t pc_next;

  // ---------------- fetch ----------------
  logic [79:0] ibytes;
  logic        imem_error;
  reg_id_t     f_rA, f_rB;

  imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .pc, .bytes_out(ibytes), .imem_error);

  assign f_rA = imem_error ? R_NONE : ibytes[15:12];
  assign f_rB = imem_error ? R_NONE : ibytes[11:8];

  // hazard: fetched instruction reads what decode or execute will write
  function automatic logic reads(reg_id_t a, reg_id_t b, reg_id_t dst);
    return (dst != R_NONE) && (a == dst || b == dst);
  endfunction

  assign stall   = !FORWARDING && (reads(f_rA, f_rB, fd.rB) || reads(f_rA, f_rB, de.dstE));
  assign pc_next = stall ? pc : pc + 64'd2;
  assign fd_in   = '{rA: f_rA, rB: f_rB};

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

  pipe_reg #(.T(fd_t), .DEFAULT(FD_NOP)) u_fd (
    .clk, .rst, .stall(1'b0), .bubble(stall), .d(fd_in), .q(fd));

  // ---------------- decode ----------------
  word_t rvalA, rvalB, d_valA, d_valB, e_valE;

  regfile u_rf (
    .clk, .rst(1'b0), .srcA(fd.rA), .srcB(fd.rB), .valA(rvalA), .valB(rvalB),
    .dstE(ew.dstE), .valE(ew.valE),
    .dstM(init_we ? init_reg : R_NONE), .valM(init_val),
    .dbg_id(dbg_reg), .dbg_val);

  always_comb begin
    d_valA   = rvalA;
    d_valB   = rvalB;
    fwd_used = '0;
    if (FORWARDING) begin
      if (fd.rA != R_NONE && fd.rA == de.dstE) begin
        d_valA = e_valE;  fwd_used[0] = 1'b1;
      end else if (fd.rA != R_NONE && fd.rA == ew.dstE) begin
        d_valA = ew.valE; fwd_used[1] = 1'b1;
      end
      if (fd.rB != R_NONE && fd.rB == de.dstE) begin
        d_valB = e_valE;  fwd_used[0] = 1'b1;
      end else if (fd.rB != R_NONE && fd.rB == ew.dstE) begin
        d_valB = ew.valE; fwd_used[1] = 1'b1;
      end
    end
  end

  assign de_in = '{valA: d_valA, valB: d_valB, dstE: fd.rB};

  pipe_reg #(.T(de_t), .DEFAULT(DE_NOP)) u_de (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(de_in), .q(de));

  // ---------------- execute ----------------
  assign e_valE = de.valA + de.valB;
  assign ew_in  = '{valE: e_valE, dstE: de.dstE};

  pipe_reg #(.T(ew_t), .DEFAULT(EW_NOP)) u_ew (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(ew_in), .q(ew));

  // ---------------- observation ----------------
  assign D_rA   = fd.rA;
  assign D_rB   = fd.rB;
  assign E_valA = de.valA;
  assign E_valB = de.valB;
  assign E_dstE = de.dstE;
  assign W_valE = ew.valE;
  assign W_dstE = ew.dstE;

endmodule
