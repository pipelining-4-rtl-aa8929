// y86_pipe: five-stage pipelined Y86-64 processor (fetch, decode, execute, memory,
// writeback) that completes one instruction per cycle except around hazards.
//
// How hazards are handled:
//  - most data hazards are removed by forwarding into the end of decode
//    (fwd_select): results of execute, memory and writeback bypass the register file;
//  - a load followed by a use (mrmovq/popq, then an instruction reading the loaded
//    register) costs one stall cycle (hazard_ctl);
//  - conditional jumps are predicted taken; a wrong guess is seen when the jump is in
//    execute, the two wrongly fetched instructions are squashed into bubbles and fetch
//    restarts at the fall-through address (2 cycles lost);
//  - ret stalls fetch until the return address has been read in memory (3 cycles).
// Every pipeline register is a pipe_reg with stall (keep) and bubble (load no-op).
// Destination registers are decided in decode and carried down the pipeline, so the
// forwarding and stall logic compare register numbers only. Condition codes are set
// in execute by OPq, memory is written in the memory stage, registers in writeback.
// The hazard rules, the stage split and the PC update follow the slides; the
// instruction set encoding, status handling and memory layout are standard Y86-64
// choices (see the package and the submodules).
//
// Interface: clk, rst (synchronous, active high; PC restarts at 0, registers and
// condition codes clear, ZF=1). Program bytes are written through prog_we/addr/data
// before or during reset. stat is the status of the instruction in writeback; the
// processor stops when it is not AOK. dbg_reg/dbg_val read any register. The
// ev_* outputs pulse once per cycle in which a mechanism acts, retire pulses for
// each instruction other than nop/bubble that completes writeback.
module y86_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       prog_we,
  input  word_t      prog_addr,
  input  logic [7:0] prog_data,
  input  reg_id_t    dbg_reg,
  output word_t      dbg_val,
  output stat_t      stat,
  output logic       retire,
  output logic       ev_load_use,
  output logic       ev_mispredict,
  output logic       ev_ret_bubble,
  output logic [2:0] ev_fwdA,
  output logic [2:0] ev_fwdB
);

  // ---------------- control ----------------
  logic F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, set_cc_ok;

  // ---------------- fetch ----------------
  word_t       F_predPC, f_pc, f_predPC, f_valC, f_valP;
  logic [79:0] f_bytes;
  logic        imem_error;
  icode_t      f_icode;
  logic [3:0]  f_ifun;
  reg_id_t     f_rA, f_rB;
  stat_t       f_stat;

  d_reg_t D, d_in;
  e_reg_t E, e_in;
  m_reg_t M, m_in;
  w_reg_t W, w_in;

  pipe_reg #(.T(word_t), .DEFAULT('0)) u_F (
    .clk, .rst, .stall(F_stall), .bubble(1'b0), .d(f_predPC), .q(F_predPC));

  pc_select u_pcsel (
    .F_predPC, .M_icode(M.icode), .M_cnd(M.cnd), .M_valA(M.valA),
    .W_icode(W.icode), .W_valM(W.valM), .f_icode, .f_stat, .f_valC, .f_valP,
    .f_pc, .f_predPC);

  imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .pc(f_pc), .bytes_out(f_bytes), .imem_error);

  fetch_split u_split (
    .pc(f_pc), .bytes_in(f_bytes), .imem_error, .icode(f_icode), .ifun(f_ifun),
    .rA(f_rA), .rB(f_rB), .valC(f_valC), .valP(f_valP), .stat(f_stat));

  assign d_in = '{stat: f_stat, icode: f_icode, ifun: f_ifun, rA: f_rA, rB: f_rB,
                  valC: f_valC, valP: f_valP};

  pipe_reg #(.T(d_reg_t), .DEFAULT(D_BUBBLE)) u_D (
    .clk, .rst, .stall(D_stall), .bubble(D_bubble), .d(d_in), .q(D));

  // ---------------- decode ----------------
  reg_id_t d_srcA, d_srcB, d_dstE, d_dstM;
  word_t   d_rvalA, d_rvalB, d_valA, d_valB;
  reg_id_t e_dstE;
  word_t   e_valE, m_valM;
  logic [2:0] fwdA, fwdB;

  always_comb begin
    d_srcA = (D.icode inside {I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ}) ? D.rA :
             (D.icode inside {I_POPQ, I_RET})                      ? R_RSP : R_NONE;
    d_srcB = (D.icode inside {I_OPQ, I_RMMOVQ, I_MRMOVQ})          ? D.rB :
             (D.icode inside {I_PUSHQ, I_POPQ, I_CALL, I_RET})     ? R_RSP : R_NONE;
    d_dstE = (D.icode inside {I_RRMOVQ, I_IRMOVQ, I_OPQ})          ? D.rB :
             (D.icode inside {I_PUSHQ, I_POPQ, I_CALL, I_RET})     ? R_RSP : R_NONE;
    d_dstM = (D.icode inside {I_MRMOVQ, I_POPQ})                   ? D.rA : R_NONE;
  end

  regfile u_rf (
    .clk, .rst, .srcA(d_srcA), .srcB(d_srcB), .valA(d_rvalA), .valB(d_rvalB),
    .dstE(W.stat == S_AOK ? W.dstE : R_NONE), .valE(W.valE),
    .dstM(W.stat == S_AOK ? W.dstM : R_NONE), .valM(W.valM),
    .dbg_id(dbg_reg), .dbg_val);

  fwd_select u_fwd (
    .D_icode(D.icode), .D_valP(D.valP), .srcA(d_srcA), .srcB(d_srcB),
    .rvalA(d_rvalA), .rvalB(d_rvalB), .e_dstE, .e_valE, .M_dstM(M.dstM), .m_valM,
    .M_dstE(M.dstE), .M_valE(M.valE), .W_dstM(W.dstM), .W_valM(W.valM),
    .W_dstE(W.dstE), .W_valE(W.valE), .valA(d_valA), .valB(d_valB), .fwdA, .fwdB);

  assign e_in = '{stat: D.stat, icode: D.icode, ifun: D.ifun, valC: D.valC,
                  valA: d_valA, valB: d_valB, dstE: d_dstE, dstM: d_dstM};

  pipe_reg #(.T(e_reg_t), .DEFAULT(E_BUBBLE)) u_E (
    .clk, .rst, .stall(1'b0), .bubble(E_bubble), .d(e_in), .q(E));

  // ---------------- execute ----------------
  word_t      aluA, aluB;
  logic [3:0] alufun;
  cc_t        cc, cc_new;
  logic       e_cnd, set_cc;
  stat_t      m_stat;

  always_comb begin
    aluA = (E.icode inside {I_RRMOVQ, I_OPQ})              ? E.valA :
           (E.icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ}) ? E.valC :
           (E.icode inside {I_CALL, I_PUSHQ})              ? -64'sd8 :
           (E.icode inside {I_RET, I_POPQ})                ? 64'd8 : '0;
    aluB = (E.icode inside {I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL,
                            I_PUSHQ, I_RET, I_POPQ})       ? E.valB : '0;
    alufun = (E.icode == I_OPQ) ? E.ifun : A_ADD;
    set_cc = (E.icode == I_OPQ) && set_cc_ok;
  end

  y86_alu u_alu (.alufun, .aluA, .aluB, .valE(e_valE), .cc_new);

  always_ff @(posedge clk) begin
    if (rst)         cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc <= cc_new;
  end

  cond_eval u_cond (.ifun(E.ifun), .cc, .cnd(e_cnd));

  assign e_dstE = (E.icode == I_RRMOVQ && !e_cnd) ? R_NONE : E.dstE;

  assign m_in = '{stat: E.stat, icode: E.icode, cnd: e_cnd, valE: e_valE,
                  valA: E.valA, dstE: e_dstE, dstM: E.dstM};

  pipe_reg #(.T(m_reg_t), .DEFAULT(M_BUBBLE)) u_M (
    .clk, .rst, .stall(1'b0), .bubble(M_bubble), .d(m_in), .q(M));

  // ---------------- memory ----------------
  word_t mem_addr;
  logic  mem_read, mem_write, dmem_error;

  always_comb begin
    mem_addr  = (M.icode inside {I_POPQ, I_RET}) ? M.valA : M.valE;
    mem_read  = M.icode inside {I_MRMOVQ, I_POPQ, I_RET};
    mem_write = (M.icode inside {I_RMMOVQ, I_PUSHQ, I_CALL}) && (W.stat == S_AOK);
  end

  dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .rd(mem_read), .wr(mem_write), .addr(mem_addr), .wdata(M.valA),
    .rdata(m_valM), .dmem_error);

  assign m_stat = dmem_error ? S_ADR : M.stat;

  assign w_in = '{stat: m_stat, icode: M.icode, valE: M.valE, valM: m_valM,
                  dstE: M.dstE, dstM: M.dstM};

  pipe_reg #(.T(w_reg_t), .DEFAULT(W_BUBBLE)) u_W (
    .clk, .rst, .stall(W_stall), .bubble(1'b0), .d(w_in), .q(W));

  // ---------------- hazard control ----------------
  logic load_use, mispredict, ret_wait;

  hazard_ctl u_hz (
    .D_icode(D.icode), .d_srcA, .d_srcB, .E_icode(E.icode), .E_dstM(E.dstM),
    .e_cnd, .M_icode(M.icode), .m_stat, .W_stat(W.stat),
    .F_stall, .D_stall, .D_bubble, .E_bubble, .M_bubble, .W_stall, .set_cc_ok,
    .load_use, .mispredict, .ret_wait);

  // ---------------- status and events ----------------
  logic W_first;   // W holds a newly arrived instruction (not a held copy)
  always_ff @(posedge clk) W_first <= !rst && !W_stall;

  assign stat          = W.stat;
  assign retire        = W_first && (W.icode != I_NOP);
  assign ev_load_use   = load_use;
  assign ev_mispredict = mispredict;
  assign ev_ret_bubble = ret_wait && !load_use;
  assign ev_fwdA       = fwdA;
  assign ev_fwdB       = fwdB;

endmodule
