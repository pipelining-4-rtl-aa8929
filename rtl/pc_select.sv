// pc_select: the PC update logic of the Y86-64 pipeline.
//
// The PC register holds a prediction (predPC). At the start of fetch the actual PC
// is chosen: the fall-through address of a conditional jump that turned out not
// taken (the jump's valP, carried in M_valA while the jump is in the memory stage),
// else the return address of a ret that has just read it (W_valM while the ret is in
// writeback), else the prediction. The next prediction is then valC for call and
// every jXX (jumps are predicted taken), valP (PC + instruction length) otherwise,
// and the PC itself when the fetched instruction is halt or faulty, so that fetch
// repeats. Holding the PC during a stall is done by the register's stall input.
// The five cases (instruction length, immediate, repeat, misprediction correction,
// ret correction) and correcting at the start of fetch follow the slides; the halt
// rule is their "repeat previous PC for stalls (... halt ...)". Combinational.
module pc_select
  import y86_pkg::*;
(
  input  word_t  F_predPC,
  input  icode_t M_icode,
  input  logic   M_cnd,
  input  word_t  M_valA,
  input  icode_t W_icode,
  input  word_t  W_valM,
  input  icode_t f_icode,
  input  stat_t  f_stat,
  input  word_t  f_valC,
  input  word_t  f_valP,
  output word_t  f_pc,
  output word_t  f_predPC
);

  logic corr_mispredict, corr_ret;

  assign corr_mispredict = (M_icode == I_JXX) && !M_cnd;
  assign corr_ret        = (W_icode == I_RET);

  always_comb begin
    if (corr_mispredict) f_pc = M_valA;
    else if (corr_ret)   f_pc = W_valM;
    else                 f_pc = F_predPC;

    if (f_stat != S_AOK)                      f_predPC = f_pc;
    else if (f_icode inside {I_JXX, I_CALL})  f_predPC = f_valC;
    else                                      f_predPC = f_valP;
  end

endmodule
