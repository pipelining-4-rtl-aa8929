// hazard_ctl: stall and bubble control of the Y86-64 pipeline.
//
// Produces the stall and bubble inputs of the five pipeline registers from the
// instructions in flight:
//  - load/use hazard: an mrmovq or popq in execute loads a register that the
//    instruction in decode reads. Fetch and decode repeat (stall F and D) and a
//    bubble goes into execute: one cycle lost.
//  - misprediction: a jXX in execute finds it is not taken. The two instructions
//    fetched behind it are squashed (bubble D and E) and fetch is corrected next
//    cycle from the memory stage.
//  - ret: while a ret is in decode, execute or memory, fetch waits (stall F) and
//    bubbles enter decode, three cycles in all, until the return address is
//    read. A load/use hazard on the ret itself takes precedence (stall D).
//  - exceptions (halt, bad address, bad instruction): once one reaches memory or
//    writeback, the memory stage gets bubbles so no later instruction writes
//    memory, the writeback register holds, and condition codes stop changing.
// These rules and their penalties (1 cycle load/use, 2 cycles misprediction,
// 3 cycles ret) follow the slides; the exception rules are the textbook's.
// Purely combinational.
module hazard_ctl
  import y86_pkg::*;
(
  input  icode_t  D_icode,
  input  reg_id_t d_srcA,
  input  reg_id_t d_srcB,
  input  icode_t  E_icode,
  input  reg_id_t E_dstM,
  input  logic    e_cnd,
  input  icode_t  M_icode,
  input  stat_t   m_stat,
  input  stat_t   W_stat,
  output logic    F_stall,
  output logic    D_stall,
  output logic    D_bubble,
  output logic    E_bubble,
  output logic    M_bubble,
  output logic    W_stall,
  output logic    set_cc_ok,
  output logic    load_use,
  output logic    mispredict,
  output logic    ret_wait
);

  logic exc;

  always_comb begin
    load_use   = (E_icode inside {I_MRMOVQ, I_POPQ}) && (E_dstM != R_NONE) &&
                 (E_dstM == d_srcA || E_dstM == d_srcB);
    mispredict = (E_icode == I_JXX) && !e_cnd;
    ret_wait   = (D_icode == I_RET) || (E_icode == I_RET) || (M_icode == I_RET);
    exc        = (m_stat != S_AOK) || (W_stat != S_AOK);

    F_stall   = load_use || ret_wait;
    D_stall   = load_use;
    D_bubble  = mispredict || (!load_use && ret_wait);
    E_bubble  = mispredict || load_use;
    M_bubble  = exc;
    W_stall   = (W_stat != S_AOK);
    set_cc_ok = !exc;
  end

endmodule
