// fwd_select: the forwarding MUXes at the end of the decode stage.
//
// Chooses the valA and valB that the decode stage passes to execute. valA of call
// and jXX is the return/fall-through address valP. Otherwise, for a source register
// that is not 0xF, the newest value in flight wins, in this priority: the execute
// stage's ALU result (e_valE to e_dstE), the memory stage's loaded value (m_valM to
// M_dstM), the memory stage's ALU result (M_valE to M_dstE), the writeback stage's
// loaded value (W_valM to W_dstM), the writeback stage's ALU result (W_valE to
// W_dstE); with no match the register file output is used. The slides give the
// e_dstE and m_dstE conditions and that forwarding goes only to the end of decode;
// the full list and its order are the textbook's, taken as given.
// fwdA/fwdB report which source was used (0 none, 1 e_valE, 2 m_valM, 3 M_valE,
// 4 W_valM, 5 W_valE, 6 valP) so that tests can count the forwarding paths.
// Purely combinational.
module fwd_select
  import y86_pkg::*;
(
  input  icode_t     D_icode,
  input  word_t      D_valP,
  input  reg_id_t    srcA,
  input  reg_id_t    srcB,
  input  word_t      rvalA,
  input  word_t      rvalB,
  input  reg_id_t    e_dstE,
  input  word_t      e_valE,
  input  reg_id_t    M_dstM,
  input  word_t      m_valM,
  input  reg_id_t    M_dstE,
  input  word_t      M_valE,
  input  reg_id_t    W_dstM,
  input  word_t      W_valM,
  input  reg_id_t    W_dstE,
  input  word_t      W_valE,
  output word_t      valA,
  output word_t      valB,
  output logic [2:0] fwdA,
  output logic [2:0] fwdB
);

  function automatic logic [2:0] pick(reg_id_t src, reg_id_t e_dE, reg_id_t M_dM,
                                      reg_id_t M_dE, reg_id_t W_dM, reg_id_t W_dE);
    if (src == R_NONE)     return 3'd0;
    else if (src == e_dE)  return 3'd1;
    else if (src == M_dM)  return 3'd2;
    else if (src == M_dE)  return 3'd3;
    else if (src == W_dM)  return 3'd4;
    else if (src == W_dE)  return 3'd5;
    else                   return 3'd0;
  endfunction

  function automatic word_t value(logic [2:0] sel, word_t rv, word_t ev, word_t mm,
                                  word_t me, word_t wm, word_t we, word_t vp);
    case (sel)
      3'd1:    return ev;
      3'd2:    return mm;
      3'd3:    return me;
      3'd4:    return wm;
      3'd5:    return we;
      3'd6:    return vp;
      default: return rv;
    endcase
  endfunction

  always_comb begin
    fwdA = (D_icode inside {I_CALL, I_JXX}) ? 3'd6
                                             : pick(srcA, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE);
    fwdB = pick(srcB, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE);
    valA = value(fwdA, rvalA, e_valE, m_valM, M_valE, W_valM, W_valE, D_valP);
    valB = value(fwdB, rvalB, e_valE, m_valM, M_valE, W_valM, W_valE, D_valP);
  end

endmodule
