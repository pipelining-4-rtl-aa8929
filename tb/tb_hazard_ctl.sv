// tb_hazard_ctl: directed cases for each hazard of the design (load/use,
// misprediction, ret in decode/execute/memory, load/use on a ret, halt reaching
// memory or writeback, and no hazard), with the expected stall/bubble vector
// written out by hand for each; then random inputs checked against the rules that
// must always hold (never stall and bubble the same register; fetch stalls
// whenever decode does).
module tb_hazard_ctl;
  import y86_pkg::*;
  icode_t  D_icode, E_icode, M_icode;
  reg_id_t d_srcA, d_srcB, E_dstM;
  logic    e_cnd;
  stat_t   m_stat, W_stat;
  logic    F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, set_cc_ok;
  logic    load_use, mispredict, ret_wait;
  int checks = 0, failures = 0;

  hazard_ctl dut (.*);

  // expected {F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, set_cc_ok}
  task automatic case_(string name, icode_t di, reg_id_t sa, reg_id_t sb, icode_t ei,
                       reg_id_t edm, logic c, icode_t mi, stat_t ms, stat_t ws, logic [6:0] exp);
    D_icode = di; d_srcA = sa; d_srcB = sb; E_icode = ei; E_dstM = edm; e_cnd = c;
    M_icode = mi; m_stat = ms; W_stat = ws;
    #1;
    checks++;
    if ({F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, set_cc_ok} !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", name, {F_stall, D_stall, D_bubble, E_bubble,
               M_bubble, W_stall, set_cc_ok}, exp);
    end
  endtask

  initial begin
    case_("none",          I_OPQ, 4'd1, 4'd2, I_OPQ, R_NONE, 1, I_OPQ, S_AOK, S_AOK, 7'b0000001);
    case_("load/use A",    I_OPQ, 4'd3, 4'd1, I_MRMOVQ, 4'd3, 1, I_OPQ, S_AOK, S_AOK, 7'b1101001);
    case_("load/use B",    I_OPQ, 4'd1, 4'd3, I_POPQ, 4'd3, 1, I_OPQ, S_AOK, S_AOK, 7'b1101001);
    case_("load no use",   I_OPQ, 4'd1, 4'd2, I_MRMOVQ, 4'd3, 1, I_OPQ, S_AOK, S_AOK, 7'b0000001);
    case_("mispredict",    I_OPQ, 4'd1, 4'd2, I_JXX, R_NONE, 0, I_OPQ, S_AOK, S_AOK, 7'b0011001);
    case_("jump taken",    I_OPQ, 4'd1, 4'd2, I_JXX, R_NONE, 1, I_OPQ, S_AOK, S_AOK, 7'b0000001);
    case_("ret in D",      I_RET, 4'd4, 4'd4, I_OPQ, R_NONE, 1, I_OPQ, S_AOK, S_AOK, 7'b1010001);
    case_("ret in E",      I_NOP, R_NONE, R_NONE, I_RET, R_NONE, 1, I_OPQ, S_AOK, S_AOK, 7'b1010001);
    case_("ret in M",      I_NOP, R_NONE, R_NONE, I_NOP, R_NONE, 1, I_RET, S_AOK, S_AOK, 7'b1010001);
    case_("load/use ret",  I_RET, 4'd4, 4'd4, I_POPQ, 4'd4, 1, I_OPQ, S_AOK, S_AOK, 7'b1101001);
    case_("halt in M",     I_OPQ, 4'd1, 4'd2, I_OPQ, R_NONE, 1, I_HALT, S_HLT, S_AOK, 7'b0000100);
    case_("halt in W",     I_OPQ, 4'd1, 4'd2, I_OPQ, R_NONE, 1, I_OPQ, S_AOK, S_HLT, 7'b0000110);
    case_("bad address M", I_OPQ, 4'd1, 4'd2, I_OPQ, R_NONE, 1, I_MRMOVQ, S_ADR, S_AOK, 7'b0000100);
    for (int t = 0; t < 5000; t++) begin
      D_icode = icode_t'($urandom_range(11)); E_icode = icode_t'($urandom_range(11));
      M_icode = icode_t'($urandom_range(11));
      d_srcA = reg_id_t'($urandom_range(3)); d_srcB = reg_id_t'($urandom_range(3));
      E_dstM = reg_id_t'($urandom_range(3)); e_cnd = 1'($urandom);
      m_stat = stat_t'($urandom_range(3)); W_stat = stat_t'($urandom_range(3));
      #1;
      checks++;
      if ((D_stall && D_bubble) || (D_stall && !F_stall) ||
          (load_use != ((E_icode == I_MRMOVQ || E_icode == I_POPQ) && (E_dstM == d_srcA || E_dstM == d_srcB)))) begin
        failures++;
        $display("FAIL random rule");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
