// cond_eval: decides whether a jXX is taken (or a cmovXX moves) from the condition
// codes. The slides show je using ZF and jle/jne as further examples; the full set
// of conditions (always, le, l, e, ne, ge, g) and their formulas over ZF, SF and OF
// are the standard Y86-64 ones. Purely combinational.
module cond_eval
  import y86_pkg::*;
(
  input  logic [3:0] ifun,
  input  cc_t        cc,
  output logic       cnd
);

  logic lt;
  assign lt = cc.sf ^ cc.of;

  always_comb begin
    unique case (ifun)
      C_YES:   cnd = 1'b1;
      C_LE:    cnd = lt | cc.zf;
      C_L:     cnd = lt;
      C_E:     cnd = cc.zf;
      C_NE:    cnd = !cc.zf;
      C_GE:    cnd = !lt;
      C_G:     cnd = !lt && !cc.zf;
      default: cnd = 1'b0;
    endcase
  end

endmodule
