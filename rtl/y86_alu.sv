// y86_alu: the execute-stage ALU of the Y86-64 pipeline.
//
// Computes valE = B op A for op = add, sub, and, xor (the OPq family the slides use:
// addq, subq, andq, xorq) and the new condition codes: ZF (result zero), SF (result
// negative) and OF (signed overflow, for add and sub only). The condition codes are
// held elsewhere; the slides place their update in the execute stage. Purely
// combinational. Encodings of the ALU functions are the standard Y86-64 ones.
module y86_alu
  import y86_pkg::*;
(
  input  logic [3:0] alufun,
  input  word_t      aluA,
  input  word_t      aluB,
  output word_t      valE,
  output cc_t        cc_new
);

  always_comb begin
    unique case (alufun)
      A_SUB:   valE = aluB - aluA;
      A_AND:   valE = aluB & aluA;
      A_XOR:   valE = aluB ^ aluA;
      default: valE = aluB + aluA;
    endcase
    cc_new.zf = (valE == '0);
    cc_new.sf = valE[63];
    unique case (alufun)
      A_ADD:   cc_new.of = (aluA[63] == aluB[63]) && (valE[63] != aluB[63]);
      A_SUB:   cc_new.of = (aluA[63] != aluB[63]) && (valE[63] != aluB[63]);
      default: cc_new.of = 1'b0;
    endcase
  end

endmodule
