// fetch_split: the "split" box of the fetch stage.
//
// Takes the ten instruction bytes read at the PC and splits them into the fields of
// a Y86-64 instruction: icode and ifun from byte 0, rA and rB from the register
// byte when the instruction has one, the 8-byte constant valC (after the register
// byte, or right after byte 0 for jXX and call), and valP = PC + instruction length
// (2 for OPq, 10 for irmovq, and so on). It also gives the fetch status: ADR when the
// instruction memory reports a bad address, INS for an unknown icode, HLT for halt.
// The figures show "split" feeding rA/rB and the PC adder ("+2", "+10", "convert
// icode"); field layout and lengths are the standard Y86-64 encoding.
// Purely combinational.
module fetch_split
  import y86_pkg::*;
(
  input  word_t       pc,
  input  logic [79:0] bytes_in,
  input  logic        imem_error,
  output icode_t      icode,
  output logic [3:0]  ifun,
  output reg_id_t     rA,
  output reg_id_t     rB,
  output word_t       valC,
  output word_t       valP,
  output stat_t       stat
);

  logic [3:0] raw_icode;
  logic       need_regids;
  logic       known;

  assign raw_icode = bytes_in[7:4];
  assign known     = (raw_icode <= 4'hB);

  always_comb begin
    icode = imem_error ? I_NOP : (known ? icode_t'(raw_icode) : I_NOP);
    ifun  = imem_error ? 4'h0 : bytes_in[3:0];
    need_regids = icode inside {I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ,
                                I_IRMOVQ, I_RMMOVQ, I_MRMOVQ};
    rA   = need_regids ? bytes_in[15:12] : R_NONE;
    rB   = need_regids ? bytes_in[11:8]  : R_NONE;
    valC = need_regids ? bytes_in[79:16] : bytes_in[71:8];
    valP = pc + word_t'(instr_len(icode));
    if (imem_error)            stat = S_ADR;
    else if (!known)           stat = S_INS;
    else if (icode == I_HALT)  stat = S_HLT;
    else                       stat = S_AOK;
  end

endmodule
