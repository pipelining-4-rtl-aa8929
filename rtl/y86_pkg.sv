// y86_pkg: types and constants shared by the Y86-64 pipeline and the addq pipeline.
//
// Holds the instruction codes (icode), function codes for the ALU and for conditions,
// the register numbers (0xF means "no register"), the status codes and the contents
// of each pipeline register as packed structs. The slides name the instructions
// (addq, subq, andq, xorq, rrmovq, irmovq, rmmovq, mrmovq, jXX, call, ret, pushq,
// popq, nop, halt) and the "no register" value 0xF; the numeric encodings and
// instruction lengths are the standard Y86-64 ones that the slides take from their
// textbook.
package y86_pkg;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  reg_id_t;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  // ALU functions (ifun of OPq)
  localparam logic [3:0] A_ADD = 4'h0;
  localparam logic [3:0] A_SUB = 4'h1;
  localparam logic [3:0] A_AND = 4'h2;
  localparam logic [3:0] A_XOR = 4'h3;

  // condition functions (ifun of jXX and cmovXX)
  localparam logic [3:0] C_YES = 4'h0;
  localparam logic [3:0] C_LE  = 4'h1;
  localparam logic [3:0] C_L   = 4'h2;
  localparam logic [3:0] C_E   = 4'h3;
  localparam logic [3:0] C_NE  = 4'h4;
  localparam logic [3:0] C_GE  = 4'h5;
  localparam logic [3:0] C_G   = 4'h6;

  localparam reg_id_t R_RSP  = 4'h4;
  localparam reg_id_t R_NONE = 4'hF;

  typedef enum logic [1:0] {
    S_AOK = 2'd0,   // normal
    S_HLT = 2'd1,   // halt executed
    S_ADR = 2'd2,   // bad address
    S_INS = 2'd3    // invalid instruction
  } stat_t;

  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // fetch -> decode
  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic [3:0] ifun;
    reg_id_t rA;
    reg_id_t rB;
    word_t   valC;
    word_t   valP;
  } d_reg_t;

  // decode -> execute
  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic [3:0] ifun;
    word_t   valC;
    word_t   valA;
    word_t   valB;
    reg_id_t dstE;
    reg_id_t dstM;
  } e_reg_t;

  // execute -> memory
  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic    cnd;
    word_t   valE;
    word_t   valA;
    reg_id_t dstE;
    reg_id_t dstM;
  } m_reg_t;

  // memory -> writeback
  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    word_t   valE;
    word_t   valM;
    reg_id_t dstE;
    reg_id_t dstM;
  } w_reg_t;

  // bubble (no-operation) contents of each pipeline register
  localparam d_reg_t D_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0, rA: R_NONE,
                                  rB: R_NONE, valC: '0, valP: '0};
  localparam e_reg_t E_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0, valC: '0,
                                  valA: '0, valB: '0, dstE: R_NONE, dstM: R_NONE};
  localparam m_reg_t M_BUBBLE = '{stat: S_AOK, icode: I_NOP, cnd: 1'b0, valE: '0,
                                  valA: '0, dstE: R_NONE, dstM: R_NONE};
  localparam w_reg_t W_BUBBLE = '{stat: S_AOK, icode: I_NOP, valE: '0, valM: '0,
                                  dstE: R_NONE, dstM: R_NONE};

  // instruction length in bytes, from the instruction code
  function automatic logic [3:0] instr_len(icode_t ic);
    case (ic)
      I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ: return 4'd2;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:     return 4'd10;
      I_JXX, I_CALL:                    return 4'd9;
      default:                          return 4'd1;  // halt, nop, ret
    endcase
  endfunction

endpackage
