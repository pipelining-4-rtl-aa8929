// pipelining_top: the pipelines side by side.
//
// The Y86-64 five-stage pipeline (y86_pipe: forwarding, load/use stall, branch
// prediction with squashing, ret stall) and the four-stage addq pipeline used to
// introduce data hazards, in both of its variants: addq_cpu with forwarding and
// addq_cpu that stalls instead. The three share nothing; each keeps its own
// program-load port, register debug port and observation outputs, prefixed y_
// (Y86-64), a_ (addq, forwarding) and s_ (addq, stalling). They share only the
// clock and reset.
module pipelining_top
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic       clk,
  input  logic       rst,
  // Y86-64 pipeline
  input  logic       y_prog_we,
  input  word_t      y_prog_addr,
  input  logic [7:0] y_prog_data,
  input  reg_id_t    y_dbg_reg,
  output word_t      y_dbg_val,
  output stat_t      y_stat,
  output logic       y_retire,
  output logic       y_ev_load_use,
  output logic       y_ev_mispredict,
  output logic       y_ev_ret_bubble,
  output logic [2:0] y_ev_fwdA,
  output logic [2:0] y_ev_fwdB,
  // addq pipeline, forwarding variant
  input  logic       a_prog_we,
  input  word_t      a_prog_addr,
  input  logic [7:0] a_prog_data,
  input  logic       a_init_we,
  input  reg_id_t    a_init_reg,
  input  word_t      a_init_val,
  input  reg_id_t    a_dbg_reg,
  output word_t      a_dbg_val,
  output word_t      a_pc,
  output logic       a_stall,
  output reg_id_t    a_D_rA,
  output reg_id_t    a_D_rB,
  output word_t      a_E_valA,
  output word_t      a_E_valB,
  output reg_id_t    a_E_dstE,
  output word_t      a_W_valE,
  output reg_id_t    a_W_dstE,
  output logic [1:0] a_fwd_used,
  // addq pipeline, stalling variant
  input  logic       s_prog_we,
  input  word_t      s_prog_addr,
  input  logic [7:0] s_prog_data,
  input  logic       s_init_we,
  input  reg_id_t    s_init_reg,
  input  word_t      s_init_val,
  input  reg_id_t    s_dbg_reg,
  output word_t      s_dbg_val,
  output word_t      s_pc,
  output logic       s_stall,
  output reg_id_t    s_D_rA,
  output reg_id_t    s_D_rB,
  output word_t      s_E_valA,
  output word_t      s_E_valB,
  output reg_id_t    s_E_dstE,
  output word_t      s_W_valE,
  output reg_id_t    s_W_dstE,
  output logic [1:0] s_fwd_used
);

  y86_pipe #(.IMEM_BYTES(IMEM_BYTES), .DMEM_BYTES(DMEM_BYTES)) u_y86 (
    .clk, .rst, .prog_we(y_prog_we), .prog_addr(y_prog_addr), .prog_data(y_prog_data),
    .dbg_reg(y_dbg_reg), .dbg_val(y_dbg_val), .stat(y_stat), .retire(y_retire),
    .ev_load_use(y_ev_load_use), .ev_mispredict(y_ev_mispredict),
    .ev_ret_bubble(y_ev_ret_bubble), .ev_fwdA(y_ev_fwdA), .ev_fwdB(y_ev_fwdB));

  addq_cpu #(.FORWARDING(1'b1), .IMEM_BYTES(IMEM_BYTES)) u_addq (
    .clk, .rst, .prog_we(a_prog_we), .prog_addr(a_prog_addr), .prog_data(a_prog_data),
    .init_we(a_init_we), .init_reg(a_init_reg), .init_val(a_init_val),
    .dbg_reg(a_dbg_reg), .dbg_val(a_dbg_val), .pc(a_pc), .stall(a_stall),
    .D_rA(a_D_rA), .D_rB(a_D_rB), .E_valA(a_E_valA), .E_valB(a_E_valB),
    .E_dstE(a_E_dstE), .W_valE(a_W_valE), .W_dstE(a_W_dstE), .fwd_used(a_fwd_used));

  addq_cpu #(.FORWARDING(1'b0), .IMEM_BYTES(IMEM_BYTES)) u_addq_stall (
    .clk, .rst, .prog_we(s_prog_we), .prog_addr(s_prog_addr), .prog_data(s_prog_data),
    .init_we(s_init_we), .init_reg(s_init_reg), .init_val(s_init_val),
    .dbg_reg(s_dbg_reg), .dbg_val(s_dbg_val), .pc(s_pc), .stall(s_stall),
    .D_rA(s_D_rA), .D_rB(s_D_rB), .E_valA(s_E_valA), .E_valB(s_E_valB),
    .E_dstE(s_E_dstE), .W_valE(s_W_valE), .W_dstE(s_W_dstE), .fwd_used(s_fwd_used));

endmodule
