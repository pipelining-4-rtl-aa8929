// tb_pc_select: checks the PC choice at the start of fetch (misprediction
// correction from the memory stage first, then a ret's return address from
// writeback, else the prediction) and the next prediction (valC for call and jXX,
// valP otherwise, the same PC again for halt or a faulty fetch), over random
// inputs with each case forced often.
module tb_pc_select;
  import y86_pkg::*;
  word_t  F_predPC, M_valA, W_valM, f_valC, f_valP, f_pc, f_predPC;
  icode_t M_icode, W_icode, f_icode;
  logic   M_cnd;
  stat_t  f_stat;
  int checks = 0, failures = 0;
  int n_mis = 0, n_ret = 0, n_pred = 0;

  pc_select dut (.*);

  initial begin
    for (int t = 0; t < 10000; t++) begin
      word_t exp_pc, exp_pred;
      F_predPC = {$urandom, $urandom}; M_valA = {$urandom, $urandom};
      W_valM = {$urandom, $urandom}; f_valC = {$urandom, $urandom}; f_valP = {$urandom, $urandom};
      M_icode = icode_t'($urandom_range(11)); W_icode = icode_t'($urandom_range(11));
      f_icode = icode_t'($urandom_range(11));
      if ($urandom_range(2) == 0) M_icode = I_JXX;
      if ($urandom_range(2) == 0) W_icode = I_RET;
      M_cnd  = 1'($urandom);
      f_stat = ($urandom_range(7) == 0) ? stat_t'($urandom_range(3)) : S_AOK;
      #1;
      if (M_icode == I_JXX && !M_cnd) begin exp_pc = M_valA; n_mis++; end
      else if (W_icode == I_RET)      begin exp_pc = W_valM; n_ret++; end
      else                            begin exp_pc = F_predPC; n_pred++; end
      if (f_stat != S_AOK)                         exp_pred = exp_pc;
      else if (f_icode == I_JXX || f_icode == I_CALL) exp_pred = f_valC;
      else                                          exp_pred = f_valP;
      checks++;
      if (f_pc !== exp_pc || f_predPC !== exp_pred) begin
        failures++;
        $display("FAIL M=%0d cnd=%b W=%0d f=%0d", M_icode, M_cnd, W_icode, f_icode);
      end
    end
    checks++;
    if (n_mis == 0 || n_ret == 0 || n_pred == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
