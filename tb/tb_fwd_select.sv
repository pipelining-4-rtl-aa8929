// tb_fwd_select: random register numbers, drawn from a small set so that matches
// are frequent, against a model that scans the in-flight destinations from the
// newest (execute) to the oldest (writeback, ALU result last) and takes the first
// match; 0xF never matches; call and jXX pass valP as valA.
module tb_fwd_select;
  import y86_pkg::*;
  icode_t     D_icode;
  word_t      D_valP, rvalA, rvalB, e_valE, m_valM, M_valE, W_valM, W_valE, valA, valB;
  reg_id_t    srcA, srcB, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE;
  logic [2:0] fwdA, fwdB;
  int checks = 0, failures = 0;
  int used [7];

  fwd_select dut (.*);

  function automatic reg_id_t rr();
    return ($urandom_range(3) == 0) ? R_NONE : reg_id_t'($urandom_range(3));
  endfunction

  function automatic word_t model(reg_id_t s, word_t rv);
    reg_id_t d [5];
    word_t   v [5];
    d = '{e_dstE, M_dstM, M_dstE, W_dstM, W_dstE};
    v = '{e_valE, m_valM, M_valE, W_valM, W_valE};
    if (s == R_NONE) return rv;
    for (int i = 0; i < 5; i++) if (d[i] == s) return v[i];
    return rv;
  endfunction

  initial begin
    for (int i = 0; i < 7; i++) used[i] = 0;
    for (int t = 0; t < 20000; t++) begin
      word_t ea, eb;
      D_icode = icode_t'($urandom_range(11));
      D_valP = {$urandom, $urandom}; rvalA = {$urandom, $urandom}; rvalB = {$urandom, $urandom};
      e_valE = {$urandom, $urandom}; m_valM = {$urandom, $urandom}; M_valE = {$urandom, $urandom};
      W_valM = {$urandom, $urandom}; W_valE = {$urandom, $urandom};
      srcA = rr(); srcB = rr(); e_dstE = rr(); M_dstM = rr(); M_dstE = rr(); W_dstM = rr(); W_dstE = rr();
      #1;
      ea = (D_icode == I_CALL || D_icode == I_JXX) ? D_valP : model(srcA, rvalA);
      eb = model(srcB, rvalB);
      used[fwdA]++; used[fwdB]++;
      checks++;
      if (valA !== ea || valB !== eb) begin
        failures++;
        $display("FAIL srcA=%h srcB=%h e=%h Mm=%h Me=%h Wm=%h We=%h", srcA, srcB, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE);
      end
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (used[i] == 0) begin failures++; $display("FAIL source %0d never selected", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
