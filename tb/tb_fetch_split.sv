// tb_fetch_split: builds random instructions of every kind byte by byte, presents
// them with a random PC and checks icode, ifun, register fields, constant,
// next PC (PC + the instruction's length) and status.
module tb_fetch_split;
  import y86_pkg::*;
  word_t       pc, valC, valP;
  logic [79:0] bytes_in;
  logic        imem_error;
  icode_t      icode;
  logic [3:0]  ifun;
  reg_id_t     rA, rB;
  stat_t       stat;
  int checks = 0, failures = 0;

  fetch_split dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // lengths of icodes 0..11
  int len [12] = '{1, 1, 2, 10, 10, 10, 2, 9, 9, 1, 2, 2};

  initial begin
    for (int t = 0; t < 10000; t++) begin
      int ic;
      word_t c;
      bit has_regs;
      ic = int'($urandom_range(13));
      c = {$urandom, $urandom};
      pc = word_t'($urandom);
      imem_error = ($urandom_range(15) == 0);
      bytes_in = {$urandom, $urandom, $urandom};
      bytes_in[7:4] = 4'(ic);
      has_regs = (ic == 2 || ic == 3 || ic == 4 || ic == 5 || ic == 6 || ic == 10 || ic == 11);
      if (has_regs) bytes_in[79:16] = c; else bytes_in[71:8] = c;
      #1;
      if (imem_error) begin
        chk(stat == S_ADR, "address error status");
        chk(icode == I_NOP, "address error gives nop");
      end else if (ic > 11) begin
        chk(stat == S_INS, $sformatf("invalid icode %0d status", ic));
      end else begin
        chk(int'(icode) == ic && ifun == bytes_in[3:0], $sformatf("icode/ifun %0d", ic));
        chk(stat == ((ic == 0) ? S_HLT : S_AOK), $sformatf("status of icode %0d", ic));
        chk(valP == pc + word_t'(len[ic]), $sformatf("valP of icode %0d", ic));
        if (has_regs) chk(rA == bytes_in[15:12] && rB == bytes_in[11:8], "register fields");
        else          chk(rA == R_NONE && rB == R_NONE, "no register fields");
        if (ic == 3 || ic == 4 || ic == 5 || ic == 7 || ic == 8) chk(valC == c, $sformatf("valC of icode %0d", ic));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
