// tb_instr_mix: runs the hypothetical instruction mix of the design description on
// the Y86-64 pipeline and measures cycles per instruction.
//
// The mix is 3% not-taken conditional jumps (3 cycles each with predict-taken),
// 5% taken conditional jumps (1 cycle), 1% ret (4 cycles) and 91% other
// instructions (1 cycle, no load/use pairs), which should give
// 3*0.03 + 1*0.05 + 4*0.01 + 1*0.91 = 1.09 cycles per instruction. A program of
// exactly 100 executed instructions with that mix is built (ZF stays 1 from reset,
// so je is taken and jne is not), run to halt, and the cycles it took, less the
// four cycles needed to fill the pipeline and plus one for the halt's own slot,
// must be 109.
module tb_instr_mix;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  logic       clk = 1'b0, rst = 1'b1, prog_we = 1'b0;
  word_t      prog_addr = '0, dbg_val;
  logic [7:0] prog_data = '0;
  reg_id_t    dbg_reg = '0;
  stat_t      stat;
  logic       retire, ev_load_use, ev_mispredict, ev_ret_bubble;
  logic [2:0] ev_fwdA, ev_fwdB;
  int checks = 0, failures = 0, n_retired = 0;
  int unsigned cyc, a, c1, f, j, n_not_taken, n_taken, n_other;

  y86_pipe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) n_retired += int'(retire);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    clear();
    n_not_taken = 0; n_taken = 0; n_other = 0;
    a  = e_irmovq(64'h200, 4); n_other++;
    c1 = e_call(0);            n_other++;
    // 96 more: 3 jne (not taken), 5 je (taken, to the next instruction), 88 others; then halt
    for (int i = 0; i < 96; i++) begin
      if (i % 30 == 10 && n_not_taken < 3) begin
        a = e_jxx(4, 0); n_not_taken++;          // jne: not taken
        patch(a, plen + 9 + 10);                 // predicted target skips one irmovq
      end else if (i % 19 == 5 && n_taken < 5) begin
        j = e_jxx(3, 0); patch(j, plen); n_taken++;   // je: taken
      end else begin
        a = e_irmovq(longint'(i), i % 3 == 0 ? 9 : 10); n_other++;
      end
    end
    a = e_halt(); n_other++;
    f = plen;
    patch(c1, f);
    a = e_ret();

    for (int i = 0; i < PROG_MAX; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = word_t'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    rst = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1;
      cyc++;
    end while (stat == S_AOK && cyc < 10000);

    ref_run(10000);
    chk(n_not_taken == 3 && n_taken == 5 && ref_rets == 1 && ref_instrs == 100,
        $sformatf("mix: %0d not taken, %0d taken, %0d ret, %0d instructions", n_not_taken, n_taken, ref_rets, ref_instrs));
    chk(ref_mispred == 3, "model sees three mispredictions");
    chk(stat == S_HLT, "halted");
    chk(cyc - 4 + 1 == 109, $sformatf("cycles for 100 instructions: %0d, expected 109 (CPI 1.09)", cyc - 4 + 1));
    for (int r = 0; r < 15; r++) begin
      dbg_reg = reg_id_t'(r);
      #1;
      chk(dbg_val == ref_reg[r], $sformatf("R[%0d]", r));
    end
    $display("instruction mix: %0d instructions in %0d cycles after fill, CPI = %0d.%02d",
             ref_instrs, cyc - 3, (cyc - 3) / 100, (cyc - 3) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
