// tb_regfile: checks the two-read, two-write register file against an array model:
// reads of 0xF give zero, writes to 0xF do nothing, a read in the cycle of a write
// sees the old value, and a dstM write wins over a dstE write to the same register.
module tb_regfile;
  import y86_pkg::*;
  logic    clk = 1'b0, rst = 1'b1;
  reg_id_t srcA = '0, srcB = '0, dstE = R_NONE, dstM = R_NONE, dbg_id = '0;
  word_t   valA, valB, valE = '0, valM = '0, dbg_val;
  word_t   model [16];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) model[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 5000; t++) begin
      srcA = reg_id_t'($urandom); srcB = reg_id_t'($urandom); dbg_id = reg_id_t'($urandom);
      dstE = reg_id_t'($urandom); dstM = ($urandom_range(3) == 0) ? dstE : reg_id_t'($urandom);
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      #1;
      chk(valA, model[srcA], "read A (old value before the edge)");
      chk(valB, model[srcB], "read B");
      chk(dbg_val, model[dbg_id], "debug read");
      @(negedge clk);
      if (dstE != R_NONE) model[dstE] = valE;
      if (dstM != R_NONE) model[dstM] = valM;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
