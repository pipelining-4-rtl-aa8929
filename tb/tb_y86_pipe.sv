// tb_y86_pipe: self-checking test of the five-stage Y86-64 pipeline.
//
// Each program is assembled into memory, loaded through the program port, run from
// reset until the processor halts, and then checked against the instruction-level
// reference model in y86_asm_pkg: all fifteen registers, the halt status, and the
// number of cycles, which the model predicts from the hazard penalties (1 cycle per
// load/use, 2 per mispredicted jump, 3 per ret). Directed programs reproduce the
// examples of the design description (addq chain, load/use, taken and not-taken
// jumps, call/ret, repeated writes to one register); random straight-line programs
// with forward jumps, calls, pushes and pops follow. The test also counts how often
// each mechanism acted (load/use stall, squash, ret bubble, every forwarding source)
// and fails if one never did.
module tb_y86_pipe;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       prog_we = 1'b0;
  word_t      prog_addr = '0;
  logic [7:0] prog_data = '0;
  reg_id_t    dbg_reg = '0;
  word_t      dbg_val;
  stat_t      stat;
  logic       retire, ev_load_use, ev_mispredict, ev_ret_bubble;
  logic [2:0] ev_fwdA, ev_fwdB;

  int checks = 0, failures = 0;
  int n_loaduse = 0, n_mispred = 0, n_retb = 0;
  int n_fwd [7];

  y86_pipe dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    n_loaduse += int'(ev_load_use);
    n_mispred += int'(ev_mispredict);
    n_retb    += int'(ev_ret_bubble);
    n_fwd[ev_fwdA]++;
    n_fwd[ev_fwdB]++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // load prog[], run until halt, compare with the reference model
  task automatic run_and_compare(string name, int unsigned max_cycles = 3000);
    int unsigned cyc = 0;
    rst = 1'b1;
    for (int i = 0; i < PROG_MAX; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = word_t'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    do begin
      @(posedge clk);
      #1;
      cyc++;
    end while (stat == S_AOK && cyc < max_cycles);
    ref_run(10000);
    check(stat == S_HLT && ref_stat == 1, $sformatf("%s: halt status %0d", name, stat));
    check(cyc == ref_cycles(), $sformatf("%s: cycles %0d expected %0d", name, cyc, ref_cycles()));
    for (int r = 0; r < 15; r++) begin
      dbg_reg = reg_id_t'(r);
      #1;
      check(dbg_val == ref_reg[r], $sformatf("%s: R[%0d]=%0d expected %0d", name, r, dbg_val, ref_reg[r]));
    end
  endtask

  function automatic longint unsigned reg_now(int r);
    return ref_reg[r];
  endfunction

  int unsigned a, j1, j2, c1, sub;
  int data_regs [13] = '{0, 1, 2, 3, 6, 7, 8, 9, 10, 11, 12, 13, 14};

  initial begin
    for (int i = 0; i < 7; i++) n_fwd[i] = 0;

    // 1. data hazards solved by forwarding (addq chain of the slides)
    clear();
    a = e_irmovq(800, 8);  a = e_irmovq(900, 9);
    a = e_irmovq(1000, 10); a = e_irmovq(1100, 11);
    a = e_opq(0, 8, 9);    // r9 = 1700
    a = e_opq(0, 9, 8);    // r8 = 2500
    a = e_opq(0, 10, 11);  // r11 = 2100
    a = e_halt();
    run_and_compare("addq chain");
    check(ref_reg[9] == 1700 && ref_reg[8] == 2500, "addq chain: model values");

    // 2. three writes to %r8 in a row, then a two-apart dependency
    clear();
    a = e_irmovq(1, 8); a = e_irmovq(10, 10); a = e_irmovq(11, 11); a = e_irmovq(12, 12);
    a = e_opq(0, 10, 8); a = e_opq(0, 11, 8); a = e_opq(0, 12, 8);
    a = e_opq(0, 10, 8); a = e_opq(0, 11, 12); a = e_opq(0, 12, 8);
    a = e_halt();
    run_and_compare("multiple forwarding");

    // 3. load/use: mrmovq then subq using the loaded register
    clear();
    a = e_irmovq(64'h100, 0); a = e_irmovq(7, 2); a = e_rmmovq(2, 0, 0);
    a = e_irmovq(20, 1);
    a = e_mrmovq(0, 0, 3);    // rbx = M[rax]
    a = e_opq(1, 3, 1);       // rcx = rcx - rbx (stalls one cycle)
    a = e_irmovq(10, 3);
    a = e_halt();
    run_and_compare("load/use");
    check(ref_loaduse == 1 && ref_reg[1] == 13, "load/use: model values");

    // 4. jne not taken (misprediction) and je taken
    clear();
    a  = e_irmovq(5, 8);
    a  = e_opq(1, 8, 8);          // ZF = 1
    j1 = e_jxx(4, 0);             // jne LABEL: not taken
    a  = e_opq(3, 10, 11);
    a  = e_irmovq(3, 12);
    j2 = e_jxx(3, 0);             // je L2: taken
    a  = e_irmovq(99, 13);        // skipped
    patch(j2, plen);
    a  = e_halt();
    patch(j1, plen);              // LABEL
    a  = e_opq(0, 8, 9);
    a  = e_irmovq(1, 11);
    a  = e_halt();
    run_and_compare("jumps");
    check(ref_mispred == 1, "jumps: model mispredictions");

    // 5. call / ret
    clear();
    a   = e_irmovq(64'h200, 4);
    a   = e_irmovq(800, 8); a = e_irmovq(900, 9);
    c1  = e_call(0);
    a   = e_opq(0, 8, 9);
    a   = e_halt();
    sub = e_ret();
    patch(c1, sub);
    run_and_compare("call/ret");
    check(ref_rets == 1 && ref_reg[9] == 1700, "call/ret: model values");

    // 6. forwarding-path exercise: addq / subq / xorq / andq sharing %r8 and %r9
    clear();
    a = e_irmovq(3, 8); a = e_irmovq(5, 9); a = e_irmovq(64, 10);
    a = e_opq(0, 8, 9);   // addq %r8, %r9
    a = e_opq(1, 8, 10);  // subq %r8, %r10
    a = e_opq(3, 8, 9);   // xorq %r8, %r9
    a = e_opq(2, 9, 8);   // andq %r9, %r8
    a = e_halt();
    run_and_compare("forwarding exercise");

    // 7. dependencies and hazards example (1)
    clear();
    a = e_irmovq(2, 0); a = e_irmovq(30, 3); a = e_irmovq(40, 1); a = e_irmovq(1000, 10);
    a = e_opq(0, 0, 3);    // addq %rax, %rbx
    a = e_opq(1, 0, 1);    // subq %rax, %rcx
    a = e_irmovq(100, 1);  // irmovq $100, %rcx
    a = e_opq(0, 1, 10);   // addq %rcx, %r10
    a = e_opq(0, 3, 10);   // addq %rbx, %r10
    a = e_halt();
    run_and_compare("dependencies (1)");
    check(ref_reg[10] == 1132, "dependencies (1): model value");

    // 8. dependencies and hazards example (2): load, add, jne, add, load
    clear();
    a = e_irmovq(64'h100, 0); a = e_irmovq(64'h108, 1); a = e_rmmovq(1, 0, 0);
    a = e_irmovq(64'hFFFF_FFFF_FFFF_FFF8, 2); a = e_irmovq(0, 1);
    a = e_mrmovq(0, 0, 3);     // mrmovq 0(%rax), %rbx
    a = e_opq(0, 3, 1);        // addq %rbx, %rcx
    j1 = e_jxx(4, 0);          // jne foo
    patch(j1, plen);
    a = e_opq(0, 1, 2);        // foo: addq %rcx, %rdx
    a = e_mrmovq(0, 2, 1);     // mrmovq (%rdx), %rcx
    a = e_halt();
    run_and_compare("dependencies (2)");

    // 9. random programs
    for (int seed = 0; seed < 40; seed++) begin
      int pushes, n;
      pushes = 0;
      n = 20 + int'($urandom_range(40));
      clear();
      a = e_irmovq(64'h100, 5);
      a = e_irmovq(64'h3F0, 4);
      for (int k = 0; k < 16; k++) a = e_rmmovq(0, longint'(8 * k), 5);  // zero the data area
      for (int k = 0; k < n; k++) begin
        int ra, rb;
        ra = data_regs[$urandom_range(12)];
        rb = data_regs[$urandom_range(12)];
        case ($urandom_range(11))
          0, 1: a = e_opq(int'($urandom_range(3)), ra, rb);
          2:    a = e_irmovq({$urandom, $urandom} >> $urandom_range(60), rb);
          3:    a = e_rrmovq(int'($urandom_range(6)), ra, rb);
          4:    a = e_rmmovq(ra, longint'(8 * $urandom_range(15)), 5);
          5:    a = e_mrmovq(longint'(8 * $urandom_range(15)), 5, ra);
          6:    begin a = e_mrmovq(longint'(8 * $urandom_range(15)), 5, ra); a = e_opq(0, ra, rb); end
          7:    begin a = e_pushq(ra); pushes++; end
          8:    if (pushes > 0) begin a = e_popq(ra); pushes--; end
                else a = e_nop();
          9:    begin
                  j1 = e_jxx(int'($urandom_range(6)), 0);
                  a = e_opq(int'($urandom_range(3)), ra, rb);
                  if ($urandom_range(1) == 1) a = e_irmovq(longint'($urandom), ra);
                  patch(j1, plen);
                end
          10:   begin
                  c1 = e_call(0);
                  a = e_opq(0, ra, rb);
                  j2 = e_jxx(0, 0);     // jmp over the subroutine
                  patch(c1, plen);
                  a = e_opq(int'($urandom_range(3)), rb, ra);
                  a = e_ret();
                  patch(j2, plen);
                end
          default: a = e_opq(int'($urandom_range(3)), ra, ra);
        endcase
      end
      a = e_halt();
      run_and_compare($sformatf("random %0d", seed));
    end

    // every mechanism must have acted at least once
    check(n_loaduse > 0, "load/use stall never happened");
    check(n_mispred > 0, "misprediction squash never happened");
    check(n_retb > 0, "ret bubble never happened");
    for (int s = 1; s <= 6; s++) check(n_fwd[s] > 0, $sformatf("forwarding source %0d never used", s));
    $display("events: load_use=%0d mispredict=%0d ret_bubble=%0d fwd e=%0d m_valM=%0d M_valE=%0d W_valM=%0d W_valE=%0d valP=%0d",
             n_loaduse, n_mispred, n_retb, n_fwd[1], n_fwd[2], n_fwd[3], n_fwd[4], n_fwd[5], n_fwd[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
