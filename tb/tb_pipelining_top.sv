// tb_pipelining_top: end-to-end test of the top with every parameter at its default.
//
// Y86-64 side: a program built from the examples of the design description (a load
// feeding an add feeding a conditional jump, the addq chain, a not-taken jne that
// squashes two wrongly fetched instructions, a call/ret, a loop summing memory
// words) runs to halt; registers, halt status and cycle count are compared with the
// instruction-level reference model. addq side: the "forwarding two stages"
// sequence and a longer dependent chain run at the same time; registers are
// compared with a sequential model. The stalling addq variant runs the same
// program; its registers must match too, and its stall cycles must equal the count
// the dependences predict (a use right behind its producer waits 2 cycles, one
// instruction further 1), while the forwarding variant never stalls. Each
// mechanism (load/use stall, squash, ret bubble, each forwarding source of both
// pipelines, the addq stall) is counted and must occur.
module tb_pipelining_top;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic       y_prog_we = 1'b0, a_prog_we = 1'b0, a_init_we = 1'b0;
  word_t      y_prog_addr = '0, a_prog_addr = '0, a_init_val = '0;
  logic [7:0] y_prog_data = '0, a_prog_data = '0;
  reg_id_t    y_dbg_reg = '0, a_dbg_reg = '0, a_init_reg = '0;
  word_t      y_dbg_val, a_dbg_val, a_pc, a_E_valA, a_E_valB, a_W_valE;
  stat_t      y_stat;
  logic       y_retire, y_ev_load_use, y_ev_mispredict, y_ev_ret_bubble, a_stall;
  logic [2:0] y_ev_fwdA, y_ev_fwdB;
  reg_id_t    a_D_rA, a_D_rB, a_E_dstE, a_W_dstE;
  logic [1:0] a_fwd_used;
  // the stalling addq pipeline gets the same program, preload and debug select
  logic       s_prog_we, s_init_we, s_stall;
  word_t      s_prog_addr, s_init_val, s_dbg_val, s_pc, s_E_valA, s_E_valB, s_W_valE;
  logic [7:0] s_prog_data;
  reg_id_t    s_dbg_reg, s_init_reg, s_D_rA, s_D_rB, s_E_dstE, s_W_dstE;
  logic [1:0] s_fwd_used;
  assign s_prog_we = a_prog_we;  assign s_prog_addr = a_prog_addr; assign s_prog_data = a_prog_data;
  assign s_init_we = a_init_we;  assign s_init_reg = a_init_reg;   assign s_init_val = a_init_val;
  assign s_dbg_reg = a_dbg_reg;

  int checks = 0, failures = 0;
  int n_lu = 0, n_mis = 0, n_ret = 0, n_retired = 0, n_afe = 0, n_afw = 0;
  int n_fwd [7];
  int n_sst = 0, n_ast = 0, n_sfwd = 0;

  pipelining_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    n_lu += int'(y_ev_load_use); n_mis += int'(y_ev_mispredict); n_ret += int'(y_ev_ret_bubble);
    n_retired += int'(y_retire);
    n_fwd[y_ev_fwdA]++; n_fwd[y_ev_fwdB]++;
    n_afe += int'(a_fwd_used[0]); n_afw += int'(a_fwd_used[1]);
    n_sst += int'(s_stall); n_ast += int'(a_stall); n_sfwd += int'(s_fwd_used != 2'b00);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int unsigned a, j1, c1, sub, loop;
  int arA [8] = '{8, 0, 9, 9, 10, 8, 11, 8};
  int arB [8] = '{9, 0, 10, 8, 8, 11, 8, 9};
  longint unsigned am [15];
  int unsigned cyc;
  int f [8];
  int exp_sst;

  initial begin
    for (int i = 0; i < 7; i++) n_fwd[i] = 0;
    // ---- Y86-64 program ----
    clear();
    a = e_irmovq(64'h200, 4);              // stack
    a = e_irmovq(64'h100, 0);              // %rax: data address
    a = e_irmovq(5, 1);  a = e_rmmovq(1, 0, 0);
    a = e_irmovq(64'h108, 2); a = e_rmmovq(2, 8, 0);
    a = e_irmovq(7, 3); a = e_rmmovq(3, 16, 0); a = e_rmmovq(3, 24, 0);
    a = e_mrmovq(8, 0, 5);                 // load, then a use three instructions later
    a = e_irmovq(3, 12); a = e_irmovq(4, 13);
    a = e_opq(0, 5, 12);
    a = e_mrmovq(0, 0, 3);                 // mrmovq 0(%rax), %rbx
    a = e_opq(0, 3, 1);                    // addq %rbx, %rcx (load/use)
    j1 = e_jxx(4, 0);                      // jne foo (taken)
    patch(j1, 64'(plen));
    a = e_opq(0, 1, 2);                    // foo: addq %rcx, %rdx
    a = e_mrmovq(64'hFFFF_FFFF_FFFF_FFF3, 2, 1);  // mrmovq -13(%rdx), %rcx
    a = e_irmovq(800, 8); a = e_irmovq(900, 9);
    a = e_opq(0, 8, 9); a = e_opq(0, 9, 8);       // forwarding chain
    a = e_opq(1, 8, 8);                    // ZF = 1
    j1 = e_jxx(4, 0);                      // jne LABEL: not taken, squash
    a = e_opq(3, 10, 11);
    c1 = e_call(0);                        // call sum
    a = e_irmovq(1, 12);
    a = e_halt();
    patch(j1, 64'(plen));                       // LABEL (wrong path)
    a = e_opq(0, 8, 9);
    a = e_rmmovq(10, 0, 11);
    a = e_halt();
    sub = plen;                            // sum: add 4 words at 0x100.. by a loop
    patch(c1, 64'(sub));
    a = e_irmovq(4, 6); a = e_irmovq(1, 7); a = e_irmovq(0, 13); a = e_irmovq(64'h100, 14);
    loop = plen;
    a = e_mrmovq(0, 14, 10);
    a = e_opq(0, 10, 13);
    a = e_irmovq(8, 10); a = e_opq(0, 10, 14);
    a = e_opq(1, 7, 6);
    a = e_jxx(4, 64'(loop));                    // jne loop
    a = e_pushq(13); a = e_popq(5);
    a = e_ret();

    // ---- addq program: R[i] = 100*i ----
    for (int r = 0; r < 15; r++) am[r] = 100 * r;
    for (int i = 0; i < 8; i++) am[arB[i]] = am[arA[i]] + am[arB[i]];
    // fetch cycle of each instruction in the stalling variant: one after the
    // previous, and at least three after the last writer of a register it reads
    for (int i = 0; i < 8; i++) begin
      f[i] = (i == 0) ? 0 : f[i-1] + 1;
      for (int k = 0; k < i; k++)
        if (arB[k] == arA[i] || arB[k] == arB[i]) f[i] = (f[k] + 3 > f[i]) ? f[k] + 3 : f[i];
    end
    exp_sst = f[7] - 7;

    rst = 1'b1;
    for (int i = 0; i < PROG_MAX; i++) begin
      @(negedge clk);
      y_prog_we = 1'b1; y_prog_addr = word_t'(i); y_prog_data = prog[i];
      a_prog_we = 1'b1; a_prog_addr = word_t'(i);
      if (i / 2 < 8) a_prog_data = (i % 2 == 0) ? 8'h60 : 8'((arA[i/2] << 4) | arB[i/2]);
      else           a_prog_data = (i % 2 == 0) ? 8'h10 : 8'hFF;
      a_init_we = (i < 15); a_init_reg = reg_id_t'(i); a_init_val = word_t'(100 * i);
    end
    @(negedge clk);
    y_prog_we = 1'b0; a_prog_we = 1'b0; a_init_we = 1'b0;
    rst = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1;
      cyc++;
    end while (y_stat == S_AOK && cyc < 5000);
    @(posedge clk);    // let the retire count see the halt
    #1;

    ref_run(10000);
    chk(y_stat == S_HLT, "y86 halted");
    chk(cyc == ref_cycles(), $sformatf("y86 cycles %0d expected %0d", cyc, ref_cycles()));
    chk(n_retired == int'(ref_instrs), $sformatf("y86 retired %0d expected %0d", n_retired, ref_instrs));
    for (int r = 0; r < 15; r++) begin
      y_dbg_reg = reg_id_t'(r); a_dbg_reg = reg_id_t'(r);
      #1;
      chk(y_dbg_val == ref_reg[r], $sformatf("y86 R[%0d]=%0d expected %0d", r, y_dbg_val, ref_reg[r]));
      chk(a_dbg_val == am[r], $sformatf("addq R[%0d]=%0d expected %0d", r, a_dbg_val, am[r]));
      chk(s_dbg_val == am[r], $sformatf("stalling addq R[%0d]=%0d expected %0d", r, s_dbg_val, am[r]));
    end
    chk(ref_reg[13] == 5 + 64'h108 + 7 + 7, "model: loop sum");
    chk(n_lu > 0, "load/use stall never happened");
    chk(n_mis > 0, "misprediction squash never happened");
    chk(n_ret > 0, "ret bubble never happened");
    for (int s = 1; s <= 6; s++) chk(n_fwd[s] > 0, $sformatf("y86 forwarding source %0d never used", s));
    chk(n_afe > 0 && n_afw > 0, "addq forwarding paths not both used");
    chk(n_sst > 0, "addq stall never happened");
    chk(n_sst == exp_sst, $sformatf("stalling addq stalled %0d cycles, expected %0d", n_sst, exp_sst));
    chk(n_ast == 0, "forwarding addq stalled");
    chk(n_sfwd == 0, "stalling addq forwarded");
    $display("cycles=%0d load_use=%0d mispredict=%0d ret_bubble=%0d addq fwd e=%0d w=%0d addq stalls=%0d",
             cyc, n_lu, n_mis, n_ret, n_afe, n_afw, n_sst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
