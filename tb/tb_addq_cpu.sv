// tb_addq_cpu: checks both variants of the four-stage addq pipeline.
//
// The stalling variant (FORWARDING=0) runs addq %r8,%r9; addq %r9,%r8;
// addq %r10,%r11 with R[i] = 100*i beforehand, and every pipeline register is
// compared cycle by cycle with the table of the design description: PC held at
// 0x2 for two cycles, two no-ops (register numbers 0xF) inserted, R[9] = 1700 and
// R[8] = 2500. The forwarding variant runs addq %r8,%r9; addq %rax,%rax;
// addq %r9,%r10; addq %r10,%r8 and must pass 1700 from writeback and 2700 from
// execute without any stall. Then both run random addq sequences over a few
// registers; final registers are compared with a sequential model, and the number
// of stall cycles of the stalling variant with the count expected from the
// dependences (2 for a use right after the write, 1 for a use two later).
module tb_addq_cpu;
  import y86_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd_e = 0, n_fwd_w = 0;

  // port bundles of the two instances: index 0 stalling, 1 forwarding
  logic       prog_we [2];
  word_t      prog_addr [2];
  logic [7:0] prog_data [2];
  logic       init_we [2];
  reg_id_t    init_reg [2];
  word_t      init_val [2];
  reg_id_t    dbg_reg [2];
  word_t      dbg_val [2], pc [2], E_valA [2], E_valB [2], W_valE [2];
  logic       stall [2];
  reg_id_t    D_rA [2], D_rB [2], E_dstE [2], W_dstE [2];
  logic [1:0] fwd_used [2];

  addq_cpu #(.FORWARDING(1'b0)) u_st (
    .clk, .rst, .prog_we(prog_we[0]), .prog_addr(prog_addr[0]), .prog_data(prog_data[0]),
    .init_we(init_we[0]), .init_reg(init_reg[0]), .init_val(init_val[0]),
    .dbg_reg(dbg_reg[0]), .dbg_val(dbg_val[0]), .pc(pc[0]), .stall(stall[0]),
    .D_rA(D_rA[0]), .D_rB(D_rB[0]), .E_valA(E_valA[0]), .E_valB(E_valB[0]),
    .E_dstE(E_dstE[0]), .W_valE(W_valE[0]), .W_dstE(W_dstE[0]), .fwd_used(fwd_used[0]));

  addq_cpu #(.FORWARDING(1'b1)) u_fw (
    .clk, .rst, .prog_we(prog_we[1]), .prog_addr(prog_addr[1]), .prog_data(prog_data[1]),
    .init_we(init_we[1]), .init_reg(init_reg[1]), .init_val(init_val[1]),
    .dbg_reg(dbg_reg[1]), .dbg_val(dbg_val[1]), .pc(pc[1]), .stall(stall[1]),
    .D_rA(D_rA[1]), .D_rB(D_rB[1]), .E_valA(E_valA[1]), .E_valB(E_valB[1]),
    .E_dstE(E_dstE[1]), .W_valE(W_valE[1]), .W_dstE(W_dstE[1]), .fwd_used(fwd_used[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    n_stall += int'(stall[0]);
    n_fwd_e += int'(fwd_used[1][0]);
    n_fwd_w += int'(fwd_used[1][1]);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // programs as lists of (rA, rB); the rest of memory is filled with no-ops (0xF, 0xF)
  int progA [2][$];
  int progB [2][$];

  // load both programs and set R[i] = 100*i while reset holds the pipeline
  task automatic load();
    rst = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        int idx;
        idx = i / 2;
        prog_we[k] = 1'b1; prog_addr[k] = word_t'(i);
        if (idx < progA[k].size()) prog_data[k] = (i % 2 == 0) ? 8'h60 : 8'((progA[k][idx] << 4) | progB[k][idx]);
        else                       prog_data[k] = (i % 2 == 0) ? 8'h10 : 8'hFF;
        if (i < 15) begin
          init_we[k] = 1'b1; init_reg[k] = reg_id_t'(i); init_val[k] = word_t'(100 * i);
        end else init_we[k] = 1'b0;
      end
    end
    @(negedge clk);
    for (int k = 0; k < 2; k++) prog_we[k] = 1'b0;
    rst = 1'b0;    // cycle 0 of the tables starts here
  endtask

  // compare instance k's pipeline registers (0xF = no-op; valA/valB checked when given)
  task automatic row(int k, int cyc, longint exp_pc, int rA, int rB, longint vA, longint vB,
                     int eDst, longint wV, int wDst);
    string n = $sformatf("%s cycle %0d", k == 0 ? "stall" : "forward", cyc);
    if (exp_pc >= 0) chk(pc[k] == word_t'(exp_pc), $sformatf("%s PC=%h", n, pc[k]));
    if (rA >= 0) chk(D_rA[k] == reg_id_t'(rA) && D_rB[k] == reg_id_t'(rB),
                     $sformatf("%s rA/rB=%h/%h", n, D_rA[k], D_rB[k]));
    if (vA >= 0) chk(E_valA[k] == word_t'(vA) && E_valB[k] == word_t'(vB),
                     $sformatf("%s R[srcA]/R[srcB]=%0d/%0d", n, E_valA[k], E_valB[k]));
    if (eDst >= 0) chk(E_dstE[k] == reg_id_t'(eDst), $sformatf("%s E dstE=%h", n, E_dstE[k]));
    if (wV >= 0) chk(W_valE[k] == word_t'(wV), $sformatf("%s next R[dstE]=%0d", n, W_valE[k]));
    if (wDst >= 0) chk(W_dstE[k] == reg_id_t'(wDst), $sformatf("%s W dstE=%h", n, W_dstE[k]));
  endtask

  task automatic check_regs(int k, longint unsigned m [15], string what);
    for (int r = 0; r < 15; r++) begin
      dbg_reg[k] = reg_id_t'(r);
      #1;
      chk(dbg_val[k] == m[r], $sformatf("%s R[%0d]=%0d expected %0d", what, r, dbg_val[k], m[r]));
    end
  endtask

  initial begin
    for (int k = 0; k < 2; k++) begin
      prog_we[k] = 0; prog_addr[k] = 0; prog_data[k] = 0; init_we[k] = 0;
      init_reg[k] = 0; init_val[k] = 0; dbg_reg[k] = 0;
    end

    // ---- directed: the tables of the design description ----
    progA[0] = '{8, 9, 10}; progB[0] = '{9, 8, 11};
    progA[1] = '{8, 0, 9, 10}; progB[1] = '{9, 0, 10, 8};
    load();
    // values during each cycle: sample just before the rising edge that ends it
    for (int cyc = 0; cyc <= 7; cyc++) begin
      @(posedge clk);
      #0;
      case (cyc)
        //             k cyc  PC   rA  rB   valA  valB  E.dstE  W.valE W.dstE
        0: begin row(0, 0,  0, 15, 15,   -1,  -1,   15,   -1,   15);
                 row(1, 0,  0, 15, 15,   -1,  -1,   15,   -1,   15); end
        1: begin row(0, 1,  2,  8,  9,   -1,  -1,   15,   -1,   15);
                 row(1, 1,  2,  8,  9,   -1,  -1,   15,   -1,   15); end
        2: begin row(0, 2,  2, 15, 15,  800, 900,    9,   -1,   15);
                 row(1, 2,  4,  0,  0,  800, 900,    9,   -1,   15); end
        3: begin row(0, 3,  2, 15, 15,   -1,  -1,   15, 1700,    9);
                 row(1, 3,  6,  9, 10,    0,   0,    0, 1700,    9); end
        4: begin row(0, 4,  4,  9,  8,   -1,  -1,   15,   -1,   15);
                 row(1, 4,  8, 10,  8, 1700, 1000,  10,    0,    0); end
        5: begin row(0, 5, -1, 10, 11, 1700, 800,    8,   -1,   15);
                 row(1, 5, -1, -1, -1, 2700, 800,    8, 2700,   10); end
        6: begin row(0, 6, -1, -1, -1, 1000, 1100,  11, 2500,    8);
                 row(1, 6, -1, -1, -1,   -1,  -1,   -1, 3500,    8); end
        7: begin row(0, 7, -1, -1, -1,   -1,  -1,   -1, 2100,   11); end
        default: ;
      endcase
    end
    chk(n_stall == 2, $sformatf("stalling variant stalled %0d cycles, expected 2", n_stall));

    // ---- random addq sequences on registers 0..3 ----
    for (int seed = 0; seed < 30; seed++) begin
      longint unsigned m [15];
      int f [80];
      int exp_stalls, st0, n;
      exp_stalls = 0;
      n = 10 + int'($urandom_range(60));
      for (int k = 0; k < 2; k++) begin progA[k].delete(); progB[k].delete(); end
      for (int i = 0; i < n; i++) begin
        int a, b;
        a = int'($urandom_range(3));
        b = int'($urandom_range(3));
        for (int k = 0; k < 2; k++) begin progA[k].push_back(a); progB[k].push_back(b); end
      end
      for (int r = 0; r < 15; r++) m[r] = 100 * r;
      // fetch time f[i]: one after the previous instruction, and no earlier than
      // three cycles after a producer's fetch (the producer has reached writeback)
      for (int i = 0; i < n; i++) begin
        m[progB[0][i]] = m[progA[0][i]] + m[progB[0][i]];
        f[i] = (i == 0) ? 0 : f[i-1] + 1;
        for (int j = (i >= 2 ? i - 2 : 0); j < i; j++)
          if ((progB[0][j] == progA[0][i] || progB[0][j] == progB[0][i]) && f[i] < f[j] + 3)
            f[i] = f[j] + 3;
      end
      exp_stalls = f[n-1] - (n - 1);
      load();
      st0 = n_stall;
      repeat (n + 3 * n + 10) @(posedge clk);
      #1;
      chk(n_stall - st0 == exp_stalls, $sformatf("random %0d: %0d stall cycles, expected %0d", seed, n_stall - st0, exp_stalls));
      check_regs(0, m, $sformatf("stall random %0d", seed));
      check_regs(1, m, $sformatf("forward random %0d", seed));
    end
    chk(n_fwd_e > 0 && n_fwd_w > 0, "both forwarding paths used");
    $display("stall cycles=%0d forwards from execute=%0d from writeback=%0d", n_stall, n_fwd_e, n_fwd_w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
