// tb_pipe_reg: checks the stall/bubble pipeline register bank.
// First the exercise of the design description: an 8-bit register with default
// 0xFF fed 0x01, 0x02, ... with the given stall/bubble pattern must produce
// 0xFF 0x01 0x01 0x03 0xFF 0x05 0x06 0x06 0x06. Then random stall/bubble/data
// against a one-line model (keep, default, or load). Last, a bank of five such
// registers (fetch, decode, execute, memory, writeback) holding instructions
// E D C B A gets the two squash-and-stall patterns of the description: fetch
// stalled, decode bubble, execute stall, memory bubble, writeback normal must
// give E nop C nop B; all normal except execute stall and memory bubble, with
// F fetched next, must give F E C nop B.
module tb_pipe_reg;
  logic       clk = 1'b0, rst = 1'b1, stall = 1'b0, bubble = 1'b0;
  logic [7:0] d = '0, q;
  int checks = 0, failures = 0;

  pipe_reg dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] a_val [9] = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08, 8'h00};
  logic       st    [9] = '{0, 1, 0, 0, 0, 0, 1, 1, 0};
  logic       bu    [9] = '{0, 0, 0, 1, 0, 0, 0, 0, 0};
  logic [7:0] exp_b [9] = '{8'hFF, 8'h01, 8'h01, 8'h03, 8'hFF, 8'h05, 8'h06, 8'h06, 8'h06};
  logic [7:0] model;

  // five-register bank: stage 0 is fetch, its input is the next instruction
  logic [7:0] bank_in, bank_q [5];
  logic [4:0] bank_st, bank_bu;
  for (genvar i = 0; i < 5; i++) begin : g_bank
    pipe_reg stage (.clk, .rst, .stall(bank_st[i]), .bubble(bank_bu[i]),
                    .d(i == 0 ? bank_in : bank_q[i == 0 ? 0 : i - 1]), .q(bank_q[i]));
  end

  initial begin
    bank_in = '0; bank_st = '0; bank_bu = '0;
  end

  // fill the bank with E D C B A (letters as ASCII), then apply one pattern
  task automatic bank_case(logic [4:0] st, logic [4:0] bu, logic [7:0] exp [5], string name);
    bank_st = '0; bank_bu = '0;
    for (int k = 0; k < 5; k++) begin
      bank_in = 8'("A") + 8'(k);
      @(negedge clk);
    end
    bank_in = 8'("F"); bank_st = st; bank_bu = bu;
    @(negedge clk);
    bank_st = '0; bank_bu = '0;
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (bank_q[i] !== exp[i]) begin
        failures++;
        $display("FAIL %s stage %0d: %h expected %h", name, i, bank_q[i], exp[i]);
      end
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 9; t++) begin
      checks++;
      if (q !== exp_b[t]) begin
        failures++;
        $display("FAIL exercise time %0d: B=%h expected %h", t, q, exp_b[t]);
      end
      d = a_val[t]; stall = st[t]; bubble = bu[t];
      @(negedge clk);
    end
    model = q;
    for (int t = 0; t < 2000; t++) begin
      d = 8'($urandom);
      case ($urandom_range(3))
        0: begin stall = 1'b1; bubble = 1'b0; end
        1: begin stall = 1'b0; bubble = 1'b1; end
        default: begin stall = 1'b0; bubble = 1'b0; end
      endcase
      @(negedge clk);
      model = bubble ? 8'hFF : (stall ? model : d);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL random %0d: q=%h expected %h", t, q, model);
      end
    end
    // stage bits: [0] fetch .. [4] writeback
    bank_case(5'b00101, 5'b01010, '{8'("E"), 8'hFF, 8'("C"), 8'hFF, 8'("B")}, "squash+stall 1");
    bank_case(5'b00100, 5'b01000, '{8'("F"), 8'("E"), 8'("C"), 8'hFF, 8'("B")}, "squash+stall 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
