// tb_imem: fills the instruction memory with random bytes through the load port,
// then reads ten bytes at random PCs and checks them and the bad-address flag
// (PC beyond the last full ten-byte window) against a copy kept by the test.
module tb_imem;
  import y86_pkg::*;
  localparam int BYTES = 1024;
  logic        clk = 1'b0, we = 1'b0, imem_error;
  word_t       waddr = '0, pc = '0;
  logic [7:0]  wdata = '0;
  logic [79:0] bytes_out;
  logic [7:0]  model [BYTES];
  int checks = 0, failures = 0;

  imem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < BYTES; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = word_t'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      logic exp_err;
      pc = ($urandom_range(9) == 0) ? word_t'(BYTES - 12 + $urandom_range(6)) :
           ($urandom_range(20) == 0) ? {$urandom, $urandom} : word_t'($urandom_range(BYTES - 1));
      #1;
      exp_err = (pc > word_t'(BYTES - 10));
      checks++;
      if (imem_error !== exp_err) begin
        failures++;
        $display("FAIL pc=%h error=%b", pc, imem_error);
      end
      if (!exp_err)
        for (int i = 0; i < 10; i++) begin
          checks++;
          if (bytes_out[8*i +: 8] !== model[int'(pc) + i]) begin
            failures++;
            $display("FAIL pc=%h byte %0d", pc, i);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
