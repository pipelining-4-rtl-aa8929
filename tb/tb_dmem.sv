// tb_dmem: random 8-byte reads and writes at any byte address (including
// overlapping and unaligned ones) against a byte-array model; out-of-range
// accesses must raise dmem_error and must not write.
module tb_dmem;
  import y86_pkg::*;
  localparam int BYTES = 1024;
  logic       clk = 1'b0, rd = 1'b0, wr = 1'b0, dmem_error;
  word_t      addr = '0, wdata = '0, rdata;
  logic [7:0] model [BYTES];
  int checks = 0, failures = 0;

  dmem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every byte
    for (int i = 0; i < BYTES; i += 8) begin
      @(negedge clk);
      wr = 1'b1; rd = 1'b0; addr = word_t'(i); wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) model[i + k] = wdata[8*k +: 8];
    end
    for (int t = 0; t < 5000; t++) begin
      logic  oob;
      word_t exp;
      @(negedge clk);
      wr = ($urandom_range(1) == 1); rd = !wr || ($urandom_range(1) == 1);
      addr = ($urandom_range(15) == 0) ? word_t'(BYTES - 10 + $urandom_range(9)) : word_t'($urandom_range(BYTES - 8));
      wdata = {$urandom, $urandom};
      #1;
      oob = (addr > word_t'(BYTES - 8));
      checks++;
      if (dmem_error !== oob) begin
        failures++;
        $display("FAIL addr=%h error=%b", addr, dmem_error);
      end
      if (rd && !oob) begin
        for (int k = 0; k < 8; k++) exp[8*k +: 8] = model[int'(addr) + k];
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("FAIL read addr=%h got %h expected %h", addr, rdata, exp);
        end
      end
      if (wr && !oob)
        for (int k = 0; k < 8; k++) model[int'(addr) + k] = wdata[8*k +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
