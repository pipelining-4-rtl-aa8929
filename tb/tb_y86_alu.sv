// tb_y86_alu: checks add, sub, and, xor and the condition codes. Overflow is
// worked out independently by doing the add or subtract on 65-bit signed values
// and testing whether the result fits in 64 bits.
module tb_y86_alu;
  import y86_pkg::*;
  logic [3:0] alufun;
  word_t      aluA, aluB, valE;
  cc_t        cc_new;
  int checks = 0, failures = 0;

  y86_alu dut (.*);

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic signed [64:0] wide;
      word_t exp_v;
      logic  exp_of;
      alufun = 4'($urandom_range(3));
      case ($urandom_range(3))
        0: begin aluA = {$urandom, $urandom}; aluB = aluA; end
        1: begin aluA = 64'h8000_0000_0000_0000 - 64'($urandom_range(2)); aluB = {$urandom, $urandom}; end
        default: begin aluA = {$urandom, $urandom}; aluB = {$urandom, $urandom}; end
      endcase
      case (alufun)
        4'd0: begin wide = $signed({aluB[63], aluB}) + $signed({aluA[63], aluA}); exp_v = wide[63:0];
                    exp_of = (wide > 65'sh0_7FFF_FFFF_FFFF_FFFF) || (wide < -65'sh0_8000_0000_0000_0000); end
        4'd1: begin wide = $signed({aluB[63], aluB}) - $signed({aluA[63], aluA}); exp_v = wide[63:0];
                    exp_of = (wide > 65'sh0_7FFF_FFFF_FFFF_FFFF) || (wide < -65'sh0_8000_0000_0000_0000); end
        4'd2: begin exp_v = aluA & aluB; exp_of = 1'b0; end
        default: begin exp_v = aluA ^ aluB; exp_of = 1'b0; end
      endcase
      #1;
      checks++;
      if (valE !== exp_v || cc_new.of !== exp_of || cc_new.zf !== (exp_v == 0) ||
          cc_new.sf !== exp_v[63]) begin
        failures++;
        $display("FAIL fun=%0d A=%h B=%h: valE=%h of=%b expected %h of=%b", alufun, aluA, aluB,
                 valE, cc_new.of, exp_v, exp_of);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
