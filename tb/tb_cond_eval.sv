// tb_cond_eval: sets the condition codes as "subq a, b" would (flags of b - a) and
// checks each jump condition against the signed comparison of b with a that it
// stands for: le is b <= a, l is b < a, e is b == a, and so on. Codes 7..15 must
// never be taken.
module tb_cond_eval;
  import y86_pkg::*;
  logic [3:0] ifun;
  cc_t        cc;
  logic       cnd;
  int checks = 0, failures = 0;

  cond_eval dut (.*);

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint a, b;
      logic signed [64:0] wide;
      word_t r;
      logic  exp_c;
      a = longint'({$urandom, $urandom});
      b = ($urandom_range(3) == 0) ? a : longint'({$urandom, $urandom});
      if ($urandom_range(3) == 0) a = -64'sd9223372036854775807 - 1;
      wide = 65'(b) - 65'(a);
      r = word_t'(b - a);
      cc.zf = (r == 0);
      cc.sf = r[63];
      cc.of = (wide != 65'($signed(r)));
      ifun = 4'($urandom_range(15));
      case (ifun)
        4'd0: exp_c = 1'b1;
        4'd1: exp_c = (b <= a);
        4'd2: exp_c = (b < a);
        4'd3: exp_c = (b == a);
        4'd4: exp_c = (b != a);
        4'd5: exp_c = (b >= a);
        4'd6: exp_c = (b > a);
        default: exp_c = 1'b0;
      endcase
      #1;
      checks++;
      if (cnd !== exp_c) begin
        failures++;
        $display("FAIL ifun=%0d a=%0d b=%0d: cnd=%b", ifun, a, b, cnd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
