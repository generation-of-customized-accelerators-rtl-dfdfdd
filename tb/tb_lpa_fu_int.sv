// tb_lpa_fu_int: checks every integer FU operation against an independent
// computation on random and corner operands.
module tb_lpa_fu_int;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  word_t a, b;
  word_t y [10];
  lpa_fu_int #(.OP(INT_ADD))  u0 (.a, .b, .y(y[0]));
  lpa_fu_int #(.OP(INT_RSUB)) u1 (.a, .b, .y(y[1]));
  lpa_fu_int #(.OP(INT_AND))  u2 (.a, .b, .y(y[2]));
  lpa_fu_int #(.OP(INT_OR))   u3 (.a, .b, .y(y[3]));
  lpa_fu_int #(.OP(INT_XOR))  u4 (.a, .b, .y(y[4]));
  lpa_fu_int #(.OP(INT_BSLL)) u5 (.a, .b, .y(y[5]));
  lpa_fu_int #(.OP(INT_BSRL)) u6 (.a, .b, .y(y[6]));
  lpa_fu_int #(.OP(INT_BSRA)) u7 (.a, .b, .y(y[7]));
  lpa_fu_int #(.OP(INT_CMP))  u8 (.a, .b, .y(y[8]));
  lpa_fu_int #(.OP(INT_CMPU)) u9 (.a, .b, .y(y[9]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int i, word_t exp);
    checks++;
    if (y[i] !== exp) begin
      failures++;
      $display("FAIL op %0d a=%h b=%h got %h exp %h", i, a, b, y[i], exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      longint sa, sb;
      word_t sh;
      a = (n < 4) ? word_t'(n * 32'h7FFF_FFFF) : $urandom;
      b = (n % 3 == 0) ? word_t'($urandom % 40) : $urandom;
      #1;
      sa = longint'($signed(a)); sb = longint'($signed(b));
      chk(0, word_t'(longint'(a) + longint'(b)));
      chk(1, word_t'(longint'(b) - longint'(a)));
      chk(2, a & b);
      chk(3, a | b);
      chk(4, a ^ b);
      sh = 0; for (int k = 0; k < 32; k++) if (k + int'(b[4:0]) < 32) sh[k + int'(b[4:0])] = a[k];
      chk(5, sh);
      sh = 0; for (int k = 0; k < 32; k++) if (k + int'(b[4:0]) < 32) sh[k] = a[k + int'(b[4:0])];
      chk(6, sh);
      for (int k = 0; k < 32; k++) if (k + int'(b[4:0]) >= 32) sh[k] = a[31];
      chk(7, sh);
      chk(8, {sa > sb, 31'(longint'(b) - longint'(a))});
      chk(9, {a > b, 31'(longint'(b) - longint'(a))});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
