// tb_lpa_fu_exit: checks every branch condition, both trace directions and
// the start gating of the exit unit.
module tb_lpa_fu_exit;
  import lpa_pkg::*;
  int checks = 0, failures = 0;
  word_t a;
  logic start;
  logic [5:0] ex_loop, ex_fall;
  for (genvar c = 0; c < 6; c++) begin : g
    lpa_fu_exit #(.COND(br_cond_e'(c)), .LOOP_ON_TAKEN(1'b1)) u_t (.start, .a, .exit_o(ex_loop[c]));
    lpa_fu_exit #(.COND(br_cond_e'(c)), .LOOP_ON_TAKEN(1'b0)) u_f (.start, .a, .exit_o(ex_fall[c]));
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    word_t vals [5] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF};
    foreach (vals[i]) for (int s = 0; s < 2; s++) begin
      logic [5:0] tk;
      int v;
      a = vals[i]; start = s[0]; #1;
      v = $signed(a);
      tk = {v >= 0, v > 0, v <= 0, v < 0, v != 0, v == 0};
      for (int c = 0; c < 6; c++) begin
        checks += 2;
        if (ex_loop[c] !== (start & ~tk[c])) begin failures++; $display("FAIL loop c%0d a=%h", c, a); end
        if (ex_fall[c] !== (start &  tk[c])) begin failures++; $display("FAIL fall c%0d a=%h", c, a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
