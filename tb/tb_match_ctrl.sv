// tb_match_ctrl: all 16 symbol pairs must give M_ij = 1 exactly on equality.
`timescale 1ns / 1ps
module tb_match_ctrl;
  import race_pkg::*;
  nt_e  p, q;
  logic m;
  int checks = 0, failures = 0;

  match_ctrl dut (.p_sym(p), .q_sym(q), .m);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        p = nt_e'(i);
        q = nt_e'(j);
        #1;
        checks++;
        if (m !== (i == j)) begin
          failures++;
          $display("FAIL p=%0d q=%0d m=%b", i, j, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
