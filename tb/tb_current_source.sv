// tb_current_source: bias current = VREF / R after the settling time, for
// resistors across the dynamic range, and zero current for an open resistor.
`timescale 1ns / 1ps
module tb_current_source;
  logic [15:0] r;
  logic [15:0] i_na;
  int checks = 0, failures = 0;

  current_source #(.RES_W(16), .BIAS_W(16), .VREF_MV(450), .T_SETTLE_NS(5)) dut (
    .res_kohm(r), .bias_na(i_na));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned rs [6] = '{100, 300, 400, 1000, 150, 0};
    int unsigned exp_i;
    r = 16'd100;
    #20;
    foreach (rs[k]) begin
      r = 16'(rs[k]);
      exp_i = (rs[k] == 0) ? 0 : 450000 / rs[k];
      #6;
      checks++;
      if (int'(i_na) != int'(exp_i)) begin
        failures++;
        $display("FAIL R=%0d kOhm: I=%0d nA expected %0d", rs[k], i_na, exp_i);
      end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
