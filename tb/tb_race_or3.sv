// tb_race_or3: exhaustive check of the unit cell's first-arrival OR gate.
`timescale 1ns / 1ps
module tb_race_or3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  race_or3 dut (.a, .b, .c, .y);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {a, b, c} = 3'(k);
      #1;
      checks++;
      if (y !== (k != 0)) begin
        failures++;
        $display("FAIL abc=%03b y=%b", 3'(k), y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
