// tb_delay_element: rise delay = C*dV/I for several bias currents (a 10x
// range), fast fall, and inertial swallowing of a pulse shorter than the
// rise delay.
`timescale 1ns / 1ps
module tb_delay_element;
  logic        vin;
  logic [15:0] bias;
  logic        vout;
  int checks = 0, failures = 0;
  realtime t0, t1;

  delay_element #(.BIAS_W(16), .CV_FF_MV(4500), .T_FALL_PS(20)) dut (
    .vin, .bias_na(bias), .vout);

  task automatic check_close(string what, real got, real exp, real tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %0.4f expected %0.4f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned currents [4] = '{4500, 1500, 1125, 450};
    vin  = 1'b0;
    bias = 16'd4500;
    #10;
    foreach (currents[k]) begin
      bias = 16'(currents[k]);
      #1;
      t0 = $realtime;
      vin = 1'b1;
      @(posedge vout);
      t1 = $realtime;
      check_close("rise delay", t1 - t0, 4500.0 / real'(currents[k]), 0.002);
      #5;
      t0 = $realtime;
      vin = 1'b0;
      @(negedge vout);
      t1 = $realtime;
      check_close("fall delay", t1 - t0, 0.020, 0.002);
      #5;
    end
    // Inertial: a 1 ns pulse into a 3 ns element must not come out.
    bias = 16'd1500;
    #1;
    vin = 1'b1;
    #1;
    vin = 1'b0;
    #10;
    checks++;
    if (vout !== 1'b0) begin
      failures++;
      $display("FAIL short pulse passed through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
