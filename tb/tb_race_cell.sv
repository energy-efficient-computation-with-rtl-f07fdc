// tb_race_cell: a rising edge on any one input must appear on the right and
// down outputs after the indel delay and on the diagonal output after the
// match or mismatch delay, chosen by the cell's symbols; the earliest of two
// inputs decides the timing.
`timescale 1ns / 1ps
module tb_race_cell;
  import race_pkg::*;
  logic      top_in, left_in, diag_in;
  nt_e       p, q;
  bias_bus_t bias;
  logic      node, right_out, down_out, diag_out;
  int checks = 0, failures = 0;
  realtime t0, t_r, t_d, t_g;

  race_cell dut (.top_in, .left_in, .diag_in, .p_sym(p), .q_sym(q), .bias,
                 .node, .right_out, .down_out, .diag_out);

  always @(posedge right_out) t_r = $realtime;
  always @(posedge down_out)  t_d = $realtime;
  always @(posedge diag_out)  t_g = $realtime;

  task automatic check_close(string what, real got, real exp);
    checks++;
    if (got < exp - 0.002 || got > exp + 0.002) begin
      failures++;
      $display("FAIL %s: got %0.3f expected %0.3f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bias.indel    = 16'd1500;  // 3 ns
    bias.match    = 16'd4500;  // 1 ns
    bias.mismatch = 16'd1125;  // 4 ns
    {top_in, left_in, diag_in} = 3'b000;
    p = NT_A;
    q = NT_A;
    #20;
    for (int k = 0; k < 6; k++) begin
      real second;
      p = nt_e'(k % 4);
      q = (k % 2 == 0) ? nt_e'(k % 4) : nt_e'((k + 1) % 4);
      #1;
      t0 = $realtime;
      second = 2.0;
      // first input rises now, another one 2 ns later (must not matter)
      case (k % 3)
        0: top_in = 1'b1;
        1: left_in = 1'b1;
        default: diag_in = 1'b1;
      endcase
      #(second);
      case (k % 3)
        0: diag_in = 1'b1;
        1: top_in = 1'b1;
        default: left_in = 1'b1;
      endcase
      #10;
      check_close("right", t_r - t0, 3.0);
      check_close("down", t_d - t0, 3.0);
      check_close("diag", t_g - t0, (p == q) ? 1.0 : 4.0);
      {top_in, left_in, diag_in} = 3'b000;
      #2;
      checks++;
      if ({node, right_out, down_out, diag_out} !== 4'b0000) begin
        failures++;
        $display("FAIL cell did not clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
