// tb_race_array: races through a 7-symbol edit graph. The arrival time of
// the last node must equal the shortest-path score from the reference model,
// for the example pair P = ACTGAGA / Q = GATTCGA, a perfect match, a complete
// mismatch and random pairs; a second bias setting (all delays tripled) must
// triple the score. The array must clear after start falls.
`timescale 1ns / 1ps
module tb_race_array;
  import race_pkg::*;
  import race_ref_pkg::*;

  localparam int N = 7;

  logic      start, finish;
  nt_e       p [N];
  nt_e       q [N];
  bias_bus_t bias;
  int checks = 0, failures = 0;

  race_array #(.N(N)) dut (.start, .p_seq(p), .q_seq(q), .bias, .finish);

  function automatic nt_e chr(byte c);
    case (c)
      "A": return NT_A;
      "C": return NT_C;
      "T": return NT_T;
      default: return NT_G;
    endcase
  endfunction

  task automatic run(int scale);
    seq_t    ps, qs;
    int      exp_s;
    realtime t0, t1;
    foreach (p[k]) begin
      ps[k] = int'(p[k]);
      qs[k] = int'(q[k]);
    end
    exp_s = scale * edit_score(ps, qs, N, 1, 4, 3);
    #2;
    t0 = $realtime;
    start = 1'b1;
    @(posedge finish);
    t1 = $realtime;
    checks++;
    if (t1 - t0 < real'(exp_s) - 0.01 || t1 - t0 > real'(exp_s) + 0.01) begin
      failures++;
      $display("FAIL arrival %0.3f ns, expected score %0d", t1 - t0, exp_s);
    end
    start = 1'b0;
    #3;
    checks++;
    if (finish !== 1'b0) begin
      failures++;
      $display("FAIL array did not clear");
    end
  endtask

  task automatic load_example();
    string sp = "ACTGAGA";
    string sq = "GATTCGA";
    foreach (p[k]) begin
      p[k] = chr(sp[k]);
      q[k] = chr(sq[k]);
    end
  endtask

  task automatic load_random();
    foreach (p[k]) begin
      p[k] = nt_e'($urandom_range(3));
      q[k] = nt_e'($urandom_range(3));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0;
    bias.indel    = 16'd1500;  // 3 ns
    bias.match    = 16'd4500;  // 1 ns
    bias.mismatch = 16'd1125;  // 4 ns
    load_example();
    #10;
    run(1);
    foreach (p[k]) begin
      p[k] = nt_e'(k % 4);
      q[k] = nt_e'(k % 4);
    end
    run(1);
    foreach (p[k]) begin
      p[k] = NT_A;
      q[k] = NT_C;
    end
    run(1);
    for (int r = 0; r < 20; r++) begin
      load_random();
      run(1);
    end
    // Reprogrammed bias: every delay three times longer
    bias.indel    = 16'd500;
    bias.match    = 16'd1500;
    bias.mismatch = 16'd375;
    load_example();
    run(3);
    for (int r = 0; r < 3; r++) begin
      load_random();
      run(3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
