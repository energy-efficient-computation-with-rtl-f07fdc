// tb_race_variation: Monte Carlo style study of delay variation. Two arrays
// (N = 12) whose delay elements draw a normally distributed error on every
// rising edge, with a 5 % and a 10 % standard deviation, race the same pair
// of strings RUNS times. Checks, per array: every arrival lies within a
// +-5 sigma band of the exact score; the runs actually spread; and the mean
// score is not above the exact one, because an OR-type array always passes
// the fastest of the competing paths, so errors bias the score downwards.
// Also shows that a threshold a little above the exact score still accepts
// the pair in (nearly) every run.
`timescale 1ns / 1ps
module tb_race_variation;
  import race_pkg::*;
  import race_ref_pkg::*;

  localparam int N    = 12;
  localparam int RUNS = 300;

  logic      start;
  logic      fin5, fin10;
  nt_e       p [N];
  nt_e       q [N];
  bias_bus_t bias;
  realtime   t_start, t5, t10;
  int checks = 0, failures = 0;

  race_array #(.N(N), .SIGMA_PERMIL(50))  dut5  (.start, .p_seq(p), .q_seq(q), .bias, .finish(fin5));
  race_array #(.N(N), .SIGMA_PERMIL(100)) dut10 (.start, .p_seq(p), .q_seq(q), .bias, .finish(fin10));

  always @(posedge fin5)  t5  = $realtime;
  always @(posedge fin10) t10 = $realtime;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t ps, qs;
    int   exact;
    real  s5, s10, sum5, sum10, min5, max5, min10, max10;
    int   below5, below10, accept10, thr10;
    start = 1'b0;
    bias.indel    = 16'd1500;
    bias.match    = 16'd4500;
    bias.mismatch = 16'd1125;
    foreach (p[k]) begin
      p[k]  = nt_e'($urandom_range(3));
      q[k]  = nt_e'($urandom_range(3));
      ps[k] = int'(p[k]);
      qs[k] = int'(q[k]);
    end
    exact = edit_score(ps, qs, N, 1, 4, 3);
    thr10 = exact + (exact + 19) / 20;  // threshold raised by about 5 %
    sum5 = 0.0; sum10 = 0.0;
    min5 = 1.0e9; max5 = 0.0; min10 = 1.0e9; max10 = 0.0;
    below5 = 0; below10 = 0; accept10 = 0;
    #10;
    for (int r = 0; r < RUNS; r++) begin
      t_start = $realtime;
      start = 1'b1;
      wait (fin5 && fin10);
      #0.001;
      s5  = t5 - t_start;
      s10 = t10 - t_start;
      sum5 += s5;
      sum10 += s10;
      if (s5 < min5) min5 = s5;
      if (s5 > max5) max5 = s5;
      if (s10 < min10) min10 = s10;
      if (s10 > max10) max10 = s10;
      if (s5 < real'(exact)) below5++;
      if (s10 < real'(exact)) below10++;
      if (s10 <= real'(thr10)) accept10++;
      check("5% run inside +-5 sigma band",
            s5 > 0.75 * real'(exact) && s5 < 1.25 * real'(exact));
      check("10% run inside +-5 sigma band",
            s10 > 0.5 * real'(exact) && s10 < 1.5 * real'(exact));
      start = 1'b0;
      #5;
    end
    $display("exact score %0d; 5%%: mean %0.2f min %0.2f max %0.2f below %0d/%0d",
             exact, sum5 / RUNS, min5, max5, below5, RUNS);
    $display("10%%: mean %0.2f min %0.2f max %0.2f below %0d/%0d; accepted at threshold %0d: %0d/%0d",
             sum10 / RUNS, min10, max10, below10, RUNS, thr10, accept10, RUNS);
    check("5% runs spread", max5 - min5 > 0.01 * real'(exact));
    check("10% runs spread wider than 5%", max10 - min10 > max5 - min5);
    check("5% mean not above exact", sum5 / RUNS <= real'(exact));
    check("10% mean not above exact", sum10 / RUNS <= real'(exact));
    check("raised threshold accepts the pair in >= 90% of runs", accept10 * 10 >= RUNS * 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
