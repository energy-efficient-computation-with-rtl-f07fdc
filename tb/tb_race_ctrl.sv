// tb_race_ctrl: the controller against a stand-in for the array whose
// finish signal rises a chosen number of ns after race_start (clock period
// 1 ns). Checks the reported score, the hit flag, the go-to-result latency
// (S + 4 cycles for a hit, threshold + 5 for a rejected race), that the
// strings are latched on go, and that ready returns only after the clear
// phase.
`timescale 1ns / 1ps
module tb_race_ctrl;
  import race_pkg::*;

  localparam int N = 4;
  localparam int CNT_W = 12;
  localparam int CLEAR = 16;

  logic             clk = 1'b0, rst_n;
  logic             go, ready;
  nt_e              p_in [N], q_in [N], p_seq [N], q_seq [N];
  logic [CNT_W-1:0] threshold;
  logic             race_start, race_finish;
  logic             result_valid, result_hit;
  logic [CNT_W-1:0] result_score;
  int checks = 0, failures = 0;
  real arrival_ns;
  int  ev;

  race_ctrl #(.N(N), .CNT_W(CNT_W), .CLEAR_CYCLES(CLEAR)) dut (
    .clk, .rst_n, .go, .ready, .p_in, .q_in, .threshold,
    .p_seq, .q_seq, .race_start, .race_finish,
    .result_valid, .result_score, .result_hit);

  always #0.5 clk = ~clk;

  // Array stand-in: rising edge delayed by arrival_ns, fast clear
  initial begin
    race_finish = 1'b0;
    ev = 0;
  end
  always @(race_start) begin
    ev = ev + 1;
    fork
      automatic int   id = ev;
      automatic logic lv = race_start;
      begin
        #(lv ? arrival_ns : 0.1);
        if (id == ev) race_finish = lv;
      end
    join_none
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic race(int s, int thr);
    int cyc;
    bit exp_hit;
    arrival_ns = real'(s);
    threshold  = CNT_W'(thr);
    wait (ready);
    @(negedge clk);
    foreach (p_in[k]) begin
      p_in[k] = nt_e'($urandom_range(3));
      q_in[k] = nt_e'($urandom_range(3));
    end
    go = 1'b1;
    @(posedge clk);
    #0.1;
    go = 1'b0;
    foreach (p_in[k]) begin
      check("p latched", int'(p_seq[k]), int'(p_in[k]));
      check("q latched", int'(q_seq[k]), int'(q_in[k]));
    end
    cyc = 0;
    while (!result_valid) begin
      @(posedge clk);
      #0.1;
      cyc++;
    end
    exp_hit = (s <= thr);
    check("hit", int'(result_hit), int'(exp_hit));
    check("score", int'(result_score), exp_hit ? s : thr);
    check("latency", cyc, exp_hit ? s + 4 : thr + 5);
    check("ready low while clearing", int'(ready), 0);
    cyc = 0;
    while (!ready) begin
      @(posedge clk);
      #0.1;
      cyc++;
    end
    checks++;
    if (cyc < CLEAR) begin
      failures++;
      $display("FAIL clear phase only %0d cycles", cyc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    go = 1'b0;
    threshold = '0;
    arrival_ns = 1.0;
    foreach (p_in[k]) begin
      p_in[k] = NT_A;
      q_in[k] = NT_A;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    race(4, 100);
    race(7, 100);
    race(50, 60);
    race(60, 60);   // exactly at the threshold: still a hit
    race(61, 60);   // one unit over: rejected
    race(300, 92);  // far over: rejected
    race(1, 10);
    for (int k = 0; k < 10; k++) race($urandom_range(200, 1), 120);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
