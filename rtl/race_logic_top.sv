// race_logic_top: asynchronous race-logic DNA sequence aligner.
//
// Computes the edit-distance style similarity score of a reference string p
// and a query string q, both N nucleotides long, by racing a rising edge
// through an (N+1) x (N+1) mesh of OR-type unit cells whose edge delays are
// the entries of the score matrix. The score is the time the edge needs to
// reach the last node. Three op-amp current sources, each set by its own
// (off-chip) resistor, bias every indel, match and mismatch delay element of
// the array through shared global bias lines. A clocked controller latches
// the strings, launches the race, converts the arrival time into a count of
// clock periods, abandons races that exceed the similarity threshold and
// clears the array between comparisons.
//
// With the default resistor settings (300/100/400 kOhm for indel/match/
// mismatch) one score unit is 1 ns; run clk at 1 ns period and result_score
// is the exact score. Other resistor values rescale the delays (about 10x
// range), which reprograms the score matrix.
// The array, the three resistor-set current sources with a global bias, and
// the threshold screening follow the original design; the clocked controller,
// the port formats and the absolute delay scale are this design's own.
//
// Interface: clk, rst_n; go/ready request with p_in, q_in and threshold;
// r_*_kohm resistor settings; result_valid, result_score, result_hit.
// Latency: see race_ctrl (score + 4 cycles from go for a hit).
`timescale 1ns / 1ps
module race_logic_top
  import race_pkg::*;
#(
  parameter int unsigned N            = N_DEFAULT,
  parameter int unsigned CNT_W        = 12,
  parameter int unsigned CLEAR_CYCLES = 16,
  parameter int unsigned SIGMA_PERMIL = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  output logic             ready,
  input  nt_e              p_in [N],
  input  nt_e              q_in [N],
  input  logic [CNT_W-1:0] threshold,
  input  logic [RES_W-1:0] r_indel_kohm,
  input  logic [RES_W-1:0] r_match_kohm,
  input  logic [RES_W-1:0] r_mismatch_kohm,
  output logic             result_valid,
  output logic [CNT_W-1:0] result_score,
  output logic             result_hit
);

  bias_bus_t bias;
  nt_e       p_seq [N];
  nt_e       q_seq [N];
  logic      race_start, race_finish;

  current_source #(.RES_W(RES_W), .BIAS_W(BIAS_W)) u_cs_indel (
    .res_kohm(r_indel_kohm), .bias_na(bias.indel));
  current_source #(.RES_W(RES_W), .BIAS_W(BIAS_W)) u_cs_match (
    .res_kohm(r_match_kohm), .bias_na(bias.match));
  current_source #(.RES_W(RES_W), .BIAS_W(BIAS_W)) u_cs_mismatch (
    .res_kohm(r_mismatch_kohm), .bias_na(bias.mismatch));

  race_ctrl #(.N(N), .CNT_W(CNT_W), .CLEAR_CYCLES(CLEAR_CYCLES)) u_ctrl (
    .clk, .rst_n, .go, .ready, .p_in, .q_in, .threshold,
    .p_seq, .q_seq, .race_start, .race_finish,
    .result_valid, .result_score, .result_hit);

  race_array #(.N(N), .SIGMA_PERMIL(SIGMA_PERMIL)) u_array (
    .start(race_start), .p_seq, .q_seq, .bias, .finish(race_finish));

endmodule
