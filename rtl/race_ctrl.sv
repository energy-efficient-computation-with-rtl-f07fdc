// race_ctrl: clocked front end of the asynchronous race-logic array.
//
// The array itself has no clock; this controller runs one comparison at a
// time around it:
//   IDLE   - waits for go, then latches the reference (p) and query (q)
//            strings, which stay static on p_seq/q_seq during the race.
//   LAUNCH - one cycle in which the match/mismatch selects settle; the race
//            is then injected by raising race_start.
//   RUN    - counts clock cycles while the rising edge propagates. The
//            arrival of the edge at the last node (race_finish, asynchronous)
//            is brought in through a two-flop synchronizer; the elapsed time,
//            minus the synchronizer latency, is the alignment score in clock
//            periods. If the count passes the similarity threshold before
//            the edge arrives, the race is abandoned: the pair is judged not
//            similar (a pair is a hit when its score <= threshold) and the controller moves on (result_hit = 0).
//   CLEAR  - race_start is dropped, which returns every node of the array to
//            zero; the controller waits CLEAR_CYCLES cycles and until the
//            synchronized finish is low before accepting the next pair.
// race_start is launched from a falling-edge flop so that an arrival after an
// exact whole number of clock periods lands mid-cycle for the rising-edge
// synchronizer: with the clock period equal to one delay unit, a race of
// score S is reported as S exactly. The timing measurement, the synchronizer,
// the threshold abort and the clear phase are this design's own realisation of
// "observe the arrival time and drop pairs above a threshold".
//
// Interface: go/ready handshake (go is taken in IDLE, where ready is high);
// result_valid pulses for one cycle with result_score and result_hit.
// Latency: result_valid rises S + 4 cycles after the cycle in which go was
// taken (hit), or threshold + 5 cycles after it (rejected).
`timescale 1ns / 1ps
module race_ctrl
  import race_pkg::*;
#(
  parameter int unsigned N            = N_DEFAULT,
  parameter int unsigned CNT_W        = 12,
  parameter int unsigned CLEAR_CYCLES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // request
  input  logic             go,
  output logic             ready,
  input  nt_e              p_in [N],
  input  nt_e              q_in [N],
  input  logic [CNT_W-1:0] threshold,
  // to / from the race array
  output nt_e              p_seq [N],
  output nt_e              q_seq [N],
  output logic             race_start,
  input  logic             race_finish,
  // result
  output logic             result_valid,
  output logic [CNT_W-1:0] result_score,
  output logic             result_hit
);

  localparam int unsigned SYNC_LAT = 2;

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_RUN, S_CLEAR} state_e;

  state_e           state;
  logic             start_req;
  logic             fin_s1, fin_s2;
  logic [CNT_W-1:0] cnt;

  // Two-flop synchronizer for the asynchronous arrival
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin_s1 <= 1'b0;
      fin_s2 <= 1'b0;
    end else begin
      fin_s1 <= race_finish;
      fin_s2 <= fin_s1;
    end
  end

  // Launch flop on the falling edge (see header)
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) race_start <= 1'b0;
    else        race_start <= start_req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      start_req    <= 1'b0;
      cnt          <= '0;
      result_valid <= 1'b0;
      result_score <= '0;
      result_hit   <= 1'b0;
      for (int k = 0; k < int'(N); k++) begin
        p_seq[k] <= NT_A;
        q_seq[k] <= NT_A;
      end
    end else begin
      result_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (go) begin
            p_seq <= p_in;
            q_seq <= q_in;
            state <= S_LAUNCH;
          end
        end
        S_LAUNCH: begin
          start_req <= 1'b1;
          cnt       <= '0;
          state     <= S_RUN;
        end
        S_RUN: begin
          if (cnt != '1) cnt <= cnt + 1'b1;
          // Passing the threshold takes priority: an edge seen at the same
          // cycle arrived later than the threshold allows.
          if ({1'b0, cnt} >= {1'b0, threshold} + (CNT_W+1)'(SYNC_LAT + 1)) begin
            result_valid <= 1'b1;
            result_score <= threshold;
            result_hit   <= 1'b0;
            start_req    <= 1'b0;
            cnt          <= '0;
            state        <= S_CLEAR;
          end else if (fin_s2) begin
            result_valid <= 1'b1;
            result_score <= cnt - CNT_W'(SYNC_LAT);
            result_hit   <= 1'b1;
            start_req    <= 1'b0;
            cnt          <= '0;
            state        <= S_CLEAR;
          end
        end
        S_CLEAR: begin
          if (cnt != '1) cnt <= cnt + 1'b1;
          if (cnt >= CNT_W'(CLEAR_CYCLES) && !fin_s2) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb ready = (state == S_IDLE);

  // The array must be back at all-zero before a new race is injected.
  a_clear_before_launch : assert property (
    @(posedge clk) disable iff (!rst_n)
    (state == S_LAUNCH) |-> (!fin_s2 && !race_start))
    else $error("race launched before the array was cleared");

endmodule
