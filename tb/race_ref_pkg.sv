// race_ref_pkg: reference model for the testbenches.
//
// edit_score() computes the shortest path through the edit graph of two
// strings with the classic dynamic-programming recurrence
//   S[0][0] = 0, S[i][j] = min(S[i-1][j] + indel, S[i][j-1] + indel,
//                              S[i-1][j-1] + (q[i-1]==p[j-1] ? match : mismatch))
// which is what the race array computes in time. Strings are int arrays of
// nucleotide codes 0..3, up to MAXN long.
`timescale 1ns / 1ps
package race_ref_pkg;

  localparam int MAXN = 64;

  typedef int seq_t [MAXN];

  function automatic int edit_score(seq_t p, seq_t q, int n,
                                    int match, int mismatch, int indel);
    int s [MAXN+1][MAXN+1];
    int best, c;
    for (int i = 0; i <= n; i++) begin
      for (int j = 0; j <= n; j++) begin
        if (i == 0 && j == 0) s[i][j] = 0;
        else begin
          best = 1 << 30;
          if (i > 0) begin
            c = s[i-1][j] + indel;
            if (c < best) best = c;
          end
          if (j > 0) begin
            c = s[i][j-1] + indel;
            if (c < best) best = c;
          end
          if (i > 0 && j > 0) begin
            c = s[i-1][j-1] + ((q[i-1] == p[j-1]) ? match : mismatch);
            if (c < best) best = c;
          end
          s[i][j] = best;
        end
      end
    end
    return s[n][n];
  endfunction

endpackage
