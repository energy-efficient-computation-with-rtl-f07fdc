// match_ctrl: per-cell match/mismatch control.
//
// Compares the reference symbol of the cell's column with the query symbol of
// its row and raises m (M_ij) when they are equal. M_ij steers the cell's
// diagonal multiplexer to the match-delay element; otherwise the
// mismatch-delay element is used. The comparison is a plain equality of the
// 2-bit nucleotide codes, the simplest circuit that performs the function.
// The symbols are static for the duration of a race, so the output settles
// before the race is launched. Combinational.
`timescale 1ns / 1ps
module match_ctrl
  import race_pkg::*;
(
  input  nt_e  p_sym,  // reference/column symbol
  input  nt_e  q_sym,  // query/row symbol
  output logic m       // 1: match, 0: mismatch
);

  always_comb m = (p_sym == q_sym);

endmodule
