// race_pkg: types and constants shared by the race-logic sequence aligner.
//
// Nucleotides are carried as a 2-bit enumerated type. The default score
// matrix is the race-formulated DNA matrix: a match costs 1 delay unit, a
// mismatch 4 units, and an insertion or deletion (indel) 3 units. In the
// circuit these costs are not stored anywhere digital: they are set by the
// three bias currents (one per delay class), i.e. by three off-chip
// resistors. The constants below give the default resistor settings that
// produce those delays with the default delay-element and current-source
// models (delay in ns = R in kOhm / 100, so 1 score unit = 1 ns).
// The 2-bit symbol code is this design's own choice.
`timescale 1ns / 1ps
package race_pkg;

  typedef enum logic [1:0] {
    NT_A = 2'd0,
    NT_C = 2'd1,
    NT_T = 2'd2,
    NT_G = 2'd3
  } nt_e;

  // Score matrix (delay units)
  localparam int unsigned SCORE_MATCH    = 1;
  localparam int unsigned SCORE_MISMATCH = 4;
  localparam int unsigned SCORE_INDEL    = 3;

  // Default string length of the fabricated array
  localparam int unsigned N_DEFAULT = 50;

  // Width of the off-chip resistor setting (kOhm) and of the bias current (nA)
  localparam int unsigned RES_W  = 16;
  localparam int unsigned BIAS_W = 16;

  // Resistor settings giving the score matrix above: 100 kOhm per delay unit
  localparam logic [RES_W-1:0] R_MATCH_KOHM    = RES_W'(100 * SCORE_MATCH);
  localparam logic [RES_W-1:0] R_MISMATCH_KOHM = RES_W'(100 * SCORE_MISMATCH);
  localparam logic [RES_W-1:0] R_INDEL_KOHM    = RES_W'(100 * SCORE_INDEL);

  // The three bias currents shared by the whole array (global bias)
  typedef struct packed {
    logic [BIAS_W-1:0] indel;     // horizontal and vertical delay elements
    logic [BIAS_W-1:0] match;     // diagonal element taken on a match
    logic [BIAS_W-1:0] mismatch;  // diagonal element taken on a mismatch
  } bias_bus_t;

endpackage
