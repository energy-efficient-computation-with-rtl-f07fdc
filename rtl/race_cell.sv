// race_cell: one unit cell (one node) of the OR-type race-logic edit graph.
//
// The first rising edge to arrive on the top, left or diagonal input passes
// the symmetric OR gate and becomes the node signal. The node drives three
// outgoing edges: a horizontal and a vertical indel delay element (constant
// delay for alignment) and two diagonal delay elements, one biased for a match
// and one for a mismatch. The per-cell control circuit compares the cell's
// two symbols and its output M_ij selects, through a 2:1 multiplexer, which
// diagonal element's output leaves the cell. All delays are set by the three
// shared bias currents. Both diagonal elements are driven and the multiplexer
// sits after them, as in the cell floorplan.
// The cell structure follows the original design; the multiplexer polarity
// (M_ij = 1 selects the match element) and zero delay in the OR gate and the
// multiplexer are this design's choices.
//
// Interface: top_in, left_in, diag_in in; p_sym (column symbol), q_sym (row
// symbol) and bias in; node, right_out, down_out, diag_out out.
// Timing: right_out/down_out rise one indel delay after node, diag_out one
// match or mismatch delay after node; node rises at the earliest input.
`timescale 1ns / 1ps
module race_cell
  import race_pkg::*;
#(
  parameter int unsigned SIGMA_PERMIL = 0
) (
  input  logic      top_in,
  input  logic      left_in,
  input  logic      diag_in,
  input  nt_e       p_sym,
  input  nt_e       q_sym,
  input  bias_bus_t bias,
  output logic      node,
  output logic      right_out,
  output logic      down_out,
  output logic      diag_out
);

  logic m_ij;
  logic diag_match, diag_mismatch;

  race_or3 u_or (.a(top_in), .b(left_in), .c(diag_in), .y(node));

  match_ctrl u_ctrl (.p_sym(p_sym), .q_sym(q_sym), .m(m_ij));

  delay_element #(.BIAS_W(BIAS_W), .SIGMA_PERMIL(SIGMA_PERMIL)) u_dly_h (
    .vin(node), .bias_na(bias.indel), .vout(right_out));

  delay_element #(.BIAS_W(BIAS_W), .SIGMA_PERMIL(SIGMA_PERMIL)) u_dly_v (
    .vin(node), .bias_na(bias.indel), .vout(down_out));

  delay_element #(.BIAS_W(BIAS_W), .SIGMA_PERMIL(SIGMA_PERMIL)) u_dly_dm (
    .vin(node), .bias_na(bias.match), .vout(diag_match));

  delay_element #(.BIAS_W(BIAS_W), .SIGMA_PERMIL(SIGMA_PERMIL)) u_dly_dx (
    .vin(node), .bias_na(bias.mismatch), .vout(diag_mismatch));

  // Diagonal multiplexer driven by M_ij
  always_comb diag_out = m_ij ? diag_match : diag_mismatch;

endmodule
