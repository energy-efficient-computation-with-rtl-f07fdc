// race_array: the (N+1) x (N+1) node edit graph of two length-N strings.
//
// Node (i,j) (row i = query position, column j = reference position) is one
// race_cell. Its horizontal output feeds the left input of node (i,j+1), its
// vertical output the top input of node (i+1,j), and its diagonal output the
// diagonal input of node (i+1,j+1). The diagonal edge leaving node (i,j)
// aligns reference symbol p[j] with query symbol q[i]; the cells of the last
// row and column have no outgoing diagonal into the graph, so their symbols
// are tied off. The race is injected at node (0,0); inputs that would come
// from outside the graph are tied low. With all delays ideal, the bottom-right
// node rises exactly score * unit after start rises, where score is the
// shortest path through the edit graph under the programmed score matrix.
// Taking start low returns the whole array to zero after (2N) fast fall delays.
// The mesh, its orientation (reference along columns, query along rows) and
// the corner-to-corner race follow the original design; tying the border inputs
// low and keeping full cells in the last row and column are this design's.
//
// Interface: start in; p_seq[N], q_seq[N] symbols (static during a race);
// bias (three shared bias currents); finish out (node (N,N)).
`timescale 1ns / 1ps
module race_array
  import race_pkg::*;
#(
  parameter int unsigned N            = N_DEFAULT,
  parameter int unsigned SIGMA_PERMIL = 0
) (
  input  logic      start,
  input  nt_e       p_seq [N],
  input  nt_e       q_seq [N],
  input  bias_bus_t bias,
  output logic      finish
);

  // Outputs of node (i,j): node signal and its right, down and diagonal edges.
  // The edges leaving the last row or column end at the graph border.
  logic nd [N+1][N+1];
  logic ro [N+1][N+1];
  logic dn [N+1][N+1];
  logic dg [N+1][N+1];

  for (genvar i = 0; i <= N; i++) begin : g_row
    for (genvar j = 0; j <= N; j++) begin : g_col
      logic top_i, left_i, diag_i;
      nt_e  p_s, q_s;

      if (i == 0 && j == 0) begin : g_root
        assign top_i  = start;
        assign left_i = 1'b0;
        assign diag_i = 1'b0;
      end else begin : g_inner
        if (i == 0) begin : g_top0
          assign top_i = 1'b0;
        end else begin : g_top
          assign top_i = dn[i-1][j];
        end
        if (j == 0) begin : g_left0
          assign left_i = 1'b0;
        end else begin : g_left
          assign left_i = ro[i][j-1];
        end
        if (i == 0 || j == 0) begin : g_diag0
          assign diag_i = 1'b0;
        end else begin : g_diag
          assign diag_i = dg[i-1][j-1];
        end
      end

      if (i < N && j < N) begin : g_sym
        assign p_s = p_seq[j];
        assign q_s = q_seq[i];
      end else begin : g_nosym
        assign p_s = NT_A;
        assign q_s = NT_A;
      end

      race_cell #(.SIGMA_PERMIL(SIGMA_PERMIL)) u_cell (
        .top_in   (top_i),
        .left_in  (left_i),
        .diag_in  (diag_i),
        .p_sym    (p_s),
        .q_sym    (q_s),
        .bias     (bias),
        .node     (nd[i][j]),
        .right_out(ro[i][j]),
        .down_out (dn[i][j]),
        .diag_out (dg[i][j])
      );
    end
  end

  assign finish = nd[N][N];

endmodule
