// safcm: one-dimensional systolic array that forms the m x m coefficient
// matrix A of the GF(2^m) division b = c / a (canonical basis).
//
// The divisor a enters bit-serially, a_{m-1} first, together with the
// coefficients of g(z) (g_{m-1} first) and a start flag q that is 1 with
// a_{m-1}.  Column 0 of A is the input stream itself (a[i][0] = a_{m-1-i});
// processor Q_j (j = 1..m-1) produces column j, row 0 first, with element
// a[i][j] leaving Q_j at step i + 2j.  The last element of every column is
// only pushed out by the next start flag, so q must repeat every m steps
// (back-to-back divisions).  There is no global wiring: g and q travel
// through the cells with the data.
//
// col[j] is the serial stream of column j.  Structure and timing follow the
// divider's description; the port bundling is this design's choice.  The
// last cell's forwarded g and q streams have no consumer; lint reports
// them as unused bits and synthesis removes them.
module safcm #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         g_in,
  input  logic         q_in,
  input  logic         a_in,
  output logic [M-1:0] col
);
  logic [M-1:0] g_c, q_c, a_c;

  assign g_c[0] = g_in;
  assign q_c[0] = q_in;
  assign a_c[0] = a_in;

  for (genvar j = 1; j < M; j++) begin : g_cell
    safcm_cell u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .g_in (g_c[j-1]),
      .q_in (q_c[j-1]),
      .a_in (a_c[j-1]),
      .g_out(g_c[j]),
      .q_out(q_c[j]),
      .a_out(a_c[j])
    );
  end

  assign col = a_c;
endmodule
