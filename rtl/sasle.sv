// sasle: triangular systolic array that solves the m x m system A b = c
// over GF(2) by Gauss-Jordan elimination with partial pivoting (A must be
// non-singular, as the coefficient matrix of a division by a non-zero
// element is).
//
// Row k of the array has a circular processor V_kk followed by square
// processors V_k,k+1 .. V_k,m.  Column j of [A, c] (column m is c) enters
// V_0j from above, row 0 first, with column j delayed by j steps.  The start
// flag s_in is 1 with element (0,0) and must repeat every m steps; it runs
// down the diagonal through three flip-flops per row (the circular
// processor's own and two between neighbours).  Row k of [A,c] settles in
// array row k as pivot row and clears column k of every other row; it is
// released downwards by the next start flag and then has its elements
// right of the diagonal cleared in the rows below.  Column m leaves
// V_m-1,m as the solution: b_0 comes out 3m steps after s_in, then
// b_1 .. b_m-1 on the following steps (b_m-1 is pushed out by the next
// start flag), i.e. one division every m steps after a latency of 4m-1.
//
// The array structure, processor operations and diagonal delays follow the
// published array.  s_last (the start flag leaving the last circular
// processor) is brought out so that a user can mark the output word.
module sasle
  import gf_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_in,
  input  logic [M:0] col_in,
  output logic       b_out,
  output logic       s_last
);
  // a_dn[k][j]: element entering V_kj from above
  logic   a_dn [M+1][M+1];
  // p_rt[k][j]: operation leaving V_kj to the right
  gj_op_t p_rt [M][M+1];
  // s_dg[k]: start flag entering V_kk
  logic   s_dg [M+1];

  for (genvar j = 0; j <= M; j++) begin : g_top
    assign a_dn[0][j] = col_in[j];
  end

  assign s_dg[0] = s_in;

  for (genvar k = 0; k < M; k++) begin : g_row
    logic s_o, s_d1, s_d2;

    sasle_circ u_circ (
      .clk  (clk),
      .rst_n(rst_n),
      .s_in (s_dg[k]),
      .a_in (a_dn[k][k]),
      .p_out(p_rt[k][k]),
      .s_out(s_o)
    );

    // two flip-flops between adjacent circular processors
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        s_d1 <= 1'b0;
        s_d2 <= 1'b0;
      end else begin
        s_d1 <= s_o;
        s_d2 <= s_d1;
      end
    end
    assign s_dg[k+1] = s_d2;

    for (genvar j = k + 1; j <= M; j++) begin : g_sq
      sasle_sq u_sq (
        .clk  (clk),
        .rst_n(rst_n),
        .p_in (p_rt[k][j-1]),
        .a_in (a_dn[k][j]),
        .p_out(p_rt[k][j]),
        .a_out(a_dn[k+1][j])
      );
    end

    if (k == M - 1) begin : g_last
      assign s_last = s_o;
    end
  end

  assign b_out = a_dn[M][M];
endmodule
