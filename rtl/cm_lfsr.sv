// cm_lfsr: LFSR-based formation of the coefficient matrix A of the
// GF(2^m) division, the direct alternative to the systolic array (safcm).
//
// Element a_{i,j} of A is coordinate m-1-i of alpha^j * a, so column 0 is
// a itself in reversed order and column j follows from column j-1 in one
// LFSR step:  a_{i,j} = g_{m-1-i} a_{0,j-1} + a_{i+1,j-1}  (i < m-1),
// a_{m-1,j} = a_{0,j-1}.  The LFSR produces one column per step; each
// column is parked in a parallel-in serial-out register R_j that then
// shifts it out, row 0 first.  The result is the same skewed format the
// systolic array delivers: element a_{i,j} on col[j] at step i + j + 1
// after start.
//
// Interface: a and g (g_0..g_{m-1}, the z^m term implied) are taken in
// parallel on the start step; start may repeat every m steps.  Unlike the
// systolic array this needs an m-bit bus from the LFSR to every R_j and a
// feedback wire across the LFSR: the global wiring the systolic form
// avoids.  g_0 is not used (it is always 1; lint reports the unused bit).
// Follows the published LFSR structure; the parallel operand
// inputs and the load timing are this design's.
module cm_lfsr #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] g,
  output logic [M-1:0] col
);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  logic [M-1:0]   v, col0, vstep;   // v[i] = a_{i,j} of the present column
  logic [M-1:0]   piso [M];
  logic [M-1:0]   gq;               // gq[i] = g_{m-1-i}
  logic [CW-1:0]  j;
  logic           busy;

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      col0[i] = a[M-1-i];
      gq[i]   = g[M-1-i];
    end
  end

  // one LFSR step applied to the column being loaded
  // column 1, formed from column 0 on the start step (g_0 = 1 is not used:
  // the wrap-around term a_{m-1,j} = a_{0,j-1} has no coefficient)
  assign vstep = {col0[0], col0[M-1:1] ^ (gq[M-2:0] & {(M-1){col0[0]}})};

  logic [M-2:0] gq_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v    <= '0;
      gq_r <= '0;
      j    <= '0;
      busy <= 1'b0;
      for (int unsigned k = 0; k < M; k++) piso[k] <= '0;
    end else begin
      for (int unsigned k = 0; k < M; k++) piso[k] <= piso[k] >> 1;
      if (start) begin
        piso[0] <= col0;
        v       <= vstep;
        gq_r    <= gq[M-2:0];
        j       <= CW'(1);
        busy    <= (M > 1);
      end else if (busy) begin
        piso[j] <= v;
        v       <= {v[0], v[M-1:1] ^ (gq_r & {(M-1){v[0]}})};
        j       <= j + 1'b1;
        if (j == CW'(M - 1)) busy <= 1'b0;
      end
    end
  end

  for (genvar k = 0; k < M; k++) begin : g_out
    assign col[k] = piso[k][0];
  end
endmodule
