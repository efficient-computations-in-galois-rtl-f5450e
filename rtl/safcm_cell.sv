// safcm_cell: rectangular processor Q_j of the systolic array that forms the
// coefficient matrix (CM) of the GF(2^m) divider.
//
// Column j of the CM follows from column j-1 by
//   a[i][j] = g[m-1-i] * a[0][j-1] + a[i+1][j-1]   (i < m-1)
//   a[m-1][j] = a[0][j-1].
// Column j-1 arrives bit-serially on a_in, row 0 first, together with a
// start flag q_in = 1.  On that step the processor keeps a[0][j-1] in its
// register r and pushes out the previous r (which is the last element,
// a[m-1][j], of the previous division).  On the other steps it outputs
// g_temp & r ^ a_in.  The g and q streams pass through two flip-flops so
// that they stay aligned with column j, which leaves the cell one step
// later than column j-1 entered it, i.e. columns are skewed by two steps.
//
// All outputs are registered (one time step).  The operation and circuit
// follow the processor description of the divider; the synchronous
// active-low reset is this design's addition.
module safcm_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic g_in,
  input  logic q_in,
  input  logic a_in,
  output logic g_out,
  output logic q_out,
  output logic a_out
);
  logic g_temp, q_temp, r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g_temp <= 1'b0;
      g_out  <= 1'b0;
      q_temp <= 1'b0;
      q_out  <= 1'b0;
      r      <= 1'b0;
      a_out  <= 1'b0;
    end else begin
      g_temp <= g_in;
      g_out  <= g_temp;
      q_temp <= q_in;
      q_out  <= q_temp;
      if (q_in) begin
        a_out <= r;
        r     <= a_in;
      end else begin
        a_out <= (g_temp & r) ^ a_in;
      end
    end
  end
endmodule
