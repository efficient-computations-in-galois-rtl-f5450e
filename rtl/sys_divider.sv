// sys_divider: bit-serial systolic divider b = c / a over GF(2^m), canonical
// basis, for any irreducible g(z) of degree m supplied as a serial stream.
//
// Division is done without computing an inverse: the divisor a defines an
// m x m binary coefficient matrix A with A b = c.  The SAFCM array forms A
// column by column (column j skewed by 2j steps); delay lines of m-1-j steps
// on column j and of m steps on c re-skew [A, c] to the one-step skew the
// SASLE array needs, and the SASLE solves the system by Gauss-Jordan
// elimination.  All communication is between neighbouring cells, so the
// clock period does not depend on m.
//
// Interface (one bit per time step, period m, fully pipelined):
//   s_in  1 on the first step of each division; must repeat every m steps
//   g_in  g_{m-1}, ..., g_0      a_in  a_{m-1}, ..., a_0
//   c_in  c_{m-1}, ..., c_0
//   b_out b_0, ..., b_{m-1}; b_first marks b_0, which appears 4m-1 steps
//         after the division's s_in (last bit after 5m-2 steps).
//   a_nonzero  zero detection of the divisor: an OR gate and a flip-flop
//         re-initialised by s; the verdict for a division is presented from
//         the step after the next s_in until the one after.
// The array structure, the column delays and the zero detector follow the
// published divider.  The dividend is taken in the same steps as the
// divisor, so its delay is 2m-1 rather than the published m, which assumes
// the dividend is presented m-1 steps after the divisor.  The SASLE start flag is taken from s_in through m-1
// flip-flops so that it meets column 0 after its m-1 step delay (the
// published figure feeds both arrays from one periodic line); b_first is
// an addition of this design.
module sys_divider #(
  parameter int unsigned M = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s_in,
  input  logic g_in,
  input  logic a_in,
  input  logic c_in,
  output logic b_out,
  output logic b_first,
  output logic a_nonzero
);
  logic [M-1:0] col;
  logic [M:0]   sasle_in;
  logic         s_sasle, s_last;
  logic         z;

  safcm #(.M(M)) u_safcm (
    .clk  (clk),
    .rst_n(rst_n),
    .g_in (g_in),
    .q_in (s_in),
    .a_in (a_in),
    .col  (col)
  );

  // D^(m-1-j) on column j, D^(2m-1) on c, D^(m-1) on the start flag
  for (genvar j = 0; j < M; j++) begin : g_dly
    dly_line #(.D(M - 1 - j)) u_dly (
      .clk(clk), .rst_n(rst_n), .d(col[j]), .q(sasle_in[j])
    );
  end

  dly_line #(.D(2 * M - 1)) u_dly_c (
    .clk(clk), .rst_n(rst_n), .d(c_in), .q(sasle_in[M])
  );

  dly_line #(.D(M - 1)) u_dly_s (
    .clk(clk), .rst_n(rst_n), .d(s_in), .q(s_sasle)
  );

  sasle #(.M(M)) u_sasle (
    .clk   (clk),
    .rst_n (rst_n),
    .s_in  (s_sasle),
    .col_in(sasle_in),
    .b_out (b_out),
    .s_last(s_last)
  );

  dly_line #(.D(2)) u_dly_first (
    .clk(clk), .rst_n(rst_n), .d(s_last), .q(b_first)
  );

  // zero detection: OR gate + flip-flop initialised by s
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z         <= 1'b0;
      a_nonzero <= 1'b0;
    end else begin
      z <= s_in ? a_in : (z | a_in);
      if (s_in) a_nonzero <= z;
    end
  end
endmodule
