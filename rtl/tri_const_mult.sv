// tri_const_mult: pipelined bit-serial multiplier c = a * b for a constant
// (or slowly changing) b over GF(2^m), using the triangular basis.
//
// Elements stream through one after another with period m.  During one
// period the recursive filter turns a (a_{m-1} first) into its triangular
// coordinates; on the last bit of the period the row LFSR captures them as
// Toeplitz row 0 while the filter starts on the next element.  During the
// next period the LFSR steps through the rows, the inner product of each
// row with b gives cbar_i, and the non-recursive filter turns these into
// c_{m-1}, ..., c_0.  So c for the element entered in period p leaves in
// period p+1: latency m steps, one result every m steps.
//
// Interface: clr = 1 on a step marks it as bit a_{m-1} of a new stream and
// makes every register read as zero in that step; the phase counter then
// runs freely with period m.  In the first period after clr c_out is 0.
// b must be stable over the period in which c_out is produced.
// Follows the published pipelined structure; the clr handling is this
// design's.
module tri_const_mult #(
  parameter int unsigned M = 8,
  parameter logic [M-1:0] F = M'(9'h11D)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         a_in,
  input  logic [M-1:0] b,
  output logic         c_out
);
  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;

  logic [PW-1:0] ph, ph_eff;
  logic [M-1:0]  rq_next, row;
  logic          first, last;

  assign ph_eff = clr ? '0 : ph;
  assign first  = (ph_eff == '0);
  assign last   = (ph_eff == PW'(M - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)    ph <= '0;
    else if (last) ph <= '0;
    else           ph <= ph_eff + 1'b1;
  end

  rec_filter #(.M(M), .F(F)) u_rf (
    .clk, .rst_n, .zero(first), .din(a_in), .q_next(rq_next)
  );
  row_lfsr #(.M(M), .F(F)) u_row (
    .clk, .rst_n, .zero(clr), .load(last), .load_val(rq_next), .row(row)
  );
  nonrec_filter #(.M(M), .F(F)) u_nrf (
    .clk, .rst_n, .zero(first), .din(^(b & row)), .dout(c_out)
  );
endmodule
