// rec_filter: recursive filter.  Converts a canonical-basis element,
// arriving bit-serially a_{m-1} first, into its triangular-basis
// coordinates abar_0 .. abar_{m-1}:
//   abar_i = a_{m-1-i} + sum_{l=1..i} abar_{i-l} f_{m-l}
// The shift register holds the coordinates produced so far, newest in
// q[m-1]; after m steps q[j] = abar_j, which is also row 0 of the Toeplitz
// matrix of the multiplication.
//
// zero = 1 makes the filter treat its present contents as 0 during that
// step (used on the first bit of each element and to start clean);
// q_next is the value the register takes at the end of the step, exposed so
// that a row generator can capture row 0 on the element's last bit while
// this filter starts over; its top bit q_next[m-1] is the coordinate
// produced in the present step.  F holds f_0..f_{m-1} (f_m = 1 implied).
// Follows the published recursive-filter configuration; the zero input is
// this design's form of the filter reset.
module rec_filter #(
  parameter int unsigned M = 8,
  parameter logic [M-1:0] F = M'(9'h11D)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         zero,
  input  logic         din,
  output logic [M-1:0] q_next
);
  logic [M-1:0] q, q_eff;

  assign q_eff  = zero ? '0 : q;
  assign q_next = {din ^ (^(F & q_eff)), q_eff[M-1:1]};

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end
endmodule
