// aop_mult: parallel multiplier for GF(2^m) defined by an irreducible
// all-one polynomial (AOP) z^m + z^{m-1} + ... + 1, canonical basis.
// Because alpha^(m+1) = 1 the Toeplitz matrix of the product has only m+1
// distinct entries, so the multiplier is three simple modules in a row:
// P (a -> a~), Q (Toeplitz matrix times b) and R (c~ -> c); m^2 AND and
// m^2 + m - 2 XOR gates in all.  Combinational.  Follows the published
// structure; m must be a degree for which the AOP is irreducible
// (2, 4, 10, 12, 18, 28, ...).
module aop_mult #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);
  logic [M:0]   at;
  logic [M-1:0] ct;

  aop_p #(.M(M)) u_p (.a(a), .at(at));
  aop_q #(.M(M), .EXTRA(0)) u_q (.at(at), .b(b), .ct(ct));
  aop_r #(.M(M)) u_r (.ct(ct), .c(c));
endmodule
