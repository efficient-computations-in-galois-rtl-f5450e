// aop_p: module P of the AOP-based parallel multiplier.  For a field
// defined by an irreducible all-one polynomial z^m + ... + z + 1 it maps the
// m canonical coordinates of a to the m+1 distinct Toeplitz entries
//   a~_0 = a_{m-1},  a~_k = a_{m-1-k} + a_{m-k} (0<k<m),  a~_m = a_0
// with m-1 XOR gates.  Combinational.  Follows the published module.
module aop_p #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  output logic [M:0]   at
);
  always_comb begin
    at[0] = a[M-1];
    for (int unsigned k = 1; k < M; k++) at[k] = a[M-1-k] ^ a[M-k];
    at[M] = a[0];
  end
endmodule
