// aop_square: parallel squarer for GF(2^m) defined by an irreducible
// all-one polynomial (m even).  Since alpha^(m+1) = 1, squaring only
// permutes coordinates and adds a_{m/2}:
//   c_{m-1} = a_{m/2}
//   c_k     = a_{m/2} + a_{k/2}            (k even, k < m-1)
//   c_k     = a_{m/2} + a_{(k+m+1)/2}      (k odd,  k < m-1)
// m-1 XOR gates, one gate delay.  Combinational.  Follows the published
// configuration.
module aop_square #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] c
);
  always_comb begin
    c[M-1] = a[M/2];
    for (int unsigned k = 0; k + 1 < M; k++) begin
      if (k % 2 == 0) c[k] = a[M/2] ^ a[k/2];
      else            c[k] = a[M/2] ^ a[(k+M+1)/2];
    end
  end
endmodule
