// aop_q: module Q of the AOP-based parallel multiplier: the Toeplitz
// matrix-vector product.  Cell i forms
//   c~_i = sum_j b_j a~_((i+j) mod (m+1))
// from the (m+1)-bit bus a~ and the m bits of b (m AND gates and m-1 XOR
// gates per cell).  With EXTRA = 1 an additional cell m is appended; its
// output sum_j b_j a~_((j+m) mod (m+1)) equals c~_0 + ... + c~_{m-1}, the
// last entry the fast inversion loop needs.  Combinational.  Follows the
// published module and its extended form.
module aop_q #(
  parameter int unsigned M     = 4,
  parameter int unsigned EXTRA = 0
) (
  input  logic [M:0]         at,
  input  logic [M-1:0]       b,
  output logic [M-1+EXTRA:0] ct
);
  always_comb begin
    for (int unsigned i = 0; i < M + EXTRA; i++) begin
      ct[i] = 1'b0;
      for (int unsigned j = 0; j < M; j++) ct[i] ^= b[j] & at[(i + j) % (M + 1)];
    end
  end
endmodule
