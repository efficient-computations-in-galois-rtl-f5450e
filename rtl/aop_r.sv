// aop_r: module R of the AOP-based parallel multiplier.  It converts the
// transformed product c~ back to canonical coordinates:
//   c_{m-1} = c~_0,  c_{m-1-i} = c~_i + c_{m-i}
// a ripple chain of m-1 XOR gates (delay (m-1) XOR).  Combinational.
// Follows the published module.
module aop_r #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] ct,
  output logic [M-1:0] c
);
  always_comb begin
    c[M-1] = ct[0];
    for (int unsigned i = 1; i < M; i++) c[M-1-i] = ct[i] ^ c[M-i];
  end
endmodule
