// root_gen: root generation unit.  An m-bit register holding a power of
// alpha (canonical basis, alpha a root of f).  In one step it is multiplied
// by alpha (shift up, fold the overflow back with f) or by alpha^-1 (add
// f if the lowest coordinate is 1, then shift down; f_0 = 1 makes that
// exact).  Reset value alpha^0 = 1.
// Interface: mul_up / mul_dn update on the next clock (mul_up has priority);
// root is the register.  Follows the published unit, which uses an alpha
// and an alpha^-1 multiplication circuit of the same shape.
module root_gen #(
  parameter int unsigned M = 8,
  parameter logic [M-1:0] F = M'(9'h11D)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mul_up,
  input  logic         mul_dn,
  output logic [M-1:0] root
);
  logic [M-1:0] up, dn;

  assign up = {root[M-2:0], 1'b0} ^ (root[M-1] ? F : '0);
  assign dn = {root[0], root[M-1:1] ^ (root[0] ? F[M-1:1] : '0)};

  always_ff @(posedge clk) begin
    if (!rst_n)      root <= M'(1);
    else if (mul_up) root <= up;
    else if (mul_dn) root <= dn;
  end
endmodule
