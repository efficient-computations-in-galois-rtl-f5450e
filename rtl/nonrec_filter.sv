// nonrec_filter: non-recursive filter.  Converts triangular-basis
// coordinates cbar_0, cbar_1, ... (cbar_0 first) into canonical
// coordinates c_{m-1}, c_{m-2}, ...:
//   c_{m-1-i} = cbar_i + sum_{l=1..i} cbar_{i-l} f_{m-l}
// The register keeps the previous m-1 input bits; the output is
// combinational in the present input bit, so c_{m-1-i} appears in the same
// step as cbar_i.  zero = 1 treats the history as empty for that step (used
// on the first bit of each element).
// Follows the published non-recursive-filter configuration, except that
// the present input bit is used directly instead of being registered
// first: inside the encoder's feedback loop this saves the one step that
// would otherwise break the m-step symbol period.
module nonrec_filter #(
  parameter int unsigned M = 8,
  parameter logic [M-1:0] F = M'(9'h11D)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic zero,
  input  logic din,
  output logic dout
);
  // h[l] = input bit l steps ago, l = 1 .. m-1
  logic [M-1:1] h, h_eff;
  logic         acc;

  assign h_eff = zero ? '0 : h;

  always_comb begin
    acc = din;
    for (int unsigned l = 1; l < M; l++) acc ^= F[M-l] & h_eff[l];
  end
  assign dout = acc;

  always_ff @(posedge clk) begin
    if (!rst_n) h <= '0;
    else if (M > 2) h <= (M-1)'({h_eff[M-2:1], din});
    else h <= (M-1)'(din);
  end
endmodule
