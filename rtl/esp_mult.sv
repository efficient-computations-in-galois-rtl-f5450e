// esp_mult: parallel multiplier for GF(2^n), n = m*s, defined by an
// irreducible s-spaced polynomial (ESP) g(z) = f(z^s), where f is an
// irreducible all-one polynomial of degree m and s = (m+1)^i.  The root
// beta has order r = n + s, so the product's Toeplitz matrix has only r
// distinct entries, and the multiplier is built entirely from the m-bit
// modules of the AOP multiplier:
//   s modules P_i:  P_i takes a_{s-1-i+s*j} (j = 0..m-1) and yields
//                   a~_{i+s*k} (k = 0..m)
//   s^2 modules Q_ij: inputs b_{j+s*l} (l = 0..m-1) and the output of
//                   P_((i+j) mod s), rotated by one entry when i+j >= s;
//                   outputs the partial sums c~^(k)_ij
//   n(s-1) XOR gates: c~_{i+s*k} = sum_j c~^(k)_ij
//   s modules R_i:  R_i takes c~_{i+s*k} and yields c_{s-1-i+s*w}.
// Combinational.  The default, m = 2 and s = 3, is the 3-ESP
// z^6 + z^3 + 1 built from the AOP z^2 + z + 1.  The module arrangement
// follows the published construction; the index bookkeeping is derived
// from its equations.
module esp_mult #(
  parameter int unsigned M = 2,
  parameter int unsigned S = 3
) (
  input  logic [M*S-1:0] a,
  input  logic [M*S-1:0] b,
  output logic [M*S-1:0] c
);
  localparam int unsigned N = M * S;

  logic [M:0]   p_out [S];
  logic [M-1:0] q_out [S][S];
  logic [M-1:0] r_in  [S];
  logic [M-1:0] r_out [S];

  for (genvar i = 0; i < S; i++) begin : g_p
    logic [M-1:0] x;
    for (genvar j = 0; j < M; j++) begin : g_x
      assign x[j] = a[S - 1 - i + S * j];
    end
    aop_p #(.M(M)) u_p (.a(x), .at(p_out[i]));
  end

  for (genvar i = 0; i < S; i++) begin : g_qi
    for (genvar j = 0; j < S; j++) begin : g_qj
      logic [M:0]   at_ij;
      logic [M-1:0] b_j;
      for (genvar l = 0; l < M; l++) begin : g_b
        assign b_j[l] = b[j + S * l];
      end
      if (i + j < S) begin : g_direct
        assign at_ij = p_out[i + j];
      end else begin : g_rot
        assign at_ij = {p_out[i + j - S][0], p_out[i + j - S][M:1]};
      end
      aop_q #(.M(M), .EXTRA(0)) u_q (.at(at_ij), .b(b_j), .ct(q_out[i][j]));
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < S; i++) begin
      r_in[i] = '0;
      for (int unsigned j = 0; j < S; j++) r_in[i] ^= q_out[i][j];
    end
  end

  for (genvar i = 0; i < S; i++) begin : g_r
    aop_r #(.M(M)) u_r (.ct(r_in[i]), .c(r_out[i]));
    for (genvar w = 0; w < M; w++) begin : g_c
      assign c[S - 1 - i + S * w] = r_out[i][w];
    end
  end

  if (N != M * S) begin : g_never
    $error("esp_mult: size mismatch");
  end
endmodule
