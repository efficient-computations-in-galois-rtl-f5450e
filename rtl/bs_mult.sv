// bs_mult: bit-serial multiplier c = a * b over GF(2^m), canonical basis,
// for any irreducible g(z) = z^m + g_{m-1} z^{m-1} + ... + g_0.
//
// The product is computed from the Toeplitz (Wiener-Hopf) form of the
// multiplication: with the input a_{m-1}, ..., a_0 an LFSR whose feedback
// taps are g_0..g_{m-1} builds the Toeplitz entries a~_0 .. a~_{m-1} in its
// registers R_0..R_{m-1}.  The switch S then closes for m steps: every step
// the inner product of the register contents with b is one coordinate
// c~_i of the product in the transformed system, while the LFSR, now fed
// with zeros, moves on to the next Toeplitz row.  A feed-forward shift
// register with taps g_1..g_{m-1} turns c~_0, ..., c~_{m-1} into
// c_{m-1}, ..., c_0.  No dual basis and no basis-conversion circuitry is
// needed.
//
// Interface: start is 1 with a_{m-1}; a_in carries a_{m-1}..a_0 on
// m consecutive steps; b is held constant for the operation.  c_out carries
// c_{m-1}, ..., c_0 on steps m+1 .. 2m after start (c_valid marks them), so
// one multiplication takes 2m steps and a new start may follow step 2m.
// All registers are cleared by start.
// The structure follows the published circuit; the start/valid control is
// this design's.  All m feed-forward stages are kept; taps whose g_i is 0
// disappear in synthesis.
module bs_mult #(
  parameter int unsigned M = 31,
  // z^31 + z^30 + z^29 + z^28 + 1 without its z^31 term
  parameter logic [M-1:0] G = M'(32'h7000_0001)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         a_in,
  input  logic [M-1:0] b,
  output logic         c_out,
  output logic         c_valid
);
  localparam int unsigned CW = $clog2(2 * M + 1);

  logic [M-1:0] r;        // R_0 .. R_{m-1}
  logic [M:1]   rp;       // R'_1 .. R'_m
  logic [CW-1:0] cnt;
  logic          busy;

  logic [M-1:0] r_cur;
  logic         load_ph, switch_s, fb, lin;

  assign r_cur    = start ? '0 : r;
  assign load_ph  = start || (busy && cnt < CW'(M));
  assign switch_s = busy && !start && cnt >= CW'(M) && cnt < CW'(2 * M);
  assign lin      = load_ph ? a_in : 1'b0;
  assign fb       = ^(G & r_cur);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r    <= '0;
      rp   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
    end else begin
      r <= {lin ^ fb, r_cur[M-1:1]};
      if (start) begin
        rp   <= '0;
        cnt  <= CW'(1);
        busy <= 1'b1;
      end else begin
        rp <= {switch_s ? ^(b & r) : 1'b0, rp[M:2]};
        if (busy) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(2 * M)) busy <= 1'b0;
        end
      end
    end
  end

  // c_{m-1-i} = c~_i + sum_{l=1..i} g_{m-l} c~_{i-l}
  logic ff_sum;
  always_comb begin
    ff_sum = rp[M];
    for (int unsigned l = 1; l < M; l++) ff_sum ^= G[M-l] & rp[M-l];
  end
  assign c_out   = ff_sum;
  assign c_valid = busy && cnt > CW'(M) && cnt <= CW'(2 * M);
endmodule
