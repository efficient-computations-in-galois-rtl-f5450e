// aop_inverter: inverter for GF(2^m) defined by an irreducible all-one
// polynomial, using a^-1 = a^2 * a^4 * ... * a^(2^(m-1)).
//
// Two loops run side by side.  The squaring loop holds a^(2^n) in an m-bit
// register and squares it every step (aop_square).  The multiplication loop
// keeps its running product not in canonical form but as the (m+1)-entry
// Toeplitz vector a~; since module P applied after module R is the
// identity on these vectors, the loop needs only module Q extended by one
// cell (which supplies the (m+1)-th entry, the sum of the c~_i), so the
// loop delay is one AND and about log2(m) XOR levels.  The register starts
// at (0,...,0,1,1), the Toeplitz vector of 1.  After m-1 steps module R
// turns the register into the canonical coordinates of a^-1.
//
// Interface: start loads a (one step); done is 1 for one step when inv is
// valid (m steps after start: one load step and m-1 loop steps) and inv
// holds the result until the next start.
// a = 0 gives 0.  Structure follows the published fast inversion loop; the
// step counter and handshake are this design's.
module aop_inverter #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic [M-1:0] inv,
  output logic         done
);
  localparam int unsigned CW = $clog2(M + 1);

  logic [M-1:0]  sq_reg, sq_next;
  logic [M:0]    acc, acc_next;
  logic [CW-1:0] cnt;
  logic          busy;

  aop_square #(.M(M)) u_sq (.a(sq_reg), .c(sq_next));
  aop_q #(.M(M), .EXTRA(1)) u_q (.at(acc), .b(sq_next), .ct(acc_next));
  aop_r #(.M(M)) u_r (.ct(acc[M-1:0]), .c(inv));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sq_reg <= '0;
      acc    <= '0;
      cnt    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        sq_reg <= a;
        acc    <= (M + 1)'(3) << (M - 1);
        cnt    <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        sq_reg <= sq_next;
        acc    <= acc_next;
        cnt    <= cnt + 1'b1;
        if (cnt == CW'(M - 2)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
