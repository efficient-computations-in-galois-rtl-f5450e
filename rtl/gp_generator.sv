// gp_generator: generator-polynomial (GP) unit of the rate-adaptive RS
// encoder.  It holds g(x) = prod_{j=1..r} (x + alpha^j) and, on request,
// multiplies it by (x + alpha^(r+1)) or divides it by (x + alpha^r), so
// that the number r of parity symbols changes by +1 or -1.
//
// Units:
//  - coefficient unit: R_MAX+1 serial-in m-bit registers G_0 .. G_RMAX
//    forming one ring; G_RMAX-j holds g_(r-j), the rest are 0;
//  - a pipelined bit-serial constant multiplier (tri_const_mult) whose
//    constant is the present root;
//  - root generation unit (root_gen) holding alpha^r.
// One update rotates the ring once, (R_MAX+1)*m steps, bit by bit, highest
// coefficient first.  The symbol leaving the ring is added to the
// multiplier output, which is the previous symbol times the root, and the
// sum re-enters the ring.  For +1 the multiplier input is the leaving
// symbol (g'_j = g_(j-1) + root*g_j, root updated to alpha^(r+1) first); for
// -1 it is the sum itself (g'_j = g_(j+1) + root*g'_(j+1), root updated to
// alpha^(r-1) afterwards).  The switch is a multiplexer on that input.
//
// Interface: start (one step) with del_r: 00 hold, 10 increase, 11
// decrease (01 is treated as hold).  An increase at r = R_MAX or a decrease
// at r = 0 is ignored.  busy is 1 while rotating; done is 1 for one step
// when g_out and r_out are valid (the step after start for a hold).
// g_out[j] = G_j for j < R_MAX, so g_(r-1) is on line R_MAX-1 and lines
// below R_MAX-r are 0.  After reset r = 0 and g(x) = 1.
// Follows the published three-unit structure, mode sequence and output
// layout; the handshake and the limits are this design's.
module gp_generator
  import gf_pkg::*;
#(
  parameter int unsigned M     = 8,
  parameter logic [M-1:0] F    = M'(9'h11D),
  parameter int unsigned R_MAX = 16,
  localparam int unsigned RW   = $clog2(R_MAX + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  del_r_t                  del_r,
  output logic [R_MAX-1:0][M-1:0] g_out,
  output logic [RW-1:0]           r_out,
  output logic                    busy,
  output logic                    done
);
  localparam int unsigned NSTEP = (R_MAX + 1) * M;
  localparam int unsigned CW    = $clog2(NSTEP + 1);

  logic [R_MAX:0][M-1:0] G;
  logic [CW-1:0]         cnt;
  logic                  mode_dn, mclr;
  logic                  chain_out, sum_bit, m_in, m_out;
  logic [M-1:0]          root;
  logic                  up_now, dn_now, go_up, go_dn;

  assign chain_out = G[R_MAX][M-1];
  assign sum_bit   = chain_out ^ m_out;
  assign m_in      = mode_dn ? sum_bit : chain_out;
  assign mclr      = busy && (cnt == '0);

  tri_const_mult #(.M(M), .F(F)) u_mult (
    .clk, .rst_n, .clr(mclr), .a_in(busy ? m_in : 1'b0), .b(root), .c_out(m_out)
  );

  assign go_up  = start && !busy && del_r == DR_INC && r_out != RW'(R_MAX);
  assign go_dn  = start && !busy && del_r == DR_DEC && r_out != '0;
  assign up_now = go_up;
  assign dn_now = busy && mode_dn && cnt == CW'(NSTEP - 1);

  root_gen #(.M(M), .F(F)) u_root (
    .clk, .rst_n, .mul_up(up_now), .mul_dn(dn_now), .root(root)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      G        <= '0;
      G[R_MAX] <= M'(1);
      cnt      <= '0;
      mode_dn  <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      r_out    <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        G[0] <= {G[0][M-2:0], sum_bit};
        for (int j = 1; j <= R_MAX; j++) G[j] <= {G[j][M-2:0], G[j-1][M-1]};
        cnt <= cnt + 1'b1;
        if (cnt == CW'(NSTEP - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          r_out <= mode_dn ? r_out - 1'b1 : r_out + 1'b1;
        end
      end else if (start) begin
        if (go_up || go_dn) begin
          busy    <= 1'b1;
          mode_dn <= go_dn;
          cnt     <= '0;
        end else begin
          done <= 1'b1;
        end
      end
    end
  end

  for (genvar j = 0; j < R_MAX; j++) begin : g_o
    assign g_out[j] = G[j];
  end
endmodule
