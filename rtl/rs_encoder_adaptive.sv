// rs_encoder_adaptive: rate-adaptive systematic RS encoder.  The number of
// parity symbols r may change by -1, 0 or +1 from one codeword to the next;
// the generator polynomial for the new r is computed recursively by the GP
// generator and fed straight to the matrix-vector unit of the encoder, so
// no table of generator polynomials is stored.
//
// Control sequence per codeword (start with del_r and n_data):
//   1. the GP generator updates g(x) and r ((R_MAX+1)*m steps, or one step
//      for a hold);
//   2. the encoder is started with n_par = r: k data symbols pass through
//      (din_ready = 1) and r parity symbols follow;
//   3. done is 1 for one step; the next start may follow.
// r_out is the number of parity symbols of the present/last codeword.
// Serial format as in rs_encoder (symbol c_{m-1} first, highest degree
// first).  The GP generator's output lines connect one to one to the
// encoder's coefficient inputs.
// Follows the published combination of the encoder and the GP generator;
// running the GP update before each codeword, with the encoder idle, rather
// than overlapped with the previous codeword, is this design's choice.
module rs_encoder_adaptive
  import gf_pkg::*;
#(
  parameter int unsigned M     = 8,
  parameter logic [M-1:0] F    = M'(9'h11D),
  parameter int unsigned R_MAX = 16,
  localparam int unsigned RW   = $clog2(R_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  del_r_t        del_r,
  input  logic [M-1:0]  n_data,
  input  logic          din,
  output logic          din_ready,
  output logic          dout,
  output logic          dout_valid,
  output logic          dout_par,
  output logic [RW-1:0] r_out,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {C_IDLE, C_GP, C_ENC} cstate_t;
  cstate_t cst;

  logic [R_MAX-1:0][M-1:0] gcoef;
  logic [M-1:0]            k_reg;
  logic                    gp_start, gp_busy, gp_done, enc_start, enc_done;

  assign gp_start  = (cst == C_IDLE) && start;
  assign enc_start = (cst == C_GP) && gp_done;
  assign busy      = (cst != C_IDLE);

  gp_generator #(.M(M), .F(F), .R_MAX(R_MAX)) u_gp (
    .clk, .rst_n, .start(gp_start), .del_r(del_r), .g_out(gcoef), .r_out(r_out),
    .busy(gp_busy), .done(gp_done)
  );

  rs_encoder #(.M(M), .F(F), .R_MAX(R_MAX)) u_enc (
    .clk, .rst_n, .start(enc_start), .n_data(k_reg), .n_par(r_out), .g(gcoef),
    .din(din), .din_ready(din_ready), .dout(dout), .dout_valid(dout_valid),
    .dout_par(dout_par), .done(enc_done)
  );

  // a GP update is only ever requested while the generator is idle
  a_gp_idle: assert property (@(posedge clk) disable iff (!rst_n) gp_start |-> !gp_busy);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cst   <= C_IDLE;
      k_reg <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (cst)
        C_IDLE: if (start) begin
          k_reg <= n_data;
          cst   <= C_GP;
        end
        C_GP:  if (gp_done) cst <= C_ENC;
        C_ENC: if (enc_done) begin
          cst  <= C_IDLE;
          done <= 1'b1;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end
endmodule
