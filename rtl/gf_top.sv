// gf_top: the Galois-field arithmetic units side by side.  They are
// independent designs and share only the clock and reset; each keeps its
// own ports, prefixed by the unit:
//   div_  bit-serial systolic divider, GF(2^DIV_M), any irreducible g
//         given serially (sys_divider)
//   cm_   LFSR-based coefficient-matrix generator for the same division,
//         the global-wiring alternative to the divider's systolic front end
//         (cm_lfsr)
//   bsm_  bit-serial multiplier, GF(2^31) with z^31+z^30+z^29+z^28+1
//         (bs_mult)
//   aop_  parallel multiplier and inverter for an irreducible all-one
//         polynomial, GF(2^AOP_M) (aop_mult, aop_inverter)
//   esp_  parallel multiplier for an irreducible equally-spaced
//         polynomial, GF(2^(ESP_M*ESP_S)) (esp_mult)
//   rs_   rate-adaptive Reed-Solomon encoder over GF(2^RS_M) with up to
//         RS_R_MAX parity symbols (rs_encoder_adaptive); rs_del_r uses the
//         coding 00 hold, 10 one more, 11 one fewer parity symbol.
// Timing and formats are those of the individual units (see their
// headers).  Only the grouping into one top is this design's.
module gf_top #(
  parameter int unsigned DIV_M     = 4,
  parameter int unsigned BS_M      = 31,
  parameter logic [BS_M-1:0] BS_G  = BS_M'(32'h7000_0001),
  parameter int unsigned AOP_M     = 4,
  parameter int unsigned ESP_M     = 2,
  parameter int unsigned ESP_S     = 3,
  parameter int unsigned RS_M      = 8,
  parameter logic [RS_M-1:0] RS_F  = RS_M'(9'h11D),
  parameter int unsigned RS_R_MAX  = 16,
  localparam int unsigned RS_RW    = $clog2(RS_R_MAX + 1),
  localparam int unsigned ESP_N    = ESP_M * ESP_S
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // systolic divider
  input  logic                    div_s,
  input  logic                    div_g,
  input  logic                    div_a,
  input  logic                    div_c,
  output logic                    div_b,
  output logic                    div_b_first,
  output logic                    div_a_nonzero,
  // LFSR coefficient-matrix generator
  input  logic                    cm_start,
  input  logic [DIV_M-1:0]        cm_a,
  input  logic [DIV_M-1:0]        cm_g,
  output logic [DIV_M-1:0]        cm_col,
  // bit-serial multiplier
  input  logic                    bsm_start,
  input  logic                    bsm_a,
  input  logic [BS_M-1:0]         bsm_b,
  output logic                    bsm_c,
  output logic                    bsm_c_valid,
  // AOP multiplier and inverter
  input  logic [AOP_M-1:0]        aop_a,
  input  logic [AOP_M-1:0]        aop_b,
  output logic [AOP_M-1:0]        aop_c,
  input  logic                    aop_inv_start,
  input  logic [AOP_M-1:0]        aop_inv_a,
  output logic [AOP_M-1:0]        aop_inv,
  output logic                    aop_inv_done,
  // ESP multiplier
  input  logic [ESP_N-1:0]        esp_a,
  input  logic [ESP_N-1:0]        esp_b,
  output logic [ESP_N-1:0]        esp_c,
  // rate-adaptive RS encoder
  input  logic                    rs_start,
  input  logic [1:0]              rs_del_r,
  input  logic [RS_M-1:0]         rs_n_data,
  input  logic                    rs_din,
  output logic                    rs_din_ready,
  output logic                    rs_dout,
  output logic                    rs_dout_valid,
  output logic                    rs_dout_par,
  output logic [RS_RW-1:0]        rs_r,
  output logic                    rs_busy,
  output logic                    rs_done
);
  sys_divider #(.M(DIV_M)) u_div (
    .clk, .rst_n, .s_in(div_s), .g_in(div_g), .a_in(div_a), .c_in(div_c),
    .b_out(div_b), .b_first(div_b_first), .a_nonzero(div_a_nonzero)
  );

  cm_lfsr #(.M(DIV_M)) u_cm (
    .clk, .rst_n, .start(cm_start), .a(cm_a), .g(cm_g), .col(cm_col)
  );

  bs_mult #(.M(BS_M), .G(BS_G)) u_bsm (
    .clk, .rst_n, .start(bsm_start), .a_in(bsm_a), .b(bsm_b),
    .c_out(bsm_c), .c_valid(bsm_c_valid)
  );

  aop_mult #(.M(AOP_M)) u_aop_mult (.a(aop_a), .b(aop_b), .c(aop_c));

  aop_inverter #(.M(AOP_M)) u_aop_inv (
    .clk, .rst_n, .start(aop_inv_start), .a(aop_inv_a), .inv(aop_inv), .done(aop_inv_done)
  );

  esp_mult #(.M(ESP_M), .S(ESP_S)) u_esp (.a(esp_a), .b(esp_b), .c(esp_c));

  rs_encoder_adaptive #(.M(RS_M), .F(RS_F), .R_MAX(RS_R_MAX)) u_rs (
    .clk, .rst_n, .start(rs_start), .del_r(gf_pkg::del_r_t'(rs_del_r)), .n_data(rs_n_data),
    .din(rs_din), .din_ready(rs_din_ready), .dout(rs_dout), .dout_valid(rs_dout_valid),
    .dout_par(rs_dout_par), .r_out(rs_r), .busy(rs_busy), .done(rs_done)
  );
endmodule
