// rs_encoder: systematic Reed-Solomon encoder over GF(2^m) built on the
// pipelined bit-serial constant multiplier.  It computes the parity
// p(x) = x^r d(x) mod g(x) for a generator polynomial of degree r <= R_MAX
// and sends d followed by p, one bit per step, symbols highest degree
// first and each symbol c_{m-1} first.
//
// Units:
//  - basis transformation: one recursive filter (feedback symbol to the
//    triangular basis) and one non-recursive filter (top remainder symbol
//    back to the canonical basis);
//  - row generation: an LFSR that, loaded with row 0, yields the Toeplitz
//    rows of the feedback symbol;
//  - matrix-vector unit: R_MAX inner-product modules, module j forming the
//    triangular coordinates of g_j times the feedback symbol;
//  - remainder unit: R_MAX-1 m-bit rotating registers holding the
//    remainder in the triangular basis, added to bit by bit.
// The top remainder coefficient is never stored: it is formed on the fly
// from the register below it and the product of module R_MAX-1, converted
// to canonical form, added to the data symbol and fed back.  A feedback
// symbol entered in one period produces its products in the next period,
// exactly when the next data symbol needs the updated top coefficient, so
// one symbol is accepted every m steps without stalls.
//
// Interface: start (one step, no data) samples n_data = k and n_par = r
// and clears the datapath.  During the next k*m steps din_ready is 1 and
// din is taken; dout = din there.  During the following r*m steps dout
// carries the parity symbols.  dout_valid covers all n*m steps and
// dout_par marks the parity part; done is 1 on the step after the last bit.
// g holds g_0 .. g_{r-1} right-aligned: g[R_MAX-r+i] = g_i, lower entries 0
// (g_r = 1 is implied); it must be stable during encoding.
// Follows the published four-unit structure and switch sequence; the
// on-the-fly top coefficient, the zero-latency output filter, the
// right-aligned coefficients and the handshake are this design's choices.
module rs_encoder #(
  parameter int unsigned M     = 8,
  parameter logic [M-1:0] F    = M'(9'h11D),
  parameter int unsigned R_MAX = 16,
  localparam int unsigned RW   = $clog2(R_MAX + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [M-1:0]              n_data,
  input  logic [RW-1:0]             n_par,
  input  logic [R_MAX-1:0][M-1:0]   g,
  input  logic                      din,
  output logic                      din_ready,
  output logic                      dout,
  output logic                      dout_valid,
  output logic                      dout_par,
  output logic                      done
);
  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_PAR} state_t;
  state_t state;

  logic [PW-1:0]  ph;
  logic [M-1:0]   sym;
  logic [M-1:0]   k_reg;
  logic [RW-1:0]  r_reg;
  logic           run, first, last;

  assign run   = (state != S_IDLE);
  assign first = (ph == '0) || !run;
  assign last  = run && (ph == PW'(M - 1));

  // ---------------- datapath ----------------
  logic [M-1:0]         row, rf_next;
  logic [R_MAX-1:0]     mbit;
  logic [R_MAX-2:0][M-1:0] rem;
  logic                 top_bit, top_can, fb_in;

  for (genvar j = 0; j < R_MAX; j++) begin : g_mod
    assign mbit[j] = ^(g[j] & row);
  end

  assign top_bit = rem[R_MAX-2][0] ^ mbit[R_MAX-1];

  nonrec_filter #(.M(M), .F(F)) u_nrf (
    .clk, .rst_n, .zero(first), .din(run ? top_bit : 1'b0), .dout(top_can)
  );

  assign fb_in = (state == S_DATA) ? (din ^ top_can) : 1'b0;

  rec_filter #(.M(M), .F(F)) u_rf (
    .clk, .rst_n, .zero(first), .din(fb_in), .q_next(rf_next)
  );
  row_lfsr #(.M(M), .F(F)) u_row (
    .clk, .rst_n, .zero(!run), .load(last), .load_val(rf_next), .row(row)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || !run) begin
      rem <= '0;
    end else begin
      rem[0] <= {mbit[0], rem[0][M-1:1]};
      for (int j = 1; j < R_MAX - 1; j++)
        rem[j] <= {rem[j-1][0] ^ mbit[j], rem[j][M-1:1]};
    end
  end

  assign din_ready  = (state == S_DATA);
  assign dout_valid = run;
  assign dout_par   = (state == S_PAR);
  assign dout       = (state == S_DATA) ? din : (state == S_PAR) ? top_can : 1'b0;

  // ---------------- control ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ph    <= '0;
      sym   <= '0;
      k_reg <= '0;
      r_reg <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        k_reg <= n_data;
        r_reg <= n_par;
        ph    <= '0;
        sym   <= '0;
        if (n_data != '0)     state <= S_DATA;
        else if (n_par != '0) state <= S_PAR;
        else begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
      end else if (run) begin
        ph <= last ? '0 : ph + 1'b1;
        if (last) begin
          sym <= sym + 1'b1;
          if (state == S_DATA && sym == k_reg - 1'b1) begin
            sym <= '0;
            if (r_reg != '0) state <= S_PAR;
            else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end else if (state == S_PAR && sym == M'(r_reg) - 1'b1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
      end
    end
  end
endmodule
