// rs_encoder_tb: self-checking test of the fixed-rate RS encoder.
// Codewords with random data length and random number of parity symbols
// (0 .. R_MAX) are encoded back to back at the default size (GF(2^8),
// f = x^8+x^4+x^3+x^2+1, R_MAX = 16) and at m = 4, R_MAX = 4.  The serial
// output must equal the data followed by the parity of a reference
// long-division encoder, with the handshake flags at the right steps.
module rs_encoder_tb;
  import gf_ref_pkg::*;

  localparam int NCW = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // default instance
  logic                  st = 1'b0, di = 1'b0;
  logic [7:0]            nd = '0;
  logic [4:0]            np = '0;
  logic [15:0][7:0]      gv = '0;
  logic                  rdy, dq, dv, dp, dn;
  rs_encoder dut (.clk, .rst_n, .start(st), .n_data(nd), .n_par(np), .g(gv), .din(di),
                  .din_ready(rdy), .dout(dq), .dout_valid(dv), .dout_par(dp), .done(dn));

  // small instance
  logic                  st4 = 1'b0, di4 = 1'b0;
  logic [3:0]            nd4 = '0;
  logic [2:0]            np4 = '0;
  logic [3:0][3:0]       gv4 = '0;
  logic                  rdy4, dq4, dv4, dp4, dn4;
  rs_encoder #(.M(4), .F(4'h3), .R_MAX(4)) dut4 (
    .clk, .rst_n, .start(st4), .n_data(nd4), .n_par(np4), .g(gv4), .din(di4),
    .din_ready(rdy4), .dout(dq4), .dout_valid(dv4), .dout_par(dp4), .done(dn4));

  initial begin : watchdog
    repeat (NCW * 2 * (60 * 8 + 30)) @(posedge clk);
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(input string what, input word_t got, input word_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  task automatic encode8(input int k, input int r);
    word_t d[], g[], p[], got;
    int bad_flags = 0;
    d = new[k];
    foreach (d[i]) d[i] = gf_rand(8);
    rs_gen(g, r, 64'h11D, 8);
    rs_parity(p, d, g, r, 64'h11D, 8);
    gv = '0;
    for (int i = 0; i < r; i++) gv[16 - r + i] = g[i][7:0];
    @(negedge clk);
    nd = 8'(k);
    np = 5'(r);
    st = 1'b1;
    @(negedge clk);
    st = 1'b0;
    for (int s = 0; s < k + r; s++) begin
      got = '0;
      for (int t = 0; t < 8; t++) begin
        di = (s < k) ? d[s][7-t] : 1'b0;
        #1;
        if (!dv || rdy != (s < k) || dp != (s >= k)) bad_flags++;
        got = {got[62:0], dq};
        @(negedge clk);
      end
      if (s < k) chk("m8 data symbol", got, d[s]);
      else       chk("m8 parity symbol", got, p[s-k]);
    end
    chk("m8 done/idle", word_t'({dn, dv}), 64'h2);
    chk("m8 flags", word_t'(bad_flags), 64'd0);
  endtask

  task automatic encode4(input int k, input int r);
    word_t d[], g[], p[], got;
    d = new[k];
    foreach (d[i]) d[i] = gf_rand(4);
    rs_gen(g, r, 64'h13, 4);
    rs_parity(p, d, g, r, 64'h13, 4);
    gv4 = '0;
    for (int i = 0; i < r; i++) gv4[4 - r + i] = g[i][3:0];
    @(negedge clk);
    nd4 = 4'(k);
    np4 = 3'(r);
    st4 = 1'b1;
    @(negedge clk);
    st4 = 1'b0;
    for (int s = 0; s < k + r; s++) begin
      got = '0;
      for (int t = 0; t < 4; t++) begin
        di4 = (s < k) ? d[s][3-t] : 1'b0;
        #1;
        got = {got[62:0], dq4};
        @(negedge clk);
      end
      if (s < k) chk("m4 data symbol", got, d[s]);
      else       chk("m4 parity symbol", got, p[s-k]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    encode8(1, 1);
    encode8(3, 2);
    encode8(10, 16);
    encode8(5, 0);
    for (int n = 0; n < NCW; n++) encode8(1 + $urandom_range(0, 40), $urandom_range(0, 16));
    for (int n = 0; n < NCW; n++) encode4(1 + $urandom_range(0, 10), $urandom_range(0, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
