// rs_encoder_adaptive_tb: self-checking test of the rate-adaptive RS
// encoder.  A sequence of codewords is sent with a random walk of rate
// changes; every codeword must carry its data followed by the parity of
// a reference encoder using prod_{j=1..r}(x + alpha^j) for the current r,
// and r_out must follow the requested changes.  Default size GF(2^8),
// R_MAX = 16.
module rs_encoder_adaptive_tb;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  localparam int NCW = 70;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       st = 1'b0, di = 1'b0;
  del_r_t     dr = DR_HOLD;
  logic [7:0] nd = '0;
  logic       rdy, dq, dv, dp, bz, dn;
  logic [4:0] ro;

  rs_encoder_adaptive dut (.clk, .rst_n, .start(st), .del_r(dr), .n_data(nd), .din(di),
                           .din_ready(rdy), .dout(dq), .dout_valid(dv), .dout_par(dp),
                           .r_out(ro), .busy(bz), .done(dn));

  initial begin : watchdog
    repeat (NCW * (17 * 8 + 60 * 8 + 20)) @(posedge clk);
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

  int r = 0;

  task automatic codeword(input del_r_t d, input int k);
    word_t dat[], g[], p[], got;
    int waited = 0;
    if (d == DR_INC && r < 16) r++;
    if (d == DR_DEC && r > 0) r--;
    dat = new[k];
    foreach (dat[i]) dat[i] = gf_rand(8);
    rs_gen(g, r, 64'h11D, 8);
    rs_parity(p, dat, g, r, 64'h11D, 8);
    @(negedge clk);
    dr = d;
    nd = 8'(k);
    st = 1'b1;
    @(negedge clk);
    st = 1'b0;
    while (!dv && waited < 500) begin
      @(negedge clk);
      waited++;
    end
    for (int s = 0; s < k + r; s++) begin
      got = '0;
      for (int t = 0; t < 8; t++) begin
        di = (s < k) ? dat[s][7-t] : 1'b0;
        #1;
        got = {got[62:0], dq};
        @(negedge clk);
      end
      chk((s < k) ? "data symbol" : "parity symbol", got, (s < k) ? dat[s] : p[s-k]);
    end
    chk("r_out", word_t'(ro), word_t'(r));
    while (!dn && waited < 1000) begin
      @(negedge clk);
      waited++;
    end
    chk("done", word_t'(dn), 64'd1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    codeword(DR_HOLD, 4);
    codeword(DR_INC, 4);
    codeword(DR_INC, 7);
    codeword(DR_DEC, 7);
    for (int n = 0; n < NCW; n++) begin
      automatic int c = $urandom_range(0, 9);
      codeword((c < 2) ? DR_HOLD : (c < 5) ? DR_DEC : DR_INC, 1 + $urandom_range(0, 50));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
