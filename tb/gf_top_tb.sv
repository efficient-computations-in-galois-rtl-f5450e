// gf_top_tb: end-to-end test of the whole top at its default parameters.
// All units run at the same time, each driven by its own thread and
// checked against reference arithmetic:
//  - divider: back-to-back divisions with the field polynomial changing
//    between divisions (three irreducible quartics), a zero divisor, the
//    b_0 position 4m-1 steps after start and the zero detector;
//  - LFSR coefficient-matrix generator: every element of A for
//    back-to-back divisors;
//  - bit-serial multiplier in GF(2^31); AOP multiplier and inverter; ESP
//    multiplier;
//  - rate-adaptive RS encoder: a sequence of codewords with holds,
//    increases, decreases, a request beyond the lower limit and
//    codewords without parity.
// Every mechanism is counted; one that never happened counts as a failure.
module gf_top_tb;
  import gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        div_s = 1'b0, div_g = 1'b0, div_a = 1'b0, div_c = 1'b0;
  logic        div_b, div_b_first, div_a_nonzero;
  logic        cm_start = 1'b0;
  logic [3:0]  cm_a = '0, cm_g = '0, cm_col;
  logic        bsm_start = 1'b0, bsm_a = 1'b0, bsm_c, bsm_c_valid;
  logic [30:0] bsm_b = '0;
  logic [3:0]  aop_a = '0, aop_b = '0, aop_c, aop_inv_a = '0, aop_inv;
  logic        aop_inv_start = 1'b0, aop_inv_done;
  logic [5:0]  esp_a = '0, esp_b = '0, esp_c;
  logic        rs_start = 1'b0, rs_din = 1'b0;
  logic [1:0]  rs_del_r = 2'b00;
  logic [7:0]  rs_n_data = '0;
  logic        rs_din_ready, rs_dout, rs_dout_valid, rs_dout_par, rs_busy, rs_done;
  logic [4:0]  rs_r;

  gf_top dut (.*);

  // mechanism counters
  int n_div = 0, n_div_poly_change = 0, n_div_zero = 0, n_pivot_swap = 0;
  int n_cm_col = 0;
  int n_bsm = 0, n_aop_mul = 0, n_aop_inv = 0, n_esp = 0;
  int n_rs_inc = 0, n_rs_dec = 0, n_rs_hold = 0, n_rs_limit = 0, n_rs_nopar = 0;
  int n_rs_par_sym = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  // ---------------- divider ----------------
  localparam int DM = 4;
  localparam int NDIV = 40;
  word_t dpoly[3] = '{64'h13, 64'h19, 64'h1F};
  word_t av[NDIV], cv[NDIV], pv[NDIV];
  int    issue_t[NDIV];
  int    cyc = 0;
  logic  div_drv_done = 1'b0, div_mon_done = 1'b0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run_div();
    for (int d = 0; d < NDIV; d++) begin
      pv[d] = dpoly[$urandom_range(0, 2)];
      av[d] = (d == 5 || d == 23) ? 64'd0 : gf_rand(DM);
      if (d != 5 && d != 23 && av[d] == 0) av[d] = 64'd1;
      cv[d] = gf_rand(DM);
      if (d > 0 && pv[d] != pv[d-1]) n_div_poly_change++;
      if (av[d] == 0) n_div_zero++;
    end
    for (int d = 0; d < NDIV + 2; d++) begin
      for (int i = 0; i < DM; i++) begin
        @(negedge clk);
        div_s = (i == 0);
        div_g = (d < NDIV) ? pv[d][DM-1-i] : 1'b0;
        div_a = (d < NDIV) ? av[d][DM-1-i] : 1'b0;
        div_c = (d < NDIV) ? cv[d][DM-1-i] : 1'b0;
      end
    end
    wait (div_mon_done);
  endtask

  int    n_issued = 0, bit_i = -1, zd_pending = 0;
  word_t bq;
  always @(posedge clk) begin
    if (rst_n && !div_mon_done) begin
      if (zd_pending > 0) begin
        chk("divider zero detect", word_t'(div_a_nonzero), word_t'(av[zd_pending-1] != 0));
        zd_pending = 0;
      end
      if (div_s && n_issued < NDIV) begin
        issue_t[n_issued] = cyc;
        if (n_issued > 0) zd_pending = n_issued;
        n_issued++;
      end
      if (div_b_first && n_div < NDIV) begin
        chk("divider latency", word_t'(unsigned'(cyc - issue_t[n_div])), word_t'(4 * DM - 1));
        bit_i = 0;
        bq = '0;
      end
      if (bit_i >= 0) begin
        bq[bit_i] = div_b;
        bit_i++;
        if (bit_i == DM) begin
          if (av[n_div] != 0)
            chk("divider quotient", gf_mul(bq, av[n_div], pv[n_div], DM), cv[n_div]);
          n_div++;
          bit_i = -1;
          if (n_div == NDIV) div_mon_done = 1'b1;
        end
      end
    end
  end

  // a row exchange happens when a circular processor, outside its start
  // step, meets a 1 while it still holds no pivot
  always @(posedge clk) begin
    if (rst_n) begin
      if (!dut.u_div.u_sasle.g_row[0].u_circ.s_in && dut.u_div.u_sasle.g_row[0].u_circ.a_in &&
          !dut.u_div.u_sasle.g_row[0].u_circ.r) n_pivot_swap++;
      if (!dut.u_div.u_sasle.g_row[1].u_circ.s_in && dut.u_div.u_sasle.g_row[1].u_circ.a_in &&
          !dut.u_div.u_sasle.g_row[1].u_circ.r) n_pivot_swap++;
      if (!dut.u_div.u_sasle.g_row[2].u_circ.s_in && dut.u_div.u_sasle.g_row[2].u_circ.a_in &&
          !dut.u_div.u_sasle.g_row[2].u_circ.r) n_pivot_swap++;
    end
  end

  // ---------------- LFSR coefficient-matrix generator ----------------
  task automatic run_cm();
    localparam int NC = 20;
    word_t av[NC], pv[NC], x;
    for (int d = 0; d < NC; d++) begin
      av[d] = gf_rand(DM);
      pv[d] = dpoly[$urandom_range(0, 2)];
    end
    for (int t = 0; t < NC * DM + 10; t++) begin
      @(negedge clk);
      cm_start = (t % DM == 0) && (t / DM < NC);
      if (cm_start) begin
        cm_a = av[t/DM][3:0];
        cm_g = pv[t/DM][3:0];
      end
      #1;
      for (int j = 0; j < DM; j++)
        for (int d = 0; d < NC; d++) begin
          int i = t - d * DM - j - 1;
          if (i >= 0 && i < DM) begin
            x = gf_mul(av[d], gf_pow(64'd2, longint'(j), pv[d], DM), pv[d], DM);
            chk("CM element", word_t'(cm_col[j]), word_t'(x[DM-1-i]));
            if (i == DM - 1) n_cm_col++;
          end
        end
    end
  endtask

  // ---------------- bit-serial multiplier ----------------
  task automatic run_bsm();
    for (int n = 0; n < 30; n++) begin
      word_t a = gf_rand(31), b = gf_rand(31), got = '0;
      int nv = 0;
      @(negedge clk);
      bsm_b = b[30:0];
      for (int t = 0; t < 62; t++) begin
        bsm_start = (t == 0);
        bsm_a     = (t < 31) ? a[30-t] : 1'b0;
        @(posedge clk);
        #1;
        if (bsm_c_valid) begin
          got = {got[62:0], bsm_c};
          nv++;
        end
        @(negedge clk);
      end
      bsm_start = 1'b0;
      chk("bit-serial product", got, gf_mul(a, b, 64'hF000_0001, 31));
      chk("bit-serial valid steps", word_t'(nv), 64'd31);
      n_bsm++;
    end
  endtask

  // ---------------- AOP and ESP ----------------
  task automatic run_parallel();
    for (int n = 0; n < 60; n++) begin
      word_t x = gf_rand(4), y = gf_rand(4), u = gf_rand(6), v = gf_rand(6), w = gf_rand(4);
      int lat = 0;
      @(negedge clk);
      aop_a = x[3:0];
      aop_b = y[3:0];
      esp_a = u[5:0];
      esp_b = v[5:0];
      aop_inv_a = w[3:0];
      aop_inv_start = 1'b1;
      #1;
      chk("AOP product", word_t'(aop_c), gf_mul(x, y, 64'h1F, 4));
      chk("ESP product", word_t'(esp_c), gf_mul(u, v, 64'h49, 6));
      n_aop_mul++;
      n_esp++;
      @(negedge clk);
      aop_inv_start = 1'b0;
      lat = 1;
      while (!aop_inv_done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      chk("AOP inverse", word_t'(aop_inv), (w == 0) ? 64'd0 : gf_inv(w, 64'h1F, 4));
      chk("AOP inverse latency", word_t'(lat), 64'd4);
      n_aop_inv++;
    end
  endtask

  // ---------------- rate-adaptive RS encoder ----------------
  int r_now = 0;
  task automatic rs_codeword(input logic [1:0] dr, input int k);
    word_t dat[], g[], p[], got;
    int waited = 0;
    if (dr == 2'b10) begin
      if (r_now < 16) begin r_now++; n_rs_inc++; end else n_rs_limit++;
    end else if (dr == 2'b11) begin
      if (r_now > 0) begin r_now--; n_rs_dec++; end else n_rs_limit++;
    end else n_rs_hold++;
    if (r_now == 0) n_rs_nopar++;
    dat = new[k];
    foreach (dat[i]) dat[i] = gf_rand(8);
    rs_gen(g, r_now, 64'h11D, 8);
    rs_parity(p, dat, g, r_now, 64'h11D, 8);
    @(negedge clk);
    rs_del_r  = dr;
    rs_n_data = 8'(k);
    rs_start  = 1'b1;
    @(negedge clk);
    rs_start = 1'b0;
    while (!rs_dout_valid && waited < 500) begin
      @(negedge clk);
      waited++;
    end
    for (int s = 0; s < k + r_now; s++) begin
      got = '0;
      for (int t = 0; t < 8; t++) begin
        rs_din = (s < k) ? dat[s][7-t] : 1'b0;
        #1;
        if (rs_din_ready != (s < k) || rs_dout_par != (s >= k)) begin
          failures++;
          $display("FAIL RS flags symbol %0d", s);
        end
        got = {got[62:0], rs_dout};
        @(negedge clk);
      end
      chk((s < k) ? "RS data symbol" : "RS parity symbol", got, (s < k) ? dat[s] : p[s-k]);
      if (s >= k) n_rs_par_sym++;
    end
    chk("RS parity count", word_t'(rs_r), word_t'(r_now));
    while (!rs_done && waited < 1000) begin
      @(negedge clk);
      waited++;
    end
    chk("RS done", word_t'(rs_done), 64'd1);
  endtask

  task automatic run_rs();
    rs_codeword(2'b11, 3);     // decrease below 0: ignored, no parity
    rs_codeword(2'b00, 2);     // hold at 0
    rs_codeword(2'b10, 5);
    rs_codeword(2'b10, 5);
    rs_codeword(2'b00, 9);
    rs_codeword(2'b11, 4);
    for (int n = 0; n < 14; n++) rs_codeword(2'b10, 1 + $urandom_range(0, 20));
    for (int n = 0; n < 20; n++) begin
      int c = $urandom_range(0, 9);
      rs_codeword((c < 2) ? 2'b00 : (c < 5) ? 2'b11 : 2'b10, 1 + $urandom_range(0, 30));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      run_div();
      run_cm();
      run_bsm();
      run_parallel();
      run_rs();
    join
    begin
      automatic string names[16] = '{"CM column", "division", "polynomial change", "zero divisor", "pivot swap",
                           "bit-serial product", "AOP product", "AOP inverse", "ESP product",
                           "rate +1", "rate -1", "rate hold", "rate limit",
                           "codeword without parity", "parity symbol", "divider monitor"};
      int cnt[16];
      cnt = '{n_cm_col, n_div, n_div_poly_change, n_div_zero, n_pivot_swap, n_bsm, n_aop_mul,
              n_aop_inv, n_esp, n_rs_inc, n_rs_dec, n_rs_hold, n_rs_limit, n_rs_nopar,
              n_rs_par_sym, int'(div_mon_done)};
      foreach (cnt[i]) begin
        $display("mechanism %-24s %0d", names[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
