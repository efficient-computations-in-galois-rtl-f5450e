// sys_divider_tb: self-checking test of the bit-serial systolic divider.
// Divisions are issued back to back (one every M steps) on random
// operands; each quotient is multiplied back by a reference multiplier and
// compared with the dividend.  The position of b_0 (4M-1 steps after the
// division's start flag) is checked, as is the zero detector for a zero
// divisor.  Run at M = 4 with g(z) = z^4 + z + 1; division 7 has a zero
// divisor.
module sys_divider_tb;
  import gf_ref_pkg::*;

  localparam int M = 4;
  localparam logic [63:0] POLY = 64'h13;  // z^4 + z + 1
  localparam int NDIV = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_in = 1'b0, g_in = 1'b0, a_in = 1'b0, c_in = 1'b0;
  logic b_out, b_first, a_nonzero;
  int checks = 0, failures = 0;

  sys_divider #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  word_t av[NDIV], cv[NDIV];
  int    issue_t[NDIV];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (NDIV * M * 4 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    for (int d = 0; d < NDIV; d++) begin
      av[d] = (d == 7) ? 64'd0 : gf_rand(M);
      if (d != 7 && av[d] == 0) av[d] = 64'd1;
      cv[d] = gf_rand(M);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // two extra zero divisions at the end flush the pipeline
    for (int d = 0; d < NDIV + 2; d++) begin
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        s_in = (i == 0);
        g_in = POLY[M-1-i];
        a_in = (d < NDIV) ? av[d][M-1-i] : 1'b0;
        c_in = (d < NDIV) ? cv[d][M-1-i] : 1'b0;
      end
    end
  end

  // monitor: everything is sampled on the rising edge
  int    n_issued = 0, n_done = 0, bit_i = -1, zd_pending = 0;
  word_t b;
  always @(posedge clk) begin
    if (rst_n) begin
      if (zd_pending > 0) begin
        // verdict for division zd_pending-1 became visible on this edge
        checks++;
        if (a_nonzero !== (av[zd_pending-1] != 0)) begin
          failures++;
          $display("zero detect wrong for div %0d", zd_pending - 1);
        end
        zd_pending = 0;
      end
      if (s_in && n_issued < NDIV) begin
        issue_t[n_issued] = cyc;
        if (n_issued > 0) zd_pending = n_issued;
        n_issued++;
      end
      if (b_first && n_done < NDIV) begin
        checks++;
        if (cyc - issue_t[n_done] != 4 * M - 1) begin
          failures++;
          $display("latency mismatch div %0d: %0d", n_done, cyc - issue_t[n_done]);
        end
        bit_i = 0;
        b = '0;
      end
      if (bit_i >= 0) begin
        b[bit_i] = b_out;
        bit_i++;
        if (bit_i == M) begin
          if (av[n_done] != 0) begin
            checks++;
            if (gf_mul(b, av[n_done], POLY, M) != cv[n_done]) begin
              failures++;
              $display("div %0d: a=%h c=%h got b=%h", n_done, av[n_done], cv[n_done], b);
            end
          end
          n_done++;
          bit_i = -1;
          if (n_done == NDIV) begin
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end
endmodule
