// cm_lfsr_tb: self-checking test of the LFSR-based coefficient-matrix
// generator.  For back-to-back random divisors (start every m steps) and
// the three irreducible quartics, every serial output element a_{i,j} is
// compared with coordinate m-1-i of alpha^j * a, computed by a reference
// multiplier, at step i + j + 1 after its start.  m = 4 and m = 8.
module cm_lfsr_tb;
  import gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       st4 = 1'b0, st8 = 1'b0;
  logic [3:0] a4 = '0, g4 = '0, col4;
  logic [7:0] a8 = '0, g8 = '0, col8;

  cm_lfsr dut4 (.clk, .rst_n, .start(st4), .a(a4), .g(g4), .col(col4));
  cm_lfsr #(.M(8)) dut8 (.clk, .rst_n, .start(st8), .a(a8), .g(g8), .col(col8));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // expected element a_{i,j} for divisor a, polynomial poly
  function automatic logic elem(word_t a, word_t poly, int m, int i, int j);
    word_t x = gf_mul(a, gf_pow(64'd2, longint'(j), poly, m), poly, m);
    return x[m-1-i];
  endfunction

  localparam int ND = 60;
  word_t p4[3] = '{64'h13, 64'h19, 64'h1F};
  word_t p8[3] = '{64'h11D, 64'h11B, 64'h12B};

  task automatic run4();
    word_t av[ND], pv[ND];
    int t0[ND];
    for (int d = 0; d < ND; d++) begin
      av[d] = gf_rand(4);
      pv[d] = p4[$urandom_range(0, 2)];
    end
    // issue every m steps; check every element on the step it is due
    for (int t = 0; t < ND * 4 + 12; t++) begin
      @(negedge clk);
      st4 = (t % 4 == 0) && (t / 4 < ND);
      if (st4) begin
        a4 = av[t/4][3:0];
        g4 = pv[t/4][3:0];
      end
      #1;
      for (int j = 0; j < 4; j++) begin
        // element due now on column j: i = t - d*4 - j - 1
        for (int d = 0; d < ND; d++) begin
          int i = t - d * 4 - j - 1;
          if (i >= 0 && i < 4) begin
            checks++;
            if (col4[j] !== elem(av[d], pv[d], 4, i, j)) begin
              failures++;
              $display("FAIL m4 div %0d a_{%0d,%0d}", d, i, j);
            end
          end
        end
      end
    end
  endtask

  task automatic run8();
    word_t av[ND], pv[ND];
    for (int d = 0; d < ND; d++) begin
      av[d] = gf_rand(8);
      pv[d] = p8[$urandom_range(0, 2)];
    end
    for (int t = 0; t < ND * 8 + 20; t++) begin
      @(negedge clk);
      st8 = (t % 8 == 0) && (t / 8 < ND);
      if (st8) begin
        a8 = av[t/8][7:0];
        g8 = pv[t/8][7:0];
      end
      #1;
      for (int j = 0; j < 8; j++) begin
        for (int d = 0; d < ND; d++) begin
          int i = t - d * 8 - j - 1;
          if (i >= 0 && i < 8) begin
            checks++;
            if (col8[j] !== elem(av[d], pv[d], 8, i, j)) begin
              failures++;
              $display("FAIL m8 div %0d a_{%0d,%0d}", d, i, j);
            end
          end
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run4();
    run8();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
