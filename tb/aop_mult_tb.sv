// aop_mult_tb: self-checking test of the AOP parallel multiplier and its
// modules P, Q and R.  m = 4 (z^4+z^3+z^2+z+1) is checked exhaustively,
// m = 10 and m = 12 on random operands.  The Toeplitz entries produced by P
// and the extra cell of Q are also checked against their definitions.
module aop_mult_tb;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [3:0]  a4 = '0, b4 = '0, c4;
  logic [9:0]  a10 = '0, b10 = '0, c10;
  logic [11:0] a12 = '0, b12 = '0, c12;
  logic [4:0]  at4;
  logic [4:0]  ct4x;

  aop_mult #(.M(4))  d4  (.a(a4),  .b(b4),  .c(c4));
  aop_mult #(.M(10)) d10 (.a(a10), .b(b10), .c(c10));
  aop_mult #(.M(12)) d12 (.a(a12), .b(b12), .c(c12));
  aop_p #(.M(4)) p4 (.a(a4), .at(at4));
  aop_q #(.M(4), .EXTRA(1)) q4 (.at(at4), .b(b4), .ct(ct4x));

  function automatic word_t aop(int m);
    return (64'd1 << (m + 1)) - 1;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        word_t s;
        a4 = 4'(a);
        b4 = 4'(b);
        @(posedge clk);
        chk("m4 product", word_t'(c4), gf_mul(word_t'(a), word_t'(b), aop(4), 4));
        // a~_k is a_{m-1-k}+a_{m-k}; alpha^5 = 1 fixes a~ uniquely
        chk("m4 P", word_t'(at4),
            word_t'({a4[0], a4[0] ^ a4[1], a4[1] ^ a4[2], a4[2] ^ a4[3], a4[3]}));
        s = '0;
        for (int i = 0; i < 4; i++) s ^= word_t'(ct4x[i]);
        chk("m4 Q extra cell", word_t'(ct4x[4]), s);
      end
    end
    for (int n = 0; n < 300; n++) begin
      automatic word_t x = gf_rand(10), y = gf_rand(10), u = gf_rand(12), v = gf_rand(12);
      a10 = x[9:0];
      b10 = y[9:0];
      a12 = u[11:0];
      b12 = v[11:0];
      @(posedge clk);
      chk("m10 product", word_t'(c10), gf_mul(x, y, aop(10), 10));
      chk("m12 product", word_t'(c12), gf_mul(u, v, aop(12), 12));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
