// esp_mult_tb: self-checking test of the ESP parallel multiplier.  The
// default GF(2^6) with z^6 + z^3 + 1 (m = 2, s = 3) is checked exhaustively;
// a second instance with m = 4, s = 5 (z^20 + z^15 + z^10 + z^5 + 1, the
// 5-spaced form of the AOP of degree 4) is checked on random operands.
module esp_mult_tb;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [5:0]  a6 = '0, b6 = '0, c6;
  logic [19:0] a20 = '0, b20 = '0, c20;

  esp_mult dut6 (.a(a6), .b(b6), .c(c6));
  esp_mult #(.M(4), .S(5)) dut20 (.a(a20), .b(b20), .c(c20));

  localparam word_t P6  = 64'h49;                       // z^6+z^3+1
  localparam word_t P20 = 64'h108421;                   // z^20+z^15+z^10+z^5+1

  initial begin : watchdog
    repeat (10000) @(posedge clk);
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
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        a6 = 6'(a);
        b6 = 6'(b);
        #1;
        chk("n6", word_t'(c6), gf_mul(word_t'(a), word_t'(b), P6, 6));
      end
    for (int n = 0; n < 500; n++) begin
      automatic word_t x = gf_rand(20), y = gf_rand(20);
      a20 = x[19:0];
      b20 = y[19:0];
      @(posedge clk);
      chk("n20", word_t'(c20), gf_mul(x, y, P20, 20));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
