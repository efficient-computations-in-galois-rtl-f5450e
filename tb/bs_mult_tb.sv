// bs_mult_tb: self-checking test of the bit-serial multiplier.  Two
// instances: the default m = 31 with g(z) = z^31 + z^30 + z^29 + z^28 + 1,
// and m = 4 with g(z) = z^4 + z + 1, checked exhaustively.  Operations are
// issued back to back (start every 2m steps) and each serial product is
// compared with a reference multiplication.
module bs_mult_tb;
  import gf_ref_pkg::*;

  localparam int M1 = 31;
  localparam logic [63:0] POLY1 = 64'hF000_0001;
  localparam int M2 = 4;
  localparam logic [63:0] POLY2 = 64'h13;
  localparam int NRAND = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic          st1 = 1'b0, a1 = 1'b0, c1, v1;
  logic [M1-1:0] b1 = '0;
  logic          st2 = 1'b0, a2 = 1'b0, c2, v2;
  logic [M2-1:0] b2 = '0;

  bs_mult dut1 (.clk, .rst_n, .start(st1), .a_in(a1), .b(b1), .c_out(c1), .c_valid(v1));
  bs_mult #(.M(M2), .G(4'b0011)) dut2 (.clk, .rst_n, .start(st2), .a_in(a2), .b(b2),
                                       .c_out(c2), .c_valid(v2));

  initial begin : watchdog
    repeat (NRAND * 2 * M1 + 256 * 2 * M2 + 500) @(posedge clk);
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // one multiplication on an instance; collects the serial output
  task automatic run1(input word_t a, input word_t b);
    word_t exp_c = gf_mul(a, b, POLY1, M1);
    word_t got   = '0;
    int    nv    = 0;
    b1 = b[M1-1:0];
    for (int t = 0; t < 2 * M1; t++) begin
      st1 = (t == 0);
      a1  = (t < M1) ? a[M1-1-t] : 1'b0;
      @(posedge clk);
      #1;
      if (v1) begin
        got = {got[62:0], c1};
        nv++;
      end
    end
    st1 = 1'b0;
    checks++;
    if (nv != M1 || got != exp_c) begin
      failures++;
      $display("FAIL m=31 a=%h b=%h got=%h exp=%h nvalid=%0d", a, b, got, exp_c, nv);
    end
  endtask

  task automatic run2(input word_t a, input word_t b);
    word_t exp_c = gf_mul(a, b, POLY2, M2);
    word_t got   = '0;
    int    nv    = 0;
    b2 = b[M2-1:0];
    for (int t = 0; t < 2 * M2; t++) begin
      st2 = (t == 0);
      a2  = (t < M2) ? a[M2-1-t] : 1'b0;
      @(posedge clk);
      #1;
      if (v2) begin
        got = {got[62:0], c2};
        nv++;
      end
    end
    st2 = 1'b0;
    checks++;
    if (nv != M2 || got != exp_c) begin
      failures++;
      $display("FAIL m=4 a=%h b=%h got=%h exp=%h nvalid=%0d", a, b, got, exp_c, nv);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run1(64'd1, 64'd1);
    run1(64'd2, 64'h4000_0000);
    for (int n = 0; n < NRAND; n++) run1(gf_rand(M1), gf_rand(M1));
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) run2(word_t'(a), word_t'(b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
