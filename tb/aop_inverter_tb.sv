// aop_inverter_tb: self-checking test of the AOP squarer and inverter.
// m = 4 is checked exhaustively (squares and inverses), m = 10 and m = 18
// on random elements.  Each inverse must equal a^(2^m - 2) and arrive
// exactly m steps after start (one load step and m-1 loop steps).
module aop_inverter_tb;
  import gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        s4 = 1'b0,  d4;
  logic [3:0]  a4 = '0,  i4, q4;
  logic        s10 = 1'b0, d10;
  logic [9:0]  a10 = '0, i10, q10;
  logic        s18 = 1'b0, d18;
  logic [17:0] a18 = '0, i18;

  aop_inverter #(.M(4))  v4  (.clk, .rst_n, .start(s4),  .a(a4),  .inv(i4),  .done(d4));
  aop_inverter #(.M(10)) v10 (.clk, .rst_n, .start(s10), .a(a10), .inv(i10), .done(d10));
  aop_inverter #(.M(18)) v18 (.clk, .rst_n, .start(s18), .a(a18), .inv(i18), .done(d18));
  aop_square #(.M(4))  sq4  (.a(a4),  .c(q4));
  aop_square #(.M(10)) sq10 (.a(a10), .c(q10));

  function automatic word_t aop(int m);
    return (64'd1 << (m + 1)) - 1;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // start all three inverters together and wait for each done
  task automatic invert(input word_t x4, input word_t x10, input word_t x18);
    int lat4 = -1, lat10 = -1, lat18 = -1;
    @(negedge clk);
    a4 = x4[3:0];
    a10 = x10[9:0];
    a18 = x18[17:0];
    s4 = 1'b1;
    s10 = 1'b1;
    s18 = 1'b1;
    #1;
    chk("m4 square", word_t'(q4), gf_mul(x4, x4, aop(4), 4));
    chk("m10 square", word_t'(q10), gf_mul(x10, x10, aop(10), 10));
    @(negedge clk);
    s4 = 1'b0;
    s10 = 1'b0;
    s18 = 1'b0;
    for (int t = 1; t <= 20; t++) begin
      if (d4 && lat4 < 0) begin
        lat4 = t;
        chk("m4 inverse", word_t'(i4), (x4 == 0) ? 64'd0 : gf_inv(x4, aop(4), 4));
      end
      if (d10 && lat10 < 0) begin
        lat10 = t;
        chk("m10 inverse", word_t'(i10), (x10 == 0) ? 64'd0 : gf_inv(x10, aop(10), 10));
      end
      if (d18 && lat18 < 0) begin
        lat18 = t;
        chk("m18 inverse", word_t'(i18), (x18 == 0) ? 64'd0 : gf_inv(x18, aop(18), 18));
      end
      @(negedge clk);
    end
    chk("m4 latency", word_t'(lat4), 64'd4);
    chk("m10 latency", word_t'(lat10), 64'd10);
    chk("m18 latency", word_t'(lat18), 64'd18);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int a = 0; a < 16; a++) invert(word_t'(a), gf_rand(10), gf_rand(18));
    for (int n = 0; n < 100; n++) invert(gf_rand(4), gf_rand(10), gf_rand(18));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
