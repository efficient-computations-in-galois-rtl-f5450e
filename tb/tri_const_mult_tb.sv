// tri_const_mult_tb: self-checking test of the pipelined triangular-basis
// constant multiplier and of its filters.
//  - a continuous stream of random elements enters every m steps; the
//    output of each period must equal the previous element times b
//    (m = 8 with f = x^8+x^4+x^3+x^2+1, and m = 4 with f = x^4+x+1);
//  - the stream output of the recursive filter, passed through a
//    non-recursive filter, must reproduce the input bits (the two basis
//    transformations are inverse);
//  - after clr the first output period must be zero.
module tri_const_mult_tb;
  import gf_ref_pkg::*;

  localparam int NEL = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       clr8 = 1'b0, a8 = 1'b0, c8;
  logic [7:0] b8 = '0;
  logic       clr4 = 1'b0, a4 = 1'b0, c4;
  logic [3:0] b4 = '0;
  logic       z8 = 1'b1, back8;
  logic [7:0] rq8;

  tri_const_mult dut8 (.clk, .rst_n, .clr(clr8), .a_in(a8), .b(b8), .c_out(c8));
  tri_const_mult #(.M(4), .F(4'h3)) dut4 (.clk, .rst_n, .clr(clr4), .a_in(a4), .b(b4),
                                          .c_out(c4));
  rec_filter u_rf (.clk, .rst_n, .zero(z8), .din(a8), .q_next(rq8));
  nonrec_filter u_nrf (.clk, .rst_n, .zero(z8), .din(rq8[7]), .dout(back8));

  initial begin : watchdog
    repeat (NEL * 8 + 2000) @(posedge clk);
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

  // m = 8 stream, with the filter pair alongside
  task automatic stream8(input int nel);
    word_t prev = '0, cur, got, back;
    for (int e = 0; e <= nel; e++) begin
      cur  = (e < nel) ? gf_rand(8) : 64'd0;
      got  = '0;
      back = '0;
      for (int t = 0; t < 8; t++) begin
        @(negedge clk);
        clr8 = (e == 0 && t == 0);
        z8   = (t == 0);
        a8   = cur[7-t];
        #1;
        got  = {got[62:0], c8};
        back = {back[62:0], back8};
      end
      chk("m8 product", got, (e == 0) ? 64'd0 : gf_mul(prev, word_t'(b8), 64'h11D, 8));
      chk("m8 filters inverse", back, cur);
      prev = cur;
    end
  endtask

  task automatic stream4(input int nel);
    word_t prev = '0, cur, got;
    for (int e = 0; e <= nel; e++) begin
      cur = (e < nel) ? gf_rand(4) : 64'd0;
      got = '0;
      for (int t = 0; t < 4; t++) begin
        @(negedge clk);
        clr4 = (e == 0 && t == 0);
        a4   = cur[3-t];
        #1;
        got = {got[62:0], c4};
      end
      chk("m4 product", got, (e == 0) ? 64'd0 : gf_mul(prev, word_t'(b4), 64'h13, 4));
      prev = cur;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      automatic word_t bb = gf_rand(8);
      b8 = bb[7:0];
      stream8(NEL / 8);
    end
    for (int r = 0; r < 16; r++) begin
      b4 = 4'(r);
      stream4(20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
