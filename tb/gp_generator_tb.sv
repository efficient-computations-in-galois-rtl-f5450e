// gp_generator_tb: self-checking test of the GP generator and the root
// generation unit.  A random walk of rate changes (+1, -1, hold, including
// attempts beyond 0 and R_MAX) is applied; after every update g_out and
// r_out must match the reference generator polynomial for the new r, and
// done must come (R_MAX+1)*m + 1 steps after start (1 step for a hold).  A
// separate root generator is stepped up and down at random and compared
// with alpha^e.  Default size GF(2^8), R_MAX = 16, plus m = 4, R_MAX = 4.
module gp_generator_tb;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic             st = 1'b0;
  del_r_t           dr = DR_HOLD;
  logic [15:0][7:0] go;
  logic [4:0]       ro;
  logic             bz, dn;
  gp_generator dut (.clk, .rst_n, .start(st), .del_r(dr), .g_out(go), .r_out(ro),
                    .busy(bz), .done(dn));

  logic             st4 = 1'b0;
  del_r_t           dr4 = DR_HOLD;
  logic [3:0][3:0]  go4;
  logic [2:0]       ro4;
  logic             bz4, dn4;
  gp_generator #(.M(4), .F(4'h3), .R_MAX(4)) dut4 (
    .clk, .rst_n, .start(st4), .del_r(dr4), .g_out(go4), .r_out(ro4), .busy(bz4), .done(dn4));

  logic       up = 1'b0, down = 1'b0;
  logic [7:0] root;
  root_gen u_root (.clk, .rst_n, .mul_up(up), .mul_dn(down), .root(root));

  initial begin : watchdog
    repeat (300 * 17 * 8 + 120 * 5 * 4 + 5000) @(posedge clk);
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

  function automatic del_r_t pick();
    case ($urandom_range(0, 9))
      0, 1:    return DR_HOLD;
      2, 3, 4: return DR_DEC;
      default: return DR_INC;
    endcase
  endfunction

  int r8 = 0, r4 = 0;

  task automatic step8(input del_r_t d);
    word_t g[];
    int lat = 0;
    @(negedge clk);
    dr = d;
    st = 1'b1;
    @(negedge clk);
    st = 1'b0;
    lat = 1;
    while (!dn && lat < 1000) begin
      @(negedge clk);
      lat++;
    end
    if (d == DR_INC && r8 < 16) r8++;
    if (d == DR_DEC && r8 > 0) r8--;
    rs_gen(g, r8, 64'h11D, 8);
    chk("m8 r", word_t'(ro), word_t'(r8));
    for (int j = 0; j < 16; j++)
      chk("m8 coefficient", word_t'(go[j]), (j >= 16 - r8) ? g[j - (16 - r8)] : 64'd0);
    chk("m8 latency", word_t'(lat),
        ((d == DR_INC && lat > 1) || (d == DR_DEC && lat > 1)) ? 64'd137 : 64'd1);
  endtask

  task automatic step4(input del_r_t d);
    word_t g[];
    @(negedge clk);
    dr4 = d;
    st4 = 1'b1;
    @(negedge clk);
    st4 = 1'b0;
    while (!dn4) @(negedge clk);
    if (d == DR_INC && r4 < 4) r4++;
    if (d == DR_DEC && r4 > 0) r4--;
    rs_gen(g, r4, 64'h13, 4);
    chk("m4 r", word_t'(ro4), word_t'(r4));
    for (int j = 0; j < 4; j++)
      chk("m4 coefficient", word_t'(go4[j]), (j >= 4 - r4) ? g[j - (4 - r4)] : 64'd0);
  endtask

  initial begin
    automatic int e = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // root generator walk
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      up   = 1'($urandom_range(0, 1));
      down = !up;
      @(negedge clk);
      e    = up ? e + 1 : e - 1;
      up   = 1'b0;
      down = 1'b0;
      chk("root", word_t'(root), gf_pow(64'd2, (longint'(e) % 255 + 255) % 255, 64'h11D, 8));
    end
    step8(DR_DEC);                       // below 0: ignored
    for (int n = 0; n < 17; n++) step8(DR_INC);   // up to R_MAX and one beyond
    for (int n = 0; n < 17; n++) step8(DR_DEC);
    for (int n = 0; n < 200; n++) step8(pick());
    for (int n = 0; n < 120; n++) step4(pick());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
