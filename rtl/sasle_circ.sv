// sasle_circ: circular (diagonal) processor V_kk of the systolic array that
// solves A b = c over GF(2) by Gauss-Jordan elimination with partial
// pivoting.
//
// It holds the pivot bit r of column k.  When the start flag s_in is 1 it
// loads the arriving element as the new pivot and tells its row to swap
// (h,f) = (1,1), so the square processors take in the new pivot row and
// release the old one.  Otherwise, for each passing element a_in:
//   r=0, a_in=1 -> swap (the passing row becomes the pivot row)
//   r=1, a_in=1 -> add the pivot row to the passing row (annihilate)
//   a_in=0      -> pass unchanged.
// The register r is rewritten when s_in = 1 or r = 0.  (h,f) and the start
// flag leave through flip-flops, one step later.  The gate-level function
// is the processor's published operation; the reset is this design's.
module sasle_circ
  import gf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   s_in,
  input  logic   a_in,
  output gj_op_t p_out,
  output logic   s_out
);
  logic r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r     <= 1'b0;
      p_out <= GJ_PASS;
      s_out <= 1'b0;
    end else begin
      p_out.h <= s_in | a_in;
      p_out.f <= s_in | (a_in & ~r);
      s_out   <= s_in;
      if (s_in || !r) r <= a_in;
    end
  end
endmodule
