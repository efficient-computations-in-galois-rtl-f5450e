// sasle_sq: square processor V_kj (j > k) of the Gauss-Jordan systolic
// array.  It holds one bit r of the resident pivot row and applies the
// elementary row operation (h,f) received from its left neighbour to the
// element a_in passing from above:
//   (0,0)  a_out = a_in
//   (1,0)  a_out = r ^ a_in
//   (1,1)  a_out = r, r = a_in   (rows interchanged)
// (h,f) is forwarded to the right.  Both outputs are registered (one time
// step).  Function and circuit follow the published processor; the
// combination (0,1) never occurs and is treated as a pass.
module sasle_sq
  import gf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  gj_op_t p_in,
  input  logic   a_in,
  output gj_op_t p_out,
  output logic   a_out
);
  logic r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r     <= 1'b0;
      p_out <= GJ_PASS;
      a_out <= 1'b0;
    end else begin
      p_out <= p_in;
      unique case (p_in)
        GJ_SWAP: begin
          a_out <= r;
          r     <= a_in;
        end
        GJ_ADD:  a_out <= r ^ a_in;
        default: a_out <= a_in;
      endcase
    end
  end
endmodule
