// dly_line: D-step delay of a single bit (a chain of D flip-flops, cleared
// by the synchronous active-low reset).  D = 0 is a plain wire.  Used for
// the D^i skew-matching delays of the systolic divider.  With D = 0 the
// clock and reset are not used; the lint warning about them for that size
// is expected.
module dly_line #(
  parameter int unsigned D = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else if (D == 1) begin : g_one
    always_ff @(posedge clk) begin
      if (!rst_n) q <= 1'b0;
      else        q <= d;
    end
  end else begin : g_chain
    logic [D-1:0] sr;
    always_ff @(posedge clk) begin
      if (!rst_n) sr <= '0;
      else        sr <= {sr[D-2:0], d};
    end
    assign q = sr[D-1];
  end
endmodule
