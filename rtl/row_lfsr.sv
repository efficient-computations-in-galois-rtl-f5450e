// row_lfsr: row generation unit.  An m-bit LFSR whose feedback taps are
// f_0..f_{m-1}.  Loaded with row 0 of the Toeplitz matrix (the triangular
// coordinates of the multiplicand), it steps through rows 1 .. m-1 on the
// following m-1 steps:  x[m-1] <= sum_k f_k x[k],  x[j] <= x[j+1].
// load has priority and takes load_val; zero = 1 makes the present row
// read as 0 (start-up clear).  row is the present row.
// Follows the published row generation unit.
module row_lfsr #(
  parameter int unsigned M = 8,
  parameter logic [M-1:0] F = M'(9'h11D)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         zero,
  input  logic         load,
  input  logic [M-1:0] load_val,
  output logic [M-1:0] row
);
  logic [M-1:0] x;

  assign row = zero ? '0 : x;

  always_ff @(posedge clk) begin
    if (!rst_n)    x <= '0;
    else if (load) x <= load_val;
    else           x <= {^(F & row), row[M-1:1]};
  end
endmodule
