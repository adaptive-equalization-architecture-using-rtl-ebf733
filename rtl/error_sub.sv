// Error subtractor: e(k) = d(k) - y(k).
//
// Both operands are W-bit two's-complement fractions; the result is W+1 bits
// wide so that it never overflows. Purely combinational.
module error_sub #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0] d,
  input  logic signed [W-1:0] y,
  output logic signed [W:0]   e
);
  always_comb e = (W+1)'(d) - (W+1)'(y);
endmodule
