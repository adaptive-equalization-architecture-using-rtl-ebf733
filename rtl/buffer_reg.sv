// Buffer: a W-bit holding register with load enable.
//
// Used three times in the filter: to hold d(k), to hold y(k) for the error
// subtractor, and to hold y(k) for the D/A converter until the next sample.
// q takes d on the rising clock edge when load is high. Active-low async reset.
module buffer_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
endmodule
