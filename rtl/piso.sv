// Parallel-in serial-out shift register for the input sample.
//
// On load the B-bit sample is captured; each shift strobe moves it one place
// towards bit 0, so sout presents bit 0 (the LSB) first and the sign bit last,
// one bit per strobe. Feeding the bits LSB first lets the scaling accumulator
// halve its running sum each step and subtract the sign-bit term last.
// Load has priority over shift. Synchronous to clk, active-low async reset.
module piso #(
  parameter int unsigned B = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [B-1:0] din,
  output logic         sout
);
  logic [B-1:0] sr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {1'b0, sr[B-1:1]};

  assign sout = sr[0];
endmodule
