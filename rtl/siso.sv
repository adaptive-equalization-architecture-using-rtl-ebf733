// Serial-in serial-out shift register: a bit stream delayed by B shifts.
//
// Each shift strobe takes in sin and moves the register one place; sout shows
// the bit that went in B strobes earlier. Chained behind the input PISO, with
// B strobes per sample, the output of the j-th register is the bit stream of
// s(k-j). The same register, fed from a tap and strobed twice per sample,
// replays that tap's bits in the update pass. Active-low async reset.
module siso #(
  parameter int unsigned B = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic sin,
  output logic sout
);
  logic [B-1:0] sr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     sr <= '0;
    else if (shift) sr <= {sin, sr[B-1:1]};

  assign sout = sr[0];
endmodule
