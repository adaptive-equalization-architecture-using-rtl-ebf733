// Partial-product RAM: 2^N words of W bits (16 x 20 bits for 4 taps).
//
// Word a holds the sum of the tap weights whose address bit is set in a, the
// look-up table of distributed arithmetic; it is not loaded from outside but
// adapted in place by the LMS update. Read is combinational (asynchronous),
// write is synchronous on clk when we is high, so one cycle can read a word,
// add the update to it and write it back. There is no reset: the control unit
// clears all words after reset.
module pp_ram #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 20
) (
  input  logic                clk,
  input  logic                we,
  input  logic [N-1:0]        addr,
  input  logic signed [W-1:0] wdata,
  output logic signed [W-1:0] rdata
);
  logic signed [W-1:0] mem [2**N];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
