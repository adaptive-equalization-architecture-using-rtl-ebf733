// Scaling accumulator: evaluates y = F^T P one partial product per cycle.
//
// F = [-1, 2^-1, ..., 2^-(B-1)]. The partial products arrive LSB term first,
// so each load computes acc <= acc/2 + din, and the last one (sub high, the
// sign-bit term) computes acc <= acc/2 - din. After B loads acc holds
// sum_i F_i * p_i in the partial products' own fixed-point format. The halving
// is an arithmetic right shift, truncating towards minus infinity. clr has
// priority over load. ACC_W must exceed IN_W by one bit so that the sum of
// halved terms cannot overflow. Active-low async reset.
module scaling_acc #(
  parameter int unsigned IN_W  = 20,
  parameter int unsigned ACC_W = 21
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    load,
  input  logic                    sub,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [ACC_W-1:0] din_x, half;

  always_comb begin
    din_x = ACC_W'(din);
    half  = acc >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     acc <= '0;
    else if (clr)   acc <= '0;
    else if (load)  acc <= sub ? half - din_x : half + din_x;
endmodule
