// Partial-product update: the shift bank and adder in front of the RAM write.
//
// Implements one element of P(k+1) = P(k) + 0.5*mu*N*e(k)*F, where the step
// 0.5*mu*N = 2^-STEP_SHIFT is a power of two and F = [-1, 2^-1, ...,
// 2^-(B-1)]. The bank holds B fixed shifts of the error, e*2^-STEP_SHIFT*F_i
// for i = 0..B-1 (the i = 0 term negated, being the sign-bit weight), aligned
// to the FRAC_W fraction bits of a RAM word; bit_idx selects the term for the
// partial product now on the RAM output, and the adder adds it to p_old. Bits
// shifted below the RAM LSB are dropped (arithmetic shift). The sum saturates
// at the limits of a RAM word instead of wrapping: a choice of this design.
// e is a (B+1)-bit two's-complement number with B-1 fraction bits, as
// produced by the error subtractor. Purely combinational.
module pp_update #(
  parameter int unsigned B          = 8,
  parameter int unsigned RAM_W      = 20,
  parameter int unsigned FRAC_W     = 17,
  parameter int unsigned STEP_SHIFT = 3
) (
  input  logic signed [B:0]         e,
  input  logic [$clog2(B)-1:0]      bit_idx,
  input  logic signed [RAM_W-1:0]   p_old,
  output logic signed [RAM_W-1:0]   p_new
);
  localparam int unsigned ALIGN = FRAC_W - (B - 1);   // e LSB -> RAM LSB
  localparam int unsigned SUM_W = RAM_W + 2;
  localparam logic signed [SUM_W-1:0] PMAX = SUM_W'({1'b0, {(RAM_W-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] PMIN = -PMAX - 1;

  logic signed [SUM_W-1:0] e_al;
  logic signed [SUM_W-1:0] bank [B];
  logic signed [SUM_W-1:0] sum;

  always_comb begin
    e_al = SUM_W'(e) <<< ALIGN;
    for (int i = 0; i < int'(B); i++) begin
      bank[i] = e_al >>> (STEP_SHIFT + i);
    end
    bank[0] = -bank[0];
    sum = SUM_W'(p_old) + bank[bit_idx];
    if (sum > PMAX)      p_new = PMAX[RAM_W-1:0];
    else if (sum < PMIN) p_new = PMIN[RAM_W-1:0];
    else                 p_new = sum[RAM_W-1:0];
  end
endmodule
