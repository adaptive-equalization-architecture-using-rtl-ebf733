// Reference model of the DA LMS filter, written from the algorithm, for the
// testbenches: y(k) = F^T P(k) with F = [-1, 2^-1, ..., 2^-(B-1)], then
// P(k+1) = P(k) + 2^-step * e(k) * F, one element per input bit position,
// applied to the partial-product table in bit order B-1 (LSB) down to 0.
// Number formats follow the RTL: B-bit fractions for data, RAM words of RAM_W
// bits with FRAC_W fraction bits, accumulator halving by floor, saturation
// of y(k) and of RAM words. Included inside a testbench module.
class da_lms_model;
  int unsigned b, n, ram_w, frac_w, step;
  longint mem [];
  int hist [];            // hist[j] = s(k-j) as a B-bit pattern
  int last_addr [];       // address of each bit position, last sample
  bit last_sat;           // y(k) of the last sample was clipped
  bit last_collision;     // two bit positions of the last sample shared a word

  function new(int unsigned b_, int unsigned n_, int unsigned ram_w_,
               int unsigned frac_w_, int unsigned mu_shift_);
    b = b_; n = n_; ram_w = ram_w_; frac_w = frac_w_;
    step = mu_shift_ + 1 - $clog2(n_);
    mem = new[2**n];
    hist = new[n];
    last_addr = new[b];
    foreach (mem[a]) mem[a] = 0;
    foreach (hist[j]) hist[j] = 0;
  endfunction

  // bit i of the weighting F (i = 0 is the sign bit) of a B-bit pattern
  function automatic int bit_of(int pat, int i);
    return (pat >> (b - 1 - i)) & 1;
  endfunction

  function automatic longint clip(longint v, int w);
    longint hi, lo;
    hi = (longint'(1) << (w - 1)) - 1;
    lo = -(longint'(1) << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // one sample: s and d as signed integers of B bits; returns y(k)
  function automatic int run(int s, int d);
    longint acc, delta, ea;
    int y, e;
    for (int j = int'(n) - 1; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = s & ((1 << b) - 1);
    last_collision = 0;
    for (int i = 0; i < int'(b); i++) begin
      int a;
      a = 0;
      for (int j = 0; j < int'(n); j++) a |= bit_of(hist[j], i) << j;
      last_addr[i] = a;
      for (int q = 0; q < i; q++) if (last_addr[q] == a) last_collision = 1;
    end
    acc = 0;
    for (int i = int'(b) - 1; i >= 0; i--)
      acc = (acc >>> 1) + ((i == 0) ? -mem[last_addr[i]] : mem[last_addr[i]]);
    acc = acc >>> (frac_w - (b - 1));
    y = int'(clip(acc, b));
    last_sat = (longint'(y) != acc);
    e = d - y;
    ea = longint'(e) <<< (frac_w - (b - 1));
    for (int i = int'(b) - 1; i >= 0; i--) begin
      delta = ea >>> (step + i);
      if (i == 0) delta = -delta;
      mem[last_addr[i]] = clip(mem[last_addr[i]] + delta, ram_w);
    end
    return y;
  endfunction
endclass
