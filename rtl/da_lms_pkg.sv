// Shared constants and types of the distributed-arithmetic LMS adaptive filter.
//
// Number formats used throughout:
//   * s(k), d(k), y(k): B-bit two's-complement fractions (sign bit weighs -1,
//     the next bit 1/2, ..., the LSB 2^-(B-1)).
//   * Partial products in the RAM: RAM_W-bit two's complement with FRAC_W
//     fraction bits. With B = 8 and a step of 2^-3 the smallest update is
//     2^-3 * 2^-7 * 2^-7 = 2^-17, so 17 fraction bits plus 3 integer bits fill
//     the 20-bit RAM word exactly (this split is a choice of this design).
//   * The accumulator is one bit wider than a RAM word.
// The control word carries the nine control lines of the sequencer under their
// architectural names; the bit-shift strobe is called clk_sh here so that it is
// not confused with the system clock.
package da_lms_pkg;

  parameter int unsigned DEF_B        = 8;   // input wordlength (bits of s(k))
  parameter int unsigned DEF_N        = 4;   // filter taps
  parameter int unsigned DEF_RAM_W    = 20;  // partial-product word length
  parameter int unsigned DEF_FRAC_W   = 17;  // fraction bits of a partial product
  parameter int unsigned DEF_MU_SHIFT = 4;   // mu = 2^-MU_SHIFT

  // Control lines issued by the control unit.
  typedef struct packed {
    logic clk_sh;    // shift strobe for PISO and SISO registers
    logic lr;        // load PISO with s(k) and the desired-signal buffer with d(k)
    logic rd_wr;     // 1: RAM read, 0: RAM write
    logic lacc;      // accumulator load
    logic clacc;     // accumulator clear
    logic s_a;       // 1: accumulator subtracts the RAM word (sign bit)
    logic lbuff_op;  // load y(k) into the output buffers
    logic re_turn;   // 1: RAM addressed from the replay registers (update pass)
    logic sc;        // start-of-conversion request to the A/D converter
  } ctrl_t;

  // Step of the partial-product update, 0.5*mu*N = 2^-step_shift.
  function automatic int step_shift(int unsigned mu_shift, int unsigned n_taps);
    return int'(mu_shift) + 1 - $clog2(n_taps);
  endfunction

endpackage
