// Multiplierless LMS adaptive FIR filter built on distributed arithmetic.
//
// The filter never stores tap weights. It stores, for every N-bit pattern a,
// the partial product p[a] = sum of the weights w_j with a[j] = 1 (a 2^N-word
// RAM). The input samples are streamed bit-serially, LSB first, through a
// PISO and N-1 SISO delay registers; at bit i the N taps s(k)..s(k-N+1) give
// the address A_i = {b_i(k-N+1), ..., b_i(k)}, and y(k) = -p[A_0] +
// sum_{i>0} 2^-i p[A_i] is formed by a scaling accumulator. Adaptation updates
// the same B words instead of the weights: with white input the LMS step
// becomes p[A_i] += 0.5*mu*N*e(k)*F_i, F = [-1, 2^-1, ..., 2^-(B-1)], and
// 0.5*mu*N is a power of two, so only shifts and adds are needed. A second
// group of N SISO registers records the B addresses during the output pass and
// replays them for the update pass.
//
// Sample period (2B+2 = 18 cycles of clk at the defaults):
//   LOAD (1), PASS1 read/accumulate (B), RESULT (1), PASS2 update (B).
// s_in and d_in are sampled in LOAD; sc pulses in RESULT to request the next
// sample, which must be on s_in/d_in by the following LOAD (B+1 cycles later).
// y_out changes at the end of RESULT, B+1 cycles after s(k) was sampled, and
// holds until the next RESULT. After reset, 2^N cycles clear the RAM first.
// All data are B-bit two's-complement fractions (sign bit weighs -1); y(k)
// saturates to that range.
//
// From the architecture: the unit list (PISO, SISOs, RAM, scaling
// accumulator, buffers, subtractor, update circuit, control), the control
// signal names, 4 taps, 8-bit data, the 16 x 20-bit RAM, mu = 2^-4 and the
// pins (s, d, clock, reset in; y, sc out). Choices of this design: the cycle
// schedule, the RAM number format (17 fraction bits), read-modify-write of
// the RAM in one cycle, saturation, active-low reset and the RAM clear.
// Concurrent assertions at the end check the sequencing rules.
module da_lms_filter
  import da_lms_pkg::*;
#(
  parameter int unsigned B        = DEF_B,
  parameter int unsigned N        = DEF_N,
  parameter int unsigned RAM_W    = DEF_RAM_W,
  parameter int unsigned FRAC_W   = DEF_FRAC_W,
  parameter int unsigned MU_SHIFT = DEF_MU_SHIFT
) (
  input  logic                clk,     // system clock
  input  logic                rst_n,   // active-low asynchronous reset
  input  logic signed [B-1:0] s_in,    // input sample s(k) from the A/D
  input  logic signed [B-1:0] d_in,    // desired signal d(k)
  output logic signed [B-1:0] y_out,   // filter output y(k) to the D/A
  output logic                sc       // A/D start-of-conversion request
);
  localparam int unsigned ACC_W      = RAM_W + 1;
  localparam int unsigned STEP_SHIFT = step_shift(MU_SHIFT, N);
  localparam int unsigned BI_W       = $clog2(B);
  localparam logic signed [ACC_W-1:0] YMAX = ACC_W'(2**(B-1) - 1);
  localparam logic signed [ACC_W-1:0] YMIN = -YMAX - 1;

  ctrl_t             ctrl;
  logic [BI_W-1:0]   bit_idx;
  logic              init;
  logic [N-1:0]      init_addr;

  // ---------------- bit-serial input delay line and address replay --------
  logic              line_shift;
  logic [N-1:0]      tap;       // tap[j]: current bit of s(k-j)
  logic [N-1:0]      rep;       // replayed address bits for the update pass
  logic [N-1:0]      addr;

  assign line_shift = ctrl.clk_sh & ~ctrl.re_turn;

  piso #(.B(B)) u_piso (
    .clk, .rst_n, .load(ctrl.lr), .shift(line_shift), .din(s_in), .sout(tap[0])
  );

  for (genvar j = 1; j < int'(N); j++) begin : g_delay
    siso #(.B(B)) u_siso (
      .clk, .rst_n, .shift(line_shift), .sin(tap[j-1]), .sout(tap[j])
    );
  end

  for (genvar j = 0; j < int'(N); j++) begin : g_replay
    siso #(.B(B)) u_siso (
      .clk, .rst_n, .shift(ctrl.clk_sh), .sin(tap[j]), .sout(rep[j])
    );
  end

  always_comb begin
    if (init)              addr = init_addr;
    else if (ctrl.re_turn) addr = rep;
    else                   addr = tap;
  end

  // ---------------- partial-product RAM ----------------------------------
  logic signed [RAM_W-1:0] p_rd, p_new, p_wr;

  assign p_wr = init ? '0 : p_new;

  pp_ram #(.N(N), .W(RAM_W)) u_ram (
    .clk, .we(~ctrl.rd_wr), .addr, .wdata(p_wr), .rdata(p_rd)
  );

  // ---------------- output: scaling accumulator and buffers --------------
  logic signed [ACC_W-1:0] acc, acc_y;
  logic signed [B-1:0]     y_sat, y_err, d_buf;
  logic signed [B:0]       e;

  scaling_acc #(.IN_W(RAM_W), .ACC_W(ACC_W)) u_acc (
    .clk, .rst_n, .clr(ctrl.clacc), .load(ctrl.lacc), .sub(ctrl.s_a),
    .din(p_rd), .acc
  );

  // Drop the fraction bits below the B-bit output LSB, then saturate.
  always_comb begin
    acc_y = acc >>> (FRAC_W - (B - 1));
    if (acc_y > YMAX)      y_sat = YMAX[B-1:0];
    else if (acc_y < YMIN) y_sat = YMIN[B-1:0];
    else                   y_sat = acc_y[B-1:0];
  end

  buffer_reg #(.W(B)) u_buf_y (
    .clk, .rst_n, .load(ctrl.lbuff_op), .d(y_sat), .q(y_err)
  );
  buffer_reg #(.W(B)) u_buf_out (
    .clk, .rst_n, .load(ctrl.lbuff_op), .d(y_sat), .q(y_out)
  );
  buffer_reg #(.W(B)) u_buf_d (
    .clk, .rst_n, .load(ctrl.lr), .d(d_in), .q(d_buf)
  );

  // ---------------- adaptation ---------------------------------------------
  error_sub #(.W(B)) u_err (.d(d_buf), .y(y_err), .e);

  pp_update #(
    .B(B), .RAM_W(RAM_W), .FRAC_W(FRAC_W), .STEP_SHIFT(STEP_SHIFT)
  ) u_upd (
    .e, .bit_idx, .p_old(p_rd), .p_new
  );

  control_unit #(.B(B), .N(N)) u_ctrl (
    .clk, .rst_n, .ctrl, .bit_idx, .init, .init_addr
  );

  assign sc = ctrl.sc;

  // ---------------- sequencing rules ---------------------------------------
  // The RAM is written only while clearing or in the update pass, and the
  // update pass always uses the replayed addresses.
  a_write_phase: assert property (@(posedge clk)
    !ctrl.rd_wr |-> (init || ctrl.re_turn));
  // The accumulator only subtracts on a load, and never while it is cleared.
  a_sub_on_load: assert property (@(posedge clk)
    ctrl.s_a |-> (ctrl.lacc && !ctrl.clacc));
  // A new sample is never loaded in the middle of the update pass.
  a_no_load_in_update: assert property (@(posedge clk)
    ctrl.re_turn |-> !ctrl.lr);
endmodule
