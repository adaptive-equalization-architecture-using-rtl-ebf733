// End-to-end testbench for da_lms_filter at its default parameters (4 taps,
// 8-bit data, 16 x 20-bit partial-product RAM, mu = 2^-4).
//
// The testbench plays the A/D converter: it puts a new s(k), d(k) pair on the
// inputs after every sc pulse. Every output sample is compared bit-exactly
// with a reference model of the DA LMS algorithm (da_lms_model.svh), and the
// sample timing is checked: first sc 25 cycles after reset (16 RAM-clear
// cycles, LOAD, 8 accumulate cycles), then one sc and one new y(k) every
// 18 cycles. Three phases:
//   1. system identification: white input, d(k) = output of a fixed 4-tap
//      FIR; the mean-square error must fall by 10x and end small;
//   2. full-scale white input through the same unknown system, which drives
//      y(k) into saturation;
//   3. square-wave input of period 8 with a sine of the same period as d(k)
//      (the square-wave experiment); the error must become small.
// It counts how often each mechanism happens (RAM clear, read/accumulate,
// sign-bit subtraction, result load, update write from the replayed address,
// two bit positions updating the same RAM word, output saturation) and fails
// if one never does.
module tb_da_lms_filter;
  `include "da_lms_model.svh"

  localparam int B = 8, PERIOD = 2*B + 2, FIRST_SC = 16 + 1 + B;
  localparam int N_ID = 1500, N_SAT = 300, N_SQ = 1500;
  localparam real H [4] = '{0.9, -0.5, 0.3, 0.2};

  logic clk = 1'b0, rst_n = 1'b0, sc;
  logic signed [B-1:0] s_in = '0, d_in = '0, y_out;
  int checks = 0, failures = 0;
  longint cycle = 0, last_sc = -1;
  int n_init = 0, n_acc = 0, n_sub = 0, n_res = 0, n_upd = 0, n_coll = 0, n_sat = 0;

  da_lms_filter dut (.clk, .rst_n, .s_in, .d_in, .y_out, .sc);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // y_out may change only on the edge that ends the RESULT cycle
  logic signed [B-1:0] y_prev = '0;
  logic                lb_prev = 1'b0;
  always @(posedge clk) begin
    y_prev  <= y_out;
    lb_prev <= dut.ctrl.lbuff_op;
  end
  always @(negedge clk) if (rst_n && !lb_prev) begin
    checks++;
    if (y_out !== y_prev) begin
      failures++;
      $display("FAIL y_out changed outside RESULT at cycle %0d", cycle);
    end
  end

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (dut.init)                                 n_init++;
    if (dut.ctrl.lacc)                            n_acc++;
    if (dut.ctrl.lacc && dut.ctrl.s_a)            n_sub++;
    if (dut.ctrl.lbuff_op)                        n_res++;
    if (dut.ctrl.re_turn && !dut.ctrl.rd_wr)      n_upd++;
  end

  initial begin : watchdog
    repeat (PERIOD * (N_ID + N_SAT + N_SQ + 20)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    da_lms_model m;
    int hs [4];
    automatic int k = 0;
    automatic real se_early = 0.0, se_late = 0.0, se_sq = 0.0;
    m = new(B, 4, 20, 17, 4);
    foreach (hs[j]) hs[j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (k = 0; k < N_ID + N_SAT + N_SQ; k++) begin
      int s, d, y_ref;
      real acc;
      if (k < N_ID + N_SAT) begin
        s = (k < N_ID) ? $urandom_range(0, 127) - 64 : $urandom_range(0, 255) - 128;
        for (int j = 3; j > 0; j--) hs[j] = hs[j-1];
        hs[0] = s;
        acc = 0.0;
        foreach (hs[j]) acc += H[j] * real'(hs[j]);
        d = $rtoi(acc + ((acc < 0) ? -0.5 : 0.5));
        d = (d > 127) ? 127 : (d < -128) ? -128 : d;
      end else begin
        s = ((k % 8) < 4) ? 64 : -64;
        d = $rtoi(64.0 * $sin(2.0 * 3.14159265358979 * real'(k % 8) / 8.0));
      end
      s_in = B'(s);
      d_in = B'(d);
      // wait for the result of this sample (sc marks the RESULT cycle)
      do @(posedge clk); while (!sc);
      if (last_sc < 0) check(cycle == longint'(FIRST_SC), $sformatf("first sc at cycle %0d", cycle));
      else             check(cycle - last_sc == longint'(PERIOD), $sformatf("sc period %0d", cycle - last_sc));
      last_sc = cycle;
      @(negedge clk);
      y_ref = m.run(s, d);
      check(int'(y_out) == y_ref, $sformatf("sample %0d: y %0d exp %0d", k, y_out, y_ref));
      if (m.last_collision) n_coll++;
      if (m.last_sat)       n_sat++;
      if (k < 50)                          se_early += real'((d - y_ref) ** 2);
      if (k >= N_ID - 300 && k < N_ID)     se_late  += real'((d - y_ref) ** 2);
      if (k >= N_ID + N_SAT + N_SQ - 300)  se_sq    += real'((d - y_ref) ** 2);
    end
    se_early /= 50.0; se_late /= 300.0; se_sq /= 300.0;
    $display("system identification MSE (LSB^2): first 50 %.1f, last 300 %.2f", se_early, se_late);
    $display("square wave MSE (LSB^2), last 300: %.2f", se_sq);
    check(se_late * 10.0 < se_early, "MSE did not fall by 10x");
    check(se_late < 16.0, "system identification did not converge");
    check(se_sq < 16.0, "square-wave experiment did not converge");
    $display("mechanisms: ram_clear=%0d accumulate=%0d subtract=%0d result=%0d update=%0d collision=%0d saturation=%0d",
             n_init, n_acc, n_sub, n_res, n_upd, n_coll, n_sat);
    check(n_init == 16, "RAM clear");
    check(n_acc > 0 && n_sub > 0 && n_res > 0 && n_upd > 0, "datapath step never happened");
    check(n_coll > 0, "shared RAM word in update pass never happened");
    check(n_sat > 0, "output saturation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
