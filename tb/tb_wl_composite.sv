// Composite-signal experiment: separating a 100 Hz tone from a 1 kHz tone.
//
// The input is s(k) = 0.5 sin(2 pi 100 k/fs) + 0.25 sin(2 pi 1000 k/fs), the
// second tone at half the amplitude of the first, and the desired signal is
// the 100 Hz tone alone, in phase. The sample rate fs = 4 kHz is a choice of
// this testbench. The filter runs at its default parameters (mu = 2^-4) for
// 20000 samples (5 s of signal). Checks: every output equals the reference
// model bit for bit; the sample period is 18 clock cycles; and over the
// last 1000 samples the error power is below 5% of the power of the 1 kHz
// tone that has to be removed, i.e. the output is the 100 Hz tone with the
// right phase.
module tb_wl_composite;
  `include "da_lms_model.svh"

  localparam int B = 8, NS = 20000, PERIOD = 2*B + 2;
  localparam real FS = 4000.0, PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, sc;
  logic signed [B-1:0] s_in = '0, d_in = '0, y_out;
  int checks = 0, failures = 0;
  longint cycle = 0, last_sc = -1;

  da_lms_filter dut (.clk, .rst_n, .s_in, .d_in, .y_out, .sc);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int q8(real v);
    int r;
    r = $rtoi(v * 128.0 + ((v < 0) ? -0.5 : 0.5));
    return (r > 127) ? 127 : (r < -128) ? -128 : r;
  endfunction

  initial begin : watchdog
    repeat (PERIOD * (NS + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    da_lms_model m;
    automatic real se_first = 0.0, se_last = 0.0;
    real p_hf;
    m = new(B, 4, 20, 17, 4);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NS; k++) begin
      int s, d, y_ref;
      real lf, hf;
      lf = 0.5  * $sin(2.0 * PI * 100.0  * real'(k) / FS);
      hf = 0.25 * $sin(2.0 * PI * 1000.0 * real'(k) / FS);
      s = q8(lf + hf);
      d = q8(lf);
      s_in = B'(s);
      d_in = B'(d);
      do @(posedge clk); while (!sc);
      if (last_sc >= 0)
        check(cycle - last_sc == longint'(PERIOD), $sformatf("sc period %0d", cycle - last_sc));
      last_sc = cycle;
      @(negedge clk);
      y_ref = m.run(s, d);
      check(int'(y_out) == y_ref, $sformatf("sample %0d: y %0d exp %0d", k, y_out, y_ref));
      if (k < 1000)       se_first += real'((d - y_ref) ** 2) / 1000.0;
      if (k >= NS - 1000) se_last  += real'((d - y_ref) ** 2) / 1000.0;
    end
    p_hf = (0.25 * 128.0) ** 2 / 2.0;
    $display("error power (LSB^2): first 1000 samples %.1f, last 1000 %.2f; 1 kHz tone power %.1f",
             se_first, se_last, p_hf);
    check(se_last < 0.05 * p_hf, "1 kHz tone not removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
