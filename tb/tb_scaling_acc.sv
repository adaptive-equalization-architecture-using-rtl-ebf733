// Self-checking testbench for scaling_acc: feeds B random partial products
// (LSB term first, the last one subtracted) and checks the result two ways:
// bit-exactly against a floor-halving reference, and against the exact real
// value -p0 + sum p_i 2^-i, from which truncation may take away less than 1.
// Also checks that clr empties the accumulator and that idle cycles hold it.
module tb_scaling_acc;
  localparam int IN_W = 20, ACC_W = 21, B = 8;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, load = 1'b0, sub = 1'b0;
  logic signed [IN_W-1:0]  din = '0;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  scaling_acc #(.IN_W(IN_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      int  p [B];
      int  r;
      real exact;
      for (int i = 0; i < B; i++) p[i] = $signed(IN_W'($urandom));
      if (t < 5) for (int i = 0; i < B; i++) p[i] = (t[0] ? -(2**(IN_W-1)) : 2**(IN_W-1) - 1);
      @(negedge clk); clr = 1'b1; load = 1'b1;            // clr wins
      @(negedge clk); clr = 1'b0;
      check(acc == 0, "clear");
      r = 0; exact = 0.0;
      for (int j = 0; j < B; j++) begin
        int i;
        i = B - 1 - j;
        load = 1'b1;
        sub  = (i == 0);
        din  = IN_W'(p[i]);
        r    = (r >>> 1) + ((i == 0) ? -p[i] : p[i]);
        exact += ((i == 0) ? -1.0 : 1.0) * real'(p[i]) / real'(2**i);
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin               // idle cycle
          load = 1'b0;
          @(negedge clk);
        end
      end
      load = 1'b0; sub = 1'b0;
      check(int'(acc) == r, $sformatf("horner got %0d exp %0d", acc, r));
      check(real'(acc) <= exact && real'(acc) > exact - 1.0,
            $sformatf("exact got %0d exp %f", acc, exact));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
