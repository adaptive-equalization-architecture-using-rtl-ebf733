// Self-checking testbench for error_sub: all 2^16 pairs of 8-bit operands,
// compared with the difference computed in integer arithmetic.
module tb_error_sub;
  localparam int W = 8;
  logic signed [W-1:0] d, y;
  logic signed [W:0]   e;
  int checks = 0, failures = 0;

  error_sub #(.W(W)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -(2**(W-1)); a < 2**(W-1); a++)
      for (int b = -(2**(W-1)); b < 2**(W-1); b++) begin
        d = W'(a); y = W'(b);
        #1;
        checks++;
        if (int'(e) != a - b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d - %0d: got %0d", a, b, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
