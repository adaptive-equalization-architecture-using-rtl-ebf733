// Self-checking testbench for siso: pushes a random bit stream with random
// gaps in the shift strobe and checks that sout always shows the bit taken in
// exactly B strobes earlier.
module tb_siso;
  localparam int B = 8;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, sin = 1'b0, sout;
  logic hist [$];
  int checks = 0, failures = 0;

  siso #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < B; j++) hist.push_back(1'b0);   // reset contents
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (sout !== hist[hist.size()-B]) begin
        failures++;
        $display("FAIL step %0d: got %0b exp %0b", t, sout, hist[hist.size()-B]);
      end
      shift = ($urandom_range(0, 4) != 0);
      sin   = 1'($urandom);
      if (shift) hist.push_back(sin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
