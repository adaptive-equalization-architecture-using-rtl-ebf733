// Self-checking testbench for buffer_reg: random data and load strobes;
// q must follow d only on clock edges with load high.
module tb_buffer_reg;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [W-1:0] d = '0, q, exp_q;
  int checks = 0, failures = 0;

  buffer_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_q = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = W'($urandom);
      @(posedge clk);
      if (load) exp_q = d;
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL step %0d: got %0h exp %0h", t, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
