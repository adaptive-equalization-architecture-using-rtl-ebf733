// Self-checking testbench for piso: loads random bytes, shifts them out and
// checks that the bits come out LSB first, one per shift strobe, that idle
// cycles hold the output and that load wins over shift.
module tb_piso;
  localparam int B = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0, sout;
  logic [B-1:0] din;
  int checks = 0, failures = 0;

  piso #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      logic [B-1:0] v;
      v = B'($urandom);
      @(negedge clk); din = v; load = 1'b1; shift = 1'b1;   // load wins
      @(negedge clk); load = 1'b0;
      for (int j = 0; j < B; j++) begin
        shift = 1'b0;
        if ($urandom_range(0, 3) == 0) begin                // idle cycle
          @(negedge clk);
          check(sout, v[j], "hold");
        end
        check(sout, v[j], $sformatf("bit %0d", j));
        shift = 1'b1;
        @(negedge clk);
      end
      shift = 1'b0;
      check(sout, 1'b0, "empty after B shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
