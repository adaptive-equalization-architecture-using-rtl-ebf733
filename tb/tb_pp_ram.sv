// Self-checking testbench for pp_ram: random reads and writes against an
// array model; checks that a write lands at its address only, that reads are
// combinational and that a word is read back unchanged when we is low.
module tb_pp_ram;
  localparam int N = 4, W = 20;
  logic clk = 1'b0, we = 1'b0;
  logic [N-1:0] addr = '0;
  logic signed [W-1:0] wdata = '0, rdata;
  logic signed [W-1:0] model [2**N];
  int checks = 0, failures = 0;

  pp_ram #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < 2**N; a++) begin
      @(negedge clk);
      addr = N'(a); wdata = W'($urandom); we = 1'b1; model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      addr = N'($urandom);
      we   = ($urandom_range(0, 2) == 0);
      wdata = W'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL addr %0d: got %0h exp %0h", addr, rdata, model[addr]);
      end
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
