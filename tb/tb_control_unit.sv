// Self-checking testbench for control_unit at the defaults (B = 8, N = 4).
// Checks the RAM clear after reset (16 write cycles covering every address),
// then for 50 sample periods the exact cycle-by-cycle control pattern:
// an 18-cycle period of LOAD, 8 read/accumulate cycles with bit_idx counting
// 7 down to 0 and s_a only on bit 0, RESULT with lbuff_op and sc, and 8
// update cycles with re_turn and RAM write.
module tb_control_unit;
  import da_lms_pkg::*;
  localparam int B = 8, N = 4, PERIOD = 2*B + 2;
  logic clk = 1'b0, rst_n = 1'b0;
  ctrl_t ctrl;
  logic [2:0] bit_idx;
  logic init;
  logic [N-1:0] init_addr;
  int checks = 0, failures = 0;

  control_unit #(.B(B), .N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_ctrl(input ctrl_t exp, input bit exp_init, input int exp_idx,
                             input string what);
    checks++;
    if (ctrl !== exp || init !== exp_init || (exp_idx >= 0 && int'(bit_idx) != exp_idx)) begin
      failures++;
      $display("FAIL %s: ctrl=%b init=%b idx=%0d", what, ctrl, init, bit_idx);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t c;
    bit seen [2**N];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // RAM clear
    for (int a = 0; a < 2**N; a++) begin
      c = '0;
      expect_ctrl(c, 1'b1, -1, $sformatf("init %0d", a));
      seen[init_addr] = 1'b1;
      @(negedge clk);
    end
    for (int a = 0; a < 2**N; a++) begin
      checks++;
      if (!seen[a]) begin failures++; $display("FAIL address %0d not cleared", a); end
    end
    for (int k = 0; k < 50; k++) begin
      c = '0; c.rd_wr = 1'b1; c.lr = 1'b1; c.clacc = 1'b1;
      expect_ctrl(c, 1'b0, -1, "LOAD");
      @(negedge clk);
      for (int j = 0; j < B; j++) begin
        c = '0; c.rd_wr = 1'b1; c.clk_sh = 1'b1; c.lacc = 1'b1; c.s_a = (j == B-1);
        expect_ctrl(c, 1'b0, B-1-j, $sformatf("PASS1 %0d", j));
        @(negedge clk);
      end
      c = '0; c.rd_wr = 1'b1; c.lbuff_op = 1'b1; c.sc = 1'b1;
      expect_ctrl(c, 1'b0, -1, "RESULT");
      @(negedge clk);
      for (int j = 0; j < B; j++) begin
        c = '0; c.clk_sh = 1'b1; c.re_turn = 1'b1;
        expect_ctrl(c, 1'b0, B-1-j, $sformatf("PASS2 %0d", j));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
