// Self-checking testbench for pp_update at the default sizes (B = 8, 20-bit
// words with 17 fraction bits, step 0.5*mu*N = 2^-3). For every error value
// and bit index, with random old words, the new word must be
// p_old + e * 2^-7 * 2^-3 * F_i in units of 2^-17, i.e. p_old - e*2^7 for the
// sign bit (i = 0) and p_old + e*2^(7-i) otherwise, clipped to the word range.
// Old words near both limits make the clipping happen.
module tb_pp_update;
  localparam int B = 8, RAM_W = 20, FRAC_W = 17, STEP = 3;
  localparam int PMAX = 2**(RAM_W-1) - 1, PMIN = -(2**(RAM_W-1));
  logic signed [B:0]       e;
  logic [2:0]              bit_idx;
  logic signed [RAM_W-1:0] p_old, p_new;
  int checks = 0, failures = 0, clipped = 0;

  pp_update #(.B(B), .RAM_W(RAM_W), .FRAC_W(FRAC_W), .STEP_SHIFT(STEP)) dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ev = -255; ev <= 255; ev++)
      for (int i = 0; i < B; i++)
        for (int r = 0; r < 4; r++) begin
          longint delta, expv;
          int po;
          case (r)
            0: po = $signed(RAM_W'($urandom));
            1: po = PMAX - int'($urandom_range(0, 40000));
            2: po = PMIN + int'($urandom_range(0, 40000));
            default: po = 0;
          endcase
          delta = (i == 0) ? -longint'(ev) * 128 : longint'(ev) * (longint'(1) << (7 - i));
          expv  = longint'(po) + delta;
          if (expv > PMAX) begin expv = PMAX; clipped++; end
          if (expv < PMIN) begin expv = PMIN; clipped++; end
          e = (B+1)'(ev); bit_idx = 3'(i); p_old = RAM_W'(po);
          #1;
          checks++;
          if (longint'(p_new) != expv) begin
            failures++;
            if (failures < 10)
              $display("FAIL e=%0d i=%0d p=%0d: got %0d exp %0d", ev, i, po, p_new, expv);
          end
        end
    checks++;
    if (clipped == 0) begin failures++; $display("FAIL clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
