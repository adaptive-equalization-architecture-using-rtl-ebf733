// Control unit: the sequencer that runs one sample of the DA LMS filter.
//
// After reset it spends 2^N cycles in INIT, writing zero into every RAM word
// (all weights zero); this clear-after-reset phase is a choice of this design.
// It then repeats a sample period of 2*B+2 system-clock cycles:
//   LOAD    1 cycle : lr (PISO <= s(k), d buffer <= d(k)), clacc
//   PASS1   B cycles: RAM read at the live address, lacc, clk_sh; s_a in the
//                     last cycle, where the sign-bit partial product is
//                     subtracted
//   RESULT  1 cycle : lbuff_op (y(k) into both output buffers), sc (ask the
//                     A/D converter for the next sample, wanted by next LOAD)
//   PASS2   B cycles: re_turn, RAM write (rd_wr = 0), clk_sh: each partial
//                     product read in PASS1 is rewritten with its update
// bit_idx gives, during PASS1 and PASS2, the index i of the input bit whose
// address is on the RAM (B-1, the LSB, first; 0, the sign bit, last).
// init and init_addr drive the RAM clear. The shift strobe clk_sh is an
// enable for registers clocked by the system clock, not a separate clock.
module control_unit
  import da_lms_pkg::*;
#(
  parameter int unsigned B = DEF_B,
  parameter int unsigned N = DEF_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output ctrl_t                ctrl,
  output logic [$clog2(B)-1:0] bit_idx,
  output logic                 init,
  output logic [N-1:0]         init_addr
);
  typedef enum logic [2:0] {S_INIT, S_LOAD, S_PASS1, S_RESULT, S_PASS2} state_t;

  localparam int unsigned CW = (N > $clog2(B)) ? N : $clog2(B);

  state_t        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_INIT;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_INIT:
          if (cnt == CW'(2**N - 1)) begin state <= S_LOAD; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        S_LOAD:   begin state <= S_PASS1; cnt <= '0; end
        S_PASS1:
          if (cnt == CW'(B - 1)) begin state <= S_RESULT; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        S_RESULT: begin state <= S_PASS2; cnt <= '0; end
        S_PASS2:
          if (cnt == CW'(B - 1)) begin state <= S_LOAD; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        default:  begin state <= S_INIT; cnt <= '0; end
      endcase
    end

  always_comb begin
    ctrl       = '0;
    ctrl.rd_wr = 1'b1;
    init       = 1'b0;
    init_addr  = cnt[N-1:0];
    bit_idx    = $clog2(B)'(B - 1) - cnt[$clog2(B)-1:0];
    unique case (state)
      S_INIT:   begin init = 1'b1; ctrl.rd_wr = 1'b0; end
      S_LOAD:   begin ctrl.lr = 1'b1; ctrl.clacc = 1'b1; end
      S_PASS1:  begin
                  ctrl.clk_sh = 1'b1;
                  ctrl.lacc   = 1'b1;
                  ctrl.s_a    = (bit_idx == '0);
                end
      S_RESULT: begin ctrl.lbuff_op = 1'b1; ctrl.sc = 1'b1; end
      S_PASS2:  begin
                  ctrl.clk_sh  = 1'b1;
                  ctrl.re_turn = 1'b1;
                  ctrl.rd_wr   = 1'b0;
                end
      default:  ;
    endcase
  end
endmodule
