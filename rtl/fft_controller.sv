// fft_controller: routine sequencer and control-line generator.
//
// The controller walks the start-address ROM. Each start address it reads
// names a routine; the routine issues the control lines of the datapath
// (address generator, memories, arithmetic unit, output latch) and then hands
// over to the next ROM entry. Routines that end a full FFT pass advance the
// ROM counter (BCLK) on entry; the repeating test output routines do not, so
// they are re-entered indefinitely until master reset.
//
//   0F init FFT    clear address counters and R/I, wait for a full memory
//                  (SB1), swap memories (CKM)
//   28 FFT         LOG2N arrays of N/2 butterflies: read A (LD3, LD2), read B
//                  (LD1) and start, wait for the arithmetic unit, write A*
//                  and B* back in place, step the counter (CK4); results are
//                  divided by two on arrays 1, 3, 5, ... (SB3); SB5 ends it.
//                  In test mode it first waits for SB1 and swaps memories.
//   82 unscramble  N/2 word pairs n, N-n in bit-reversed addressing; T(n)
//                  written at n, S(n) at N-n, the DC word keeps both DC
//                  terms; in full mode it then waits for the host (SB6).
//   5E / 60 power  N power-spectrum words to the output latch (5E: once,
//                  with a DMA request INT first; 60: repeating test entry)
//   49 / 47        output real / output imaginary (47 toggles R/I, CKRI,
//                  then runs 49); N words in frequency order
//   08 init test   count the start-address ROM up to the entry of the test
//                  selected on the rotary switch (SB4 compare)
//   16 test 1      wait SB1, swap, then output the memory in straight order
//                  for ever; 4B outputs in frequency order for ever
// In full mode the entry after output imaginary holds 00, which restarts the
// sequence (BR/S). Output words wait for comp_ready in full mode (DMA pace);
// in test mode they are paced only by the clock. A scope trigger pulse starts
// each repeated test output.
//
// Timing: a butterfly takes the arithmetic unit's 20 clocks plus 5 control
// clocks (read A, read B, write A*, write B*, next), so the 1024-point FFT
// takes 10 x 512 x 25 = 128 000 clocks; an unscramble pair takes 20 clocks;
// an output word takes 2 clocks (real, imaginary) or 24 (power) when the
// host is ready. A change-over of the memories (CKM) is registered, so the
// state after a swap (S_SWAP) waits one clock before the first read.
//
// The routine order, start addresses, status-bit uses and control-line
// functions follow the microprogrammed controller of the design; the
// microprogram itself is not available, so this FSM is this design's own
// implementation of those routines, with one state per micro-step.
module fft_controller
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [3:0]               test_sel,
  // status
  input  logic                     mem_full,    // from the sampler (SB1 source)
  input  logic                     comp_ready,  // SB6
  // start-address ROM
  input  logic [7:0]               sa_addr,
  output logic                     sa_test,
  output logic                     bclk,
  output logic                     brs,
  // address generator
  output logic                     ag_clr,
  output logic                     ag_inc,
  output ag_mode_e                 ag_mode,
  output logic                     ag_ab,
  input  logic                     ag_carry,
  input  logic [LOG2N-2:0]         ag_count,
  input  logic [$clog2(LOG2N)-1:0] ag_array,
  // memories
  output logic                     ckm,
  output logic                     sys_we,
  output logic [1:0]               wsel,        // 0: out1, 1: out2, 2: DC word
  // arithmetic unit
  output logic                     au_clr,
  output au_mode_e                 au_mode,
  output logic                     au_scale,
  output logic                     ld_a,
  output logic                     ld_b,
  output logic                     ld_w,
  output logic                     au_start,
  input  logic                     au_done,
  // output
  output logic                     src_power,
  output logic                     ri_clr,
  output logic                     ri_toggle,
  output logic                     ckda,
  output logic                     out_int,
  output logic                     scope_trig,
  output logic                     test_mode,
  output logic                     fft_active
);

  typedef enum logic [4:0] {
    S_START, S_DISPATCH,
    S_INIT_FFT, S_INIT_TEST, S_TEST_IDLE,
    S_WAIT_FULL,
    S_BF_RDA, S_BF_RDB, S_BF_RUN, S_BF_WRA, S_BF_WRB,
    S_UN_RDA, S_UN_RDB, S_UN_RUN, S_UN_WRA, S_UN_WRB, S_UN_HOST,
    S_OUT_RD, S_OUT_RUN, S_OUT_LATCH,
    S_SWAP
  } state_e;

  typedef enum logic [2:0] {
    R_NONE, R_FFT, R_UNSCR, R_POWER, R_OUT, R_MEMTEST
  } routine_e;

  state_e   state;
  routine_e routine;
  logic     sb1, half, repeat_out;
  logic [3:0] test_num, test_cnt;
  logic [3:0] test_target;

  localparam logic [$clog2(LOG2N)-1:0] LAST_ARRAY = ($clog2(LOG2N))'(LOG2N - 1);

  // SB4 compare target: entry of test k is 2k-1 in the test half.
  assign test_target = (test_num << 1) - 4'd1;
  assign sa_test     = test_mode;
  assign au_scale    = ~ag_array[0];
  assign fft_active  = (routine == R_FFT) || (routine == R_UNSCR);

  always_comb begin
    unique case (routine)
      R_UNSCR: au_mode = AU_UNSCR;
      R_POWER: au_mode = AU_POWER;
      default: au_mode = AU_BFLY;
    endcase
  end

  // ---- combinational control lines from the state ----
  always_comb begin
    ag_mode  = AG_FFT;
    ag_ab    = 1'b0;
    ag_inc   = 1'b0;
    sys_we   = 1'b0;
    wsel     = 2'd0;
    ld_a     = 1'b0;
    ld_b     = 1'b0;
    ld_w     = 1'b0;
    au_start = 1'b0;
    ckda     = 1'b0;
    src_power = (routine == R_POWER);
    unique case (state)
      S_BF_RDA: begin ld_a = 1'b1; ld_w = 1'b1; end
      S_BF_RDB: begin ag_ab = 1'b1; ld_b = 1'b1; au_start = 1'b1; end
      S_BF_WRA: begin sys_we = 1'b1; wsel = 2'd0; end
      S_BF_WRB: begin ag_ab = 1'b1; sys_we = 1'b1; wsel = 2'd1; ag_inc = 1'b1; end
      S_UN_RDA: begin ag_mode = AG_BITREV_N; ld_a = 1'b1; end
      S_UN_RDB: begin ag_mode = AG_BITREV_M; ld_b = 1'b1; au_start = 1'b1; end
      S_UN_WRA: begin
        ag_mode = AG_BITREV_N; sys_we = 1'b1;
        wsel    = (ag_count == '0) ? 2'd2 : 2'd0;
      end
      S_UN_WRB: begin
        ag_mode = AG_BITREV_M; sys_we = (ag_count != '0); wsel = 2'd1; ag_inc = 1'b1;
      end
      S_OUT_RD, S_OUT_RUN, S_OUT_LATCH: begin
        ag_mode = (routine == R_MEMTEST) ? AG_STRAIGHT : AG_BITREV_N;
        ag_ab   = half;
        if (state == S_OUT_RD && routine == R_POWER) begin
          ld_w = 1'b1; ld_b = 1'b1; au_start = 1'b1;
        end
        if (state == S_OUT_LATCH && (test_mode || comp_ready)) begin
          ckda   = 1'b1;
          ag_inc = 1'b1;
        end
      end
      default: ;
    endcase
  end

  // ---- sequencing ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_START;
      routine    <= R_NONE;
      sb1        <= 1'b0;
      half       <= 1'b0;
      repeat_out <= 1'b0;
      test_mode  <= 1'b0;
      test_num   <= '0;
      test_cnt   <= '0;
      bclk       <= 1'b0;
      brs        <= 1'b0;
      ag_clr     <= 1'b0;
      au_clr     <= 1'b0;
      ckm        <= 1'b0;
      ri_clr     <= 1'b0;
      ri_toggle  <= 1'b0;
      out_int    <= 1'b0;
      scope_trig <= 1'b0;
    end else begin
      bclk       <= 1'b0;
      brs        <= 1'b0;
      ag_clr     <= 1'b0;
      au_clr     <= 1'b0;
      ckm        <= 1'b0;
      ri_clr     <= 1'b0;
      ri_toggle  <= 1'b0;
      out_int    <= 1'b0;
      scope_trig <= 1'b0;
      if (mem_full) sb1 <= 1'b1;

      unique case (state)
        // master reset released: look at the FFT/test switch
        S_START: begin
          test_mode <= (test_sel != 4'd0);
          test_num  <= test_sel;
          brs       <= 1'b1;
          ag_clr    <= 1'b1;
          au_clr    <= 1'b1;
          ri_clr    <= 1'b1;
          state     <= S_DISPATCH;
        end

        S_DISPATCH: begin
          routine    <= R_NONE;
          half       <= 1'b0;
          ag_clr     <= 1'b1;
          unique case (sa_addr)
            8'h0F: begin bclk <= 1'b1; ri_clr <= 1'b1; state <= S_INIT_FFT; end
            8'h08: begin test_cnt <= '0; state <= S_INIT_TEST; end
            8'h16: begin routine <= R_MEMTEST; repeat_out <= 1'b1; state <= S_WAIT_FULL; end
            8'h28: begin
              bclk    <= 1'b1;
              routine <= R_FFT;
              state   <= test_mode ? S_WAIT_FULL : S_BF_RDA;
            end
            8'h82: begin bclk <= 1'b1; routine <= R_UNSCR; state <= S_UN_RDA; end
            8'h5E: begin
              bclk <= 1'b1; routine <= R_POWER; repeat_out <= 1'b0;
              out_int <= 1'b1; state <= S_OUT_RD;
            end
            8'h60: begin
              routine <= R_POWER; repeat_out <= 1'b1; scope_trig <= 1'b1; state <= S_OUT_RD;
            end
            8'h47: begin
              bclk <= 1'b1; ri_toggle <= 1'b1; routine <= R_OUT; repeat_out <= 1'b0;
              state <= S_OUT_RD;
            end
            8'h49: begin bclk <= 1'b1; routine <= R_OUT; repeat_out <= 1'b0; state <= S_OUT_RD; end
            8'h4B: begin
              routine <= R_OUT; repeat_out <= 1'b1; scope_trig <= 1'b1; state <= S_OUT_RD;
            end
            default: begin brs <= 1'b1; state <= S_DISPATCH; end
          endcase
        end

        S_INIT_FFT: if (sb1 && !mem_full) begin
          ckm   <= 1'b1;
          sb1   <= 1'b0;
          state <= S_DISPATCH;
        end

        // SB4: count the ROM up to the selected test's entry
        S_INIT_TEST: begin
          if (test_num > 4'd4) begin
            state <= S_TEST_IDLE;
          end else if (test_cnt == test_target) begin
            state <= S_DISPATCH;
          end else begin
            bclk     <= 1'b1;
            test_cnt <= test_cnt + 1'b1;
          end
        end

        S_TEST_IDLE: ;   // tests 5..8 are not provided

        // test entries that change over the memories first
        S_WAIT_FULL: if (sb1 && !mem_full) begin
          ckm        <= 1'b1;
          sb1        <= 1'b0;
          if (routine == R_MEMTEST) scope_trig <= 1'b1;
          state <= S_SWAP;
        end
        // CKM takes effect at the end of this cycle
        S_SWAP: state <= (routine == R_FFT) ? S_BF_RDA : S_OUT_RD;

        // ---- FFT butterflies ----
        S_BF_RDA: state <= S_BF_RDB;
        S_BF_RDB: state <= S_BF_RUN;
        S_BF_RUN: if (au_done) state <= S_BF_WRA;
        S_BF_WRA: state <= S_BF_WRB;
        S_BF_WRB: state <= (ag_carry && ag_array == LAST_ARRAY) ? S_DISPATCH : S_BF_RDA;

        // ---- unscramble ----
        S_UN_RDA: state <= S_UN_RDB;
        S_UN_RDB: state <= S_UN_RUN;
        S_UN_RUN: if (au_done) state <= S_UN_WRA;
        S_UN_WRA: state <= S_UN_WRB;
        S_UN_WRB: if (ag_carry) state <= test_mode ? S_DISPATCH : S_UN_HOST;
                  else          state <= S_UN_RDA;
        S_UN_HOST: if (comp_ready) state <= S_DISPATCH;

        // ---- output of N words ----
        S_OUT_RD:  state <= (routine == R_POWER) ? S_OUT_RUN : S_OUT_LATCH;
        S_OUT_RUN: if (au_done) state <= S_OUT_LATCH;
        S_OUT_LATCH: if (ckda) begin
          if (ag_carry) begin
            half <= ~half;
            if (half) begin
              if (repeat_out) begin
                half       <= 1'b0;
                scope_trig <= 1'b1;
                state      <= S_OUT_RD;
              end else begin
                state <= S_DISPATCH;
              end
            end else begin
              state <= S_OUT_RD;
            end
          end else begin
            state <= S_OUT_RD;
          end
        end

        default: state <= S_START;
      endcase
    end
  end

endmodule
