// address_generator: operand address sequences of the in-place FFT.
//
// Only the A addresses of an array are counted: a (LOG2N-1)-bit counter
// (nine bits for N = 1024) steps through the N/2 butterflies of the array.
// For array r (r = 0 .. LOG2N-1) the "A+B" bit is inserted at address bit
// s = LOG2N-1-r: counter bits below s keep their place, counter bits from s
// upwards move up by one, so that the carry skips the A+B position. A+B = 0
// addresses operand A, A+B = 1 addresses operand B, N/2**(r+1) words higher.
// This is the counter re-wiring of the array address sequences table; here a
// multiplexer per address bit replaces the tristate buffers and pull-ups.
//
// The W^P counter is advanced (w_adv) after a butterfly whenever all counter
// bits below s are ones, i.e. when the data address is about to skip a block.
// At the end of an array (counter carry) the array control steps to the next
// array and the W^P counter is cleared (w_clr); after the last array fft_done
// (status bit SB5) is set until the next clr (SR1).
//
// The other sequences use n = {A+B, counter}: "en n" drives bitrev(n), the
// output and unscramble order; "en (N-n)" drives bitrev(~(n-1)), i.e. the
// bit-reversed address of N-n, with N-0 wrapping to the DC word; the straight
// sequence drives n itself (memory test). carry (SB2) marks the last count.
//
// Timing: addr is combinational from the registered counter; inc (CK4)
// advances the counter at the clock edge.
module address_generator
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,        // SR1/R1: counter, array and W^P to start
  input  logic                   inc,        // CK4: next count
  input  ag_mode_e               mode,       // enabled sequence
  input  logic                   ab,         // A+B select (MS bit of n otherwise)
  output logic [LOG2N-1:0]       addr,
  output logic [LOG2N-2:0]       count,
  output logic [$clog2(LOG2N)-1:0] array_idx,
  output logic                   carry,      // inc at the last count (SB2)
  output logic                   w_adv,      // CKWP: advance the W^P counter
  output logic                   w_clr,      // clear the W^P counter
  output logic                   fft_done    // SB5: all arrays done
);

  localparam int unsigned CW = LOG2N - 1;
  localparam int unsigned AW = $clog2(LOG2N);

  logic [CW-1:0]    cnt;
  logic [AW-1:0]    arr;
  logic [CW-1:0]    lowmask;
  logic [LOG2N-1:0] fft_addr, n_seq, m_seq;

  assign count     = cnt;
  assign array_idx = arr;
  assign carry     = inc && (cnt == '1);

  // Counter bits below the A+B position of the current array.
  always_comb begin
    for (int i = 0; i < CW; i++) lowmask[i] = (i < (CW - int'(arr)));
  end

  always_comb begin
    for (int i = 0; i < LOG2N; i++) begin
      if (i < CW - int'(arr))       fft_addr[i] = cnt[i];
      else if (i == CW - int'(arr)) fft_addr[i] = ab;
      else                          fft_addr[i] = cnt[i-1];
    end
  end

  assign n_seq = {ab, cnt};
  assign m_seq = ~(n_seq - 1'b1);

  always_comb begin
    unique case (mode)
      AG_FFT:      addr = fft_addr;
      AG_BITREV_N: addr = {<<{n_seq}};
      AG_BITREV_M: addr = {<<{m_seq}};
      default:     addr = n_seq;
    endcase
  end

  assign w_adv = inc && (mode == AG_FFT) && ((cnt & lowmask) == lowmask) && !carry;
  assign w_clr = clr || (inc && carry && (mode == AG_FFT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      arr      <= '0;
      fft_done <= 1'b0;
    end else if (clr) begin
      cnt      <= '0;
      arr      <= '0;
      fft_done <= 1'b0;
    end else if (inc) begin
      cnt <= cnt + 1'b1;
      if (carry && mode == AG_FFT) begin
        if (arr == AW'(LOG2N - 1)) begin
          arr      <= '0;
          fft_done <= 1'b1;
        end else begin
          arr <= arr + 1'b1;
        end
      end
    end
  end

endmodule
