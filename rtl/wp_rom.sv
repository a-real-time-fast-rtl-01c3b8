// wp_rom: W^P look-up table and its address counter.
//
// W^P = exp(-j*2*pi*P/N) = cos(2*pi*P/N) - j*sin(2*pi*P/N), P = 0 .. N/2-1.
// The table holds the N/2 terms in bit-reversed order of P, because every
// array of the decimation-in-time FFT uses the terms in that order, the r-th
// array using the first 2**r of them. Each part is an 8-bit two's complement
// number rounded to 7-bit accuracy: value = floor(64*cos + 0.5) and
// floor(-64*sin + 0.5), so +1 is +64.
//
// The table is computed at elaboration by a constant function (Taylor series
// for sin and cos in 28-bit fixed point on [0, pi/2], folded to [0, pi)),
// instead of being programmed into PROMs. A (LOG2N-1)-bit counter addresses
// it: clr resets it to the first term, adv (CKWP from the address generator)
// steps it after a term has been used. The output follows the counter
// combinationally (ROM access), so the next term is ready before the data
// address changes.
module wp_rom
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             adv,
  output logic [LOG2N-2:0] waddr,
  output wterm_t           w
);

  localparam int unsigned NW = 2 ** (LOG2N - 1);
  localparam int unsigned FX = 28;

  typedef logic [NW-1:0][2*WW-1:0] table_t;

  function automatic table_t make_table();
    table_t t;
    longint pi_fx, x, y, y2, tc, ts, sc, ss, wr, wi;
    longint p;
    bit     flip;
    pi_fx = 64'd843314857;                // round(pi * 2**28)
    for (int k = 0; k < NW; k++) begin
      p = 0;
      for (int b = 0; b < LOG2N - 1; b++)
        if (((k >> b) & 1) != 0) p = p | (longint'(1) << (LOG2N - 2 - b));
      x = (pi_fx * p) >>> (LOG2N - 1);    // 2*pi*P/N
      flip = (2 * x > pi_fx);
      y  = flip ? pi_fx - x : x;
      y2 = (y * y) >>> FX;
      tc = longint'(1) << FX;
      sc = tc;
      ts = y;
      ss = y;
      for (int n = 1; n <= 8; n++) begin
        tc = -((tc * y2) >>> FX) / longint'((2*n - 1) * (2*n));
        sc = sc + tc;
        ts = -((ts * y2) >>> FX) / longint'((2*n) * (2*n + 1));
        ss = ss + ts;
      end
      if (flip) sc = -sc;
      wr = ((sc << WFRAC) + (longint'(1) << (FX - 1))) >>> FX;
      wi = ((-(ss << WFRAC)) + (longint'(1) << (FX - 1))) >>> FX;
      t[k] = {wr[WW-1:0], wi[WW-1:0]};
    end
    return t;
  endfunction

  localparam table_t WTAB = make_table();

  logic [LOG2N-2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt <= '0;
    else if (clr) cnt <= '0;
    else if (adv) cnt <= cnt + 1'b1;
  end

  assign waddr = cnt;
  logic [2*WW-1:0] entry;
  assign entry = WTAB[cnt];
  assign w.re  = entry[2*WW-1:WW];
  assign w.im  = entry[WW-1:0];

endmodule
