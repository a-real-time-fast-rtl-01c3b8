// fft_pkg: word formats and shared helpers of the real-time FFT analyser.
//
// Data words are 12-bit two's complement, stored as a complex pair (real
// plane = receiver 1, imaginary plane = receiver 2 before the unscramble).
// Of the 12 bits, the middle 8 (bits 9..2) are the output data; the two MS
// bits are overflow guard and the two LS bits absorb truncation error. The
// W^P terms are 8-bit two's complement with +1 represented by +64 (7-bit
// accuracy), so a product B*W carries 6 fraction bits. These widths follow the
// word-size study of the design; the enum encodings are this design's own.
package fft_pkg;

  localparam int unsigned DW      = 12;  // data word width
  localparam int unsigned WW      = 8;   // W^P word width (parallel multiplicand)
  localparam int unsigned WFRAC   = 6;   // W^P scale: +1.0 == 2**WFRAC
  localparam int unsigned OW      = 8;   // output word width
  localparam int unsigned OUT_LSB = 2;   // output = data[OUT_LSB+OW-1:OUT_LSB]

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cword_t;

  typedef struct packed {
    logic signed [WW-1:0] re;
    logic signed [WW-1:0] im;
  } wterm_t;

  // Address generator sequence selected onto the address bus.
  typedef enum logic [1:0] {
    AG_FFT      = 2'd0,   // "en (A+B)": butterfly operand sequence
    AG_BITREV_N = 2'd1,   // "en n":     bit-reversed n
    AG_BITREV_M = 2'd2,   // "en (N-n)": bit-reversed N-n
    AG_STRAIGHT = 2'd3    // test address counter, straight order
  } ag_mode_e;

  // Arithmetic unit function.
  typedef enum logic [1:0] {
    AU_BFLY  = 2'd0,      // A* = A + BW, B* = A - BW
    AU_UNSCR = 2'd1,      // separation of the two real transforms
    AU_POWER = 2'd2       // R^2 + I^2
  } au_mode_e;

  // Front panel "system start" switch.
  typedef enum logic [1:0] {
    SM_MAN     = 2'd0,    // continuous sampling
    SM_AUTO    = 2'd1,    // sampling enabled by an external line
    SM_ONESHOT = 2'd2     // one memory full per push of the start button
  } start_mode_e;

  // Front panel switches seen by the analyser.
  typedef struct packed {
    logic [3:0]  test_sel;    // rotary switch: 0 = full FFT, 1..8 = test
    logic        ri_sel;      // R/I switch: 0 = real, 1 = imaginary (tests only)
    start_mode_e start_mode;
    logic        start_btn;   // one-shot push button, one-cycle pulse
  } panel_t;

  // Output word: middle 8 bits of a 12-bit data word.
  function automatic logic [OW-1:0] out_bits(input logic [DW-1:0] d);
    return d[OUT_LSB +: OW];
  endfunction

endpackage
