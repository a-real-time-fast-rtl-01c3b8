// start_address_rom: start-address sequence ROM (U12) and its counter.
//
// The ROM lists, in execution order, the microprogram start address of each
// routine. Its MS address bit selects the half: full FFT operation (test = 0)
// or the system test routines (test = 1); a 3-bit counter selects the entry.
// bclk (BCLK) steps the counter, brs (BR/S) clears it. The contents are those
// of the start address table:
//   full: 0F init FFT, 28 FFT, 82 unscramble, 5E power spectrum,
//         49 output real, 47 output imaginary
//   test: 08 init test, 16 test 1 memory, -- (unused), 28 test 2 FFT,
//         4B output bit reversed, 82 test 3 unscramble, 4B output bit
//         reversed, 60 test 4 power spectrum
// Unused entries hold 00, this design's choice. The output is combinational
// from the registered counter.
module start_address_rom (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       test,
  input  logic       bclk,
  input  logic       brs,
  output logic [2:0] index,
  output logic [7:0] start_addr
);

  localparam logic [7:0] ROM [16] = '{
    8'h0F, 8'h28, 8'h82, 8'h5E, 8'h49, 8'h47, 8'h00, 8'h00,
    8'h08, 8'h16, 8'h00, 8'h28, 8'h4B, 8'h82, 8'h4B, 8'h60
  };

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    index <= '0;
    else if (brs)  index <= '0;
    else if (bclk) index <= index + 1'b1;
  end

  assign start_addr = ROM[{test, index}];

endmodule
