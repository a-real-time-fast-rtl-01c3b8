// sample_ram: one 1024-word data memory of the analyser.
//
// Each word holds a complex 12-bit pair (real and imaginary planes), as the
// memory board built from 1 bit wide static RAM chips does. Reads are
// asynchronous (the address selects the word in the same cycle, like the
// static RAM chips); writes happen on the rising clock edge when we is high.
// The depth follows the 1024-point transform; the single read/write port is
// this design's choice, the bus steering is done in memory_switch.
module sample_ram
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 10
) (
  input  logic             clk,
  input  logic [LOG2N-1:0] addr,
  input  logic             we,
  input  cword_t           wdata,
  output cword_t           rdata
);

  cword_t mem [2**LOG2N];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
