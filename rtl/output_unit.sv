// output_unit: R/I output multiplexer and output latch.
//
// The output latch holds the 8-bit word offered to the host computer and to
// the D/A converter used for oscilloscope display. Its input is either the
// power spectrum value from the arithmetic unit (src_power) or the middle 8
// bits of the real or imaginary part of the system data bus, chosen by the
// R/I line. In full FFT operation the R/I flip-flop starts at real after
// reset and ri_clr and is toggled by ri_toggle (CKRI); in test operation
// (panel_ri_en) it follows the front panel R/I switch instead. ckda (CKDA)
// latches the selected word; val (VAL, "output data valid") is high for the
// cycle after each latch, while the new word is on out_data.
module output_unit
  import fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  cword_t        bus,
  input  logic [OW-1:0] power,
  input  logic          src_power,
  input  logic          ri_clr,
  input  logic          ri_toggle,
  input  logic          panel_ri_en,
  input  logic          panel_ri,
  input  logic          ckda,
  output logic          ri,
  output logic [OW-1:0] out_data,
  output logic          val
);

  logic ri_ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ri_ff <= 1'b0;
    else if (ri_clr)    ri_ff <= 1'b0;
    else if (ri_toggle) ri_ff <= ~ri_ff;
  end

  assign ri = panel_ri_en ? panel_ri : ri_ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data <= '0;
      val      <= 1'b0;
    end else begin
      val <= ckda;
      if (ckda) out_data <= src_power ? power : (ri ? out_bits(bus.im) : out_bits(bus.re));
    end
  end

endmodule
