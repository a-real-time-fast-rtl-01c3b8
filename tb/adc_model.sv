// adc_model: behavioural model of the sample-and-hold amplifiers and the
// 12-bit A/D converter of the analogue input (not synthesizable logic).
// The two held input values are taken from vin_re/vin_im when sh_hold rises;
// each start pulse converts the input chosen by sel and, CONV_CYCLES clocks
// later, puts the code on data and pulses eoc for one clock.
// Ports follow the converter's role in the analogue input: hold, start,
// input select, end of conversion and data. The conversion time is this
// model's choice; a real converter takes microseconds.
module adc_model #(
  parameter int unsigned CONV_CYCLES = 4
) (
  input  logic        clk,
  input  logic        sh_hold,
  input  logic        start,
  input  logic        sel,
  input  logic [11:0] vin_re,
  input  logic [11:0] vin_im,
  output logic        eoc,
  output logic [11:0] data
);
  logic [11:0] held_re, held_im;
  logic        hold_d = 1'b0;
  int          cnt = -1;
  logic        cur_sel = 1'b0;

  initial begin
    eoc  = 1'b0;
    data = '0;
  end

  always @(posedge clk) begin
    hold_d <= sh_hold;
    eoc    <= 1'b0;
    if (start) begin
      cnt     <= CONV_CYCLES;
      cur_sel <= sel;
    end else if (cnt > 0) begin
      cnt <= cnt - 1;
    end else if (cnt == 0) begin
      cnt  <= -1;
      eoc  <= 1'b1;
      data <= cur_sel ? held_im : held_re;
    end
  end

  // sample-and-hold: track while not holding
  always @(posedge clk) begin
    if (!sh_hold || !hold_d) begin
      held_re <= vin_re;
      held_im <= vin_im;
    end
  end
endmodule
