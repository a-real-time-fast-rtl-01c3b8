// tb_output_unit: R/I selection (toggled in full mode, from the panel in test
// mode), the middle 8 output bits, the power source, and VAL timing.
// One word per latch pulse, VAL expected one clock later; inputs on the
// falling edge. The middle-8-bit output and the R/I rules follow the
// original; VAL timing is this design's.
module tb_output_unit;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, src_power = 0, ri_clr = 0, ri_toggle = 0;
  logic panel_ri_en = 0, panel_ri = 0, ckda = 0, ri, val;
  cword_t bus = '0;
  logic [OW-1:0] power = '0, out_data;
  int checks = 0, failures = 0;

  output_unit dut (.*);
  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic latch_and_check(logic [7:0] want, string what);
    ckda = 1; @(negedge clk); ckda = 0;
    checks++;
    if (out_data != want || !val) begin
      failures++;
      $display("FAIL %s: got %h want %h val %b", what, out_data, want, val);
    end
    @(negedge clk);
    checks++;
    if (val) failures++;
  endtask

  initial begin
    logic [11:0] re, im;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      re = 12'($urandom); im = 12'($urandom);
      bus = '{re: re, im: im};
      latch_and_check(re[9:2], "real");
      ri_toggle = 1; @(negedge clk); ri_toggle = 0;
      latch_and_check(im[9:2], "imag");
      ri_clr = 1; @(negedge clk); ri_clr = 0;
      latch_and_check(re[9:2], "real after clear");
      panel_ri_en = 1; panel_ri = 1;
      latch_and_check(im[9:2], "panel imag");
      panel_ri = 0;
      latch_and_check(re[9:2], "panel real");
      panel_ri_en = 0;
      power = 8'($urandom); src_power = 1;
      latch_and_check(power, "power");
      src_power = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
