// tb_start_address_rom: steps through both halves of the start-address ROM
// and compares each entry with the routine table, then checks BR/S.
// One step per clock (BCLK), inputs on the falling edge. The table is the
// original's start-address sequence.
module tb_start_address_rom;
  logic clk = 0, rst_n = 0, test = 0, bclk = 0, brs = 0;
  logic [2:0] index;
  logic [7:0] start_addr;
  int checks = 0, failures = 0;
  // full: init FFT, FFT, unscramble, power, output real, output imaginary
  // test: init test, memory, -, FFT, output BR, unscramble, output BR, power
  logic [7:0] full_tab [6] = '{8'h0F, 8'h28, 8'h82, 8'h5E, 8'h49, 8'h47};
  logic [7:0] test_tab [8] = '{8'h08, 8'h16, 8'h00, 8'h28, 8'h4B, 8'h82, 8'h4B, 8'h60};

  start_address_rom dut (.*);
  always #50 clk = ~clk;

  initial begin
    repeat (1000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (start_addr != full_tab[i] || int'(index) != i) failures++;
      bclk = 1; @(negedge clk); bclk = 0; @(negedge clk);
    end
    brs = 1; @(negedge clk); brs = 0;
    test = 1;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (start_addr != test_tab[i]) failures++;
      bclk = 1; @(negedge clk); bclk = 0;
    end
    checks++;
    if (index != 3'd0) failures++;   // wrapped
    bclk = 1; @(negedge clk); bclk = 0;
    brs = 1; @(negedge clk); brs = 0;
    checks++;
    if (index != 3'd0 || start_addr != 8'h08) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
