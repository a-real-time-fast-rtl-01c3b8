// tb_wp_rom: checks every W^P entry against cos/sin evaluated in real
// arithmetic, in bit-reversed order of P, plus the counter clear and hold.
// Runs at N = 1024 (all 512 terms); one step per clock, inputs on the
// falling edge. The rounding to +1 = 64 follows the original's 7-bit table.
module tb_wp_rom;
  import fft_pkg::*;
  localparam int unsigned LOG2N = 10;
  localparam int unsigned NW = 2 ** (LOG2N - 1);

  logic clk = 0, rst_n = 0, clr = 0, adv = 0;
  logic [LOG2N-2:0] waddr;
  wterm_t w;
  int checks = 0, failures = 0;

  wp_rom #(.LOG2N(LOG2N)) dut (.clk, .rst_n, .clr, .adv, .waddr, .w);

  always #50 clk = ~clk;

  initial begin
    repeat (200000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(int k, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (k & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic check_entry(int k);
    real ang;
    int  er, ei;
    ang = 2.0 * 3.14159265358979 * real'(bitrev(k, LOG2N - 1)) / real'(2 ** LOG2N);
    er  = int'($floor(64.0 * $cos(ang) + 0.5));
    ei  = int'($floor(-64.0 * $sin(ang) + 0.5));
    checks++;
    if (int'(w.re) != er || int'(w.im) != ei) begin
      failures++;
      if (failures < 10) $display("entry %0d: got (%0d,%0d) want (%0d,%0d)", k, w.re, w.im, er, ei);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < NW; k++) begin
      #1 check_entry(k);
      checks++;
      if (int'(waddr) != k) failures++;
      adv = 1;
      @(negedge clk);
      adv = 0;
      @(negedge clk);   // hold: no change without adv
      #1 checks++;
      if (int'(waddr) != ((k + 1) % NW)) failures++;
    end
    adv = 1; @(negedge clk); adv = 0;
    clr = 1; @(negedge clk); clr = 0;
    #1 checks++;
    if (waddr != '0 || w.re != 8'sd64 || w.im != 8'sd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
