// tb_arithmetic_unit: random operands for the three functions, results
// compared with an integer model of the truncating arithmetic:
//   butterfly  t = floor(BW/64), A* = A + t, B* = A - t, optional floor /2
//   unscramble ((An+Bn)/2 ...) with floor
//   power      (R*R8 + I*I8) >> 9, saturated to 8 bits
// and the number of cycles from start to done for each function.
// Operands are loaded on the falling edge before start; the expected clock
// counts (20, 14, 22) are this design's, the arithmetic rules follow the
// original word sizes and truncation.
module tb_arithmetic_unit;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, scale = 0;
  logic ld_a = 0, ld_b = 0, ld_w = 0, start = 0, busy, done;
  au_mode_e mode = AU_BFLY;
  cword_t bus_in, out1, out2;
  wterm_t w_in;
  logic [OW-1:0] power;
  int checks = 0, failures = 0;

  arithmetic_unit dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [11:0] fin(int x, bit sc);
    return sc ? 12'(x >>> 1) : 12'(x);
  endfunction

  // Loads A, then B with start; returns the cycles until done.
  task automatic run(au_mode_e md, cword_t a, cword_t b, wterm_t w, bit sc, output int cyc);
    @(negedge clk);
    mode = md; scale = sc;
    bus_in = a; w_in = w; ld_a = 1; ld_w = (md != AU_POWER);
    @(negedge clk);
    ld_a = 0;
    bus_in = b; ld_b = 1; start = 1; ld_w = (md == AU_POWER);
    @(negedge clk);
    ld_b = 0; start = 0; ld_w = 0;
    bus_in = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    cword_t a, b;
    wterm_t w;
    int cyc, pre, pim, tre, tim, s;
    int r8, i8;
    logic [OW-1:0] pw;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // butterflies
    for (int t = 0; t < 400; t++) begin
      a = cword_t'($urandom); b = cword_t'($urandom);
      w.re = 8'($signed(7'($urandom))); w.im = 8'($signed(7'($urandom)));
      if (t == 0) begin w.re = 8'sd64; w.im = 8'sd0; end
      if (t == 1) begin w.re = 8'sd0; w.im = -8'sd64; end
      run(AU_BFLY, a, b, w, t[0], cyc);
      pre = int'(b.re) * int'(w.re) - int'(b.im) * int'(w.im);
      pim = int'(b.re) * int'(w.im) + int'(b.im) * int'(w.re);
      tre = pre >>> 6;
      tim = pim >>> 6;
      chk(out1.re == fin(int'(a.re) + tre, t[0]), "A* re");
      chk(out1.im == fin(int'(a.im) + tim, t[0]), "A* im");
      chk(out2.re == fin(int'(a.re) - tre, t[0]), "B* re");
      chk(out2.im == fin(int'(a.im) - tim, t[0]), "B* im");
      chk(cyc == 20, "butterfly cycles");
    end
    // unscramble
    for (int t = 0; t < 200; t++) begin
      a = cword_t'($urandom); b = cword_t'($urandom);
      run(AU_UNSCR, a, b, w, 1'b0, cyc);
      chk(out1.re == 12'((int'(a.re) + int'(b.re)) >>> 1), "T re");
      chk(out1.im == 12'((int'(a.im) - int'(b.im)) >>> 1), "T im");
      chk(out2.re == 12'((int'(a.im) + int'(b.im)) >>> 1), "S re");
      chk(out2.im == 12'((int'(b.re) - int'(a.re)) >>> 1), "S im");
      chk(cyc == 14, "unscramble cycles");
    end
    // power spectrum: W and B both from the same data word
    for (int t = 0; t < 200; t++) begin
      a = cword_t'($urandom);
      if (t < 100) begin a.re = 12'($signed(10'($urandom))); a.im = 12'($signed(10'($urandom))); end
      run(AU_POWER, a, a, w, 1'b0, cyc);
      r8 = int'($signed(a.re[9:2]));
      i8 = int'($signed(a.im[9:2]));
      s  = int'(a.re) * r8 + int'(a.im) * i8;
      pw = (s < 0) ? 8'd0 : ((s >> 9) > 255) ? 8'd255 : 8'(s >> 9);
      chk(power == pw, "power");
      chk(cyc == 22, "power cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
