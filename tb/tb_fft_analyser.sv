// tb_fft_analyser: end-to-end test of the complete analyser at full size
// (N = 1024, default parameters).
//
// The A/D converter is the behavioural adc_model; receiver 1 carries a tone
// at bin 37 and receiver 2 a tone at bin 100, with a little noise. The sample
// clock strobe comes every SAMPLE_CYCLES system clocks (a scaled-down 1024 Hz,
// so that processing still finishes well inside one sampling block as in the
// real instrument). The host holds comp_ready low at random to stall the DMA.
//
// Checking: the testbench keeps a shadow image of both memories from their
// write ports and checks every system-bus read against it. When an FFT or
// unscramble routine ends, the memory is compared with a bit-exact integer
// model of the routine started from the image at its start; the first FFT is
// also compared with a floating-point DFT. Every output word is compared with
// the value expected from the image at the frequency-order (or, in memory
// test, straight) address: power, real or imaginary by the R/I line.
// Full mode must give 3N words per block with one INT, VAL must follow each
// latch by one clock, no word may be sent while comp_ready is low, and FFT
// plus unscramble must take at most 500 000 clocks (50 ms at 10 MHz).
// After two full blocks the analyser is reset into tests 1 to 5 in turn,
// then back into the full FFT with the ONE-SHOT and AUTO start modes and an
// early end of a block by stop_sampling.
// Each named mechanism is counted; one that never happened is a failure.
// Timing: 100-unit clock, stimulus on the falling edge, all checks 10
// units later. The stimulus rates and the tone amplitudes are this
// testbench's own; the routine sequence and arithmetic it checks follow
// the original analyser.
module tb_fft_analyser;
  import fft_pkg::*;

  localparam int LOG2N = 10;
  localparam int N = 1 << LOG2N;
  localparam int SAMPLE_CYCLES = 200;
  localparam int FFT_BUDGET = 500_000;

  logic clk = 0, rst_n = 0, por_n = 0;
  panel_t panel;
  logic sample_tick = 0, ext_enable = 0, stop_sampling = 0, comp_ready = 1;
  logic sh_hold, adc_start, adc_sel, adc_eoc, ovr_re, ovr_im;
  logic [11:0] adc_data, vin_re = '0, vin_im = '0;
  logic [OW-1:0] out_data;
  logic out_val, out_int, scope_trig, mem_sel, fft_busy, sampling, ri_state;
  logic [7:0] start_addr;

  fft_analyser dut (.*);
  adc_model #(.CONV_CYCLES(4)) u_adc (
    .clk, .sh_hold, .start(adc_start), .sel(adc_sel), .vin_re, .vin_im,
    .eoc(adc_eoc), .data(adc_data)
  );

  always #50 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  // mechanism counters
  int m_swap = 0, m_scaled = 0, m_unscaled = 0, m_dc = 0, m_stall = 0;
  int m_ovr = 0, m_ri_toggle = 0, m_int = 0, m_fft = 0, m_unscr = 0;
  int m_power_words = 0, m_real_words = 0, m_imag_words = 0, m_wadv = 0;
  int m_scope = 0, m_block_full = 0, m_dft = 0, m_host_wait = 0;
  int m_test [1:5] = '{0, 0, 0, 0, 0};
  int m_oneshot = 0, m_auto = 0, m_stop = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cyc, what);
    end
  endtask

  initial begin
    repeat (8_000_000) @(negedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  typedef struct { int re; int im; } cint_t;
  cint_t img [2][N];
  cint_t exp_mem [N];
  cint_t wtab [N/2];
  cint_t dft_in [N];
  bit    img_ok [2][N];

  function automatic int w12(int x);
    return int'(signed'(12'(x)));
  endfunction

  function automatic int bitrev(int k, int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) r |= ((k >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  function automatic int mid8(int x);
    return int'(signed'(8'(x >> 2)));
  endfunction

  function automatic int power_of(cint_t d);
    int s;
    s = d.re * mid8(d.re) + d.im * mid8(d.im);
    if (s < 0) return 0;
    if ((s >> 9) > 255) return 255;
    return s >> 9;
  endfunction

  task automatic model_fft();
    int s, lo, ia, ib, tre, tim, sre, sim, dre, dim;
    cint_t a, b, wv;
    for (int r = 0; r < LOG2N; r++) begin
      s = LOG2N - 1 - r;
      for (int c = 0; c < N / 2; c++) begin
        lo  = c & ((1 << s) - 1);
        ia  = ((c >> s) << (s + 1)) | lo;
        ib  = ia | (1 << s);
        a   = exp_mem[ia];
        b   = exp_mem[ib];
        wv  = wtab[c >> s];
        tre = (b.re * wv.re - b.im * wv.im) >>> 6;
        tim = (b.re * wv.im + b.im * wv.re) >>> 6;
        sre = a.re + tre;
        sim = a.im + tim;
        dre = a.re - tre;
        dim = a.im - tim;
        if ((r & 1) == 0) begin
          sre = sre >>> 1; sim = sim >>> 1; dre = dre >>> 1; dim = dim >>> 1;
        end
        exp_mem[ia] = '{w12(sre), w12(sim)};
        exp_mem[ib] = '{w12(dre), w12(dim)};
      end
    end
  endtask

  task automatic model_unscramble();
    int an, am;
    cint_t a, b, o1, o2;
    for (int n = 0; n < N / 2; n++) begin
      an = bitrev(n, LOG2N);
      am = bitrev((N - n) % N, LOG2N);
      a  = exp_mem[an];
      b  = exp_mem[am];
      o1 = '{w12((a.re + b.re) >>> 1), w12((a.im - b.im) >>> 1)};
      o2 = '{w12((a.im + b.im) >>> 1), w12((b.re - a.re) >>> 1)};
      if (n == 0) exp_mem[an] = '{o1.re, o2.re};
      else begin
        exp_mem[an] = o1;
        exp_mem[am] = o2;
      end
    end
  endtask

  // floating-point DFT of the image, compared with the scaled FFT result
  task automatic dft_check(int k);
    real sr = 0.0, si = 0.0, ang, er, ei, tol;
    int got_re, got_im;
    for (int n = 0; n < N; n++) begin
      ang = -2.0 * 3.14159265358979 * real'(k * n % N) / real'(N);
      sr += real'(dft_in[n].re) * $cos(ang) - real'(dft_in[n].im) * $sin(ang);
      si += real'(dft_in[n].re) * $sin(ang) + real'(dft_in[n].im) * $cos(ang);
    end
    er = sr / 32.0; ei = si / 32.0;    // divided by two on 5 of the 10 arrays
    got_re = exp_mem[bitrev(k, LOG2N)].re;
    got_im = exp_mem[bitrev(k, LOG2N)].im;
    // the truncations all round down, which adds up coherently at DC only
    tol = (k == 0) ? 24.0 : 12.0;
    chk((real'(got_re) - er) < tol && (er - real'(got_re)) < tol &&
        (real'(got_im) - ei) < tol && (ei - real'(got_im)) < tol,
        $sformatf("DFT bin %0d: fft (%0d,%0d) dft (%0.1f,%0.1f)", k, got_re, got_im, er, ei));
    m_dft++;
  endtask

  initial begin
    real ang;
    for (int k = 0; k < N / 2; k++) begin
      ang = 2.0 * 3.14159265358979 * real'(bitrev(k, LOG2N - 1)) / real'(N);
      wtab[k] = '{int'($floor(64.0 * $cos(ang) + 0.5)), int'($floor(-64.0 * $sin(ang) + 0.5))};
    end
    for (int m = 0; m < 2; m++)
      for (int k = 0; k < N; k++) begin
        img[m][k] = '{0, 0};
        img_ok[m][k] = 1'b0;
      end
  end

  // ---------------- monitor ----------------
  // Samples every signal 10 time units after the falling edge, when the
  // stimulus of that cycle has settled; the next rising edge acts on them.
  int prev_routine = 0, routine, state, cur_entry = 0;
  int k_word = 0, block_words = 0, fft_cycles = 0, max_fft_cycles = 0;
  bit ckda_d = 0, comp_ready_d = 1, ovr_d = 0, full_mode_run = 0, first_fft = 1;
  int exp_q [$];

  task automatic monitor();
    cint_t rd;
    int sel, addr, word, kidx, bad;
    routine = int'(dut.u_ctl.routine);
    state   = int'(dut.u_ctl.state);
    sel     = int'(mem_sel);

    // routine boundaries: start models, compare results
    if (routine != prev_routine) begin
      if (prev_routine == 1) begin          // FFT ended
        bad = 0;
        for (int k = 0; k < N; k++)
          if (img[sel][k] != exp_mem[k]) begin
            if (bad < 4) $display("  word %0d: got (%0d,%0d) model (%0d,%0d)", k,
                                  img[sel][k].re, img[sel][k].im, exp_mem[k].re, exp_mem[k].im);
            bad++;
          end
        chk(bad == 0, $sformatf("FFT result: %0d words differ", bad));
        m_fft++;
      end
      if (prev_routine == 2) begin          // unscramble ended
        bad = 0;
        for (int k = 0; k < N; k++)
          if (img[sel][k] != exp_mem[k]) bad++;
        chk(bad == 0, $sformatf("unscramble result: %0d words differ", bad));
        m_unscr++;
      end
      k_word = 0;
    end
    if (state == 1) cur_entry = int'(start_addr);
    // model starts when the first butterfly / pair is read (after any swap)
    if (state == 6 && int'(dut.ag_count) == 0 && int'(dut.ag_array) == 0 && routine == 1
        && prev_state != 6 && prev_state != 10) begin
      exp_mem = img[sel];
      if (first_fft && !dut.test_mode) begin
        dft_in = img[sel];
        model_fft();
        dft_check(37); dft_check(N - 37); dft_check(100);
        dft_check(N - 100); dft_check(0); dft_check(250);
        first_fft = 0;
      end else model_fft();
    end
    if (state == 11 && int'(dut.ag_count) == 0 && prev_state != 15) begin
      exp_mem = img[sel];
      model_unscramble();
    end
    prev_routine = routine;

    // memory read path
    rd = '{int'(dut.sys_rdata.re), int'(dut.sys_rdata.im)};
    if (img_ok[sel][dut.sys_addr]) chk(rd == img[sel][dut.sys_addr], "system bus read");

    // output latch: expected word from the image
    if (dut.ckda) begin
      if (routine == 5) addr = k_word;
      else addr = bitrev(k_word, LOG2N);
      rd = img[sel][addr];
      if (routine == 3) begin
        word = power_of(rd); m_power_words++;
      end else if (ri_state) begin
        word = mid8(rd.im); m_imag_words++;
      end else begin
        word = mid8(rd.re); m_real_words++;
      end
      exp_q.push_back(word & 8'hFF);
      if (dut.test_mode) chk(ri_state == panel.ri_sel || routine == 3, "R/I from panel");
      else if (routine == 4) chk(ri_state == (cur_entry == 8'h47), "R/I line in output");
      if (!dut.test_mode) begin
        chk(comp_ready, "word latched while comp_ready low");
        block_words++;
      end
      k_word = (k_word + 1) % N;
    end
    if (out_val) begin
      chk(ckda_d, "VAL without latch");
      if (exp_q.size() > 0) begin
        kidx = exp_q.pop_front();
        chk(int'(out_data) == kidx, $sformatf("output word %h, expected %h", out_data, kidx));
      end else chk(0, "unexpected VAL");
    end else chk(!ckda_d, "latch without VAL");
    ckda_d = dut.ckda;

    // mechanisms
    if (dut.ckm) m_swap++;
    if (dut.ag_carry && routine == 1) begin
      if (dut.au_scale) m_scaled++; else m_unscaled++;
    end
    if (dut.ag_wadv && routine == 1) m_wadv++;
    if (dut.sys_we && dut.wsel == 2'd2) m_dc++;
    if (!dut.test_mode && !comp_ready && state == 19) m_stall++;
    if (!comp_ready && state == 16) m_host_wait++;
    if ((ovr_re || ovr_im) && !ovr_d) m_ovr++;
    ovr_d = ovr_re || ovr_im;
    if (dut.ri_toggle) m_ri_toggle++;
    if (scope_trig) m_scope++;
    if (dut.mem_full) m_block_full++;
    if (out_int) begin
      if (m_int > 0) chk(block_words == 3 * N, $sformatf("block of %0d words", block_words));
      block_words = 0;
      m_int++;
    end
    if (fft_busy) fft_cycles++;
    else if (fft_cycles > 0) begin
      chk(fft_cycles <= FFT_BUDGET, $sformatf("FFT+unscramble %0d cycles", fft_cycles));
      if (fft_cycles > max_fft_cycles) max_fft_cycles = fft_cycles;
      fft_cycles = 0;
    end

    // shadow the memory writes of the coming edge
    if (dut.smp_we) begin
      img[1 - sel][dut.smp_addr] = '{int'(dut.smp_wdata.re), int'(dut.smp_wdata.im)};
      img_ok[1 - sel][dut.smp_addr] = 1'b1;
    end
    if (dut.sys_we) begin
      img[sel][dut.sys_addr] = '{int'(dut.sys_wdata.re), int'(dut.sys_wdata.im)};
      img_ok[sel][dut.sys_addr] = 1'b1;
    end
    prev_state = state;
  endtask
  int prev_state = 0;

  // ---------------- stimulus ----------------
  int tick_cnt = 0, tick_n = 0;
  bit random_host = 1, host_late_done = 0;
  int host_late = 0;

  task automatic drive();
    real ph;
    int re, im;
    tick_cnt++;
    sample_tick = 0;
    if (tick_cnt >= SAMPLE_CYCLES) begin
      tick_cnt = 0;
      sample_tick = 1;
      ph = 2.0 * 3.14159265358979 * real'(tick_n % N) / real'(N);
      re = int'($floor(24.0 * $cos(37.0 * ph) + 0.5)) + int'($urandom_range(4)) - 2;
      im = int'($floor(16.0 * $sin(100.0 * ph + 0.3) + 0.5)) + int'($urandom_range(4)) - 2;
      if (tick_n == 1500) re = 700;       // over-range sample in the second block
      vin_re = 12'(re);
      vin_im = 12'(im);
      tick_n++;
    end
    // the host answers at random, and is late once after an unscramble
    if (routine == 2 && !host_late_done) host_late = 40;
    if (state == 16) host_late_done = 1;
    if (host_late > 0) begin
      host_late--;
      comp_ready = 1'b0;
    end else comp_ready = random_host ? ($urandom_range(9) > 2) : 1'b1;
  endtask

  task automatic run_cycle();
    @(negedge clk);
    drive();
    #10;
    monitor();
    cyc++;
  endtask

  task automatic do_reset(logic [3:0] tsel);
    panel.test_sel = tsel;
    rst_n = 0;
    exp_q.delete();
    ckda_d = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    por_n = 1;            // power-on reset only once, with the first reset
    prev_routine = 0;     // a routine cut off by the reset is not compared
  endtask

  initial begin
    int w0, f0;
    panel = '{test_sel: 4'd0, ri_sel: 1'b0, start_mode: SM_MAN, start_btn: 1'b0};
    do_reset(4'd0);
    // full mode: two complete blocks
    while (m_int < 2 || block_words < 3 * N) run_cycle();
    repeat (200) run_cycle();
    $display("full mode done at cycle %0d, FFT+unscramble %0d cycles", cyc, max_fft_cycles);
    chk(block_words == 3 * N, "second block word count");

    random_host = 0;
    for (int t = 1; t <= 4; t++) begin
      panel.ri_sel = (t == 2);
      do_reset(4'(t));
      w0 = m_power_words + m_real_words + m_imag_words;
      while (m_power_words + m_real_words + m_imag_words - w0 < 2 * N) run_cycle();
      m_test[t]++;
      $display("test %0d: %0d words at cycle %0d", t, 2 * N, cyc);
    end
    // test 5 is not provided: the controller must stay idle
    do_reset(4'd5);
    w0 = m_power_words + m_real_words + m_imag_words;
    repeat (20000) run_cycle();
    chk(m_power_words + m_real_words + m_imag_words == w0, "test 5 idle");
    chk(int'(dut.u_ctl.state) == 4, "test 5 idle state");
    m_test[5]++;

    // sampler start modes, full FFT selected
    panel.start_mode = SM_ONESHOT;
    do_reset(4'd0);
    f0 = m_block_full;
    repeat (250000) run_cycle();
    chk(m_block_full == f0, "one-shot waits for the start button");
    @(negedge clk) panel.start_btn = 1'b1;
    run_cycle();
    panel.start_btn = 1'b0;
    repeat (450000) run_cycle();
    chk(m_block_full == f0 + 1, $sformatf("one-shot filled %0d memories", m_block_full - f0));
    if (m_block_full == f0 + 1) m_oneshot++;

    panel.start_mode = SM_AUTO;
    do_reset(4'd0);
    f0 = m_block_full;
    ext_enable = 1'b0;
    repeat (250000) run_cycle();
    chk(m_block_full == f0, "auto waits for the external enable");
    ext_enable = 1'b1;
    repeat (220000) run_cycle();
    chk(m_block_full == f0 + 1, "auto samples while enabled");
    if (m_block_full == f0 + 1) m_auto++;
    ext_enable = 1'b0;

    panel.start_mode = SM_MAN;
    do_reset(4'd0);
    f0 = m_block_full;
    repeat (100 * SAMPLE_CYCLES) run_cycle();
    @(negedge clk) stop_sampling = 1'b1;
    run_cycle();
    stop_sampling = 1'b0;
    repeat (100) run_cycle();
    chk(m_block_full == f0 + 1, "stop sampling ends the block early");
    if (m_block_full == f0 + 1) m_stop++;
    // the short block is then transformed like any other
    repeat (200000) run_cycle();

    $display("mechanisms: swap=%0d scaled=%0d unscaled=%0d wadv=%0d dc=%0d stall=%0d host_wait=%0d",
             m_swap, m_scaled, m_unscaled, m_wadv, m_dc, m_stall, m_host_wait);
    $display("  ovr=%0d ri_toggle=%0d int=%0d fft=%0d unscr=%0d power=%0d real=%0d imag=%0d",
             m_ovr, m_ri_toggle, m_int, m_fft, m_unscr, m_power_words, m_real_words, m_imag_words);
    $display("  scope=%0d full=%0d dft=%0d tests=%0d %0d %0d %0d %0d oneshot=%0d auto=%0d stop=%0d",
             m_scope, m_block_full, m_dft, m_test[1], m_test[2], m_test[3], m_test[4], m_test[5],
             m_oneshot, m_auto, m_stop);
    chk(m_swap > 0, "mechanism swap");
    chk(m_scaled > 0, "mechanism scaled array");
    chk(m_unscaled > 0, "mechanism unscaled array");
    chk(m_wadv > 0, "mechanism W^P advance");
    chk(m_dc > 0, "mechanism DC word");
    chk(m_stall > 0, "mechanism comp_ready stall");
    chk(m_host_wait > 0, "mechanism wait for host after unscramble");
    chk(m_ovr > 0, "mechanism over-range");
    chk(m_ri_toggle > 0, "mechanism R/I toggle");
    chk(m_int > 0, "mechanism INT");
    chk(m_fft > 0, "mechanism FFT");
    chk(m_unscr > 0, "mechanism unscramble");
    chk(m_power_words > 0 && m_real_words > 0 && m_imag_words > 0, "mechanism output words");
    chk(m_scope > 0, "mechanism scope trigger");
    chk(m_block_full > 0, "mechanism memory full");
    chk(m_dft > 0, "mechanism DFT comparison");
    for (int t = 1; t <= 5; t++) chk(m_test[t] > 0, $sformatf("mechanism test %0d", t));
    chk(m_oneshot > 0, "mechanism one-shot start");
    chk(m_auto > 0, "mechanism auto start");
    chk(m_stop > 0, "mechanism stop sampling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
