// tb_hardware_tests: the bench procedure for the pre-programmed tests, run
// on the complete analyser at full size (N = 1024).
//
// As on the bench, a sine wave feeds the real (receiver 1) input and the
// imaginary (receiver 2) input is shorted to earth. The analyser is started
// with MAN sampling and the FFT/test switch at 2, 3 and 4 in turn, with a
// master reset for each; the power-on reset is given once at the start, so
// each test works on the memory left by the one before. One repeat of the
// output (1024 words in frequency order, starting at scope_trig) is captured
// with the R/I switch at R, then one with it at I.
//
// Checking is by the properties of the transform, not by a bit-exact model:
// - Test 2, FFT: the tone (bin 10, phase 0.7 rad) gives two spikes. The
//   real trace is even (same polarity at +f and -f) and the imaginary
//   trace odd; every other word stays near zero.
// - Test 3, unscramble: the real input's transform is in locations 0..511
//   with the spike at 10, and the imaginary input's transform, zero, in
//   512..1023.
// - Test 4, power: one positive spike at 10 in the real-input half, nothing
//   in the imaginary-input half.
// Spike sizes are checked against the expected value: tone amplitude times
// N/2, divided by 32 for the five scaled passes, times 1/4 for the middle
// output bits. The tolerances (6 output units on side bins and symmetry, 5
// on the spikes, 2 in the zero halves) allow for the truncation in every
// pass, which leaves a small negative bias on the low bins.
// Timing: 100-unit clock, stimulus on the falling edge, sampling 10 units
// later. The tone, its amplitude, the tolerances and the sample rate are
// this testbench's own; the procedure and the expected traces follow the
// original analyser's test description.
module tb_hardware_tests;
  import fft_pkg::*;

  localparam int N = 1024;
  localparam int K = 10;
  localparam int SAMPLE_CYCLES = 200;
  localparam real PHI = 0.7;
  localparam real AMP = 24.0;
  localparam int SYM_TOL = 6;     // output units (middle 8 bits)
  localparam int SIDE_TOL = 6;

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
  int tick_cnt = 0, tick_n = 0;
  int trace [N];
  real e_re, e_im;

  // watchdog
  initial begin
    #2_000_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // sample strobe and the tone on receiver 1
  always @(negedge clk) begin
    real ph;
    sample_tick <= 1'b0;
    tick_cnt++;
    if (tick_cnt >= SAMPLE_CYCLES) begin
      tick_cnt = 0;
      sample_tick <= 1'b1;
      ph = 2.0 * 3.14159265358979 * real'(K) * real'(tick_n % N) / real'(N);
      vin_re <= 12'(int'($floor(AMP * $cos(ph + PHI) + 0.5)));
      vin_im <= '0;
      tick_n++;
    end
  end

  function automatic int sx(logic [OW-1:0] v);
    return int'($signed(v));
  endfunction

  // capture one output repeat: 1024 words starting at scope_trig
  task automatic capture(bit signed_words);
    int n;
    @(negedge clk);
    while (!scope_trig) @(negedge clk);
    n = 0;
    while (n < N) begin
      @(negedge clk);
      if (out_val) begin
        trace[n] = signed_words ? sx(out_data) : int'(out_data);
        n++;
      end
    end
  endtask

  task automatic do_reset(logic [3:0] tsel, logic ri);
    panel.test_sel = tsel;
    panel.ri_sel = ri;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    por_n = 1;
  endtask

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // all words other than the listed bins near zero
  task automatic chk_quiet(int lo, int hi, int tol, string what);
    int bad;
    bad = 0;
    for (int k = lo; k <= hi; k++)
      if (k != K && k != N - K && iabs(trace[k]) > tol) begin
        if (bad < 4) $display("  %s: word %0d = %0d", what, k, trace[k]);
        bad++;
      end
    chk(bad == 0, $sformatf("%s: %0d words above %0d", what, bad, tol));
  endtask

  task automatic chk_near(int got, real want, string what);
    chk(iabs(got - int'(want)) <= 5, $sformatf("%s: got %0d, expected about %0d", what, got, int'(want)));
  endtask

  initial begin
    real full;
    int bad;
    panel = '{test_sel: 4'd2, ri_sel: 1'b0, start_mode: SM_MAN, start_btn: 1'b0};
    full = AMP * real'(N) / 2.0 / 32.0 / 4.0;
    e_re = full * $cos(PHI);
    e_im = full * $sin(PHI);

    // ---- Test 2: FFT ----
    do_reset(4'd2, 1'b0);
    capture(1);
    $display("test 2 R: [%0d]=%0d [%0d]=%0d", K, trace[K], N - K, trace[N - K]);
    chk_near(trace[K], e_re, "test 2 real +f spike");
    chk_near(trace[N - K], e_re, "test 2 real -f spike");
    bad = 0;
    for (int k = 1; k < N; k++) if (iabs(trace[k] - trace[N - k]) > SYM_TOL) begin
      if (bad < 6) $display("  sym %0d: %0d %0d", k, trace[k], trace[N - k]);
      bad++;
    end
    chk(bad == 0, $sformatf("test 2 real trace not even at %0d bins", bad));
    chk_quiet(0, N - 1, SIDE_TOL, "test 2 real side bins");

    panel.ri_sel = 1'b1;
    capture(1);
    $display("test 2 I: [%0d]=%0d [%0d]=%0d", K, trace[K], N - K, trace[N - K]);
    chk_near(trace[K], e_im, "test 2 imag +f spike");
    chk_near(trace[N - K], -e_im, "test 2 imag -f spike");
    bad = 0;
    for (int k = 1; k < N; k++) if (iabs(trace[k] + trace[N - k]) > SYM_TOL) begin
      if (bad < 6) $display("  sym %0d: %0d %0d", k, trace[k], trace[N - k]);
      bad++;
    end
    chk(bad == 0, $sformatf("test 2 imag trace not odd at %0d bins", bad));
    chk_quiet(0, N - 1, SIDE_TOL, "test 2 imag side bins");

    // ---- Test 3: unscramble the transform left by test 2 ----
    do_reset(4'd3, 1'b0);
    capture(1);
    $display("test 3 R: [%0d]=%0d [%0d]=%0d", K, trace[K], N - K, trace[N - K]);
    chk_near(trace[K], e_re, "test 3 real spectrum spike");
    chk_quiet(0, N / 2 - 1, SIDE_TOL, "test 3 real spectrum side bins");
    chk_quiet(N / 2, N - 1, 2, "test 3 imaginary-input half (real)");
    panel.ri_sel = 1'b1;
    capture(1);
    $display("test 3 I: [%0d]=%0d [%0d]=%0d", K, trace[K], N - K, trace[N - K]);
    chk_near(trace[K], e_im, "test 3 imag spectrum spike");
    chk_quiet(0, N / 2 - 1, SIDE_TOL, "test 3 imag spectrum side bins");
    chk_quiet(N / 2, N - 1, 2, "test 3 imaginary-input half (imag)");

    // ---- Test 4: power spectrum of the separated transforms ----
    do_reset(4'd4, 1'b0);
    capture(0);
    $display("test 4: [%0d]=%0d [%0d]=%0d", K, trace[K], N - K, trace[N - K]);
    chk(trace[K] > 40, $sformatf("test 4 power spike %0d too small", trace[K]));
    chk_quiet(0, N - 1, 1, "test 4 power outside the spike");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
