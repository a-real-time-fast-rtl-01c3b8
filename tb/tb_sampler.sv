// tb_sampler: drives the sampler with the behavioural A/D model and checks
// the words written per sample (real then imaginary conversion, address
// order), memory full after N samples, MAN / AUTO / ONE-SHOT gating, an early
// Stop Sampling, over-range flags, and the cycles per sample.
// Runs at N = 16 with the A/D model converting in 4 clocks, so a sample
// takes 2 x (4 + 3) + 1 clocks. The conversion order follows the original;
// start-mode details and the over-range rule are this design's.
module tb_sampler;
  import fft_pkg::*;
  localparam int unsigned LOG2N = 4;
  localparam int unsigned N = 2 ** LOG2N;

  logic clk = 0, rst_n = 0, sample_tick = 0, start_btn = 0, ext_enable = 0, stop_sampling = 0;
  start_mode_e start_mode = SM_MAN;
  logic sh_hold, adc_start, adc_sel, adc_eoc;
  logic [11:0] adc_data, vin_re = '0, vin_im = '0;
  logic [LOG2N-1:0] mem_addr;
  logic mem_we, mem_full, ovr_re, ovr_im, enabled;
  cword_t mem_wdata;
  int checks = 0, failures = 0;
  int nwrites = 0, nfull = 0, sample_no = 0;
  int start_t, sample_cycles;

  sampler #(.LOG2N(LOG2N)) dut (.*);
  adc_model #(.CONV_CYCLES(4)) u_adc (.clk, .sh_hold, .start(adc_start), .sel(adc_sel),
                                      .vin_re, .vin_im, .eoc(adc_eoc), .data(adc_data));
  always #50 clk = ~clk;

  initial begin
    repeat (50000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [11:0] re_of(int k); return 12'(k * 37 - 300); endfunction
  function automatic logic [11:0] im_of(int k); return 12'(-k * 21 + 100); endfunction

  // every memory write must carry the sample that was presented
  int expect_k = 0;
  int exp_addr = 0;
  bit check_words = 1;
  always @(posedge clk) if (rst_n) begin
    if (mem_we) begin
      if (check_words) chk(mem_wdata.re == re_of(expect_k) && mem_wdata.im == im_of(expect_k), "sample word");
      chk(int'(mem_addr) == exp_addr, "sample address");
      expect_k <= expect_k + 1;
      nwrites <= nwrites + 1;
    end
    if (adc_start) chk(sh_hold || !adc_sel, "hold during conversion");
    if (mem_we) exp_addr <= exp_addr + 1;
    if (mem_full) begin nfull <= nfull + 1; exp_addr <= 0; end
  end

  // one sample: present inputs, strobe, wait long enough
  task automatic one_sample(int k);
    vin_re = re_of(k); vin_im = im_of(k);
    @(negedge clk);
    sample_tick = 1; @(negedge clk); sample_tick = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int w0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // MAN: continuous, N samples give one memory full
    for (int k = 0; k < N; k++) one_sample(k);
    chk(nwrites == N && nfull == 1, "MAN: N writes, one memory full");
    chk(int'(mem_addr) == 0, "address wraps");
    // cycles per sample: strobe to write
    vin_re = re_of(N); vin_im = im_of(N);
    @(negedge clk); sample_tick = 1; start_t = $time; @(negedge clk); sample_tick = 0;
    while (!mem_we) @(negedge clk);
    sample_cycles = ($time - start_t) / 100;
    chk(sample_cycles == 2 * (4 + 3) + 1, "cycles per sample");
    repeat (20) @(negedge clk);
    expect_k = N + 1;   // keep the checker in step: restart the sequence
    // a strobe during a conversion is dropped
    w0 = nwrites;
    vin_re = re_of(expect_k); vin_im = im_of(expect_k);
    @(negedge clk); sample_tick = 1; @(negedge clk); sample_tick = 1; @(negedge clk); sample_tick = 0;
    repeat (20) @(negedge clk);
    chk(nwrites == w0 + 1, "strobe during conversion dropped");
    // AUTO: no sampling without ext_enable
    start_mode = SM_AUTO;
    w0 = nwrites;
    one_sample(expect_k);
    chk(nwrites == w0, "AUTO gated off");
    ext_enable = 1;
    one_sample(expect_k);
    chk(nwrites == w0 + 1, "AUTO enabled");
    ext_enable = 0;
    // Stop Sampling: early memory full
    start_mode = SM_MAN;
    w0 = nfull;
    for (int k = 0; k < 3; k++) one_sample(expect_k);
    @(negedge clk); stop_sampling = 1; @(negedge clk); stop_sampling = 0;
    repeat (3) @(negedge clk);
    chk(nfull == w0 + 1 && mem_addr == '0, "stop sampling gives memory full");
    // ONE-SHOT: one memory per button press
    start_mode = SM_ONESHOT;
    w0 = nwrites;
    one_sample(expect_k);
    chk(nwrites == w0, "one-shot not armed");
    @(negedge clk); start_btn = 1; @(negedge clk); start_btn = 0;
    w0 = nfull;
    for (int k = 0; k < N + 3; k++) one_sample(expect_k);
    chk(nfull == w0 + 1 && !enabled, "one-shot stops after one memory");
    // over-range: outside -512 .. 511
    start_mode = SM_MAN;
    check_words = 0;
    vin_re = 12'sd600; vin_im = 12'sd10;
    @(negedge clk); sample_tick = 1; @(negedge clk); sample_tick = 0;
    repeat (20) @(negedge clk);
    chk(ovr_re && !ovr_im, "over-range real");
    vin_re = -12'sd513; vin_im = -12'sd512;
    @(negedge clk); sample_tick = 1; @(negedge clk); sample_tick = 0;
    repeat (20) @(negedge clk);
    chk(ovr_re && !ovr_im, "over-range negative");
    vin_re = 12'sd511; vin_im = 12'sd2047;
    @(negedge clk); sample_tick = 1; @(negedge clk); sample_tick = 0;
    repeat (20) @(negedge clk);
    chk(!ovr_re && ovr_im, "in range / over-range imag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
