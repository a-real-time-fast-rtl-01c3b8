// tb_fft_controller: the controller with the real address generator and
// start-address ROM, N = 16, and a stub arithmetic unit that answers DONE a
// fixed number of clocks after START.
// Full mode: per block it must swap once after SB1, write 2 words per
// butterfly for N/2 x LOG2N butterflies, write N-1 words in the unscramble
// (the DC pair is one word), latch 3N output words with one INT and one R/I
// toggle, and restart from the top of the ROM. The clocks per butterfly are
// checked: the arithmetic time plus 5 control clocks. Test mode: tests 1..4
// must reach start addresses 16, 28, 82 and 60 and repeat their output;
// tests 5..8 must idle.
// Timing: 100-unit clock, events sampled 10 units after the falling edge.
// The routine sequence checked follows the original controller; the clock
// counts are this design's.
module tb_fft_controller;
  import fft_pkg::*;
  localparam int LOG2N = 4;
  localparam int N = 1 << LOG2N;
  localparam int AU_LAT = 19;

  logic clk = 0, rst_n = 0;
  logic [3:0] test_sel = '0;
  logic mem_full = 0, comp_ready = 1;
  logic [7:0] sa_addr;
  logic sa_test, bclk, brs, ag_clr, ag_inc, ag_ab, ag_carry, ckm, sys_we;
  ag_mode_e ag_mode;
  logic [LOG2N-2:0] ag_count;
  logic [$clog2(LOG2N)-1:0] ag_array;
  logic [1:0] wsel;
  logic au_clr, au_scale, ld_a, ld_b, ld_w, au_start, au_done;
  au_mode_e au_mode;
  logic src_power, ri_clr, ri_toggle, ckda, out_int, scope_trig, test_mode, fft_active;
  logic [LOG2N-1:0] addr;
  logic w_adv, w_clr, fft_done;
  logic [2:0] sa_index;

  fft_controller #(.LOG2N(LOG2N)) dut (.*);
  address_generator #(.LOG2N(LOG2N)) u_ag (
    .clk, .rst_n, .clr(ag_clr), .inc(ag_inc), .mode(ag_mode), .ab(ag_ab), .addr,
    .count(ag_count), .array_idx(ag_array), .carry(ag_carry), .w_adv, .w_clr, .fft_done
  );
  start_address_rom u_sa (
    .clk, .rst_n, .test(sa_test), .bclk, .brs, .index(sa_index), .start_addr(sa_addr)
  );

  // stub arithmetic unit
  int au_cnt = -1;
  always_ff @(posedge clk) begin
    au_done <= 1'b0;
    if (au_start) au_cnt <= AU_LAT;
    else if (au_cnt > 1) au_cnt <= au_cnt - 1;
    else if (au_cnt == 1) begin au_cnt <= -1; au_done <= 1'b1; end
  end

  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters, sampled before each rising edge
  int n_ckm, n_bf_we, n_un_we, n_ckda, n_int, n_tog, n_brs, n_dc, n_start, cyc;
  int first_start, last_start;
  task automatic clear_counts();
    n_ckm = 0; n_bf_we = 0; n_un_we = 0; n_ckda = 0; n_int = 0; n_tog = 0;
    n_brs = 0; n_dc = 0; n_start = 0; first_start = -1; last_start = -1;
  endtask
  always @(negedge clk) begin
    #10;
    cyc++;
    if (ckm) n_ckm++;
    if (sys_we && au_mode == AU_BFLY) n_bf_we++;
    if (sys_we && au_mode == AU_UNSCR) n_un_we++;
    if (sys_we && wsel == 2'd2) n_dc++;
    if (ckda) n_ckda++;
    if (out_int) n_int++;
    if (ri_toggle) n_tog++;
    if (brs) n_brs++;
    if (au_start && au_mode == AU_BFLY) begin
      if (first_start < 0) first_start = cyc;
      last_start = cyc;
      n_start++;
    end
  end

  task automatic pulse_full();
    @(negedge clk); mem_full = 1; @(negedge clk); mem_full = 0;
  endtask

  initial begin
    int seen;
    clear_counts();
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    chk(n_ckm == 0, "no swap before memory full");
    for (int blk = 0; blk < 2; blk++) begin
      clear_counts();
      pulse_full();
      wait (n_int == 1);
      // host pauses the DMA for a while
      comp_ready = 0;
      repeat (100) @(negedge clk);
      chk(n_ckda == 0, "stalled by comp_ready");
      comp_ready = 1;
      wait (n_brs > 0);
      repeat (5) @(negedge clk);
      chk(n_ckm == 1, "one swap per block");
      chk(n_bf_we == N * LOG2N, $sformatf("butterfly writes %0d", n_bf_we));
      chk(n_un_we == N - 1, $sformatf("unscramble writes %0d", n_un_we));
      chk(n_dc == 1, "DC word");
      chk(n_ckda == 3 * N, $sformatf("output words %0d", n_ckda));
      chk(n_int == 1, "one INT");
      chk(n_tog == 1, "one R/I toggle");
      chk(n_start == N / 2 * LOG2N, "butterfly starts");
      chk((last_start - first_start) == (n_start - 1) * (AU_LAT + 5),
          $sformatf("clocks per butterfly %0d", (last_start - first_start) / (n_start - 1)));
      chk(sa_addr == 8'h28 && sa_index == 3'd1, "back in init FFT, ROM at the FFT entry");
    end

    // test mode entries
    for (int t = 1; t <= 8; t++) begin
      test_sel = 4'(t);
      rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
      clear_counts();
      repeat (40) @(negedge clk);
      chk(test_mode, "test mode");
      if (t <= 4) begin
        pulse_full();
        seen = 0;
        repeat (20000) begin
          @(negedge clk);
          if (n_ckda >= 2 * N) break;
        end
        chk(n_ckda >= 2 * N, $sformatf("test %0d repeats its output", t));
        case (t)
          1: chk(n_ckm == 1 && n_bf_we == 0, "test 1 memory output");
          2: chk(n_ckm == 1 && n_bf_we == N * LOG2N, "test 2 FFT");
          3: chk(n_ckm == 0 && n_un_we == N - 1, "test 3 unscramble");
          4: chk(n_ckm == 0 && src_power, "test 4 power");
        endcase
      end else begin
        pulse_full();
        repeat (2000) @(negedge clk);
        chk(n_ckda == 0 && n_ckm == 0, $sformatf("test %0d idle", t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
