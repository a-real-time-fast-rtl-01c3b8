// fft_analyser: real-time 1024-point FFT analyser for a two-receiver
// chirp ionosonde.
//
// Two receiver outputs are sampled together at 1024 Hz; receiver 1 becomes
// the real and receiver 2 the imaginary part of one complex time series, so a
// single complex FFT transforms both. While the sampler fills one memory, the
// controller works on the other: a radix-2 decimation-in-time FFT in place
// (ordered input, bit-reversed output, W^P terms from a bit-reversed ROM),
// then the unscramble that separates the two real transforms (receiver 1 in
// frequency words 0..N/2-1, receiver 2 in N/2..N-1), then the power spectrum
// and the real and imaginary words are sent, 8 bits each, to the host
// computer through the output latch (also the D/A display input).
//
// Datapath: memory_switch (two sample_ram), address_generator, wp_rom,
// arithmetic_unit (bit-serial), output_unit; control: sampler (analogue input
// side), start_address_rom and fft_controller (system side).
//
// Interface: the A/D converter and sample-and-hold, the host computer (8-bit
// data, VAL, INT, comp_ready) and the D/A converter are outside; their
// signals are ports. Front panel switches come in as a panel_t struct;
// master reset is rst_n; por_n is the power-on reset, which alone clears
// the memory selection, so that a master reset keeps the memory on the
// system bus and a test can work on the result of the one before. Clocked
// by one system clock (about 10 MHz in RUN);
// sample_tick is a one-cycle strobe per sample period synchronous to it.
// The block structure, the double memory, the data flow and the routine
// sequence follow the original analyser; the port-level handshakes with the
// converters and the host (strobes, comp_ready pacing, VAL one clock after
// the latch) are this design's own.
module fft_analyser
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             por_n,       // power-on reset (memory selection)
  input  panel_t           panel,
  // analogue input
  input  logic             sample_tick,
  input  logic             ext_enable,
  input  logic             stop_sampling,
  output logic             sh_hold,
  output logic             adc_start,
  output logic             adc_sel,
  input  logic             adc_eoc,
  input  logic [DW-1:0]    adc_data,
  output logic             ovr_re,
  output logic             ovr_im,
  // host computer and display
  input  logic             comp_ready,
  output logic [OW-1:0]    out_data,
  output logic             out_val,
  output logic             out_int,
  output logic             scope_trig,
  output logic [7:0]       start_addr,
  output logic             mem_sel,      // memory on the system bus
  output logic             fft_busy,     // FFT or unscramble running
  output logic             sampling,     // sample clock enabled
  output logic             ri_state      // R/I line of the output multiplexer
);

  // sampler side
  logic [LOG2N-1:0] smp_addr;
  logic             smp_we, mem_full;
  cword_t           smp_wdata;

  // system side
  logic [LOG2N-1:0] sys_addr;
  logic             sys_we, ckm;
  logic [1:0]       wsel;
  cword_t           sys_wdata, sys_rdata;

  // address generator and W^P
  logic                     ag_clr, ag_inc, ag_ab, ag_carry, ag_wadv, ag_wclr, ag_done;
  ag_mode_e                 ag_mode;
  logic [LOG2N-2:0]         ag_count, w_addr;
  logic [$clog2(LOG2N)-1:0] ag_array;
  wterm_t                   w;

  // arithmetic
  logic     au_clr, au_scale, ld_a, ld_b, ld_w, au_start, au_busy, au_done;
  au_mode_e au_mode;
  cword_t   out1, out2;
  logic [OW-1:0] power;

  // control
  logic sa_test, bclk, brs, src_power, ri_clr, ri_toggle, ckda, test_mode;
  logic [2:0] sa_index;

  sampler #(.LOG2N(LOG2N)) u_sampler (
    .clk, .rst_n,
    .sample_tick, .start_mode(panel.start_mode), .start_btn(panel.start_btn),
    .ext_enable, .stop_sampling,
    .sh_hold, .adc_start, .adc_sel, .adc_eoc, .adc_data,
    .mem_addr(smp_addr), .mem_we(smp_we), .mem_wdata(smp_wdata), .mem_full,
    .ovr_re, .ovr_im, .enabled(sampling)
  );

  memory_switch #(.LOG2N(LOG2N)) u_mem (
    .clk, .rst_n(por_n), .swap(ckm), .sys_sel(mem_sel),
    .smp_addr, .smp_we, .smp_wdata,
    .sys_addr, .sys_we, .sys_wdata, .sys_rdata
  );

  address_generator #(.LOG2N(LOG2N)) u_ag (
    .clk, .rst_n, .clr(ag_clr), .inc(ag_inc), .mode(ag_mode), .ab(ag_ab),
    .addr(sys_addr), .count(ag_count), .array_idx(ag_array), .carry(ag_carry),
    .w_adv(ag_wadv), .w_clr(ag_wclr), .fft_done(ag_done)
  );

  wp_rom #(.LOG2N(LOG2N)) u_wp (
    .clk, .rst_n, .clr(ag_wclr), .adv(ag_wadv), .waddr(w_addr), .w
  );

  arithmetic_unit u_au (
    .clk, .rst_n, .clr(au_clr), .mode(au_mode), .scale(au_scale),
    .bus_in(sys_rdata), .w_in(w), .ld_a, .ld_b, .ld_w, .start(au_start),
    .busy(au_busy), .done(au_done), .out1, .out2, .power
  );

  // data written back to memory: A*/T(n), B*/S(n), or the combined DC word
  always_comb begin
    unique case (wsel)
      2'd1:    sys_wdata = out2;
      2'd2:    sys_wdata = '{re: out1.re, im: out2.re};
      default: sys_wdata = out1;
    endcase
  end

  start_address_rom u_sa (
    .clk, .rst_n, .test(sa_test), .bclk, .brs, .index(sa_index), .start_addr
  );

  fft_controller #(.LOG2N(LOG2N)) u_ctl (
    .clk, .rst_n, .test_sel(panel.test_sel),
    .mem_full, .comp_ready,
    .sa_addr(start_addr), .sa_test, .bclk, .brs,
    .ag_clr, .ag_inc, .ag_mode, .ag_ab, .ag_carry, .ag_count, .ag_array,
    .ckm, .sys_we, .wsel,
    .au_clr, .au_mode, .au_scale, .ld_a, .ld_b, .ld_w, .au_start, .au_done,
    .src_power, .ri_clr, .ri_toggle, .ckda, .out_int, .scope_trig,
    .test_mode, .fft_active(fft_busy)
  );

  output_unit u_out (
    .clk, .rst_n, .bus(sys_rdata), .power, .src_power,
    .ri_clr, .ri_toggle, .panel_ri_en(test_mode), .panel_ri(panel.ri_sel),
    .ckda, .ri(ri_state), .out_data, .val(out_val)
  );

endmodule
