// sampler: analogue input sequencer (sample-and-hold, A/D, memory write).
//
// On each sample clock strobe (1024 Hz, from the ionosonde time standard) the
// real and imaginary inputs are held (sh_hold) and the A/D converter is
// started on the real input (adc_start with adc_sel = 0). Its end of
// conversion latches the real word and starts the conversion of the
// imaginary input (adc_sel = 1); the second end of conversion latches the
// imaginary word, both are written to the sampler-side memory as one complex
// word and the address is incremented. After N samples mem_full pulses (the
// "memory full" signal that reaches the controller as SB1) and the address
// returns to 0. A pulse on stop_sampling ends the block early (the "Stop
// Sampling" line for shorter transforms): mem_full pulses at the next idle
// cycle with the samples taken so far.
//
// The sample clock is gated by the front panel start mode: MAN samples
// continuously, AUTO while ext_enable is high, ONE-SHOT from a start_btn pulse
// until one memory is full. ovr_re/ovr_im light when the last word converted
// is outside -2**(DW-OVR_BITS) .. 2**(DW-OVR_BITS)-1 (its top OVR_BITS bits
// are not all equal), i.e. the input drives the guard bits.
// The sequence follows the analogue input description; the strobe/pulse
// handshake with the converter, the over-range rule and the reset state are
// this design's choices. A strobe that arrives during a conversion is dropped.
module sampler
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N    = 10,
  parameter int unsigned OVR_BITS = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_tick,
  input  start_mode_e      start_mode,
  input  logic             start_btn,
  input  logic             ext_enable,
  input  logic             stop_sampling,
  // A/D converter
  output logic             sh_hold,
  output logic             adc_start,
  output logic             adc_sel,
  input  logic             adc_eoc,
  input  logic [DW-1:0]    adc_data,
  // sampler memory bus
  output logic [LOG2N-1:0] mem_addr,
  output logic             mem_we,
  output cword_t           mem_wdata,
  output logic             mem_full,
  // front panel
  output logic             ovr_re,
  output logic             ovr_im,
  output logic             enabled
);

  typedef enum logic [1:0] {S_IDLE, S_CONV_RE, S_CONV_IM, S_WRITE} state_e;

  state_e        state;
  logic          armed, stop_req;
  logic [DW-1:0] lat_re, lat_im;

  function automatic logic over_range(input logic [DW-1:0] d);
    return !((&d[DW-1 -: OVR_BITS]) || !(|d[DW-1 -: OVR_BITS]));
  endfunction

  always_comb begin
    unique case (start_mode)
      SM_MAN:     enabled = 1'b1;
      SM_AUTO:    enabled = ext_enable;
      SM_ONESHOT: enabled = armed;
      default:    enabled = 1'b0;
    endcase
  end

  assign mem_we    = (state == S_WRITE);
  assign mem_wdata = '{re: lat_re, im: lat_im};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      armed     <= 1'b0;
      stop_req  <= 1'b0;
      mem_addr  <= '0;
      mem_full  <= 1'b0;
      sh_hold   <= 1'b0;
      adc_start <= 1'b0;
      adc_sel   <= 1'b0;
      lat_re    <= '0;
      lat_im    <= '0;
      ovr_re    <= 1'b0;
      ovr_im    <= 1'b0;
    end else begin
      mem_full  <= 1'b0;
      adc_start <= 1'b0;
      if (start_btn)     armed    <= 1'b1;
      if (stop_sampling) stop_req <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (stop_req && mem_addr != '0) begin
            stop_req <= 1'b0;
            mem_full <= 1'b1;
            mem_addr <= '0;
            if (start_mode == SM_ONESHOT) armed <= 1'b0;
          end else if (stop_req) begin
            stop_req <= 1'b0;
          end else if (sample_tick && enabled) begin
            sh_hold   <= 1'b1;
            adc_start <= 1'b1;
            adc_sel   <= 1'b0;
            state     <= S_CONV_RE;
          end
        end
        S_CONV_RE: if (adc_eoc) begin
          lat_re    <= adc_data;
          ovr_re    <= over_range(adc_data);
          adc_start <= 1'b1;
          adc_sel   <= 1'b1;
          state     <= S_CONV_IM;
        end
        S_CONV_IM: if (adc_eoc) begin
          lat_im  <= adc_data;
          ovr_im  <= over_range(adc_data);
          sh_hold <= 1'b0;
          state   <= S_WRITE;
        end
        S_WRITE: begin
          state    <= S_IDLE;
          mem_addr <= mem_addr + 1'b1;
          if (mem_addr == '1) begin
            mem_full <= 1'b1;
            stop_req <= 1'b0;
            if (start_mode == SM_ONESHOT) armed <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
