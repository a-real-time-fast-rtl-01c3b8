// arithmetic_unit: bit-serial complex arithmetic of the analyser.
//
// Three functions share one serial datapath (mode):
//
// AU_BFLY  - the Cooley-Tukey butterfly A* = A + BW, B* = A - BW. The real and
//   imaginary parts of B are shifted LS bit first (sign extended after their
//   MS bit) into four Booth serial multipliers holding W parallel:
//   BR*WR, BI*WI, BR*WI, BI*WR. Two central serial adders form
//   BR*WR - BI*WI and BR*WI + BI*WR at full precision. Because +1 in W is 64,
//   the first 6 bits of these sums are fractions: the final adders and the A
//   registers are not clocked until they have passed, which truncates the
//   product (floor) before A is added. Four final adder/subtractors then give
//   the 13-bit A +/- BW, which the output shift registers keep either as the
//   12 LS bits or, with scale, divided by two (floor).
// AU_UNSCR - separation of two real transforms held as X = T + jS. With A the
//   word of frequency n and B the word of N-n, the multipliers are bypassed
//   (multiplexed output-register inputs) and the final adders give
//   out1 = ((Rn+Rm)/2, (In-Im)/2) = T(n), out2 = ((In+Im)/2, (Rm-Rn)/2) = S(n),
//   all divided by two with floor.
// AU_POWER - power spectrum. LD2 loads W with the middle 8 bits of the data
//   word on the bus (instead of the W^P ROM) and B with the full word; the
//   central real adder is switched from subtract to add, giving
//   S = R*R8 + I*I8, about 4*(R8^2 + I8^2). power = S >> PWR_SHIFT, saturated
//   to 8 bits unsigned.
//
// Interface: ld_a (LD3), ld_b (LD1) load the bus word into the A and B
// registers, ld_w (LD2) loads W, start begins the serial run (CK1/CK3 clocks
// internally counted), done pulses one cycle after the last serial clock and
// busy is high during the run. clr (CL1) aborts a run.
// Timing: 19 serial clocks for a butterfly, 13 for unscramble, 21 for power.
// Assertions check that no start or operand load arrives during a run.
// The serial structure follows the design's arithmetic unit; the internal bit
// counter replacing the microprogrammed clock loop, the unscramble sign
// arrangement and PWR_SHIFT are this design's own.
module arithmetic_unit
  import fft_pkg::*;
#(
  parameter int unsigned PWR_SHIFT = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  au_mode_e      mode,
  input  logic          scale,      // divide butterfly results by 2
  input  cword_t        bus_in,     // system data bus
  input  wterm_t        w_in,       // W^P ROM output
  input  logic          ld_a,
  input  logic          ld_b,
  input  logic          ld_w,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output cword_t        out1,       // A* (butterfly) or T(n) (unscramble)
  output cword_t        out2,       // B* (butterfly) or S(n) (unscramble)
  output logic [OW-1:0] power
);

  localparam int unsigned RW = DW + 1;          // result bits before scaling
  localparam int unsigned PW = DW + WW + 1;     // power sum bits
  localparam int unsigned JW = $clog2(PW + WFRAC + 1);

  logic signed [DW-1:0] a_re, a_im, b_re, b_im;
  wterm_t               w;
  logic [JW-1:0]        j, ncyc, tskip;
  logic                 run_scale;
  logic [RW-1:0]        r_ar, r_ai, r_br, r_bi;
  logic [PW-1:0]        r_pw;

  // serial bit streams
  logic p1, p2, p3, p4, c_re, c_im, bw_re, bw_im;
  logic s_ar, s_ai, s_br, s_bi;
  logic mul_first, fin_first, fin_en, unscr;

  assign unscr     = (mode == AU_UNSCR);
  assign ncyc      = (mode == AU_POWER) ? JW'(PW) : unscr ? JW'(RW) : JW'(WFRAC + RW);
  assign tskip     = unscr ? '0 : JW'(WFRAC);
  assign mul_first = busy && (j == '0);
  assign fin_first = busy && (j == tskip);
  assign fin_en    = busy && (j >= tskip) && (j < tskip + JW'(RW));

  // ---- operand registers (the B and A registers shift during a run) ----
  always_ff @(posedge clk) begin
    if (ld_a) begin
      a_re <= bus_in.re;
      a_im <= bus_in.im;
    end else if (fin_en) begin
      a_re <= a_re >>> 1;
      a_im <= a_im >>> 1;
    end
    if (ld_b) begin
      b_re <= bus_in.re;
      b_im <= bus_in.im;
    end else if (busy) begin
      b_re <= b_re >>> 1;
      b_im <= b_im >>> 1;
    end
    if (ld_w) begin
      if (mode == AU_POWER) w <= '{re: out_bits(bus_in.re), im: out_bits(bus_in.im)};
      else                  w <= w_in;
    end
  end

  // ---- multipliers ----
  booth_serial_mult #(.MW(WW)) u_m1 (.clk, .en(busy), .first(mul_first), .m(w.re), .b(b_re[0]), .p(p1));
  booth_serial_mult #(.MW(WW)) u_m2 (.clk, .en(busy), .first(mul_first), .m(w.im), .b(b_im[0]), .p(p2));
  booth_serial_mult #(.MW(WW)) u_m3 (.clk, .en(busy), .first(mul_first), .m(w.im), .b(b_re[0]), .p(p3));
  booth_serial_mult #(.MW(WW)) u_m4 (.clk, .en(busy), .first(mul_first), .m(w.re), .b(b_im[0]), .p(p4));

  // ---- central adders: real part subtracts, except for the power spectrum ----
  serial_addsub u_c_re (.clk, .en(busy), .first(mul_first), .sub(mode != AU_POWER),
                        .a(p1), .b(p2), .s(c_re));
  serial_addsub u_c_im (.clk, .en(busy), .first(mul_first), .sub(1'b0),
                        .a(p3), .b(p4), .s(c_im));

  // Unscramble bypasses the multipliers.
  assign bw_re = unscr ? b_re[0] : c_re;
  assign bw_im = unscr ? b_im[0] : c_im;

  // ---- final adders ----
  serial_addsub u_f_ar (.clk, .en(fin_en), .first(fin_first), .sub(1'b0),
                        .a(a_re[0]), .b(bw_re), .s(s_ar));
  serial_addsub u_f_ai (.clk, .en(fin_en), .first(fin_first), .sub(1'b0),
                        .a(a_im[0]), .b(bw_im), .s(s_ai));
  serial_addsub u_f_br (.clk, .en(fin_en), .first(fin_first), .sub(1'b1),
                        .a(unscr ? bw_re : a_re[0]), .b(unscr ? a_re[0] : bw_re), .s(s_br));
  serial_addsub u_f_bi (.clk, .en(fin_en), .first(fin_first), .sub(1'b1),
                        .a(a_im[0]), .b(bw_im), .s(s_bi));

  // ---- sequencing and output shift registers ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      j         <= '0;
      run_scale <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clr) begin
        busy <= 1'b0;
        j    <= '0;
      end else if (start && !busy) begin
        busy      <= 1'b1;
        j         <= '0;
        run_scale <= scale || unscr;
      end else if (busy) begin
        if (j == ncyc - 1'b1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        j <= j + 1'b1;
      end
    end
  end

  // Handshake rule: no new start and no operand load during a run (the
  // operand registers are shifting then). busy is clear during reset.
  always_ff @(posedge clk) begin
    if (busy && !clr) begin
      assert (!start) else $error("arithmetic_unit: start while busy");
      assert (!(ld_a || ld_b || ld_w)) else $error("arithmetic_unit: operand load while busy");
    end
  end

  always_ff @(posedge clk) begin
    if (fin_en) begin
      r_ar <= {s_ar, r_ar[RW-1:1]};
      r_ai <= {s_ai, r_ai[RW-1:1]};
      r_br <= {s_br, r_br[RW-1:1]};
      r_bi <= {s_bi, r_bi[RW-1:1]};
    end
    if (busy) r_pw <= {c_re, r_pw[PW-1:1]};
  end

  function automatic logic [DW-1:0] fin(input logic [RW-1:0] r, input logic sc);
    return sc ? r[RW-1:1] : r[DW-1:0];
  endfunction

  cword_t res_a, res_b;
  assign res_a = '{re: fin(r_ar, run_scale), im: fin(r_ai, run_scale)};
  assign res_b = '{re: fin(r_br, run_scale), im: fin(r_bi, run_scale)};

  always_comb begin
    if (unscr) begin
      out1 = '{re: res_a.re, im: res_b.im};
      out2 = '{re: res_a.im, im: res_b.re};
    end else begin
      out1 = res_a;
      out2 = res_b;
    end
  end

  logic [PW-1:0] pw_shift;
  assign pw_shift = r_pw >> PWR_SHIFT;
  assign power    = (r_pw[PW-1] == 1'b1) ? '0 :
                    (|pw_shift[PW-1:OW]) ? '1 : pw_shift[OW-1:0];

endmodule
