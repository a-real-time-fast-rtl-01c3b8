// booth_serial_mult: two's complement serial-parallel Booth multiplier.
//
// Behaves like the Am25LS14 serial multiplier: the multiplicand m is held in
// parallel, the multiplier is applied one bit per enabled clock, LS bit first,
// and the product appears one bit per clock, LS bit first. After the MS bit of
// the multiplier the caller keeps applying its sign bit (the job of the sign
// extend shift register), and the product bits continue as the sign-extended
// two's complement product, so no sign correction is needed.
//
// Booth's rule: on the first 1 of a string of multiplier ones the multiplicand
// is subtracted from the partial product, on the first 0 after a string it is
// added; then the partial product is shifted one place towards its LS end and
// the bit shifted out is the product bit of this clock.
//
// Timing: first (asserted with the first multiplier bit) clears the partial
// product and the previous-bit flip-flop for that clock; p is combinational
// from the current multiplier bit and the state, the state updates on the
// clock edge when en is high.
module booth_serial_mult #(
  parameter int unsigned MW = 8
) (
  input  logic                 clk,
  input  logic                 en,      // CK3
  input  logic                 first,   // first bit of a new product
  input  logic signed [MW-1:0] m,       // parallel multiplicand
  input  logic                 b,       // serial multiplier bit
  output logic                 p        // serial product bit
);

  logic signed [MW+1:0] acc, acc_in, t;
  logic                 prev, prev_in;

  always_comb begin
    acc_in  = first ? '0 : acc;
    prev_in = first ? 1'b0 : prev;
    unique case ({b, prev_in})
      2'b10:   t = acc_in - (MW+2)'(m);
      2'b01:   t = acc_in + (MW+2)'(m);
      default: t = acc_in;
    endcase
    p = t[0];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      acc  <= t >>> 1;
      prev <= b;
    end
  end

endmodule
