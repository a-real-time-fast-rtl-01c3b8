// serial_addsub: bit-serial adder/subtractor (one stage of an Am25LS15).
//
// Adds (sub = 0) or subtracts (sub = 1) two bit streams applied LS bit first,
// one bit per enabled clock. Subtraction inverts b and starts with a carry of
// one. first marks the LS bit of a new word and replaces the carry flip-flop
// by the initial carry for that clock. s is combinational.
module serial_addsub (
  input  logic clk,
  input  logic en,
  input  logic first,
  input  logic sub,
  input  logic a,
  input  logic b,
  output logic s
);

  logic c, cin, bb;

  assign cin = first ? sub : c;
  assign bb  = b ^ sub;
  assign s   = a ^ bb ^ cin;

  always_ff @(posedge clk) begin
    if (en) c <= (a & bb) | (a & cin) | (bb & cin);
  end

endmodule
