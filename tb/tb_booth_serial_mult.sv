// tb_booth_serial_mult: random and corner 8-bit x 12-bit products, the
// multiplier fed LS bit first and sign extended, the serial product compared
// with the integer product over 24 bits.
// One product per run of 24 serial clocks, inputs on the falling edge and
// each product bit read just after. The serial LS-first interface follows the multiplier chip it
// stands for.
module tb_booth_serial_mult;
  logic clk = 0, en = 0, first = 0, b = 0, p;
  logic signed [7:0] m;
  int checks = 0, failures = 0;

  booth_serial_mult #(.MW(8)) dut (.clk, .en, .first, .m, .b, .p);

  always #50 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic signed [7:0] mm, logic signed [11:0] bb);
    logic signed [23:0] want;
    logic [23:0] got;
    logic signed [23:0] bx;
    bx = 24'(bb);
    want = 24'(mm) * bx;
    m = mm;
    for (int i = 0; i < 24; i++) begin
      @(negedge clk);
      en = 1; first = (i == 0); b = bx[i];
      #1 got[i] = p;
    end
    @(negedge clk);
    en = 0; first = 0;
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("m=%0d b=%0d got %0d want %0d", mm, bb, $signed(got), want);
    end
  endtask

  initial begin
    run(8'sd64, 12'sd1);
    run(-8'sd128, -12'sd2048);
    run(8'sd127, 12'sd2047);
    run(-8'sd64, 12'sd1000);
    run(8'sd0, -12'sd5);
    for (int t = 0; t < 300; t++) run(8'($urandom), 12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
